// clau_lq_snoop: load-queue snoop filter for invalidations under CLAU.
//
// Under x86-TSO a speculative load whose line is invalidated (or evicted, or
// downgraded) before it commits must be squashed. A load that has sent its
// access keeps its line address in the load queue, and every loss of
// permission snoops the queue by line address. CLAU adds one exception: a
// cache-locking RMW load (`ldstl`) that has not yet received its data is not
// squashed, because once it does read the line it will hold the lock and no
// other core can change the data after that. A cache-locking RMW that has
// already executed but whose line is no longer locked (for instance after the
// watchdog fired) is squashed as usual.
//
// Per entry: valid, issued (line address known), executed (data returned),
// locking flag, line address. Entries are addressed by the core's LQ index.
// `snoop_*` is combinational: `squash_vec` marks every entry to squash,
// `squash_oldest` is the first of them in age order starting from `head`,
// `spared_any` says a not-yet-executed locking load was kept alive.
// The rule follows the document; issuing vs. executing as two separate
// events and the age search from `head` are this design's own choices.
module clau_lq_snoop
  import clau_pkg::*;
#(
  parameter int unsigned ENTRIES = LQ_ENTRIES_DEF,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // dispatch
  input  logic               alloc_valid,
  input  logic [IDX_W-1:0]   alloc_idx,
  input  logic               alloc_lock,    // ldstl of a cache-locking RMW
  // address generated, access sent to the L1D
  input  logic               issue_valid,
  input  logic [IDX_W-1:0]   issue_idx,
  input  line_addr_t         issue_line,
  // data returned (load executed)
  input  logic               exe_valid,
  input  logic [IDX_W-1:0]   exe_idx,
  // commit and squash: entry leaves; re-execution: entry restarts
  input  logic               free_valid,    // commit
  input  logic [IDX_W-1:0]   free_idx,
  input  logic               kill_valid,    // squash
  input  logic [IDX_W-1:0]   kill_idx,
  input  logic               reexec_valid,  // clears issued/executed, keeps entry
  input  logic [IDX_W-1:0]   reexec_idx,
  // oldest entry, for age ordering of the squash
  input  logic [IDX_W-1:0]   head,
  // snoop by a loss of permission (invalidation, downgrade, eviction)
  input  logic               snoop_valid,
  input  line_addr_t         snoop_line,
  output logic [ENTRIES-1:0] squash_vec,
  output logic               squash_any,
  output logic [IDX_W-1:0]   squash_oldest,
  output logic               spared_any
);

  logic [ENTRIES-1:0] valid_q, issued_q, exec_q, lock_q;
  line_addr_t         line_q [ENTRIES];

  logic [ENTRIES-1:0] match, spared;
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      match[i]      = snoop_valid && valid_q[i] && issued_q[i] && (line_q[i] == snoop_line);
      squash_vec[i] = match[i] && (!lock_q[i] || exec_q[i]);
      spared[i]     = match[i] && lock_q[i] && !exec_q[i];
    end
  end
  assign squash_any = |squash_vec;
  assign spared_any = |spared;

  // first squashed entry at or after `head`, wrapping round
  always_comb begin
    logic found;
    logic [31:0] j;
    found         = 1'b0;
    squash_oldest = '0;
    for (int unsigned k = 0; k < ENTRIES; k++) begin
      j = (32'(head) + k) % ENTRIES;
      if (!found && squash_vec[j]) begin
        found         = 1'b1;
        squash_oldest = IDX_W'(j);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      issued_q <= '0;
      exec_q   <= '0;
      lock_q   <= '0;
      for (int i = 0; i < ENTRIES; i++) line_q[i] <= '0;
    end else begin
      if (alloc_valid) begin
        valid_q[alloc_idx]  <= 1'b1;
        issued_q[alloc_idx] <= 1'b0;
        exec_q[alloc_idx]   <= 1'b0;
        lock_q[alloc_idx]   <= alloc_lock;
      end
      if (issue_valid) begin
        issued_q[issue_idx] <= 1'b1;
        line_q[issue_idx]   <= issue_line;
      end
      if (exe_valid) exec_q[exe_idx] <= 1'b1;
      if (reexec_valid) begin
        issued_q[reexec_idx] <= 1'b0;
        exec_q[reexec_idx]   <= 1'b0;
      end
      if (free_valid) begin
        valid_q[free_idx]  <= 1'b0;
        issued_q[free_idx] <= 1'b0;
        exec_q[free_idx]   <= 1'b0;
      end
      if (kill_valid) begin
        valid_q[kill_idx]  <= 1'b0;
        issued_q[kill_idx] <= 1'b0;
        exec_q[kill_idx]   <= 1'b0;
      end
    end
  end

endmodule
