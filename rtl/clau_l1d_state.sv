// clau_l1d_state: L1 data-cache tag and coherence-state array with the
// Locked state that hardware cache locking relies on.
//
// Each line holds a tag, a MESI state extended with L (Locked) and a dirty
// bit. A line can only become Locked from a state with write permission
// (E or M): the ldstl of a cache-locking RMW reads the line and locks it. The
// store micro-op that writes the line returns it to M when it carries the
// unlock responsibility, or leaves it Locked (and dirty) when it is an earlier
// member of a lock chain. A squash or re-execution releases the lock back to
// exclusive (E, or M if the line was already dirty), and the watchdog's
// `force_unlock_all` does the same for every line at once.
// While a line is Locked, external invalidations and downgrades are refused
// (`ext_stall`): the requester keeps the request and retries. The replacement
// policy never evicts a Locked line, and a lock is refused if it would leave
// no unlocked way in the set, so a fill always finds a victim.
//
// Interface: one operation per cycle on `op`/`op_line` (see clau_pkg::l1_op_t).
// The lookup and all responses are combinational in that cycle; the state
// changes on the next clock edge. Data storage is not modelled: only what
// CLAU reads and changes.
// Geometry (48 KB, 12 ways) and the lock/unlock/stall/replacement rules follow
// the document. The 64-byte line, the dirty bit, the round-robin base
// replacement and the refuse-and-retry stall are this design's own choices.
module clau_l1d_state
  import clau_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = L1D_BYTES_DEF,
  parameter int unsigned WAYS       = L1D_WAYS_DEF,
  localparam int unsigned SETS      = SIZE_BYTES / (WAYS * (1 << LINE_OFF_W)),
  localparam int unsigned SET_W     = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W     = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned TAG_W     = LINE_ADDR_W - SET_W
) (
  input  logic        clk,
  input  logic        rst_n,
  input  l1_op_t      op,
  input  line_addr_t  op_line,
  input  logic        op_unlock,       // L1_WRITE: the store releases the lock
  input  cstate_t     op_fill_state,   // L1_FILL: S, E or M granted by the directory
  input  logic        force_unlock_all,// watchdog
  // lookup of op_line
  output logic        hit,
  output cstate_t     hit_state,
  // L1_LOCK
  output logic        lock_granted,
  // L1_WRITE
  output logic        write_hit,       // store found write permission
  // L1_INV / L1_DOWN
  output logic        ext_stall,       // refused: the line is Locked
  output logic        ext_dirty,       // data must be supplied / written back
  output logic        ext_done,        // request carried out
  // L1_FILL
  output logic        evict_valid,
  output line_addr_t  evict_line,
  output logic        evict_dirty,
  // status
  output logic        any_locked,
  output logic [$clog2(SETS*WAYS+1)-1:0] locked_count
);

  initial begin
    assert (SETS * WAYS * (1 << LINE_OFF_W) == SIZE_BYTES && (1 << SET_W) == SETS)
      else $error("clau_l1d_state: size must give a power-of-two set count");
  end

  logic [TAG_W-1:0] tag_q   [SETS][WAYS];
  cstate_t          state_q [SETS][WAYS];
  logic             dirty_q [SETS][WAYS];
  logic [WAY_W-1:0] rr_q    [SETS];

  logic [SET_W-1:0] set_i;
  logic [TAG_W-1:0] tag_i;
  assign set_i = op_line[SET_W-1:0];
  assign tag_i = op_line[LINE_ADDR_W-1:SET_W];

  // ---- lookup ----
  logic [WAY_W-1:0] hit_way;
  int unsigned      set_locked;
  always_comb begin
    hit        = 1'b0;
    hit_way    = '0;
    hit_state  = ST_I;
    set_locked = 0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (state_q[set_i][w] == ST_L) set_locked++;
      if (state_q[set_i][w] != ST_I && tag_q[set_i][w] == tag_i) begin
        hit       = 1'b1;
        hit_way   = WAY_W'(w);
        hit_state = state_q[set_i][w];
      end
    end
  end

  // ---- victim: an invalid way first, else the first unlocked way from rr ----
  logic [WAY_W-1:0] vic_way;
  logic             vic_found, inv_found;
  always_comb begin
    int unsigned j;
    vic_way   = '0;
    vic_found = 1'b0;
    inv_found = 1'b0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (!inv_found && state_q[set_i][w] == ST_I) begin
        inv_found = 1'b1;
        vic_way   = WAY_W'(w);
      end
    end
    vic_found = inv_found;
    for (int unsigned k = 0; k < WAYS; k++) begin
      j = (32'(rr_q[set_i]) + k) % WAYS;
      if (!vic_found && state_q[set_i][j] != ST_L) begin
        vic_found = 1'b1;
        vic_way   = WAY_W'(j);
      end
    end
  end

  // ---- responses ----
  assign lock_granted = (op == L1_LOCK) && hit &&
                        (hit_state == ST_E || hit_state == ST_M) &&
                        (set_locked < WAYS - 1);
  assign write_hit    = (op == L1_WRITE) && hit && has_write_perm(hit_state);
  assign ext_stall    = (op == L1_INV || op == L1_DOWN) && hit && hit_state == ST_L;
  assign ext_done     = (op == L1_INV || op == L1_DOWN) && !ext_stall;
  assign ext_dirty    = ext_done && hit && dirty_q[set_i][hit_way];
  assign evict_valid  = (op == L1_FILL) && !hit && !inv_found && vic_found;
  assign evict_line   = {tag_q[set_i][vic_way], set_i};
  assign evict_dirty  = evict_valid && dirty_q[set_i][vic_way];

  // ---- status over the whole array ----
  always_comb begin
    locked_count = '0;
    for (int unsigned s = 0; s < SETS; s++)
      for (int unsigned w = 0; w < WAYS; w++)
        if (state_q[s][w] == ST_L) locked_count++;
  end
  assign any_locked = (locked_count != '0);

  // ---- update ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) begin
        rr_q[s] <= '0;
        for (int unsigned w = 0; w < WAYS; w++) begin
          tag_q[s][w]   <= '0;
          state_q[s][w] <= ST_I;
          dirty_q[s][w] <= 1'b0;
        end
      end
    end else begin
      if (force_unlock_all) begin
        for (int unsigned s = 0; s < SETS; s++)
          for (int unsigned w = 0; w < WAYS; w++)
            if (state_q[s][w] == ST_L) state_q[s][w] <= dirty_q[s][w] ? ST_M : ST_E;
      end
      unique case (op)
        L1_LOCK: if (lock_granted) state_q[set_i][hit_way] <= ST_L;
        L1_WRITE: if (write_hit) begin
          dirty_q[set_i][hit_way] <= 1'b1;
          if (hit_state == ST_L && !op_unlock && !force_unlock_all)
            state_q[set_i][hit_way] <= ST_L;
          else
            state_q[set_i][hit_way] <= ST_M;
        end
        L1_UNLOCK: if (hit && hit_state == ST_L)
          state_q[set_i][hit_way] <= dirty_q[set_i][hit_way] ? ST_M : ST_E;
        L1_INV: if (hit && !ext_stall) begin
          state_q[set_i][hit_way] <= ST_I;
          dirty_q[set_i][hit_way] <= 1'b0;
        end
        L1_DOWN: if (hit && !ext_stall) begin
          state_q[set_i][hit_way] <= ST_S;
          dirty_q[set_i][hit_way] <= 1'b0;
        end
        L1_FILL: begin
          if (hit) begin
            // upgrade of a line already present (e.g. S -> E/M)
            if (hit_state != ST_L) state_q[set_i][hit_way] <= op_fill_state;
          end else if (vic_found) begin
            tag_q[set_i][vic_way]   <= tag_i;
            state_q[set_i][vic_way] <= op_fill_state;
            dirty_q[set_i][vic_way] <= (op_fill_state == ST_M);
            rr_q[set_i]             <= (32'(vic_way) + 1 == WAYS) ? '0 : vic_way + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  // A fill only brings a line in with a MESI state, never Locked.
  always_ff @(posedge clk) begin
    if (rst_n && op == L1_FILL)
      assert (op_fill_state inside {ST_S, ST_E, ST_M})
        else $error("clau_l1d_state: fill with state %0d", op_fill_state);
  end

endmodule
