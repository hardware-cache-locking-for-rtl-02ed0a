// clau_top: one core's CLAU unit (cache locking for all updates).
//
// Non-atomic read-modify-write instructions (RMWs) normally read their line
// with write permission but can lose it to another core before the store
// writes, which squashes the RMW or makes its store miss. This unit gives every
// non-atomic RMW the line lock that atomic RMWs already use, while the RMWs
// keep running speculatively and in parallel:
//   * the decoder emits ldstl/stul instead of ldst/st (clau_uop_xform);
//   * the ldstl locks its L1D line when it reads it with write permission
//     (clau_l1d_state), unless its data came from store-to-load forwarding
//     (LOCK_ON_FWD = 0, the document's best setting) or it joins a chain;
//   * RMWs to an already locked line join its lock chain, up to CHAIN_LEN of
//     them, and only the last store of the chain unlocks (clau_sq_chain);
//   * invalidations and downgrades of Locked lines are refused and retried;
//     a loss of permission squashes matching loads except cache-locking RMWs
//     that have not read their data yet (clau_lq_snoop);
//   * a squash or re-execution releases the lock of the RMW that holds it;
//   * a timer releases all locks when no store has written the L1D for
//     WD_THRESH cycles while a line is locked (clau_watchdog).
//
// Interface: every request channel is valid/ready with the responses
// combinational in the cycle it is accepted. The L1D tag/state array does one
// operation per cycle; a fixed-priority arbiter grants, in order: squash or
// re-execution, store write, ldstl/load execution, external request, fill.
// The core, its LQ/SQ data, the store buffer and the cache hierarchy are
// outside; entry indices are the core's own LQ and SQ indices.
// The mechanisms and default sizes follow the document; the channel
// structure, the arbiter and the refuse-and-retry handling of external
// requests are this design's own.
module clau_top
  import clau_pkg::*;
#(
  parameter int unsigned DECODE_W    = 6,
  parameter int unsigned L1D_BYTES   = L1D_BYTES_DEF,
  parameter int unsigned L1D_WAYS    = L1D_WAYS_DEF,
  parameter int unsigned LQ_ENTRIES  = LQ_ENTRIES_DEF,
  parameter int unsigned SQ_ENTRIES  = SQ_ENTRIES_DEF,
  parameter int unsigned CHAIN_LEN   = CHAIN_LEN_DEF,
  parameter int unsigned WD_W        = WD_W_DEF,
  parameter int unsigned WD_THRESH   = WD_THRESH_DEF,
  parameter bit          LOCK_ON_FWD = 1'b0,
  localparam int unsigned LQ_W = (LQ_ENTRIES > 1) ? $clog2(LQ_ENTRIES) : 1,
  localparam int unsigned SQ_W = (SQ_ENTRIES > 1) ? $clog2(SQ_ENTRIES) : 1,
  localparam int unsigned CL_W = (CHAIN_LEN > 1) ? $clog2(CHAIN_LEN) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clau_en,
  // ---- decode ----
  input  logic [DECODE_W-1:0] dec_valid,
  input  uop_t                dec_uop        [DECODE_W],
  input  logic [DECODE_W-1:0] dec_rmw,
  input  logic [DECODE_W-1:0] dec_atomic,
  output logic [DECODE_W-1:0] dec_out_valid,
  output uop_t                dec_out_uop    [DECODE_W],
  output logic [DECODE_W-1:0] dec_out_lock,
  // ---- dispatch ----
  input  logic                ld_alloc_valid,
  input  logic [LQ_W-1:0]     ld_alloc_idx,
  input  logic                ld_alloc_lock,   // ldstl
  input  logic                st_alloc_valid,
  input  logic [SQ_W-1:0]     st_alloc_idx,
  // ---- load address sent to the L1D ----
  input  logic                ld_issue_valid,
  input  logic [LQ_W-1:0]     ld_issue_idx,
  input  paddr_t              ld_issue_addr,
  // ---- load execution (data read) ----
  input  logic                exe_valid,
  output logic                exe_ready,
  input  logic [LQ_W-1:0]     exe_lq_idx,
  input  logic [SQ_W-1:0]     exe_sq_idx,     // paired store of an RMW
  input  paddr_t              exe_addr,
  input  logic                exe_lock_req,   // ldstl of a cache-locking RMW
  input  logic                exe_fwd,        // data came by store-to-load forwarding
  output logic                exe_miss,       // no write permission: refetch, replay
  output logic                exe_locked,     // RMW now holds the line lock
  output logic                exe_new_lock,   // ... by locking it in the L1D
  output logic                exe_chained,    // ... by joining a lock chain
  output logic                exe_overflow,   // chain full: RMW runs unlocked
  output logic [CL_W-1:0]     exe_cl,
  // ---- store buffer head writes the L1D ----
  input  logic                wr_valid,
  output logic                wr_ready,
  input  logic [SQ_W-1:0]     wr_sq_idx,
  input  paddr_t              wr_addr,
  output logic                wr_miss,        // store miss: no write permission
  output logic                wr_unlocked,    // this store released the line
  // ---- commit of a load ----
  input  logic                ld_commit_valid,
  input  logic [LQ_W-1:0]     ld_commit_idx,
  input  logic [LQ_W-1:0]     lq_head,
  // ---- local squash / re-execution of one RMW ----
  input  logic                sq_valid,
  output logic                sq_ready,
  input  logic [LQ_W-1:0]     sq_lq_idx,
  input  logic [SQ_W-1:0]     sq_sq_idx,
  input  logic                sq_reexec,      // re-execution: entries stay
  output logic                sq_unlocked,
  // ---- external coherence request ----
  input  logic                ext_valid,
  output logic                ext_ready,
  input  paddr_t              ext_addr,
  input  logic                ext_downgrade,  // 0: invalidation, 1: downgrade
  output logic                ext_stall,      // refused (line Locked): retry
  output logic                ext_done,
  output logic                ext_dirty,
  // ---- fill from the next level ----
  input  logic                fill_valid,
  output logic                fill_ready,
  input  paddr_t              fill_addr,
  input  cstate_t             fill_state,
  output logic                evict_valid,
  output line_addr_t          evict_line,
  output logic                evict_dirty,
  // ---- pipeline squash request caused by a loss of permission ----
  output logic                lq_squash,
  output logic [LQ_W-1:0]     lq_squash_idx,
  output logic                lq_spared,      // a not-yet-executed ldstl was kept
  // ---- status ----
  output logic                any_locked,
  output logic                wd_fire
);

  // ---------------- decode transformation ----------------
  clau_uop_xform #(.DECODE_W(DECODE_W)) u_xform (
    .clau_en           (clau_en),
    .in_valid          (dec_valid),
    .in_uop            (dec_uop),
    .in_rmw            (dec_rmw),
    .in_atomic         (dec_atomic),
    .out_valid         (dec_out_valid),
    .out_uop           (dec_out_uop),
    .out_nonatomic_lock(dec_out_lock)
  );

  // ---------------- L1D arbiter ----------------
  typedef enum logic [2:0] {G_NONE, G_SQ, G_WR, G_EXE, G_EXT, G_FILL} grant_t;
  grant_t grant;
  always_comb begin
    if      (sq_valid)   grant = G_SQ;
    else if (wr_valid)   grant = G_WR;
    else if (exe_valid)  grant = G_EXE;
    else if (ext_valid)  grant = G_EXT;
    else if (fill_valid) grant = G_FILL;
    else                 grant = G_NONE;
  end
  assign sq_ready   = (grant == G_SQ);
  assign wr_ready   = (grant == G_WR);
  assign exe_ready  = (grant == G_EXE);
  assign ext_ready  = (grant == G_EXT);
  assign fill_ready = (grant == G_FILL);

  // ---------------- sub-block wiring ----------------
  l1_op_t     l1_op;
  line_addr_t l1_line;
  logic       l1_hit, l1_lock_granted, l1_write_hit;
  cstate_t    l1_state;
  logic       l1_ext_stall, l1_ext_dirty, l1_ext_done;
  logic       l1_evict_valid, l1_evict_dirty;
  line_addr_t l1_evict_line;

  logic       sqc_need_lock, sqc_chained, sqc_overflow, sqc_wr_unlock, sqc_sq_unlock;
  logic [CL_W-1:0] sqc_new_cl;
  line_addr_t sqc_sq_line;
  logic       force_unlock;

  // Does this execution still ask for a lock?
  logic exe_fire, exe_perm, exe_lock_en;
  assign exe_fire    = exe_ready;
  assign exe_perm    = l1_hit && has_write_perm(l1_state);
  // A forwarded RMW locks only with LOCK_ON_FWD and only if it already has
  // write permission; otherwise it runs as a baseline RMW.
  assign exe_lock_en = exe_lock_req && (!exe_fwd || (LOCK_ON_FWD && exe_perm));
  // A non-forwarded RMW load needs the line with write permission, a plain
  // load only needs it present.
  assign exe_miss    = exe_fire && !exe_fwd && (exe_lock_req ? !exe_perm : !l1_hit);

  logic exe_go;  // execution completes this cycle
  assign exe_go = exe_fire && !exe_miss;

  always_comb begin
    l1_op   = L1_NOP;
    l1_line = '0;
    unique case (grant)
      G_SQ:   begin l1_op = sqc_sq_unlock ? L1_UNLOCK : L1_NOP; l1_line = sqc_sq_line; end
      G_WR:   begin l1_op = L1_WRITE; l1_line = line_of(wr_addr); end
      G_EXE:  begin l1_op = (exe_go && sqc_need_lock) ? L1_LOCK : L1_NOP;
                    l1_line = line_of(exe_addr); end
      G_EXT:  begin l1_op = ext_downgrade ? L1_DOWN : L1_INV; l1_line = line_of(ext_addr); end
      G_FILL: begin l1_op = L1_FILL; l1_line = line_of(fill_addr); end
      default: ;
    endcase
  end

  clau_l1d_state #(.SIZE_BYTES(L1D_BYTES), .WAYS(L1D_WAYS)) u_l1d (
    .clk             (clk),
    .rst_n           (rst_n),
    .op              (l1_op),
    .op_line         (l1_line),
    .op_unlock       (sqc_wr_unlock),
    .op_fill_state   (fill_state),
    .force_unlock_all(force_unlock),
    .hit             (l1_hit),
    .hit_state       (l1_state),
    .lock_granted    (l1_lock_granted),
    .write_hit       (l1_write_hit),
    .ext_stall       (l1_ext_stall),
    .ext_dirty       (l1_ext_dirty),
    .ext_done        (l1_ext_done),
    .evict_valid     (l1_evict_valid),
    .evict_line      (l1_evict_line),
    .evict_dirty     (l1_evict_dirty),
    .any_locked      (any_locked),
    .locked_count    ()
  );

  logic wr_go;
  assign wr_go = wr_ready && l1_write_hit;

  clau_sq_chain #(.ENTRIES(SQ_ENTRIES), .CHAIN_LEN(CHAIN_LEN)) u_sq (
    .clk             (clk),
    .rst_n           (rst_n),
    .alloc_valid     (st_alloc_valid),
    .alloc_idx       (st_alloc_idx),
    .exe_valid       (exe_go && exe_lock_req),
    .exe_idx         (exe_sq_idx),
    .exe_line        (line_of(exe_addr)),
    .exe_lock_en     (exe_lock_en),
    .exe_lock_granted(l1_lock_granted),
    .exe_need_lock   (sqc_need_lock),
    .exe_chained     (sqc_chained),
    .exe_overflow    (sqc_overflow),
    .exe_new_cl      (sqc_new_cl),
    .wr_valid        (wr_go),
    .wr_idx          (wr_sq_idx),
    .wr_unlock       (sqc_wr_unlock),
    .sq_valid        (sq_ready),
    .sq_idx          (sq_sq_idx),
    .sq_keep         (sq_reexec),
    .sq_unlock       (sqc_sq_unlock),
    .sq_line         (sqc_sq_line),
    .force_clear     (force_unlock),
    .resp_vec        (),
    .cl_of           ()
  );

  // Loss of permission seen by the load queue: an invalidation or downgrade
  // that was carried out, or the eviction caused by a fill.
  logic       snoop_valid;
  line_addr_t snoop_line;
  assign snoop_valid = (ext_ready && l1_ext_done) || (fill_ready && l1_evict_valid);
  assign snoop_line  = ext_ready ? line_of(ext_addr) : l1_evict_line;

  clau_lq_snoop #(.ENTRIES(LQ_ENTRIES)) u_lq (
    .clk          (clk),
    .rst_n        (rst_n),
    .alloc_valid  (ld_alloc_valid),
    .alloc_idx    (ld_alloc_idx),
    .alloc_lock   (ld_alloc_lock),
    .issue_valid  (ld_issue_valid),
    .issue_idx    (ld_issue_idx),
    .issue_line   (line_of(ld_issue_addr)),
    .exe_valid    (exe_go),
    .exe_idx      (exe_lq_idx),
    .free_valid   (ld_commit_valid),
    .free_idx     (ld_commit_idx),
    .kill_valid   (sq_ready && !sq_reexec),
    .kill_idx     (sq_lq_idx),
    .reexec_valid (sq_ready && sq_reexec),
    .reexec_idx   (sq_lq_idx),
    .head         (lq_head),
    .snoop_valid  (snoop_valid),
    .snoop_line   (snoop_line),
    .squash_vec   (),
    .squash_any   (lq_squash),
    .squash_oldest(lq_squash_idx),
    .spared_any   (lq_spared)
  );

  clau_watchdog #(.W(WD_W), .THRESH(WD_THRESH)) u_wd (
    .clk         (clk),
    .rst_n       (rst_n),
    .any_locked  (any_locked),
    .store_write (wr_go),
    .force_unlock(force_unlock),
    .count       ()
  );

  // ---------------- responses ----------------
  assign exe_new_lock = exe_go && exe_lock_req && sqc_need_lock && l1_lock_granted;
  assign exe_chained  = exe_go && exe_lock_req && sqc_chained;
  assign exe_overflow = exe_go && exe_lock_req && sqc_overflow;
  assign exe_locked   = exe_new_lock || exe_chained;
  assign exe_cl       = sqc_new_cl;
  assign wr_miss      = wr_ready && !l1_write_hit;
  assign wr_unlocked  = wr_go && sqc_wr_unlock;
  assign sq_unlocked  = sq_ready && sqc_sq_unlock;
  assign ext_stall    = ext_ready && l1_ext_stall;
  assign ext_done     = ext_ready && l1_ext_done;
  assign ext_dirty    = ext_ready && l1_ext_dirty;
  assign evict_valid  = fill_ready && l1_evict_valid;
  assign evict_line   = l1_evict_line;
  assign evict_dirty  = fill_ready && l1_evict_dirty;
  assign wd_fire      = force_unlock;

endmodule
