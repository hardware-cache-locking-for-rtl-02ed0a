// clau_cfg_probe: runs one clau_top configuration through the three
// sensitivity experiments of the CLAU evaluation and counts its own checks.
//
// 1. Chain cap: CHAIN_LEN + 1 RMWs to one line execute on consecutive cycles.
//    The first locks, the next CHAIN_LEN - 1 join the chain with CL 1, 2, ...
//    and the last overflows (with CHAIN_LEN = 1 the second already overflows).
// 2. Timeout: with the line still locked and no store written, the watchdog
//    must fire exactly WD_THRESH cycles after the lock was taken, and the
//    line must then accept an invalidation.
// 3. Forwarding: a forwarded RMW on a line held in E locks only when
//    LOCK_ON_FWD is set.
// Used by tb_clau_config_sweep; `done` rises when the probe has finished.
module clau_cfg_probe
  import clau_pkg::*;
#(
  parameter int unsigned CHAIN_LEN   = 8,
  parameter int unsigned WD_W        = 13,
  parameter int unsigned WD_THRESH   = 5000,
  parameter bit          LOCK_ON_FWD = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done = 1'b0,
  output int   checks,
  output int   failures
);
  localparam int unsigned LQW = 8, SQW = 7;
  localparam int unsigned CLW = (CHAIN_LEN > 1) ? $clog2(CHAIN_LEN) : 1;

  logic [5:0] dec_valid = '0, dec_rmw = '0, dec_atomic = '0;
  uop_t dec_uop [6];
  logic [5:0] dec_out_valid, dec_out_lock;
  uop_t dec_out_uop [6];
  logic ld_alloc_valid = 0, ld_alloc_lock = 0; logic [LQW-1:0] ld_alloc_idx = '0;
  logic st_alloc_valid = 0; logic [SQW-1:0] st_alloc_idx = '0;
  logic ld_issue_valid = 0; logic [LQW-1:0] ld_issue_idx = '0; paddr_t ld_issue_addr = '0;
  logic exe_valid = 0, exe_ready; logic [LQW-1:0] exe_lq_idx = '0; logic [SQW-1:0] exe_sq_idx = '0;
  paddr_t exe_addr = '0; logic exe_lock_req = 0, exe_fwd = 0;
  logic exe_miss, exe_locked, exe_new_lock, exe_chained, exe_overflow; logic [CLW-1:0] exe_cl;
  logic wr_valid = 0, wr_ready; logic [SQW-1:0] wr_sq_idx = '0; paddr_t wr_addr = '0;
  logic wr_miss, wr_unlocked;
  logic ld_commit_valid = 0; logic [LQW-1:0] ld_commit_idx = '0, lq_head = '0;
  logic sq_valid = 0, sq_ready; logic [LQW-1:0] sq_lq_idx = '0; logic [SQW-1:0] sq_sq_idx = '0;
  logic sq_reexec = 0, sq_unlocked;
  logic ext_valid = 0, ext_ready; paddr_t ext_addr = '0; logic ext_downgrade = 0;
  logic ext_stall, ext_done, ext_dirty;
  logic fill_valid = 0, fill_ready; paddr_t fill_addr = '0; cstate_t fill_state = ST_E;
  logic evict_valid, evict_dirty; line_addr_t evict_line;
  logic lq_squash, lq_spared; logic [LQW-1:0] lq_squash_idx;
  logic any_locked, wd_fire;
  logic clau_en = 1'b1;

  clau_top #(.CHAIN_LEN(CHAIN_LEN), .WD_W(WD_W), .WD_THRESH(WD_THRESH),
             .LOCK_ON_FWD(LOCK_ON_FWD)) dut (.*);

  int cycle = 0, fire_cycle = -1;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (wd_fire && fire_cycle < 0) fire_cycle <= cycle;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [LC%0d T%0d F%0d] %s (t=%0t)", CHAIN_LEN, WD_THRESH, LOCK_ON_FWD, what, $time);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
    ld_alloc_valid = 0; st_alloc_valid = 0; ld_issue_valid = 0; exe_valid = 0;
    wr_valid = 0; ext_valid = 0; fill_valid = 0;
  endtask

  initial begin
    paddr_t a, f;
    int n, lock_cycle, unl;
    for (int i = 0; i < 6; i++) dec_uop[i] = UOP_NONE;
    checks = 0; failures = 0;
    @(posedge rst_n); #1;
    a = paddr_t'(48'h0000_4000_0140);
    n = CHAIN_LEN + 1;
    fill_valid = 1; fill_addr = a; fill_state = ST_M; tick();
    for (int k = 0; k < n; k++) begin
      ld_alloc_valid = 1; ld_alloc_idx = LQW'(k); ld_alloc_lock = 1;
      st_alloc_valid = 1; st_alloc_idx = SQW'(k); tick();
      ld_issue_valid = 1; ld_issue_idx = LQW'(k); ld_issue_addr = a + paddr_t'(k[3:0]); tick();
    end
    // ---- 1. chain cap ----
    lock_cycle = -1;
    for (int k = 0; k < n; k++) begin
      exe_valid = 1; exe_lq_idx = LQW'(k); exe_sq_idx = SQW'(k); exe_addr = a + paddr_t'(k[3:0]);
      exe_lock_req = 1; exe_fwd = 0; #1;
      if (k == 0) begin
        check(exe_new_lock, "first RMW locks");
        lock_cycle = cycle;
      end else if (k < n - 1) begin
        check(exe_chained && int'(exe_cl) == k, $sformatf("RMW %0d chained with CL %0d", k, exe_cl));
      end else begin
        check(exe_overflow && !exe_new_lock, "RMW past the cap overflows");
      end
      tick();
    end
    // ---- 2. timeout ----
    while (fire_cycle < 0 && cycle < lock_cycle + 20000) tick();
    tick();
    check(fire_cycle - lock_cycle == int'(WD_THRESH),
          $sformatf("watchdog fired %0d cycles after the lock, threshold %0d",
                    fire_cycle - lock_cycle, WD_THRESH));
    check(!any_locked, "watchdog released the line");
    unl = 0;
    for (int k = 0; k < n; k++) begin
      wr_valid = 1; wr_sq_idx = SQW'(k); wr_addr = a; #1;
      check(!wr_miss, "store keeps write permission");
      if (wr_unlocked) unl++;
      tick();
    end
    check(unl == 0, "no store unlocks after the watchdog cleared the chain");
    // ---- 3. forwarding ----
    f = paddr_t'(48'h0000_8000_0280);
    fill_valid = 1; fill_addr = f; fill_state = ST_E; tick();
    ld_alloc_valid = 1; ld_alloc_idx = 8'd200 - 8'd60; ld_alloc_lock = 1;
    st_alloc_valid = 1; st_alloc_idx = 7'd110; tick();
    exe_valid = 1; exe_lq_idx = 8'd140; exe_sq_idx = 7'd110; exe_addr = f;
    exe_lock_req = 1; exe_fwd = 1; #1;
    check(exe_new_lock == LOCK_ON_FWD, "forwarded RMW locks only with LOCK_ON_FWD");
    tick();
    $display("probe LC%0d T%0d F%0d finished at cycle %0d", CHAIN_LEN, WD_THRESH, LOCK_ON_FWD, cycle);
    done = 1;
  end
endmodule
