// tb_clau_top: end-to-end test of one core's CLAU unit at its default sizes
// (48 KB 12-way L1D, 192-entry LQ, 114-entry SQ, chains of eight, 5000-cycle
// watchdog, no locking on store-to-load forwarding).
//
// The testbench plays the core and the rest of the memory system. It decodes
// RMWs, runs them through execute and store write, and sends invalidations,
// downgrades and fills, checking each response against the value the
// mechanism calls for. Every mechanism is counted and must occur at least
// once: decode transformation, new lock, chain join, chain overflow, refused
// invalidation and downgrade with later retry, spared not-yet-executed RMW,
// squash of an executed RMW whose lock was lost, watchdog release, release on
// local squash, forwarding without lock, store miss, replacement around locked
// lines and refusal of the last unlocked way of a set.
module tb_clau_top;
  import clau_pkg::*;

  localparam int unsigned DW = 6;
  localparam int unsigned LQW = 8, SQW = 7;

  logic clk = 0, rst_n = 0, clau_en = 1;
  logic [DW-1:0] dec_valid = '0, dec_rmw = '0, dec_atomic = '0;
  uop_t dec_uop [DW];
  logic [DW-1:0] dec_out_valid, dec_out_lock;
  uop_t dec_out_uop [DW];
  logic ld_alloc_valid = 0, ld_alloc_lock = 0; logic [LQW-1:0] ld_alloc_idx = '0;
  logic st_alloc_valid = 0; logic [SQW-1:0] st_alloc_idx = '0;
  logic ld_issue_valid = 0; logic [LQW-1:0] ld_issue_idx = '0; paddr_t ld_issue_addr = '0;
  logic exe_valid = 0, exe_ready; logic [LQW-1:0] exe_lq_idx = '0; logic [SQW-1:0] exe_sq_idx = '0;
  paddr_t exe_addr = '0; logic exe_lock_req = 0, exe_fwd = 0;
  logic exe_miss, exe_locked, exe_new_lock, exe_chained, exe_overflow; logic [2:0] exe_cl;
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

  clau_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c_xform = 0, c_newlock = 0, c_chain = 0, c_ovf = 0, c_stall = 0, c_retry = 0,
      c_spared = 0, c_squash = 0, c_wd = 0, c_sqrel = 0, c_fwd = 0, c_stmiss = 0,
      c_evict = 0, c_refuse = 0, c_unlock_wr = 0;
  int wd_cycles;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (wd_fire) c_wd++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // address of line `tag` in set `set` (64 sets, 64-byte lines)
  function automatic paddr_t A(input int tag, input int set, input int off = 0);
    return paddr_t'((longint'(tag) << 12) | (set << 6) | off);
  endfunction

  task automatic tick();
    @(posedge clk); #1;
    ld_alloc_valid = 0; st_alloc_valid = 0; ld_issue_valid = 0; exe_valid = 0;
    wr_valid = 0; ld_commit_valid = 0; sq_valid = 0; ext_valid = 0; fill_valid = 0;
    dec_valid = '0;
  endtask

  task automatic fill(input paddr_t a, input cstate_t s);
    fill_valid = 1; fill_addr = a; fill_state = s; #1;
    check(fill_ready, "fill accepted");
    if (evict_valid) c_evict++;
    tick();
  endtask

  task automatic rmw_dispatch(input int lq, input int sq, input paddr_t a);
    // decoder: one non-atomic RMW, load and store parts on lanes 0 and 1
    dec_valid = 6'b000011; dec_rmw = 6'b000011; dec_atomic = '0;
    dec_uop[0] = UOP_LDST; dec_uop[1] = UOP_ST;
    for (int i = 2; i < DW; i++) dec_uop[i] = UOP_NONE;
    #1;
    check(dec_out_uop[0] == UOP_LDSTL && dec_out_uop[1] == UOP_STUL && dec_out_lock[1:0] == 2'b11,
          "decoder emits ldstl/stul for a non-atomic RMW");
    if (dec_out_uop[0] == UOP_LDSTL) c_xform++;
    ld_alloc_valid = 1; ld_alloc_idx = LQW'(lq); ld_alloc_lock = 1;
    st_alloc_valid = 1; st_alloc_idx = SQW'(sq);
    tick();
    ld_issue_valid = 1; ld_issue_idx = LQW'(lq); ld_issue_addr = a;
    tick();
  endtask

  // execute the ldstl; return the response bits
  task automatic rmw_exec(input int lq, input int sq, input paddr_t a, input logic fwd,
                          output logic miss, output logic newl, output logic ch,
                          output logic ovf, output int cl);
    exe_valid = 1; exe_lq_idx = LQW'(lq); exe_sq_idx = SQW'(sq); exe_addr = a;
    exe_lock_req = 1; exe_fwd = fwd;
    #1;
    check(exe_ready, "execution accepted");
    miss = exe_miss; newl = exe_new_lock; ch = exe_chained; ovf = exe_overflow; cl = exe_cl;
    if (newl) c_newlock++;
    if (ch)   c_chain++;
    if (ovf)  c_ovf++;
    tick();
  endtask

  task automatic store_write(input int sq, input paddr_t a, output logic miss, output logic unl);
    wr_valid = 1; wr_sq_idx = SQW'(sq); wr_addr = a;
    #1;
    miss = wr_miss; unl = wr_unlocked;
    if (miss) c_stmiss++;
    if (unl)  c_unlock_wr++;
    tick();
  endtask

  task automatic ext(input paddr_t a, input logic down, output logic stall, output logic done,
                     output logic sqsh, output logic spr);
    ext_valid = 1; ext_addr = a; ext_downgrade = down;
    #1;
    stall = ext_stall; done = ext_done; sqsh = lq_squash; spr = lq_spared;
    if (stall) c_stall++;
    if (sqsh)  c_squash++;
    if (spr)   c_spared++;
    tick();
  endtask

  task automatic commit(input int lq);
    ld_commit_valid = 1; ld_commit_idx = LQW'(lq); tick();
  endtask

  initial begin
    logic miss, newl, ch, ovf, stall, done, sqsh, spr, unl;
    int cl;
    paddr_t a, b, c, f;
    dec_valid = '0;
    for (int i = 0; i < DW; i++) dec_uop[i] = UOP_NONE;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;

    // ---- 1. lock, refused invalidation, unlock by the store, retry ----
    a = A(1, 5, 8);
    fill(a, ST_E);
    rmw_dispatch(0, 0, a);
    rmw_exec(0, 0, a, 0, miss, newl, ch, ovf, cl);
    check(!miss && newl && !ch && cl == 0, "first RMW locks the line (case a)");
    check(any_locked, "a line is locked");
    ext(a, 0, stall, done, sqsh, spr);
    check(stall && !done && !sqsh, "invalidation of the locked line is refused, no squash");
    ext(a, 1, stall, done, sqsh, spr);
    check(stall && !done, "downgrade of the locked line is refused");
    commit(0);
    store_write(0, a, miss, unl);
    check(!miss && unl, "stul hits with permission and unlocks");
    check(!any_locked, "line unlocked after the store");
    ext(a, 0, stall, done, sqsh, spr);
    check(!stall && done && ext_dirty == 0, "retried invalidation now proceeds");
    if (done) c_retry++;

    // ---- 2. lock chain of nine RMWs on one line: 8 chained, 9th overflows ----
    b = A(2, 9);
    fill(b, ST_M);
    for (int k = 0; k < 9; k++) rmw_dispatch(10 + k, 10 + k, b + paddr_t'(k * 4));
    for (int k = 0; k < 9; k++) begin
      rmw_exec(10 + k, 10 + k, b + paddr_t'(k * 4), 0, miss, newl, ch, ovf, cl);
      if (k == 0)      check(newl && cl == 0, "chain head locks the line");
      else if (k < 8)  check(ch && cl == k, $sformatf("RMW %0d joins the chain, CL %0d", k, cl));
      else             check(ovf && !ch && !newl, "ninth RMW overflows the chain");
    end
    for (int k = 0; k < 9; k++) begin
      commit(10 + k);
      store_write(10 + k, b + paddr_t'(k * 4), miss, unl);
      check(!miss, "chained store finds write permission");
      check(unl == (k == 7), $sformatf("store %0d unlock=%0d (only the chain tail unlocks)", k, unl));
      if (k < 7) check(any_locked, "line stays locked inside the chain");
    end
    check(!any_locked, "chain released");

    // ---- 3. spared: invalidation before the ldstl has read its data ----
    c = A(3, 17);
    fill(c, ST_E);
    rmw_dispatch(30, 30, c);
    ext(c, 0, stall, done, sqsh, spr);
    check(done && !sqsh && spr, "not-yet-executed ldstl is not squashed");
    rmw_exec(30, 30, c, 0, miss, newl, ch, ovf, cl);
    check(miss, "ldstl misses after the invalidation");
    fill(c, ST_E);
    rmw_exec(30, 30, c, 0, miss, newl, ch, ovf, cl);
    check(!miss && newl, "replayed ldstl locks the refilled line");

    // ---- 4. watchdog: no store progress for 5000 cycles releases all locks ----
    wd_cycles = 0;
    while (!wd_fire && wd_cycles < 6000) begin @(posedge clk); #1; wd_cycles++; end
    check(wd_fire, "watchdog fired");
    check(wd_cycles >= 4990 && wd_cycles <= 5000,
          $sformatf("watchdog fired %0d cycles after the last progress", wd_cycles));
    tick();
    check(!any_locked, "watchdog released the lock");
    // an invalidation now reaches the executed RMW: it must be squashed
    ext(c, 0, stall, done, sqsh, spr);
    check(done && sqsh && lq_squash_idx == 30, "executed RMW whose lock was lost is squashed");
    sq_valid = 1; sq_lq_idx = 30; sq_sq_idx = 30; sq_reexec = 0; #1;
    check(!sq_unlocked, "squash of an RMW without lock releases nothing");
    tick();

    // ---- 5. local squash releases the lock ----
    fill(c, ST_E);
    rmw_dispatch(40, 40, c);
    rmw_exec(40, 40, c, 0, miss, newl, ch, ovf, cl);
    check(newl, "RMW locks");
    sq_valid = 1; sq_lq_idx = 40; sq_sq_idx = 40; sq_reexec = 0; #1;
    check(sq_ready && sq_unlocked, "squashed RMW releases its lock");
    if (sq_unlocked) c_sqrel++;
    tick();
    check(!any_locked, "line back to exclusive after the squash");
    // re-execution also releases, and the RMW can lock again
    rmw_dispatch(41, 41, c);
    rmw_exec(41, 41, c, 0, miss, newl, ch, ovf, cl);
    sq_valid = 1; sq_lq_idx = 41; sq_sq_idx = 41; sq_reexec = 1; #1;
    check(sq_unlocked, "re-executed RMW releases its lock");
    if (sq_unlocked) c_sqrel++;
    tick();
    rmw_exec(41, 41, c, 0, miss, newl, ch, ovf, cl);
    check(newl, "re-executed RMW locks again");
    commit(41);
    store_write(41, c, miss, unl);
    check(unl, "re-executed RMW's store unlocks");

    // ---- 6. store-to-load forwarding: run without lock ----
    rmw_dispatch(50, 50, c);
    rmw_exec(50, 50, c, 1, miss, newl, ch, ovf, cl);
    check(!miss && !newl && !ch && !any_locked, "forwarded RMW skips cache locking");
    if (!newl && !ch) c_fwd++;
    commit(50);
    store_write(50, c, miss, unl);
    check(!miss && !unl, "forwarded RMW's store writes without unlocking");

    // ---- 7. store miss: permission lost before the store writes ----
    f = A(4, 33);
    fill(f, ST_E);
    rmw_dispatch(60, 60, f);
    rmw_exec(60, 60, f, 1, miss, newl, ch, ovf, cl);   // forwarded: unlocked
    ext(f, 1, stall, done, sqsh, spr);
    check(done && sqsh, "downgrade of an unlocked line squashes the executed RMW load");
    commit(60);
    store_write(60, f, miss, unl);
    check(miss, "store misses after losing write permission");
    fill(f, ST_E);
    store_write(60, f, miss, unl);
    check(!miss, "store writes after permission is regained");

    // ---- 8. one unlocked way per set, replacement skips locked lines ----
    for (int w = 0; w < 12; w++) fill(A(100 + w, 60), ST_E);
    for (int w = 0; w < 12; w++) begin
      rmw_dispatch(70 + w, 70 + w, A(100 + w, 60));
      rmw_exec(70 + w, 70 + w, A(100 + w, 60), 0, miss, newl, ch, ovf, cl);
      if (w < 11) check(newl, $sformatf("lock %0d in the set granted", w));
      else begin
        check(!newl && !miss, "last unlocked way of the set is not locked");
        if (!newl) c_refuse++;
      end
    end
    fill_valid = 1; fill_addr = A(200, 60); fill_state = ST_E; #1;
    check(evict_valid && evict_line == line_of(A(111, 60)), "fill evicts the only unlocked way");
    // the victim's RMW load has executed without lock: it must be squashed
    check(lq_squash && lq_squash_idx == 81, "eviction squashes the unlocked RMW load");
    if (evict_valid) c_evict++;
    tick();
    for (int w = 0; w < 11; w++) begin
      commit(70 + w);
      store_write(70 + w, A(100 + w, 60), miss, unl);
      check(!miss && unl, "locked line survived the fill");
    end
    check(!any_locked, "all set locks released");

    // ---- coverage ----
    check(c_xform > 0, "decode transformation happened");
    check(c_newlock > 0, "new lock happened");
    check(c_chain > 0, "chain join happened");
    check(c_ovf > 0, "chain overflow happened");
    check(c_stall > 0, "refused external request happened");
    check(c_retry > 0, "retry after unlock happened");
    check(c_spared > 0, "spared RMW happened");
    check(c_squash > 0, "squash by loss of permission happened");
    check(c_wd > 0, "watchdog release happened");
    check(c_sqrel > 0, "release on local squash happened");
    check(c_fwd > 0, "forwarding without lock happened");
    check(c_stmiss > 0, "store miss happened");
    check(c_evict > 0, "eviction happened");
    check(c_refuse > 0, "refused last-way lock happened");
    $display("xform=%0d newlock=%0d chain=%0d overflow=%0d stall=%0d retry=%0d spared=%0d squash=%0d",
             c_xform, c_newlock, c_chain, c_ovf, c_stall, c_retry, c_spared, c_squash);
    $display("watchdog=%0d squash_release=%0d fwd=%0d store_miss=%0d evict=%0d refuse=%0d unlock_wr=%0d",
             c_wd, c_sqrel, c_fwd, c_stmiss, c_evict, c_refuse, c_unlock_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
