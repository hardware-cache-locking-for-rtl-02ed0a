// tb_clau_l1d_state: self-checking test of the L1D state array with the
// Locked state, on a small 4-set, 4-way geometry.
//
// Directed sequence: fill, lock from E, refusal of invalidations and
// downgrades while Locked, a chained write that keeps the lock, the unlocking
// write to M, invalidation of a dirty line, no lock and a store miss on a
// Shared line, the one-unlocked-way-per-set rule, replacement that skips
// Locked ways, squash unlock back to E or M, the watchdog's unlock of all
// lines and a permission upgrade by fill. Each expected value is written out
// from the rules, not read back from the design.
module tb_clau_l1d_state;
  import clau_pkg::*;

  localparam int unsigned WAYS = 4;
  localparam int unsigned SIZE = 4 * WAYS * 64;   // 4 sets

  logic clk = 0, rst_n = 0;
  l1_op_t op = L1_NOP; line_addr_t op_line = '0; logic op_unlock = 0;
  cstate_t op_fill_state = ST_E; logic force_unlock_all = 0;
  logic hit, lock_granted, write_hit, ext_stall, ext_dirty, ext_done;
  cstate_t hit_state;
  logic evict_valid, evict_dirty; line_addr_t evict_line;
  logic any_locked; logic [$clog2(16+1)-1:0] locked_count;

  clau_l1d_state #(.SIZE_BYTES(SIZE), .WAYS(WAYS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic line_addr_t ln(input int tag, input int set);
    return line_addr_t'((tag << 2) | set);
  endfunction

  // apply one operation: responses are sampled before the clock edge
  task automatic apply(input l1_op_t o, input line_addr_t l, input logic unl = 0,
                       input cstate_t fs = ST_E);
    op = o; op_line = l; op_unlock = unl; op_fill_state = fs;
    #1;
  endtask
  task automatic tick();
    @(posedge clk); #1;
    op = L1_NOP;
  endtask

  task automatic expect_state(input line_addr_t l, input cstate_t s, input string what);
    op = L1_NOP; op_line = l; #1;
    if (s == ST_I) check(!hit, what);
    else           check(hit && hit_state == s, $sformatf("%s (state %0d, expected %0d)", what, hit_state, s));
  endtask

  initial begin
    line_addr_t a, b, m;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    a = ln(1, 0); b = ln(2, 0);

    apply(L1_FILL, a, 0, ST_E); check(!evict_valid, "fill into an empty set evicts nothing"); tick();
    expect_state(a, ST_E, "A filled Exclusive");
    apply(L1_LOCK, a); check(lock_granted, "lock from E granted"); tick();
    expect_state(a, ST_L, "A Locked");
    check(any_locked && locked_count == 1, "one line locked");
    apply(L1_INV, a);  check(ext_stall && !ext_done, "invalidation of a Locked line refused"); tick();
    apply(L1_DOWN, a); check(ext_stall && !ext_done, "downgrade of a Locked line refused"); tick();
    expect_state(a, ST_L, "A still Locked after refused requests");
    apply(L1_WRITE, a, 0); check(write_hit, "chained write hits"); tick();
    expect_state(a, ST_L, "write without unlock keeps the lock");
    apply(L1_WRITE, a, 1); check(write_hit, "unlocking write hits"); tick();
    expect_state(a, ST_M, "unlocking write leaves M");
    check(!any_locked, "nothing locked");
    apply(L1_INV, a); check(ext_done && !ext_stall && ext_dirty, "invalidation of dirty A done with data"); tick();
    expect_state(a, ST_I, "A invalid");

    apply(L1_FILL, b, 0, ST_S); tick();
    apply(L1_LOCK, b);  check(!lock_granted, "no lock on a Shared line"); tick();
    apply(L1_WRITE, b, 0); check(!write_hit, "store miss on a Shared line"); tick();
    expect_state(b, ST_S, "B stays Shared");
    apply(L1_FILL, b, 0, ST_E); check(!evict_valid, "upgrade evicts nothing"); tick();
    expect_state(b, ST_E, "B upgraded to E");
    apply(L1_DOWN, b); check(ext_done && !ext_dirty, "downgrade of clean E done"); tick();
    expect_state(b, ST_S, "B downgraded to S");

    // set 1: four lines, lock three, the fourth lock must be refused
    for (int t = 0; t < 4; t++) begin
      apply(L1_FILL, ln(t + 1, 1), 0, (t == 0) ? ST_M : ST_E); tick();
    end
    for (int t = 0; t < 3; t++) begin
      apply(L1_LOCK, ln(t + 1, 1)); check(lock_granted, $sformatf("lock %0d in set 1 granted", t)); tick();
    end
    apply(L1_LOCK, ln(4, 1)); check(!lock_granted, "last unlocked way of a set cannot be locked"); tick();
    check(locked_count == 3, "three lines locked");
    // a fill into the full set must evict the only unlocked line
    apply(L1_FILL, ln(5, 1), 0, ST_E);
    check(evict_valid && evict_line == ln(4, 1) && !evict_dirty,
          $sformatf("replacement skips Locked ways (evicted %0h)", evict_line));
    tick();
    expect_state(ln(5, 1), ST_E, "new line filled");
    apply(L1_FILL, ln(6, 1), 0, ST_E);
    check(evict_valid && evict_line == ln(5, 1), "second fill again evicts the unlocked way");
    tick();
    for (int t = 0; t < 3; t++) expect_state(ln(t + 1, 1), ST_L, "locked lines survive fills");

    // squash unlock: dirty line back to M, clean line back to E
    apply(L1_UNLOCK, ln(1, 1)); tick();
    expect_state(ln(1, 1), ST_M, "unlock of a dirty line gives M");
    apply(L1_UNLOCK, ln(2, 1)); tick();
    expect_state(ln(2, 1), ST_E, "unlock of a clean line gives E");

    // watchdog: unlock everything
    m = ln(7, 2);
    apply(L1_FILL, m, 0, ST_E); tick();
    apply(L1_LOCK, m); tick();
    check(locked_count == 2, "two lines locked before the watchdog");
    op = L1_NOP; force_unlock_all = 1; @(posedge clk); #1; force_unlock_all = 0;
    check(!any_locked, "watchdog released every lock");
    expect_state(ln(3, 1), ST_E, "released line back to E");
    expect_state(m, ST_E, "released line back to E");
    apply(L1_INV, m); check(ext_done, "invalidation proceeds after release"); tick();
    expect_state(m, ST_I, "line invalidated after release");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
