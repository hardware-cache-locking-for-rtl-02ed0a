// tb_clau_watchdog: self-checking test of the lock watchdog at its default
// 13-bit width and 5000-cycle threshold.
//
// Checks that the timer stays at zero while nothing is locked, that a store
// write restarts it, that the release pulse comes exactly 5000 cycles after
// the last progress while a line stays locked, and that it then restarts.
module tb_clau_watchdog;
  import clau_pkg::*;

  localparam int unsigned THRESH = WD_THRESH_DEF;

  logic clk = 0, rst_n = 0;
  logic any_locked = 0, store_write = 0;
  logic force_unlock;
  logic [WD_W_DEF-1:0] count;

  int checks = 0, failures = 0;

  clau_watchdog dut (.clk(clk), .rst_n(rst_n), .any_locked(any_locked),
                     .store_write(store_write), .force_unlock(force_unlock), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t count=%0d)", what, $time, count);
    end
  endtask

  // Run n cycles with the given inputs; return the cycle (1-based) of the
  // first pulse, or 0.
  task automatic run(input int n, input logic lk, input logic sw, output int first);
    first = 0;
    for (int c = 1; c <= n; c++) begin
      any_locked  = lk;
      store_write = sw;
      #1;
      if (force_unlock && first == 0) first = c;
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    int first;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    // nothing locked: no count, no pulse
    run(6000, 1'b0, 1'b0, first);
    check(first == 0, "no pulse while unlocked");
    check(count == 0, "timer held at zero while unlocked");
    // locked: pulse exactly at cycle THRESH
    run(THRESH + 10, 1'b1, 1'b0, first);
    check(first == THRESH, $sformatf("pulse at cycle %0d, expected %0d", first, THRESH));
    check(count == 10, "timer restarts after the pulse");
    // progress resets the timer
    run(1, 1'b1, 1'b1, first);
    check(count == 0, "store write resets the timer");
    run(THRESH - 1, 1'b1, 1'b0, first);
    check(first == 0, "no pulse before THRESH cycles");
    run(1, 1'b1, 1'b1, first);
    check(first == 0 && count == 0, "store write just before the threshold avoids the pulse");
    run(THRESH, 1'b1, 1'b0, first);
    check(first == THRESH, "pulse again after a fresh period");
    // lock released: timer cleared
    run(100, 1'b1, 1'b0, first);
    run(1, 1'b0, 1'b0, first);
    check(count == 0, "timer cleared when no line is locked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
