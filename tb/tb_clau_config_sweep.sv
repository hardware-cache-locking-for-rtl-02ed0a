// tb_clau_config_sweep: the sensitivity configurations of the CLAU evaluation.
//
// Eight clau_top instances at the default structure sizes, together covering
// chain caps of 1, 2, 4, 8, 16, 32 and 64 RMWs, watchdog thresholds of 1, 10,
// 50, 100, 500, 1000, 5000 and 10000 cycles (the last needs a 14-bit timer)
// and both store-to-load forwarding policies. Each instance runs the probe in
// clau_cfg_probe; the testbench sums their checks.
module tb_clau_config_sweep;
  localparam int NP = 8;
  logic clk = 0, rst_n = 0;
  logic done [NP];
  int   chk  [NP];
  int   fl   [NP];

  always #5 clk = ~clk;

  clau_cfg_probe #(.CHAIN_LEN(1),  .WD_THRESH(1))                   p0 (clk, rst_n, done[0], chk[0], fl[0]);
  clau_cfg_probe #(.CHAIN_LEN(4),  .WD_THRESH(10))                  p1 (clk, rst_n, done[1], chk[1], fl[1]);
  clau_cfg_probe #(.CHAIN_LEN(8),  .WD_THRESH(50))                  p2 (clk, rst_n, done[2], chk[2], fl[2]);
  clau_cfg_probe #(.CHAIN_LEN(16), .WD_THRESH(100))                 p3 (clk, rst_n, done[3], chk[3], fl[3]);
  clau_cfg_probe #(.CHAIN_LEN(32), .WD_THRESH(500))                 p4 (clk, rst_n, done[4], chk[4], fl[4]);
  clau_cfg_probe #(.CHAIN_LEN(64), .WD_THRESH(1000))                p5 (clk, rst_n, done[5], chk[5], fl[5]);
  clau_cfg_probe #(.CHAIN_LEN(8),  .WD_THRESH(5000), .LOCK_ON_FWD(1)) p6 (clk, rst_n, done[6], chk[6], fl[6]);
  clau_cfg_probe #(.CHAIN_LEN(2),  .WD_W(14), .WD_THRESH(10000))    p7 (clk, rst_n, done[7], chk[7], fl[7]);

  int checks, failures;

  task automatic sum();
    checks = 0; failures = 0;
    for (int i = 0; i < NP; i++) begin checks += chk[i]; failures += fl[i]; end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    sum();
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic all;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int i = 0; i < NP; i++) if (done[i] !== 1'b1) all = 1'b0;
    end while (all !== 1'b1);
    sum();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
