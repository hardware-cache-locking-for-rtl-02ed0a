// tb_clau_sq_chain: self-checking test of the lock-chaining store-queue fields.
//
// A directed phase builds one chain of nine RMWs on one line: the first starts
// the chain (CL 0, asks the L1D to lock), the next seven join it (CL 1..7,
// responsibility moves to the newest store), the ninth overflows and runs
// unlocked; then only the chain tail's write reports an unlock. A random
// phase then mixes allocation, execution on a few lines, store writes,
// squashes, re-executions and watchdog clears, and compares every output and
// the responsibility/CL fields with a reference model after every cycle.
module tb_clau_sq_chain;
  import clau_pkg::*;

  localparam int unsigned N    = 16;
  localparam int unsigned IW   = $clog2(N);
  localparam int unsigned CLW  = 3;
  localparam int unsigned CMAX = 7;

  logic clk = 0, rst_n = 0;
  logic alloc_valid = 0; logic [IW-1:0] alloc_idx = '0;
  logic exe_valid = 0;   logic [IW-1:0] exe_idx = '0; line_addr_t exe_line = '0;
  logic exe_lock_en = 0, exe_lock_granted = 0;
  logic exe_need_lock, exe_chained, exe_overflow; logic [CLW-1:0] exe_new_cl;
  logic wr_valid = 0; logic [IW-1:0] wr_idx = '0; logic wr_unlock;
  logic sq_valid = 0; logic [IW-1:0] sq_idx = '0; logic sq_keep = 0;
  logic sq_unlock; line_addr_t sq_line;
  logic force_clear = 0;
  logic [N-1:0] resp_vec; logic [CLW-1:0] cl_of [N];

  clau_sq_chain #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_need = 0, n_chain = 0, n_ovf = 0, n_wr_unlock = 0, n_sq_unlock = 0, n_clear = 0;

  // reference model
  logic       m_valid [N];
  logic       m_resp  [N];
  line_addr_t m_line  [N];
  int         m_cl    [N];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic idle();
    alloc_valid = 0; exe_valid = 0; wr_valid = 0; sq_valid = 0; force_clear = 0;
  endtask

  // expected results of an execution, from the model
  task automatic model_exe(input int idx, input line_addr_t ln, input logic en,
                           input logic granted, output logic need, output logic ch,
                           output logic ovf, output int ncl, input logic apply);
    int hold = -1;
    for (int j = 0; j < N; j++)
      if (j != idx && m_valid[j] && m_resp[j] && m_line[j] == ln) hold = j;
    need = en && hold < 0;
    ch   = en && hold >= 0 && m_cl[hold] != CMAX;
    ovf  = en && hold >= 0 && m_cl[hold] == CMAX;
    ncl  = ch ? m_cl[hold] + 1 : 0;
    if (apply) begin
      if (ch) m_resp[hold] = 0;
      m_resp[idx] = ch || (need && granted);
      m_line[idx] = ln;
      m_cl[idx]   = ncl;
    end
  endtask

  task automatic do_alloc(input int idx);
    idle(); alloc_valid = 1; alloc_idx = IW'(idx);
    @(posedge clk); #1;
    m_valid[idx] = 1; m_resp[idx] = 0; m_cl[idx] = 0;
  endtask

  task automatic do_exe(input int idx, input line_addr_t ln, input logic en, input logic granted);
    logic need, ch, ovf; int ncl;
    idle(); exe_valid = 1; exe_idx = IW'(idx); exe_line = ln;
    exe_lock_en = en; exe_lock_granted = granted;
    #1;
    model_exe(idx, ln, en, granted, need, ch, ovf, ncl, 1'b1);
    check(exe_need_lock == need && exe_chained == ch && exe_overflow == ovf &&
          (!ch || int'(exe_new_cl) == ncl),
          $sformatf("exe idx %0d: need %0d chain %0d ovf %0d cl %0d, expected %0d %0d %0d %0d",
                    idx, exe_need_lock, exe_chained, exe_overflow, exe_new_cl, need, ch, ovf, ncl));
    if (need) n_need++;
    if (ch)   n_chain++;
    if (ovf)  n_ovf++;
    @(posedge clk); #1;
  endtask

  task automatic do_wr(input int idx);
    logic exp;
    idle(); wr_valid = 1; wr_idx = IW'(idx);
    #1;
    exp = m_valid[idx] && m_resp[idx];
    check(wr_unlock == exp, $sformatf("write idx %0d unlock %0d expected %0d", idx, wr_unlock, exp));
    if (exp) n_wr_unlock++;
    @(posedge clk); #1;
    m_valid[idx] = 0; m_resp[idx] = 0;
  endtask

  task automatic do_sq(input int idx, input logic keep);
    logic exp;
    idle(); sq_valid = 1; sq_idx = IW'(idx); sq_keep = keep;
    #1;
    exp = m_valid[idx] && m_resp[idx];
    check(sq_unlock == exp && (!exp || sq_line == m_line[idx]),
          $sformatf("squash idx %0d unlock %0d expected %0d", idx, sq_unlock, exp));
    if (exp) n_sq_unlock++;
    @(posedge clk); #1;
    m_resp[idx] = 0;
    if (!keep) m_valid[idx] = 0;
  endtask

  task automatic do_clear();
    idle(); force_clear = 1;
    @(posedge clk); #1;
    for (int j = 0; j < N; j++) m_resp[j] = 0;
    n_clear++;
  endtask

  task automatic compare_state();
    for (int j = 0; j < N; j++) begin
      check(resp_vec[j] == m_resp[j] && (!m_resp[j] || int'(cl_of[j]) == m_cl[j]),
            $sformatf("entry %0d resp %0d cl %0d, expected %0d %0d",
                      j, resp_vec[j], cl_of[j], m_resp[j], m_cl[j]));
    end
  endtask

  initial begin
    line_addr_t la;
    for (int j = 0; j < N; j++) begin m_valid[j] = 0; m_resp[j] = 0; m_line[j] = '0; m_cl[j] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1; #1;

    // ---- directed: one chain of nine on line A ----
    la = line_addr_t'(42'h123);
    for (int k = 0; k < 9; k++) do_alloc(k);
    do_exe(0, la, 1, 1);
    check(resp_vec[0] && cl_of[0] == 0, "first RMW starts the chain with CL 0");
    for (int k = 1; k < 8; k++) begin
      do_exe(k, la, 1, 0);
      check(resp_vec[k] && !resp_vec[k-1] && int'(cl_of[k]) == k,
            $sformatf("RMW %0d joined the chain with CL %0d", k, cl_of[k]));
    end
    do_exe(8, la, 1, 0);
    check(!resp_vec[8] && resp_vec[7], "ninth RMW overflows and stays unlocked");
    for (int k = 0; k < 9; k++) begin
      do_wr(k);
    end
    check(n_wr_unlock == 1, "only the chain tail unlocks");
    compare_state();

    // ---- random ----
    for (int t = 0; t < 6000; t++) begin
      int op, idx;
      line_addr_t ln;
      op  = $urandom_range(0, 99);
      idx = $urandom_range(0, N - 1);
      ln  = line_addr_t'($urandom_range(1, 3));
      if (op < 25)       do_alloc(idx);
      else if (op < 65) begin
        if (m_valid[idx]) do_exe(idx, ln, $urandom_range(0, 5) != 0, $urandom_range(0, 3) != 0);
      end
      else if (op < 85) begin if (m_valid[idx]) do_wr(idx); end
      else if (op < 98)  begin if (m_valid[idx]) do_sq(idx, $urandom_range(0, 1)); end
      else               do_clear();
      compare_state();
    end

    check(n_need > 0 && n_chain > 0 && n_ovf > 0 && n_wr_unlock > 0 && n_sq_unlock > 0 && n_clear > 0,
          $sformatf("all cases seen: need %0d chain %0d ovf %0d wr %0d sq %0d clear %0d",
                    n_need, n_chain, n_ovf, n_wr_unlock, n_sq_unlock, n_clear));
    $display("need_lock=%0d chained=%0d overflow=%0d wr_unlock=%0d sq_unlock=%0d clear=%0d",
             n_need, n_chain, n_ovf, n_wr_unlock, n_sq_unlock, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
