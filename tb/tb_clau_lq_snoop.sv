// tb_clau_lq_snoop: self-checking test of the load-queue snoop filter.
//
// Random allocation (plain loads and cache-locking RMW loads), address issue,
// execution, commit, squash and re-execution on a 16-entry queue, with snoops
// by line address in between. A reference model gives the squash vector
// (matching issued loads, except locking loads that have not executed), the
// oldest squashed entry counted from the head, and the spared flag.
module tb_clau_lq_snoop;
  import clau_pkg::*;

  localparam int unsigned N  = 16;
  localparam int unsigned IW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic alloc_valid = 0, alloc_lock = 0; logic [IW-1:0] alloc_idx = '0;
  logic issue_valid = 0; logic [IW-1:0] issue_idx = '0; line_addr_t issue_line = '0;
  logic exe_valid = 0;   logic [IW-1:0] exe_idx = '0;
  logic free_valid = 0;  logic [IW-1:0] free_idx = '0;
  logic kill_valid = 0;  logic [IW-1:0] kill_idx = '0;
  logic reexec_valid = 0; logic [IW-1:0] reexec_idx = '0;
  logic [IW-1:0] head = '0;
  logic snoop_valid = 0; line_addr_t snoop_line = '0;
  logic [N-1:0] squash_vec; logic squash_any; logic [IW-1:0] squash_oldest; logic spared_any;

  clau_lq_snoop #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_squash = 0, n_spared = 0, n_lock_squash = 0;

  logic m_valid[N], m_issued[N], m_exec[N], m_lock[N];
  line_addr_t m_line[N];

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
    alloc_valid = 0; issue_valid = 0; exe_valid = 0; free_valid = 0;
    kill_valid = 0; reexec_valid = 0; snoop_valid = 0;
  endtask

  task automatic do_snoop(input line_addr_t ln);
    logic [N-1:0] ev; logic sp; int old; int j;
    idle(); snoop_valid = 1; snoop_line = ln; head = IW'($urandom_range(0, N - 1));
    #1;
    ev = '0; sp = 0; old = -1;
    for (int i = 0; i < N; i++) begin
      if (m_valid[i] && m_issued[i] && m_line[i] == ln) begin
        if (!m_lock[i] || m_exec[i]) ev[i] = 1;
        else sp = 1;
        if (m_lock[i] && m_exec[i]) n_lock_squash++;
      end
    end
    for (int k = 0; k < N; k++) begin
      j = (int'(head) + k) % N;
      if (old < 0 && ev[j]) old = j;
    end
    check(squash_vec == ev && squash_any == (|ev) && spared_any == sp &&
          (old < 0 || int'(squash_oldest) == old),
          $sformatf("snoop line %0d: vec %b oldest %0d spared %0d, expected %b %0d %0d",
                    ln, squash_vec, squash_oldest, spared_any, ev, old, sp));
    if (|ev) n_squash++;
    if (sp)  n_spared++;
    @(posedge clk); #1;
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      m_valid[i] = 0; m_issued[i] = 0; m_exec[i] = 0; m_lock[i] = 0; m_line[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int t = 0; t < 8000; t++) begin
      int op, idx;
      line_addr_t ln;
      op  = $urandom_range(0, 99);
      idx = $urandom_range(0, N - 1);
      ln  = line_addr_t'($urandom_range(1, 4));
      idle();
      if (op < 20) begin
        alloc_valid = 1; alloc_idx = IW'(idx); alloc_lock = $urandom_range(0, 1);
        @(posedge clk); #1;
        m_valid[idx] = 1; m_issued[idx] = 0; m_exec[idx] = 0; m_lock[idx] = alloc_lock;
      end else if (op < 40) begin
        issue_valid = 1; issue_idx = IW'(idx); issue_line = ln;
        @(posedge clk); #1;
        m_issued[idx] = 1; m_line[idx] = ln;
      end else if (op < 55) begin
        exe_valid = 1; exe_idx = IW'(idx);
        @(posedge clk); #1;
        m_exec[idx] = 1;
      end else if (op < 62) begin
        free_valid = 1; free_idx = IW'(idx);
        @(posedge clk); #1;
        m_valid[idx] = 0; m_issued[idx] = 0; m_exec[idx] = 0;
      end else if (op < 67) begin
        kill_valid = 1; kill_idx = IW'(idx);
        @(posedge clk); #1;
        m_valid[idx] = 0; m_issued[idx] = 0; m_exec[idx] = 0;
      end else if (op < 72) begin
        reexec_valid = 1; reexec_idx = IW'(idx);
        @(posedge clk); #1;
        m_issued[idx] = 0; m_exec[idx] = 0;
      end else begin
        do_snoop(ln);
      end
    end
    check(n_squash > 0 && n_spared > 0 && n_lock_squash > 0,
          $sformatf("cases seen: squash %0d spared %0d executed-locking squash %0d",
                    n_squash, n_spared, n_lock_squash));
    $display("squash=%0d spared=%0d", n_squash, n_spared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
