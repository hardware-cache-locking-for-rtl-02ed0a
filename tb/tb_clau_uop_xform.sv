// tb_clau_uop_xform: self-checking test of the decode-time RMW transformation.
//
// Drives random micro-op bundles on all six lanes, with CLAU on and off, and
// compares every lane with an independent model: a non-atomic RMW's ldst/st
// become ldstl/stul with the non-atomic-lock flag only while CLAU is on;
// atomic RMWs always lock and never carry the flag; other micro-ops pass.
module tb_clau_uop_xform;
  import clau_pkg::*;

  localparam int unsigned W = 6;

  logic         clau_en;
  logic [W-1:0] in_valid, in_rmw, in_atomic, out_valid, out_lock;
  uop_t         in_uop [W];
  uop_t         out_uop[W];

  int checks = 0, failures = 0;
  int n_xform = 0, n_atomic = 0;

  clau_uop_xform #(.DECODE_W(W)) dut (
    .clau_en(clau_en), .in_valid(in_valid), .in_uop(in_uop), .in_rmw(in_rmw),
    .in_atomic(in_atomic), .out_valid(out_valid), .out_uop(out_uop),
    .out_nonatomic_lock(out_lock));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uop_t exp_uop;
    logic exp_lock;
    for (int t = 0; t < 2000; t++) begin
      clau_en = (t % 3) != 0;
      for (int i = 0; i < W; i++) begin
        in_valid[i]  = $urandom_range(0, 3) != 0;
        in_rmw[i]    = $urandom_range(0, 1);
        in_atomic[i] = $urandom_range(0, 3) == 0;
        in_uop[i]    = uop_t'($urandom_range(0, 3));
      end
      #1;
      for (int i = 0; i < W; i++) begin
        exp_uop  = in_uop[i];
        exp_lock = 1'b0;
        if (in_valid[i] && in_rmw[i] && (in_atomic[i] || clau_en)) begin
          case (in_uop[i])
            UOP_LDST: exp_uop = UOP_LDSTL;
            UOP_ST:   exp_uop = UOP_STUL;
            default:  ;
          endcase
          exp_lock = !in_atomic[i] && (in_uop[i] == UOP_LDST || in_uop[i] == UOP_ST);
        end
        if (exp_lock) n_xform++;
        if (in_valid[i] && in_rmw[i] && in_atomic[i] && in_uop[i] == UOP_LDST) n_atomic++;
        checks++;
        if (out_uop[i] !== exp_uop || out_lock[i] !== exp_lock || out_valid[i] !== in_valid[i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d lane %0d: uop %0d lock %0d, expected %0d %0d",
                     t, i, out_uop[i], out_lock[i], exp_uop, exp_lock);
        end
      end
    end
    checks++;
    if (n_xform == 0 || n_atomic == 0) begin
      failures++;
      $display("FAIL: transformation cases not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
