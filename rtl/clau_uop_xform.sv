// clau_uop_xform: decode-time transformation of non-atomic RMWs into
// cache-locking RMWs.
//
// When the decoder splits a non-atomic read-modify-write into micro-ops, the
// load part is normally an `ldst` (load asking for write permission) and the
// store part a plain `st`. With CLAU enabled they are emitted as `ldstl`
// (load and lock) and `stul` (store and unlock) instead, the same opcodes an
// atomic RMW already uses. A per-lane `nonatomic_lock` flag tells the
// cache-locking non-atomic RMW apart from an atomic one, since only the former
// may later be reverted to baseline behaviour.
//
// Interface: DECODE_W lanes, each with a valid bit, the micro-op code, an
// RMW flag (the micro-op belongs to an RMW instruction) and an atomic flag.
// Purely combinational; outputs follow the inputs in the same cycle.
// The decode width of 6 follows the evaluated core; the flag encoding is this
// design's own.
module clau_uop_xform
  import clau_pkg::*;
#(
  parameter int unsigned DECODE_W = 6
) (
  input  logic                clau_en,              // CLAU switched on
  input  logic [DECODE_W-1:0] in_valid,
  input  uop_t                in_uop   [DECODE_W],
  input  logic [DECODE_W-1:0] in_rmw,               // micro-op of an RMW
  input  logic [DECODE_W-1:0] in_atomic,            // RMW is atomic (locked prefix)
  output logic [DECODE_W-1:0] out_valid,
  output uop_t                out_uop  [DECODE_W],
  output logic [DECODE_W-1:0] out_nonatomic_lock    // cache-locking non-atomic RMW
);

  always_comb begin
    for (int i = 0; i < DECODE_W; i++) begin
      out_valid[i]          = in_valid[i];
      out_uop[i]            = in_uop[i];
      out_nonatomic_lock[i] = 1'b0;
      if (in_valid[i] && in_rmw[i]) begin
        if (in_atomic[i]) begin
          // Atomic RMWs always lock the line.
          if (in_uop[i] == UOP_LDST) out_uop[i] = UOP_LDSTL;
          if (in_uop[i] == UOP_ST)   out_uop[i] = UOP_STUL;
        end else if (clau_en) begin
          if (in_uop[i] == UOP_LDST) begin
            out_uop[i]            = UOP_LDSTL;
            out_nonatomic_lock[i] = 1'b1;
          end
          if (in_uop[i] == UOP_ST) begin
            out_uop[i]            = UOP_STUL;
            out_nonatomic_lock[i] = 1'b1;
          end
        end
      end
    end
  end

endmodule
