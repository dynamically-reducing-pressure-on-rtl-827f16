// suso_reverse: recovers the operand a SUSO instruction overwrote.
//
// A single-use self-overwriting (SUSO) instruction writes its result into
// the same physical storage as the instruction that produced its own source.
// When an exception forces the reorder buffer to be unwound, an SUSO
// instruction that already executed must be undone by recomputing the
// overwritten operand from its result R and its other operand Y:
//   ADD : old = R - Y
//   SUB : old = R + Y   when the destination was the first operand (X - Y)
//         old = Y - R   when the destination was the second operand (Y - X)
//   XOR : old = R ^ Y
// Only these operations are allowed to share a register, so every SUSO
// instruction can be reversed. Combinational.
//
// The document requires reversibility and describes recomputing the operand;
// the exact operation set and formulas are this design's own. X + X is kept
// out of sharing because the top bit is lost on wrap-around.
module suso_reverse
  import rs_pkg::*;
(
  input  op_e             op,
  input  logic            dst_is_x,  // overwritten operand was the first one
  input  logic [XLEN-1:0] result,    // value now in the shared register
  input  logic [XLEN-1:0] other,     // the operand that was not overwritten
  output logic [XLEN-1:0] old_val
);
  always_comb begin
    unique case (op)
      OP_ADD:  old_val = result - other;
      OP_SUB:  old_val = dst_is_x ? (result + other) : (other - result);
      OP_XOR:  old_val = result ^ other;
      default: old_val = result;
    endcase
  end
endmodule
