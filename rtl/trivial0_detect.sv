// trivial0_detect: rename-stage detector of "trivial 0" computations.
//
// A computation is trivial-0 when its result is known to be zero from the
// operands' mappings alone, without reading any register value: an operand
// counts as zero only when its rename mapping is already the dedicated zero
// register P0 (or, for an immediate, when the immediate is zero). When the
// detector fires, the rename logic maps the destination straight to P0 and
// the instruction allocates no physical register and needs no execution.
//
// Conditions, per operation (X = first operand, Y = second):
//   ADD, OR, XOR : X = 0 and Y = 0        SUB : X = 0 and Y = 0
//   MUL, AND     : X = 0 or  Y = 0        SLL, SRL, SRA : X = 0
//   XOR, SUB with the same logical register for X and Y (X xor X, X - X).
// The table of conditions follows the document; counting X - X alongside the
// document's X xor X example is this design's own addition. Combinational.
module trivial0_detect
  import rs_pkg::*;
(
  input  op_e  op,
  input  logic x_zero,    // first operand mapped to P0
  input  logic y_zero,    // second operand mapped to P0, or immediate == 0
  input  logic same_src,  // both operands are the same logical register
  output logic triv0
);
  always_comb begin
    unique case (op)
      OP_ADD, OP_OR:           triv0 = x_zero && y_zero;
      OP_SUB, OP_XOR:          triv0 = (x_zero && y_zero) || same_src;
      OP_MUL, OP_AND:          triv0 = x_zero || y_zero;
      OP_SLL, OP_SRL, OP_SRA:  triv0 = x_zero;
      default:                 triv0 = 1'b0;
    endcase
  end
endmodule
