// alu: integer execution unit for the operations of the rename backend.
//
// Single-cycle, combinational: add, subtract, multiply (low XLEN bits),
// and, or, xor, and the three shifts by the low six bits of the second
// operand. A branch produces no register value; its outcome is resolved by
// the core from the front end's prediction flag, so the ALU returns zero.
// The operation set is the one of the document's trivial-computation table;
// latencies and widths are this design's own choice.
module alu
  import rs_pkg::*;
(
  input  op_e             op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);
  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_MUL:  y = a * b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SLL:  y = a << b[5:0];
      OP_SRL:  y = a >> b[5:0];
      OP_SRA:  y = $signed(a) >>> b[5:0];
      default: y = '0;
    endcase
  end
endmodule
