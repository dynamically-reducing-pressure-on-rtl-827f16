// cv_detect: common-value detector of the execute stage.
//
// Flags an ALU result that equals one of the two common values, zero or one,
// and reports which one. The flag and the value are the two extra bits the
// reorder buffer keeps per instruction; at commit they make the
// instruction's destination register a candidate for early release to the
// dedicated register P0 or P1. Purely combinational, zero latency.
//
// Follows the document: only the values 0 and 1 are detected (no general
// common-value buffer). The enable input, which suppresses detection for
// instructions that write no register, is this design's own choice.
module cv_detect
  import rs_pkg::*;
(
  input  logic            en,      // instruction produces a register value
  input  logic [XLEN-1:0] result,
  output logic            cv,      // result is 0 or 1
  output logic            cv_val   // which of the two (valid when cv)
);
  always_comb begin
    cv     = en && (result[XLEN-1:1] == '0);
    cv_val = result[0];
  end
endmodule
