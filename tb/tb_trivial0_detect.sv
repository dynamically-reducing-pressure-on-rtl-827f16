// tb_trivial0_detect: exhaustive check of the trivial-0 conditions for every
// operation and every combination of zero-mapped and identical operands.
module tb_trivial0_detect;
  import rs_pkg::*;
  op_e  op;
  logic x_zero, y_zero, same_src, triv0;
  int unsigned checks = 0, failures = 0;

  trivial0_detect dut (.op(op), .x_zero(x_zero), .y_zero(y_zero), .same_src(same_src),
                       .triv0(triv0));

  // Expected result written from the table: zero when both are zero (add,
  // sub, or, xor), when either is zero (mul, and), when the shifted value is
  // zero (shifts), or x xor x / x - x.
  function automatic logic expected(op_e o, logic x, logic y, logic s);
    if (o == OP_MUL || o == OP_AND) return x | y;
    if (o == OP_SLL || o == OP_SRL || o == OP_SRA) return x;
    if (o == OP_XOR || o == OP_SUB) return (x & y) | s;
    if (o == OP_ADD || o == OP_OR) return x & y;
    return 1'b0;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o <= 9; o++)
      for (int v = 0; v < 8; v++) begin
        op = op_e'(o); x_zero = v[0]; y_zero = v[1]; same_src = v[2];
        #1;
        checks++;
        if (triv0 !== expected(op, x_zero, y_zero, same_src)) begin
          failures++;
          $display("FAIL op %0d x0=%b y0=%b same=%b: got %b", o, x_zero, y_zero, same_src, triv0);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
