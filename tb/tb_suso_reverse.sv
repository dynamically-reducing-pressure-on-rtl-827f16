// tb_suso_reverse: executes random reversible self-overwriting operations
// forward and checks that the block recovers the overwritten operand from
// the result and the other operand.
module tb_suso_reverse;
  import rs_pkg::*;
  op_e             op;
  logic            dst_is_x;
  logic [XLEN-1:0] result, other, old_val;
  int unsigned checks = 0, failures = 0;

  suso_reverse dut (.op(op), .dst_is_x(dst_is_x), .result(result), .other(other),
                    .old_val(old_val));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      logic [XLEN-1:0] ov, y;
      ov = {$urandom, $urandom};
      y  = (i % 7 == 0) ? '1 : {$urandom, $urandom};
      op = op_e'(i % 3 == 0 ? OP_ADD : i % 3 == 1 ? OP_SUB : OP_XOR);
      dst_is_x = $urandom_range(1);
      other = y;
      case (op)
        OP_ADD:  result = ov + y;
        OP_SUB:  result = dst_is_x ? ov - y : y - ov;
        default: result = ov ^ y;
      endcase
      #1;
      checks++;
      if (old_val !== ov) begin
        failures++;
        $display("FAIL op %0d dst_is_x %b: got %h expected %h", op, dst_is_x, old_val, ov);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
