// tb_alu: random and corner operands for every operation, compared with
// results computed in the testbench.
module tb_alu;
  import rs_pkg::*;
  op_e             op;
  logic [XLEN-1:0] a, b, y;
  int unsigned checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic logic [XLEN-1:0] model(op_e o, logic [XLEN-1:0] x, logic [XLEN-1:0] z);
    logic [2*XLEN-1:0] p;
    logic [XLEN-1:0]   r;
    int unsigned       sh;
    sh = z % 64;
    case (o)
      OP_ADD: return x + z;
      OP_SUB: return x + ~z + 1;
      OP_MUL: begin p = x * z; return p[XLEN-1:0]; end
      OP_AND: return x & z;
      OP_OR:  return x | z;
      OP_XOR: return (x | z) & ~(x & z);
      OP_SLL: begin r = x; repeat (sh) r = {r[XLEN-2:0], 1'b0}; return r; end
      OP_SRL: begin r = x; repeat (sh) r = {1'b0, r[XLEN-1:1]}; return r; end
      OP_SRA: begin r = x; repeat (sh) r = {r[XLEN-1], r[XLEN-1:1]}; return r; end
      default: return '0;
    endcase
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o <= 9; o++)
      for (int i = 0; i < 100; i++) begin
        op = op_e'(o);
        a  = (i == 0) ? '1 : (i == 1) ? '0 : {$urandom, $urandom};
        b  = (i < 3) ? XLEN'(i) : {$urandom, $urandom};
        #1;
        checks++;
        if (y !== model(op, a, b)) begin
          failures++;
          $display("FAIL op %0d a=%h b=%h: %h", o, a, b, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
