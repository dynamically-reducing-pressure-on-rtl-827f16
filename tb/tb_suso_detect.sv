// tb_suso_detect: random instructions and RAT states; the sharing decision
// and the incremented tag are compared with the rules written out here.
module tb_suso_detect;
  import rs_pkg::*;
  op_e               op;
  logic              has_dst, use_imm, ref_bit, triv0, suso;
  logic [LREG_W-1:0] dst, src1, src2;
  tag_t              cur_tag, new_tag;
  int unsigned checks = 0, failures = 0;

  suso_detect dut (.op(op), .has_dst(has_dst), .dst(dst), .src1(src1), .src2(src2),
                   .use_imm(use_imm), .ref_bit(ref_bit), .cur_tag(cur_tag), .triv0(triv0),
                   .suso(suso), .new_tag(new_tag));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned nsuso;
    nsuso = 0;
    for (int i = 0; i < 4000; i++) begin
      logic exp_s, self_ow;
      int   ver, st;
      op      = op_e'($urandom_range(9));
      has_dst = $urandom_range(7) != 0;
      use_imm = $urandom_range(1);
      dst     = LREG_W'($urandom_range(3));
      src1    = LREG_W'($urandom_range(3));
      src2    = LREG_W'($urandom_range(3));
      ref_bit = $urandom_range(3) == 0;
      triv0   = $urandom_range(7) == 0;
      ver     = $urandom_range(3);
      st      = (i % 5 == 0) ? $urandom_range(1) : $urandom_range(2, 161);
      cur_tag = {VER_W'(ver), PREG_W'(st)};
      #1;
      self_ow = has_dst && (dst == src1 || (!use_imm && dst == src2));
      exp_s   = self_ow && !ref_bit && st >= 2 && ver < 3 && !triv0
             && (op == OP_ADD || op == OP_SUB || op == OP_XOR)
             && !(!use_imm && src1 == src2);
      checks++;
      if (suso !== exp_s) begin
        failures++;
        $display("FAIL op %0d d%0d s%0d s%0d imm%b ref%b tag %h: suso %b", op, dst, src1, src2,
                 use_imm, ref_bit, cur_tag, suso);
      end
      if (exp_s) begin
        nsuso++;
        checks++;
        if (new_tag !== {VER_W'(ver + 1), PREG_W'(st)}) begin
          failures++;
          $display("FAIL new tag %h for %h", new_tag, cur_tag);
        end
      end
    end
    checks++;
    if (nsuso < 20) begin
      failures++;
      $display("FAIL too few sharing cases: %0d", nsuso);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
