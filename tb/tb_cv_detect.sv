// tb_cv_detect: checks the 0/1 result detector on the values around 0 and 1,
// single set bits and random values, with and without the enable.
module tb_cv_detect;
  import rs_pkg::*;
  logic            en, cv, cv_val;
  logic [XLEN-1:0] result;
  int unsigned checks = 0, failures = 0;

  cv_detect dut (.en(en), .result(result), .cv(cv), .cv_val(cv_val));

  task automatic try(logic e, logic [XLEN-1:0] v);
    logic exp_cv;
    en = e; result = v;
    #1;
    exp_cv = e && (v == 0 || v == 1);
    checks++;
    if (cv !== exp_cv || (exp_cv && cv_val !== v[0])) begin
      failures++;
      $display("FAIL en=%b value=%h: cv=%b val=%b", e, v, cv, cv_val);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      try(e[0], 0); try(e[0], 1); try(e[0], 2); try(e[0], 3); try(e[0], '1);
      for (int b = 0; b < XLEN; b++) try(e[0], XLEN'(1) << b);
      for (int i = 0; i < 200; i++) try(e[0], {$urandom, $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
