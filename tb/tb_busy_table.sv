// tb_busy_table: random set and clear traffic against a bit-vector model;
// a tag set and cleared in the same cycle must end up busy.
module tb_busy_table;
  localparam int unsigned TAG_W = 6, NSET = 3, NCLR = 2;
  logic                  clk = 1'b0, rst_n = 1'b0;
  logic [NSET-1:0]       set_valid;
  logic [TAG_W-1:0]      set_tag [NSET];
  logic [NCLR-1:0]       clr_valid;
  logic [TAG_W-1:0]      clr_tag [NCLR];
  logic [(1<<TAG_W)-1:0] busy_q, model;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  busy_table #(.TAG_W(TAG_W), .NSET(NSET), .NCLR(NCLR)) dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_valid = '0; clr_valid = '0;
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks++;
      if (busy_q !== model) begin
        failures++;
        $display("FAIL cycle %0d busy %h expected %h", c, busy_q, model);
      end
      for (int i = 0; i < NSET; i++) begin
        set_valid[i] = $urandom_range(1);
        set_tag[i]   = TAG_W'($urandom);
      end
      for (int i = 0; i < NCLR; i++) begin
        clr_valid[i] = $urandom_range(1);
        // often clear a tag that is being set in the same cycle
        clr_tag[i]   = ($urandom_range(3) == 0) ? set_tag[0] : TAG_W'($urandom);
      end
      for (int i = 0; i < NCLR; i++) if (clr_valid[i]) model[clr_tag[i]] = 1'b0;
      for (int i = 0; i < NSET; i++) if (set_valid[i]) model[set_tag[i]] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
