// tb_free_list: random pops, pushes, checkpoints, restores and single-step
// unpops against a queue model. Registers taken after the last checkpoint
// are held back from being pushed, as in the core, so a restore can return
// them. Checks the visible head registers and the count every cycle and that
// no register is lost or duplicated.
module tb_free_list;
  import rs_pkg::*;
  localparam int unsigned NUM_PREG = 16, W = 4, NPUSH = 2;
  localparam int unsigned PTR_W = $clog2(2 * NUM_PREG);
  logic                   clk = 1'b0, rst_n = 1'b0;
  logic [PREG_W-1:0]      head_preg [W];
  logic [15:0]            count;
  logic [PTR_W-1:0]       head_ptr;
  logic [$clog2(W+1)-1:0] pop_n;
  logic [NPUSH-1:0]       push_valid;
  logic [PREG_W-1:0]      push_preg [NPUSH];
  logic                   restore_en, unpop;
  logic [PTR_W-1:0]       restore_ptr;
  int unsigned checks = 0, failures = 0;

  int unsigned fl[$];        // model of the list, head first
  int unsigned pend[$];      // taken since the checkpoint, oldest first
  int unsigned out[$];       // taken before the checkpoint: may be pushed
  logic [PTR_W-1:0] snap;
  int unsigned nrestore = 0, nunpop = 0;

  always #5 clk = ~clk;

  free_list #(.NUM_PREG(NUM_PREG), .W(W), .NPUSH(NPUSH)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pop_n = '0; push_valid = '0; restore_en = 1'b0; unpop = 1'b0; restore_ptr = '0;
    for (int i = 0; i < NUM_PREG; i++) fl.push_back(i + 2);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    snap = '0;
    for (int c = 0; c < 4000; c++) begin
      int act, np;
      @(negedge clk);
      checks++;
      if (count !== 16'(fl.size())) begin
        failures++;
        $display("FAIL cycle %0d count %0d expected %0d", c, count, fl.size());
      end
      for (int i = 0; i < W && i < fl.size(); i++) begin
        checks++;
        if (head_preg[i] !== PREG_W'(fl[i])) begin
          failures++;
          $display("FAIL cycle %0d head[%0d]=%0d expected %0d", c, i, head_preg[i], fl[i]);
        end
      end
      pop_n = '0; restore_en = 1'b0; unpop = 1'b0; push_valid = '0;
      act = $urandom_range(9);
      if (act == 0) begin
        // restore to the checkpoint
        restore_en  = 1'b1;
        restore_ptr = snap;
        while (pend.size() != 0) fl.push_front(pend.pop_back());
        nrestore++;
      end else if (act == 1 && pend.size() != 0) begin
        unpop = 1'b1;
        fl.push_front(pend.pop_back());
        nunpop++;
      end else if (act == 2) begin
        // new checkpoint at the current head
        snap = head_ptr;
        while (pend.size() != 0) out.push_back(pend.pop_front());
      end else begin
        np = $urandom_range(W);
        if (np > fl.size()) np = fl.size();
        pop_n = ($clog2(W+1))'(np);
        repeat (np) pend.push_back(fl.pop_front());
      end
      for (int k = 0; k < NPUSH; k++)
        if (out.size() != 0 && $urandom_range(2) != 0) begin
          int j;
          j = $urandom_range(out.size() - 1);
          push_valid[k] = 1'b1;
          push_preg[k]  = PREG_W'(out[j]);
          fl.push_back(out[j]);
          out.delete(j);
        end
    end
    checks++;
    if (nrestore < 50 || nunpop < 50) begin
      failures++;
      $display("FAIL too few restores (%0d) or unpops (%0d)", nrestore, nunpop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
