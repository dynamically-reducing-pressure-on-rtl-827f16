// tb_prf: random writes and reads against a model; entries 0 and 1 must
// read as the constants 0 and 1 even after writes to them; a write becomes
// visible at the next clock edge.
module tb_prf;
  import rs_pkg::*;
  localparam int unsigned NUM_PREG = 160;
  localparam int unsigned NR = 4, NW = 2;
  logic            clk = 1'b0;
  preg_t           raddr [NR];
  logic [XLEN-1:0] rdata [NR];
  logic [NW-1:0]   we;
  preg_t           waddr [NW];
  logic [XLEN-1:0] wdata [NW];
  logic [XLEN-1:0] model [NUM_PREG + 2];
  logic [NUM_PREG+1:0] written;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  prf #(.NUM_PREG(NUM_PREG), .NR(NR), .NW(NW)) dut (
    .clk(clk), .raddr(raddr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    written = '0;
    we = '0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // check reads
      for (int r = 0; r < NR; r++) begin
        raddr[r] = PREG_W'($urandom_range(NUM_PREG + 1));
      end
      #1;
      for (int r = 0; r < NR; r++) begin
        int a;
        a = int'(raddr[r]);
        if (a < 2) begin
          checks++;
          if (rdata[r] !== XLEN'(a)) begin
            failures++;
            $display("FAIL P%0d reads %h", a, rdata[r]);
          end
        end else if (written[a]) begin
          checks++;
          if (rdata[r] !== model[a]) begin
            failures++;
            $display("FAIL reg %0d reads %h expected %h", a, rdata[r], model[a]);
          end
        end
      end
      // writes for this edge (distinct addresses)
      waddr[0] = PREG_W'($urandom_range(NUM_PREG + 1));
      waddr[1] = (waddr[0] == PREG_W'(NUM_PREG + 1)) ? PREG_W'(0) : waddr[0] + 1'b1;
      for (int w = 0; w < NW; w++) begin
        we[w]    = $urandom_range(1);
        wdata[w] = {$urandom, $urandom};
      end
      @(posedge clk);
      #1;
      for (int w = 0; w < NW; w++)
        if (we[w] && waddr[w] > 1) begin
          model[waddr[w]]   = wdata[w];
          written[waddr[w]] = 1'b1;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
