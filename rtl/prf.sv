// prf: physical register file with the two hardwired common-value registers.
//
// Storage index 0 always reads zero and index 1 always reads one; they are
// never written. Indices 2..NUM_PREG+1 are ordinary storage. Reads are
// combinational; writes take effect at the clock edge, so an instruction
// issued in the cycle after its producer reads the produced value. Ports are
// addressed by storage index, so all versions of a shared register reach the
// same entry.
//
// Follows the document: dedicated zero and one registers outside the pool.
// Own choices: port counts (two reads per issue slot plus two for unwinding,
// one write per issue slot plus one for unwinding), no reset of contents
// (every entry is written before it is read).
module prf
  import rs_pkg::*;
#(
  parameter int unsigned NUM_PREG = 160,
  parameter int unsigned NR       = 10,
  parameter int unsigned NW       = 5
) (
  input  logic                clk,
  input  logic [PREG_W-1:0]   raddr [NR],
  output logic [XLEN-1:0]     rdata [NR],
  input  logic [NW-1:0]       we,
  input  logic [PREG_W-1:0]   waddr [NW],
  input  logic [XLEN-1:0]     wdata [NW]
);
  logic [XLEN-1:0] mem [NUM_PREG + 2];

  always_comb
    for (int r = 0; r < NR; r++)
      rdata[r] = (raddr[r] == PREG_W'(0)) ? XLEN'(0)
               : (raddr[r] == PREG_W'(1)) ? XLEN'(1)
               : mem[raddr[r]];

  always_ff @(posedge clk)
    for (int w = 0; w < NW; w++)
      if (we[w] && waddr[w] > PREG_W'(1)) mem[waddr[w]] <= wdata[w];
endmodule
