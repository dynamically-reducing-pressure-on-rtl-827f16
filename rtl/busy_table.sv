// busy_table: one "value not yet produced" bit per physical register tag.
//
// Indexed by the full tag (storage index plus version bits), so each
// version of a shared register has its own bit. A tag is set busy when the
// rename stage hands it to an instruction and cleared when that instruction
// issues and broadcasts its tag. The rename stage reads the whole vector to
// decide whether a source operand is already available. Set and clear take
// effect at the clock edge; all bits are clear after reset.
//
// The document relies on the usual wakeup scheme of an R10000-like core and
// does not describe this table; it is this design's own, minimal version.
module busy_table #(
  parameter int unsigned TAG_W = 10,
  parameter int unsigned NSET  = 4,
  parameter int unsigned NCLR  = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NSET-1:0]       set_valid,
  input  logic [TAG_W-1:0]      set_tag [NSET],
  input  logic [NCLR-1:0]       clr_valid,
  input  logic [TAG_W-1:0]      clr_tag [NCLR],
  output logic [(1<<TAG_W)-1:0] busy_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_q <= '0;
    else begin
      for (int k = 0; k < NCLR; k++) if (clr_valid[k]) busy_q[clr_tag[k]] <= 1'b0;
      for (int k = 0; k < NSET; k++) if (set_valid[k]) busy_q[set_tag[k]] <= 1'b1;
    end
  end
endmodule
