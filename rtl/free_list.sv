// free_list: FIFO of free physical registers with checkpointable read pointer.
//
// Holds the storage indices of the NUM_PREG pooled registers (P0 and P1 are
// never in it). Up to W registers are taken per cycle from the head, in FIFO
// order; up to NPUSH released registers are appended at the tail per cycle
// (the commit stage's old mappings plus one early release). The head pointer
// can be restored from a branch checkpoint, and stepped back one entry at a
// time while the reorder buffer is unwound after an exception. Both give back
// the registers taken since, which are still in their slots because a
// register in flight is never freed before the instruction that took it
// commits.
//
// Pointers run over 0..2*NUM_PREG-1 so that a full and an empty list differ.
// The outputs show the next W free registers (combinational from the head)
// and the count. All updates take effect at the clock edge.
//
// Follows the document: FIFO allocation, release at commit, head pointer
// checkpointed with the RAT. Own choices: reset contents (all pooled
// registers free, every logical register mapped to P0), pointer encoding.
module free_list
  import rs_pkg::*;
#(
  parameter int unsigned NUM_PREG = 160,
  parameter int unsigned W        = 4,
  parameter int unsigned NPUSH    = W + 1,
  parameter int unsigned PTR_W    = $clog2(2 * NUM_PREG),
  parameter int unsigned CNT_W    = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic [PREG_W-1:0]        head_preg [W],
  output logic [CNT_W-1:0]         count,
  output logic [PTR_W-1:0]         head_ptr,
  input  logic [$clog2(W+1)-1:0]   pop_n,
  input  logic [NPUSH-1:0]         push_valid,
  input  logic [PREG_W-1:0]        push_preg [NPUSH],
  input  logic                     restore_en,
  input  logic [PTR_W-1:0]         restore_ptr,
  input  logic                     unpop        // step the head back by one
);
  logic [PREG_W-1:0] mem [NUM_PREG];
  logic [PTR_W-1:0]  head_q, tail_q;

  function automatic logic [PTR_W-1:0] ptr_add(logic [PTR_W-1:0] p, int unsigned n);
    int unsigned s;
    s = (int'(p) + n) % (2 * NUM_PREG);
    return PTR_W'(s);
  endfunction

  function automatic int unsigned idx(logic [PTR_W-1:0] p);
    return int'(p) % NUM_PREG;
  endfunction

  always_comb begin
    count    = CNT_W'((int'(tail_q) + 2 * NUM_PREG - int'(head_q)) % (2 * NUM_PREG));
    head_ptr = head_q;
    for (int i = 0; i < W; i++) head_preg[i] = mem[idx(ptr_add(head_q, i))];
  end

  int unsigned       np;           // registers appended this cycle
  int unsigned       push_pos [NPUSH];
  always_comb begin
    np = 0;
    for (int k = 0; k < NPUSH; k++) begin
      push_pos[k] = idx(ptr_add(tail_q, np));
      if (push_valid[k]) np++;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= PTR_W'(NUM_PREG);
      for (int i = 0; i < NUM_PREG; i++) mem[i] <= PREG_W'(i + 2);
    end else begin
      for (int k = 0; k < NPUSH; k++)
        if (push_valid[k]) mem[push_pos[k]] <= push_preg[k];
      tail_q <= ptr_add(tail_q, np);
      if (restore_en)  head_q <= restore_ptr;
      else if (unpop)  head_q <= ptr_add(head_q, 2 * NUM_PREG - 1);
      else             head_q <= ptr_add(head_q, int'(pop_n));
    end
  end
endmodule
