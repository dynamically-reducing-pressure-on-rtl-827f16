// issue_queue: out-of-order issue window with wakeup and early-release
// broadcast ports.
//
// Each entry holds an instruction waiting for its source operands. Every
// cycle up to W renamed instructions are written into free entries (lowest
// index first), and up to IW entries whose operands are all ready are
// selected for issue (lowest index first) and leave the queue. Wakeup: each
// issued instruction broadcasts its destination tag, which marks matching
// source operands ready at the clock edge.
//
// Early-release broadcast: a dedicated port carries the tag of a register
// that has just been released early and whose value is the common value 0 or
// 1. Matching source operands are marked as common values: at issue their
// value is taken as 0 or 1 instead of being read from the register file. The
// port is fed one cycle after the RAT update, so instructions that read the
// RAT in the same cycle as the update, and are written into the queue at its
// end, are still reached.
//
// Squash: a mispredicted branch removes every entry younger than itself
// (ages are reorder-buffer distances from the head); an exception removes
// all entries.
//
// Follows the document: dedicated broadcast port that marks a source as a
// common value, one cycle later than the RAT update. Own choices: size 40
// (the document's integer queue size), select by position rather than by age.
module issue_queue
  import rs_pkg::*;
#(
  parameter int unsigned N      = 40,
  parameter int unsigned W      = 4,
  parameter int unsigned IW     = 4,
  parameter int unsigned ROB_N  = 256,
  parameter int unsigned CNT_W  = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic [CNT_W-1:0]   free_cnt,
  // dispatch
  input  logic [W-1:0]       d_valid,
  input  iq_entry_t          d_entry [W],
  // issue
  input  logic               issue_en,
  output logic [IW-1:0]      i_valid,
  output iq_entry_t          i_entry [IW],
  // wakeup broadcast (tags of the instructions issued this cycle)
  input  logic [IW-1:0]      wk_valid,
  input  logic [TAG_W-1:0]   wk_tag [IW],
  // early-release broadcast (delayed one cycle)
  input  logic               er_valid,
  input  logic [TAG_W-1:0]   er_tag,
  input  logic               er_val,
  // squash
  input  logic               sq_br,
  input  logic [ROB_W-1:0]   sq_rob,
  input  logic [ROB_W-1:0]   rob_head,
  input  logic               flush_all
);
  iq_entry_t      ent [N];
  logic [N-1:0]   vld;
  logic [N-1:0]   rdy, pick;
  int unsigned    slot_of [W];   // entry receiving dispatch slot k
  logic [W-1:0]   slot_ok;

  // Free-entry count and placement of dispatched instructions: the k-th
  // dispatched instruction goes to the k-th free entry.
  int unsigned    free_idx [W];
  int unsigned    nfree_w;
  always_comb begin
    int unsigned nfree, r;
    nfree   = 0;
    nfree_w = 0;
    for (int j = 0; j < W; j++) free_idx[j] = 0;
    for (int e = 0; e < N; e++)
      if (!vld[e]) begin
        if (nfree_w < W) begin
          free_idx[nfree_w] = e;
          nfree_w++;
        end
        nfree++;
      end
    free_cnt = CNT_W'(nfree);
    r = 0;
    for (int k = 0; k < W; k++) begin
      slot_of[k] = free_idx[r < W ? r : 0];
      slot_ok[k] = d_valid[k] && (r < nfree_w);
      if (d_valid[k]) r++;
    end
  end

  // Select up to IW ready entries, lowest index first.
  always_comb begin
    int unsigned n;
    n    = 0;
    pick = '0;
    for (int j = 0; j < IW; j++) begin
      i_valid[j] = 1'b0;
      i_entry[j] = '0;
    end
    for (int e = 0; e < N; e++) begin
      rdy[e] = vld[e] && ent[e].r1 && ent[e].r2;
      if (issue_en && rdy[e] && n < IW) begin
        pick[e]    = 1'b1;
        i_valid[n] = 1'b1;
        i_entry[n] = ent[e];
        n++;
      end
    end
  end

  function automatic iq_entry_t snoop(iq_entry_t x);
    iq_entry_t y;
    y = x;
    for (int j = 0; j < IW; j++)
      if (wk_valid[j]) begin
        if (y.s1 == wk_tag[j]) y.r1 = 1'b1;
        if (y.s2 == wk_tag[j] && !y.use_imm) y.r2 = 1'b1;
      end
    if (er_valid) begin
      if (y.s1 == er_tag) begin
        y.r1 = 1'b1;  y.c1 = 1'b1;  y.v1 = er_val;
      end
      if (y.s2 == er_tag && !y.use_imm) begin
        y.r2 = 1'b1;  y.c2 = 1'b1;  y.v2 = er_val;
      end
    end
    return y;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      for (int e = 0; e < N; e++) ent[e] <= '0;
    end else if (flush_all) begin
      vld <= '0;
    end else begin
      for (int e = 0; e < N; e++) begin
        if (pick[e]) vld[e] <= 1'b0;
        else if (vld[e]) begin
          ent[e] <= snoop(ent[e]);
          if (sq_br && rob_age(ent[e].rob, rob_head, ROB_N) > rob_age(sq_rob, rob_head, ROB_N))
            vld[e] <= 1'b0;
        end
      end
      if (!sq_br)
        for (int k = 0; k < W; k++)
          if (d_valid[k] && slot_ok[k]) begin
            vld[slot_of[k]] <= 1'b1;
            ent[slot_of[k]] <= d_entry[k];
          end
    end
  end
endmodule
