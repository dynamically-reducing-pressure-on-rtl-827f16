// er_queue: early-release request buffer and one-cycle broadcast delay.
//
// When an instruction whose result was 0 or 1 commits, its destination tag
// becomes a candidate for early release. Up to W candidates per cycle enter
// this small FIFO; one per cycle leaves it and is searched for in the RAT
// through its CAM port (er_tag/er_val out, er_match back, same cycle). On a
// match the storage index is returned to the free list in that same cycle
// (rel_valid/rel_preg) and the tag is held for one cycle, after which it is
// broadcast to the issue queue and reorder buffer (bc_*). Without a match the
// candidate is simply dropped: some younger instruction has already remapped
// the logical register, and that instruction frees the register at commit.
// hold stops the search while the RAT is being restored or unwound.
//
// Stale candidates: while a candidate waits, a younger instruction that
// remapped the same logical register may commit and free the register, and
// the register may be handed out again under the very same tag. A search
// would then wrongly release the new owner. So every register freed at
// commit (kill_*) and every register released here removes all waiting and
// arriving candidates with the same storage index.
//
// Follows the document: commit-time candidates, one CAM search per cycle with
// a small buffer for bursts, release on a match, the one-cycle delay buffer
// in front of the issue-queue broadcast. Own choice: DEPTH = 4; the commit
// stage is held back while the buffer lacks room (room output).
module er_queue
  import rs_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 4,
  parameter int unsigned CNT_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [CNT_W-1:0]  room,
  input  logic [W-1:0]      in_valid,
  input  tag_t              in_tag [W],
  input  logic [W-1:0]      in_val,
  input  logic              hold,
  input  logic [W-1:0]      kill_valid,   // registers freed by commit
  input  preg_t             kill_preg [W],
  // RAT CAM port
  output logic              er_valid,
  output tag_t              er_tag,
  output logic              er_val,
  input  logic              er_match,
  // register returned to the free list
  output logic              rel_valid,
  output preg_t             rel_preg,
  // delayed broadcast
  output logic              bc_valid,
  output tag_t              bc_tag,
  output logic              bc_val
);
  tag_t             q_tag [DEPTH];
  logic [DEPTH-1:0] q_val;
  int unsigned      cnt;

  always_comb begin
    room      = CNT_W'(DEPTH - cnt);
    er_valid  = (cnt != 0) && !hold;
    er_tag    = q_tag[0];
    er_val    = q_val[0];
    rel_valid = er_valid && er_match;
    rel_preg  = q_tag[0][PREG_W-1:0];
  end

  function automatic logic killed(tag_t t);
    logic k;
    k = rel_valid && (t[PREG_W-1:0] == rel_preg);
    for (int j = 0; j < W; j++)
      if (kill_valid[j] && t[PREG_W-1:0] == kill_preg[j]) k = 1'b1;
    return k;
  endfunction

  // Next queue contents: drop the searched candidate and killed ones, keep
  // the order, then append the arriving candidates.
  tag_t             nt [DEPTH];
  logic [DEPTH-1:0] nv;
  int unsigned      n;
  always_comb begin
    n = 0;
    for (int i = 0; i < DEPTH; i++) begin
      nt[i] = q_tag[i];
      nv[i] = q_val[i];
    end
    for (int i = 0; i < DEPTH; i++)
      if (i < int'(cnt) && !(i == 0 && er_valid) && !killed(q_tag[i])) begin
        nt[n] = q_tag[i];
        nv[n] = q_val[i];
        n++;
      end
    for (int k = 0; k < W; k++)
      if (in_valid[k] && n < DEPTH && !killed(in_tag[k])) begin
        nt[n] = in_tag[k];
        nv[n] = in_val[k];
        n++;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= 0;
      q_val    <= '0;
      bc_valid <= 1'b0;
      bc_tag   <= '0;
      bc_val   <= 1'b0;
      for (int i = 0; i < DEPTH; i++) q_tag[i] <= '0;
    end else begin
      q_tag    <= nt;
      q_val    <= nv;
      cnt      <= n;
      bc_valid <= rel_valid;
      bc_tag   <= er_tag;
      bc_val   <= er_val;
    end
  end
endmodule
