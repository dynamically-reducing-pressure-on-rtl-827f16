// rob: reorder buffer with common-value marks and SUSO undo information.
//
// A circular buffer of ROB_N entries in program order. Rename appends up to
// W entries per cycle at the tail; the execute stage marks entries done and,
// through the two extra bits of the document's scheme, records whether the
// result was the common value 0 or 1. The head commits up to W done entries
// per cycle in order. Commit stops at an entry that raised an exception
// (reported on exc_valid) and before an entry whose common-value release
// request would not fit into the early-release queue (er_room).
//
// Recovery: a mispredicted branch cuts the tail back to just after the
// branch. After an exception the core unwinds the buffer from the tail, one
// entry per cycle (walk_pop), reading the youngest entry on tail_entry.
//
// For a SUSO entry the buffer keeps the tag of the operand that was not
// overwritten, needed to undo the instruction. The early-release broadcast
// also reaches these fields, so that a remaining operand whose register was
// released early is read as the dedicated register P0 or P1.
//
// Follows the document: old mapping kept per entry and released at commit,
// two extra bits per entry for the common value, no release for a SUSO
// entry, exception handling by walking the buffer in reverse. Own choices:
// ROB_N = 256 (the document's per-thread size), stalling commit when the
// early-release queue is full, the early-release snoop of SUSO operand tags.
module rob
  import rs_pkg::*;
#(
  parameter int unsigned ROB_N = 256,
  parameter int unsigned W     = 4,
  parameter int unsigned IW    = 4,
  parameter int unsigned CNT_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [CNT_W-1:0]  free_cnt,
  output logic [CNT_W-1:0]  count,
  output robi_t             head,
  output robi_t             d_idx [W],
  // dispatch (a prefix of the slots)
  input  logic [W-1:0]      d_valid,
  input  rob_entry_t        d_entry [W],
  // completion
  input  logic [IW-1:0]     c_valid,
  input  robi_t             c_idx [IW],
  input  logic [IW-1:0]     c_cv,
  input  logic [IW-1:0]     c_cvv,
  // commit
  input  logic              commit_en,
  input  logic [CNT_W-1:0]  er_room,
  output logic [W-1:0]      cm_valid,
  output rob_entry_t        cm_entry [W],
  output logic              exc_valid,
  output logic              er_block,     // commit waits for early-release room
  output rob_entry_t        head_entry,
  // branch squash
  input  logic              sq_br,
  input  robi_t             sq_rob,
  // exception unwinding
  input  logic              walk_pop,
  output rob_entry_t        tail_entry,
  // early-release broadcast (delayed one cycle)
  input  logic              er_valid,
  input  tag_t              er_tag,
  input  logic              er_val
);
  rob_entry_t   mem [ROB_N];
  robi_t        head_q, tail_q;
  logic [CNT_W-1:0] cnt_q;

  function automatic robi_t inc(robi_t p, int unsigned n);
    return robi_t'((int'(p) + n) % ROB_N);
  endfunction

  function automatic logic er_cand(rob_entry_t e);
    return e.wr && e.cv && (e.tag[PREG_W-1:1] != '0);
  endfunction

  always_comb begin
    int unsigned room;
    logic        go;
    free_cnt   = CNT_W'(ROB_N) - cnt_q;
    count      = cnt_q;
    head       = head_q;
    head_entry = mem[head_q];
    tail_entry = mem[inc(tail_q, ROB_N - 1)];
    exc_valid  = (cnt_q != '0) && mem[head_q].done && mem[head_q].excpt;
    for (int k = 0; k < W; k++) d_idx[k] = inc(tail_q, k);
    room = int'(er_room);
    go   = commit_en;
    er_block = 1'b0;
    for (int k = 0; k < W; k++) begin
      cm_entry[k] = mem[inc(head_q, k)];
      if (CNT_W'(k) >= cnt_q || !cm_entry[k].done || cm_entry[k].excpt) go = 1'b0;
      if (er_cand(cm_entry[k])) begin
        if (room == 0) begin
          if (go) er_block = 1'b1;
          go = 1'b0;
        end
        else if (go) room--;
      end
      cm_valid[k] = go;
    end
  end

  int unsigned ncm, nd;   // entries committed / dispatched this cycle
  always_comb begin
    ncm = 0;
    nd  = 0;
    for (int k = 0; k < W; k++) if (cm_valid[k]) ncm++;
    for (int k = 0; k < W; k++) if (d_valid[k]) nd++;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
    end else begin
      // completion and early-release snoop
      for (int j = 0; j < IW; j++)
        if (c_valid[j]) begin
          mem[c_idx[j]].done <= 1'b1;
          mem[c_idx[j]].cv   <= c_cv[j];
          mem[c_idx[j]].cvv  <= c_cvv[j];
        end
      if (er_valid)
        for (int e = 0; e < ROB_N; e++)
          if (mem[e].suso && mem[e].rem == er_tag) mem[e].rem <= {{(TAG_W-1){1'b0}}, er_val};
      head_q <= inc(head_q, ncm);
      if (walk_pop) begin
        tail_q <= inc(tail_q, ROB_N - 1);
        cnt_q  <= cnt_q - 1'b1;
      end else if (sq_br) begin
        tail_q <= inc(sq_rob, 1);
        cnt_q  <= CNT_W'(rob_age(sq_rob, head_q, ROB_N) + 1 - ncm);
      end else begin
        for (int k = 0; k < W; k++)
          if (d_valid[k]) mem[inc(tail_q, k)] <= d_entry[k];
        tail_q <= inc(tail_q, nd);
        cnt_q  <= cnt_q + CNT_W'(nd) - CNT_W'(ncm);
      end
    end
  end
endmodule
