// regshare_core: out-of-order integer backend with simple physical register
// sharing.
//
// The core renames, issues, executes and commits a stream of integer
// instructions delivered by a front end (up to W per cycle, in program
// order). Registers are renamed R10000-style onto a pool of NUM_PREG
// physical registers, and three mechanisms reduce how many of them are held:
//   * trivial 0  - an instruction whose result is known to be zero from its
//                  operands' mappings is mapped to the hardwired register P0
//                  at rename and allocates nothing;
//   * early release of 0/1 - an instruction whose result is 0 or 1 is marked
//                  in the reorder buffer; at commit its register is searched
//                  for in the RAT (one per cycle, through a small queue) and,
//                  if still mapped, released at once, the RAT and all
//                  checkpoints being redirected to P0/P1 and, one cycle later,
//                  waiting issue-queue operands marked as the constant;
//   * SUSO sharing - a single-use self-overwriting instruction in the same
//                  basic block reuses its source's register under a new
//                  version tag (up to three times per register).
//
// Pipeline (one cycle per step): rename+dispatch -> issue (operand read,
// execute, write-back and wakeup broadcast in the same cycle) -> commit.
// A branch resolves when it issues; a mispredicted one restores the RAT
// checkpoint and free-list head taken at its rename and squashes younger
// work in that cycle (redirect tells the front end, one cycle later, to resume
// after the branch). An instruction flagged as excepting is handled when it reaches the
// reorder-buffer head: the buffer is unwound from the tail one entry per cycle,
// restoring each old mapping, returning allocated registers to the free list
// and reversing already-executed SUSO instructions; then exc_busy falls and
// the front end resends from exc_seq. The dbg_* port reads the value of a
// logical register through the current mapping (architectural once drained).
//
// Follows the document: the "simple" sharing scheme of its design section
// (values 0/1 only, trivial 0 only, release at commit, one release per cycle
// with a buffer, one-cycle delayed issue-queue broadcast, 2 version bits,
// SUSO within a basic block, reversal on exceptions), 160 pooled registers,
// 40-entry issue queue, 256-entry reorder buffer. Own choices: rename and
// issue widths of 4 (the document's four-way example), single-cycle
// execution for all operations, 4 checkpoints, 4-entry release queue,
// unwinding the whole buffer rather than restoring a checkpoint first,
// no loads, stores or caches, one thread. SHARE_VALUE and SHARE_LIFETIME
// turn the value-based and the lifetime-based mechanisms off, so that the
// two can be compared in isolation as the document does.
module regshare_core
  import rs_pkg::*;
#(
  parameter int unsigned W         = 4,
  parameter int unsigned IW        = 4,
  parameter int unsigned NUM_PREG  = 160,
  parameter int unsigned IQ_N      = 40,
  parameter int unsigned ROB_N     = 256,
  parameter int unsigned NCKPT     = 4,
  parameter int unsigned ERQ_DEPTH = 4,
  // Sharing mechanisms, for comparison runs: value-based (trivial 0 and
  // early release of 0/1) and lifetime-based (SUSO). Both on by default.
  parameter bit          SHARE_VALUE    = 1'b1,
  parameter bit          SHARE_LIFETIME = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // front end
  input  logic [W-1:0]          in_valid,
  input  insn_t                 in_insn [W],
  output logic [W-1:0]          in_acc,
  output logic                  redirect,
  output logic                  exc_taken,
  output logic [31:0]           exc_seq,
  output logic                  exc_busy,
  // state inspection
  input  logic [LREG_W-1:0]     dbg_lreg,
  output logic [XLEN-1:0]       dbg_value,
  output tag_t                  dbg_tag,
  output logic [15:0]           rob_count,
  output logic [15:0]           fl_count,
  output perf_t                 perf
);
  localparam int unsigned CNT_W = 16;
  localparam int unsigned FLP_W = $clog2(2 * NUM_PREG);
  localparam int unsigned NR    = 2 * IW + 3;
  localparam int unsigned NWR   = IW + 1;

  // ---------------------------------------------------------------- state
  typedef enum logic {S_RUN, S_WALK} state_e;
  state_e state_q;

  // ---------------------------------------------------------------- nets
  tag_t              map_q [NLREG];
  logic [NLREG-1:0]  ref_q;
  tag_t              map_next [NLREG];
  logic [NLREG-1:0]  ref_next;
  tag_t              ckpt_map [NLREG];
  logic              ckpt_avail, ckpt_take;
  cki_t              ckpt_free_id;
  logic [$clog2(W)-1:0] ckpt_slot;
  logic [FLP_W-1:0]  restore_flp, fl_head_ptr, ckpt_flp;

  preg_t             fl_preg [W];
  logic [CNT_W-1:0]  fl_cnt, rob_free, rob_cnt, iq_free, er_room;
  logic [(1<<TAG_W)-1:0] busy_q;

  logic [W-1:0]      acc, s1_rdy, s2_rdy, wr_dst, alloc, suso, triv0, to_iq;
  tag_t              s1_tag [W], s2_tag [W], dst_tag [W], prev_tag [W];
  logic [$clog2(W+1)-1:0] n_alloc;
  logic              stall_reg;

  logic [IW-1:0]     i_valid;
  iq_entry_t         i_entry [IW];
  logic [IW-1:0]     wk_valid;
  tag_t              wk_tag [IW];

  robi_t             rob_head, d_idx [W];
  rob_entry_t        d_rob [W];
  iq_entry_t         d_iq [W];
  logic [W-1:0]      d_iq_valid;
  logic [W-1:0]      cm_valid;
  rob_entry_t        cm_entry [W];
  rob_entry_t        head_entry, tail_entry;
  logic              rob_exc, er_block;

  logic [IW-1:0]     c_valid, c_cv, c_cvv;
  robi_t             c_idx [IW];

  logic              er_valid, er_val, er_match, rel_valid;
  tag_t              er_tag;
  preg_t             rel_preg;
  logic              bc_valid, bc_val;
  tag_t              bc_tag;
  logic [W-1:0]      erq_in_valid, erq_in_val;
  tag_t              erq_in_tag [W];

  logic [W:0]        fl_push_valid;
  preg_t             fl_push_preg [W+1];

  preg_t             raddr [NR];
  logic [XLEN-1:0]   rdata [NR];
  logic [NWR-1:0]    we;
  preg_t             waddr [NWR];
  logic [XLEN-1:0]   wdata [NWR];

  logic [XLEN-1:0]   opa [IW], opb [IW], res [IW];
  logic [IW-1:0]     is_cv, cv_val;

  // Control of this cycle.
  logic              exc_now;     // excepting instruction at the head
  logic              walking;     // unwinding one entry this cycle
  logic              br_bad;
  cki_t              br_bad_ck;
  robi_t             br_bad_rob;
  logic [NCKPT-1:0]  ck_free;
  logic              hold_ren;
  logic              walk_alloc, walk_undo;
  logic [XLEN-1:0]   undo_val, walk_other;
  logic              issue_en;

  assign exc_now  = (state_q == S_RUN) && rob_exc;
  assign walking  = (state_q == S_WALK) && (rob_cnt != '0);
  assign issue_en = (state_q == S_RUN) && !exc_now;

  // ---------------------------------------------------------------- rename
  assign hold_ren = (state_q != S_RUN) || exc_now || br_bad;

  rename_unit #(.W(W), .IW(IW), .NUM_PREG(NUM_PREG), .CNT_W(CNT_W),
                .TRIV0_EN(SHARE_VALUE), .SUSO_EN(SHARE_LIFETIME)) u_ren (
    .hold(hold_ren), .in_valid(in_valid), .in_insn(in_insn),
    .map_q(map_q), .ref_q(ref_q), .fl_preg(fl_preg), .fl_count(fl_cnt),
    .rob_free(rob_free), .iq_free(iq_free), .ckpt_avail(ckpt_avail),
    .busy_q(busy_q), .wake_valid(wk_valid), .wake_tag(wk_tag),
    .acc(acc), .s1_tag(s1_tag), .s2_tag(s2_tag), .s1_rdy(s1_rdy), .s2_rdy(s2_rdy),
    .wr_dst(wr_dst), .dst_tag(dst_tag), .prev_tag(prev_tag), .alloc(alloc),
    .suso(suso), .triv0(triv0), .to_iq(to_iq), .n_alloc(n_alloc),
    .map_next(map_next), .ref_next(ref_next), .ckpt_take(ckpt_take),
    .ckpt_map(ckpt_map), .ckpt_slot(ckpt_slot), .stall_reg(stall_reg));

  assign in_acc = acc;

  // Free-list head as it stands right after the branch of this group.
  always_comb begin
    int unsigned n;
    n = 0;
    for (int k = 0; k < W; k++)
      if (acc[k] && alloc[k] && k <= int'(ckpt_slot)) n++;
    ckpt_flp = FLP_W'((int'(fl_head_ptr) + n) % (2 * NUM_PREG));
  end

  // Entries for the reorder buffer and the issue queue.
  always_comb begin
    for (int k = 0; k < W; k++) begin
      insn_t ins;
      logic  dx;
      ins = in_insn[k];
      dx  = (ins.dst == ins.src1);
      d_rob[k]          = '0;
      d_rob[k].seq      = ins.seq;
      d_rob[k].op       = ins.op;
      d_rob[k].wr       = wr_dst[k];
      d_rob[k].ldst     = ins.dst;
      d_rob[k].tag      = dst_tag[k];
      d_rob[k].prev     = prev_tag[k];
      d_rob[k].rel      = wr_dst[k] && !suso[k];
      d_rob[k].suso     = suso[k];
      d_rob[k].dst_is_x = dx;
      d_rob[k].rem      = dx ? s2_tag[k] : s1_tag[k];
      d_rob[k].use_imm  = ins.use_imm;
      d_rob[k].imm      = ins.imm;
      d_rob[k].excpt    = ins.excpt;
      d_rob[k].done     = !to_iq[k];

      d_iq[k]         = '0;
      d_iq[k].op      = ins.op;
      d_iq[k].imm     = ins.imm;
      d_iq[k].use_imm = ins.use_imm;
      d_iq[k].s1      = s1_tag[k];
      d_iq[k].s2      = s2_tag[k];
      d_iq[k].r1      = s1_rdy[k];
      d_iq[k].r2      = s2_rdy[k];
      d_iq[k].has_dst = wr_dst[k];
      d_iq[k].dst     = dst_tag[k];
      d_iq[k].rob     = d_idx[k];
      d_iq[k].mispred = ins.mispred;
      d_iq[k].ck      = ckpt_free_id;
      d_iq_valid[k]   = acc[k] && to_iq[k];
    end
  end

  rat #(.NUM_PREG(NUM_PREG), .NCKPT(NCKPT), .ROB_N(ROB_N)) u_rat (
    .clk(clk), .rst_n(rst_n), .map_q(map_q), .ref_q(ref_q),
    .ren_en(|acc), .map_next(map_next), .ref_next(ref_next),
    .ckpt_avail(ckpt_avail), .ckpt_free_id(ckpt_free_id), .ckpt_take(ckpt_take),
    .ckpt_map(ckpt_map), .ckpt_rob(d_idx[ckpt_slot]), .ckpt_flp(ckpt_flp),
    .ck_free(ck_free), .br_bad(br_bad), .br_id(br_bad_ck), .rob_head(rob_head),
    .restore_flp(restore_flp),
    .flush_all(exc_now), .walk_we(walking && tail_entry.wr),
    .walk_lreg(tail_entry.ldst), .walk_tag(tail_entry.prev),
    .er_valid(er_valid), .er_tag(er_tag), .er_val(er_val), .er_match(er_match));

  // Registers returned: old mappings of committing instructions plus one
  // early release.
  always_comb begin
    for (int k = 0; k < W; k++) begin
      fl_push_valid[k] = cm_valid[k] && cm_entry[k].rel
                      && (cm_entry[k].prev[PREG_W-1:1] != '0);
      fl_push_preg[k]  = cm_entry[k].prev[PREG_W-1:0];
      erq_in_valid[k]  = cm_valid[k] && cm_entry[k].wr && cm_entry[k].cv
                      && (cm_entry[k].tag[PREG_W-1:1] != '0);
      erq_in_tag[k]    = cm_entry[k].tag;
      erq_in_val[k]    = cm_entry[k].cvv;
    end
    fl_push_valid[W] = rel_valid;
    fl_push_preg[W]  = rel_preg;
  end

  assign walk_alloc = walking && tail_entry.wr && !tail_entry.suso
                   && (tail_entry.tag[PREG_W-1:1] != '0);

  free_list #(.NUM_PREG(NUM_PREG), .W(W), .NPUSH(W + 1), .CNT_W(CNT_W)) u_fl (
    .clk(clk), .rst_n(rst_n), .head_preg(fl_preg), .count(fl_cnt),
    .head_ptr(fl_head_ptr), .pop_n(n_alloc), .push_valid(fl_push_valid),
    .push_preg(fl_push_preg), .restore_en(br_bad), .restore_ptr(restore_flp),
    .unpop(walk_alloc));

  // Busy bits: set for every tag handed out, cleared by the wakeup broadcast.
  logic [W-1:0] bset_valid;
  always_comb
    for (int k = 0; k < W; k++) bset_valid[k] = acc[k] && wr_dst[k] && !triv0[k];

  busy_table #(.TAG_W(TAG_W), .NSET(W), .NCLR(IW)) u_busy (
    .clk(clk), .rst_n(rst_n), .set_valid(bset_valid), .set_tag(dst_tag),
    .clr_valid(wk_valid), .clr_tag(wk_tag), .busy_q(busy_q));

  // ---------------------------------------------------------------- issue
  issue_queue #(.N(IQ_N), .W(W), .IW(IW), .ROB_N(ROB_N), .CNT_W(CNT_W)) u_iq (
    .clk(clk), .rst_n(rst_n), .free_cnt(iq_free),
    .d_valid(d_iq_valid), .d_entry(d_iq),
    .issue_en(issue_en), .i_valid(i_valid), .i_entry(i_entry),
    .wk_valid(wk_valid), .wk_tag(wk_tag),
    .er_valid(bc_valid), .er_tag(bc_tag), .er_val(bc_val),
    .sq_br(br_bad), .sq_rob(br_bad_rob), .rob_head(rob_head), .flush_all(exc_now));

  // Register-file ports: 2 per issue slot, then the two unwinding reads and
  // the inspection read; one write per issue slot plus the unwinding write.
  always_comb begin
    for (int j = 0; j < IW; j++) begin
      raddr[2*j]   = i_entry[j].s1[PREG_W-1:0];
      raddr[2*j+1] = i_entry[j].s2[PREG_W-1:0];
    end
    raddr[2*IW]   = tail_entry.tag[PREG_W-1:0];
    raddr[2*IW+1] = tail_entry.rem[PREG_W-1:0];
    raddr[2*IW+2] = dbg_tag[PREG_W-1:0];
  end

  assign dbg_tag   = map_q[dbg_lreg];
  assign dbg_value = rdata[2*IW+2];

  for (genvar j = 0; j < IW; j++) begin : g_ex
    always_comb begin
      opa[j] = i_entry[j].c1 ? XLEN'(i_entry[j].v1) : rdata[2*j];
      opb[j] = i_entry[j].use_imm ? sext_imm(i_entry[j].imm)
             : i_entry[j].c2      ? XLEN'(i_entry[j].v2) : rdata[2*j+1];
    end
    alu u_alu (.op(i_entry[j].op), .a(opa[j]), .b(opb[j]), .y(res[j]));
    cv_detect u_cv (.en(i_entry[j].has_dst), .result(res[j]), .cv(is_cv[j]),
                    .cv_val(cv_val[j]));
  end

  // Execute, write back, wake up, complete; resolve branches.
  always_comb begin
    int unsigned best;
    br_bad     = 1'b0;
    br_bad_ck  = '0;
    br_bad_rob = '0;
    ck_free    = '0;
    best       = ROB_N;
    we         = '0;
    for (int j = 0; j < IW; j++) begin
      waddr[j]    = i_entry[j].dst[PREG_W-1:0];
      wdata[j]    = res[j];
      we[j]       = i_valid[j] && i_entry[j].has_dst;
      wk_valid[j] = i_valid[j] && i_entry[j].has_dst;
      wk_tag[j]   = i_entry[j].dst;
      c_valid[j]  = i_valid[j];
      c_idx[j]    = i_entry[j].rob;
      c_cv[j]     = is_cv[j] && SHARE_VALUE;
      c_cvv[j]    = cv_val[j];
      if (i_valid[j] && i_entry[j].op == OP_BR) begin
        if (i_entry[j].mispred) begin
          if (rob_age(i_entry[j].rob, rob_head, ROB_N) < best) begin
            best       = rob_age(i_entry[j].rob, rob_head, ROB_N);
            br_bad     = 1'b1;
            br_bad_ck  = i_entry[j].ck;
            br_bad_rob = i_entry[j].rob;
          end
        end else begin
          ck_free[i_entry[j].ck] = 1'b1;
        end
      end
    end
    if (br_bad) ck_free = '0;
    waddr[IW] = tail_entry.tag[PREG_W-1:0];
    wdata[IW] = undo_val;
    we[IW]    = walk_undo;
  end

  prf #(.NUM_PREG(NUM_PREG), .NR(NR), .NW(NWR)) u_prf (
    .clk(clk), .raddr(raddr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  // ---------------------------------------------------------------- unwinding
  assign walk_undo  = walking && tail_entry.suso && tail_entry.done;
  assign walk_other = tail_entry.use_imm ? sext_imm(tail_entry.imm) : rdata[2*IW+1];

  suso_reverse u_rev (.op(tail_entry.op), .dst_is_x(tail_entry.dst_is_x),
                      .result(rdata[2*IW]), .other(walk_other), .old_val(undo_val));

  // ---------------------------------------------------------------- commit
  rob #(.ROB_N(ROB_N), .W(W), .IW(IW), .CNT_W(CNT_W)) u_rob (
    .clk(clk), .rst_n(rst_n), .free_cnt(rob_free), .count(rob_cnt), .head(rob_head),
    .d_idx(d_idx), .d_valid(acc), .d_entry(d_rob),
    .c_valid(c_valid), .c_idx(c_idx), .c_cv(c_cv), .c_cvv(c_cvv),
    .commit_en(state_q == S_RUN), .er_room(er_room), .cm_valid(cm_valid),
    .cm_entry(cm_entry), .exc_valid(rob_exc), .er_block(er_block),
    .head_entry(head_entry), .sq_br(br_bad), .sq_rob(br_bad_rob),
    .walk_pop(walking), .tail_entry(tail_entry),
    .er_valid(bc_valid), .er_tag(bc_tag), .er_val(bc_val));

  er_queue #(.DEPTH(ERQ_DEPTH), .W(W), .CNT_W(CNT_W)) u_erq (
    .clk(clk), .rst_n(rst_n), .room(er_room), .in_valid(erq_in_valid),
    .in_tag(erq_in_tag), .in_val(erq_in_val),
    .hold((state_q != S_RUN) || exc_now || br_bad),
    .kill_valid(fl_push_valid[W-1:0]), .kill_preg(fl_push_preg[0:W-1]),
    .er_valid(er_valid), .er_tag(er_tag), .er_val(er_val), .er_match(er_match),
    .rel_valid(rel_valid), .rel_preg(rel_preg),
    .bc_valid(bc_valid), .bc_tag(bc_tag), .bc_val(bc_val));

  // ---------------------------------------------------------------- control
  int unsigned n_cvop;    // operands issued as common values this cycle
  always_comb begin
    n_cvop = 0;
    for (int j = 0; j < IW; j++)
      if (i_valid[j])
        n_cvop += int'(i_entry[j].c1) + int'(i_entry[j].c2 && !i_entry[j].use_imm);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_RUN;
      redirect  <= 1'b0;
      exc_taken <= 1'b0;
      exc_seq   <= '0;
      perf      <= '0;
    end else begin
      redirect  <= br_bad;
      exc_taken <= exc_now;
      if (exc_now) begin
        state_q <= S_WALK;
        exc_seq <= head_entry.seq;
      end else if (state_q == S_WALK && rob_cnt == '0) begin
        state_q <= S_RUN;
      end
      perf.cycles <= perf.cycles + 1;
      perf.committed  <= perf.committed  + 32'($countones(cm_valid));
      perf.reg_stall  <= perf.reg_stall  + 32'(stall_reg);
      perf.triv0      <= perf.triv0      + 32'($countones(acc & triv0));
      perf.suso       <= perf.suso       + 32'($countones(acc & suso));
      perf.er_cand    <= perf.er_cand    + 32'($countones(erq_in_valid));
      perf.er_release <= perf.er_release + 32'(rel_valid);
      perf.er_miss    <= perf.er_miss    + 32'(er_valid && !er_match);
      perf.er_full    <= perf.er_full    + 32'(er_block);
      perf.mispredict <= perf.mispredict + 32'(br_bad);
      perf.exception  <= perf.exception  + 32'(exc_now);
      perf.suso_undo  <= perf.suso_undo  + 32'(walk_undo);
      perf.cv_operand <= perf.cv_operand + 32'(n_cvop);
    end
  end

  assign exc_busy  = (state_q == S_WALK);
  assign rob_count = rob_cnt;
  assign fl_count  = fl_cnt;
endmodule
