// rename_unit: W-wide register renaming with trivial-0 and SUSO sharing.
//
// Renames up to W instructions per cycle in program order. Slot i sees the
// map left behind by slots 0..i-1 of the same group, which is how sources
// and destinations of simultaneously renamed instructions are cross-checked.
// For each accepted instruction with a destination exactly one of three
// things happens:
//   * trivial 0 : the destination is mapped to the dedicated register P0;
//                 nothing is allocated and nothing needs to execute;
//   * SUSO      : the destination keeps its current physical register, with
//                 the tag's version field incremented; nothing is allocated
//                 and the old mapping is not released at commit;
//   * otherwise : the next register of the free list is allocated (version 0)
//                 and the old mapping is released at commit.
// Reference bits are set on every source read, cleared on a destination
// write, and all set after a branch, whose checkpoint holds the map as it
// stands after the branch. Sources are ready when mapped to P0/P1, or not busy
// (or woken this cycle) and not produced earlier in the same group.
//
// Slots are accepted as a prefix: a slot is refused (and so are all later
// ones) when the reorder buffer, issue queue or free list lacks room, when it
// is a second branch in the group, or when no checkpoint is free. Purely
// combinational; the RAT registers the resulting map.
//
// Follows the document: FIFO allocation from the free list, old mapping kept
// for release at commit, trivial 0 to P0, SUSO sharing by version bits,
// reference bits, checkpoint at each branch. Own choices: one branch per
// group, prefix acceptance, r0 never renamed. TRIV0_EN and SUSO_EN switch the
// two rename-time mechanisms off, for comparison with a plain core.
module rename_unit
  import rs_pkg::*;
#(
  parameter int unsigned W        = 4,
  parameter int unsigned IW       = 4,
  parameter int unsigned NUM_PREG = 160,
  parameter int unsigned NTAGS    = 1 << TAG_W,
  parameter int unsigned CNT_W    = 16,
  parameter bit          TRIV0_EN = 1'b1,  // map trivial-0 results to P0
  parameter bit          SUSO_EN  = 1'b1   // let SUSO instructions share
) (
  input  logic                    hold,
  input  logic [W-1:0]            in_valid,
  input  insn_t                   in_insn   [W],
  input  logic [TAG_W-1:0]        map_q     [NLREG],
  input  logic [NLREG-1:0]        ref_q,
  input  logic [PREG_W-1:0]       fl_preg   [W],   // next W free registers
  input  logic [CNT_W-1:0]        fl_count,
  input  logic [CNT_W-1:0]        rob_free,
  input  logic [CNT_W-1:0]        iq_free,
  input  logic                    ckpt_avail,
  input  logic [NTAGS-1:0]        busy_q,
  input  logic [IW-1:0]           wake_valid,
  input  logic [TAG_W-1:0]        wake_tag  [IW],

  output logic [W-1:0]            acc,
  output logic [TAG_W-1:0]        s1_tag    [W],
  output logic [TAG_W-1:0]        s2_tag    [W],
  output logic [W-1:0]            s1_rdy,
  output logic [W-1:0]            s2_rdy,
  output logic [W-1:0]            wr_dst,    // slot writes a destination
  output logic [TAG_W-1:0]        dst_tag   [W],
  output logic [TAG_W-1:0]        prev_tag  [W],
  output logic [W-1:0]            alloc,
  output logic [W-1:0]            suso,
  output logic [W-1:0]            triv0,
  output logic [W-1:0]            to_iq,
  output logic [$clog2(W+1)-1:0]  n_alloc,
  output logic [TAG_W-1:0]        map_next  [NLREG],
  output logic [NLREG-1:0]        ref_next,
  output logic                    ckpt_take,
  output logic [TAG_W-1:0]        ckpt_map  [NLREG],
  output logic [$clog2(W)-1:0]    ckpt_slot,
  output logic                    stall_reg  // a slot waits for a free register
);
  logic [W-1:0]     reg_block;

  for (genvar i = 0; i < W; i++) begin : g_slot
    // State entering this slot (left by slots 0..i-1) and leaving it.
    logic [TAG_W-1:0] map_in [NLREG];
    logic [TAG_W-1:0] map_o  [NLREG];
    logic [NLREG-1:0] ref_in, ref_o;
    int unsigned      nal_in, nal_o, niq_in, niq_o;
    logic             br_in, br_o, acc_in, acc_o;
    logic [TAG_W-1:0] ck_in  [NLREG];  // checkpoint map chosen so far
    logic [TAG_W-1:0] ck_o   [NLREG];

    insn_t            ins;
    logic             hd, x0, y0, same, t0, su, t0_raw, su_raw, is_br, need_alloc, fits;
    logic [TAG_W-1:0] t1, t2, cur, su_tag, nt;

    if (i == 0) begin : g_first
      assign map_in = map_q;
      assign ref_in = ref_q;
      assign nal_in = 0;
      assign niq_in = 0;
      assign br_in  = 1'b0;
      assign acc_in = 1'b1;
      assign ck_in  = map_q;
    end else begin : g_next
      assign map_in = g_slot[i-1].map_o;
      assign ref_in = g_slot[i-1].ref_o;
      assign nal_in = g_slot[i-1].nal_o;
      assign niq_in = g_slot[i-1].niq_o;
      assign br_in  = g_slot[i-1].br_o;
      assign acc_in = g_slot[i-1].acc_o;
      assign ck_in  = g_slot[i-1].ck_o;
    end

    assign ins    = in_insn[i];
    assign acc[i] = acc_o;

    always_comb begin
      hd    = ins.has_dst && (ins.dst != '0) && (ins.op != OP_BR);
      is_br = (ins.op == OP_BR);
      t1    = map_in[ins.src1];
      t2    = map_in[ins.src2];
      cur   = map_in[ins.dst];
      x0    = (t1 == '0);
      y0    = ins.use_imm ? (ins.imm == '0) : (t2 == '0);
      same  = !ins.use_imm && (ins.src1 == ins.src2);
    end

    trivial0_detect u_t0 (.op(ins.op), .x_zero(x0), .y_zero(y0), .same_src(same),
                          .triv0(t0_raw));
    assign t0 = t0_raw && TRIV0_EN;

    suso_detect u_suso (
      .op(ins.op), .has_dst(hd), .dst(ins.dst), .src1(ins.src1), .src2(ins.src2),
      .use_imm(ins.use_imm), .ref_bit(ref_in[ins.dst]), .cur_tag(cur),
      .triv0(t0 && hd), .suso(su_raw), .new_tag(su_tag));
    assign su = su_raw && SUSO_EN;

    always_comb begin
      need_alloc = hd && !(t0 && hd) && !su;
      nt         = (t0 && hd) ? '0
                 : su         ? su_tag
                 :              {VER_W'(0), fl_preg[nal_in < W ? nal_in : 0]};
      fits = (rob_free > CNT_W'(i))
          && (CNT_W'(nal_in + (need_alloc ? 1 : 0)) <= fl_count)
          && (CNT_W'(niq_in + ((hd && t0) ? 0 : 1)) <= iq_free)
          && (!is_br || (!br_in && ckpt_avail));
      reg_block[i] = in_valid[i] && acc_in && !hold
                  && (CNT_W'(nal_in + (need_alloc ? 1 : 0)) > fl_count);
      acc_o       = in_valid[i] && acc_in && !hold && fits;
      wr_dst[i]   = hd;
      triv0[i]    = hd && t0;
      suso[i]     = su;
      alloc[i]    = need_alloc;
      to_iq[i]    = !(hd && t0);
      s1_tag[i]   = t1;
      s2_tag[i]   = t2;
      dst_tag[i]  = nt;
      prev_tag[i] = cur;
    end

    always_comb begin
      map_o = map_in;
      ref_o = ref_in;
      nal_o = nal_in;
      niq_o = niq_in;
      br_o  = br_in;
      ck_o  = ck_in;
      if (acc_o) begin
        ref_o[ins.src1] = 1'b1;
        if (!ins.use_imm) ref_o[ins.src2] = 1'b1;
        if (hd) begin
          map_o[ins.dst] = nt;
          ref_o[ins.dst] = 1'b0;
        end
        if (is_br) begin
          ck_o  = map_o;   // map right after the branch
          ref_o = '1;
          br_o  = 1'b1;
        end
        nal_o = nal_in + (need_alloc ? 1 : 0);
        niq_o = niq_in + ((hd && t0) ? 0 : 1);
      end
    end

    // Source readiness: dedicated registers are always ready; a value made
    // earlier in the same group is not; otherwise consult the busy table and
    // this cycle's wakeup broadcasts.
    function automatic logic src_ready(logic [TAG_W-1:0] t);
      logic r;
      r = (t[PREG_W-1:1] == '0) || !busy_q[t];
      for (int k = 0; k < IW; k++)
        if (wake_valid[k] && wake_tag[k] == t) r = 1'b1;
      for (int j = 0; j < i; j++)
        if (acc[j] && wr_dst[j] && !triv0[j] && dst_tag[j] == t) r = 1'b0;
      return r;
    endfunction

    always_comb begin
      s1_rdy[i] = src_ready(t1);
      s2_rdy[i] = ins.use_imm || src_ready(t2);
    end
  end

  always_comb begin
    map_next  = g_slot[W-1].map_o;
    ref_next  = g_slot[W-1].ref_o;
    n_alloc   = ($clog2(W+1))'(g_slot[W-1].nal_o);
    stall_reg = |reg_block;
    ckpt_take = 1'b0;
    ckpt_slot = '0;
    for (int i = 0; i < W; i++)
      if (acc[i] && in_insn[i].op == OP_BR) begin
        ckpt_take = 1'b1;
        ckpt_slot = ($clog2(W))'(i);
      end
  end

  assign ckpt_map = g_slot[W-1].ck_o;
endmodule
