// tb_rename_unit: directed rename groups. Checks allocation from the free
// list in order, intra-group dependences, trivial-0 mapping to P0, SUSO
// sharing with the version increment, reference-bit updates, the three room
// limits, the branch checkpoint and source readiness.
module tb_rename_unit;
  import rs_pkg::*;
  localparam int unsigned W = 4, IW = 2;
  logic                    hold;
  logic [W-1:0]            in_valid;
  insn_t                   in_insn [W];
  logic [TAG_W-1:0]        map_q [NLREG];
  logic [NLREG-1:0]        ref_q;
  logic [PREG_W-1:0]       fl_preg [W];
  logic [15:0]             fl_count, rob_free, iq_free;
  logic                    ckpt_avail;
  logic [(1<<TAG_W)-1:0]   busy_q;
  logic [IW-1:0]           wake_valid;
  logic [TAG_W-1:0]        wake_tag [IW];
  logic [W-1:0]            acc, s1_rdy, s2_rdy, wr_dst, alloc, suso, triv0, to_iq;
  logic [TAG_W-1:0]        s1_tag [W], s2_tag [W], dst_tag [W], prev_tag [W];
  logic [$clog2(W+1)-1:0]  n_alloc;
  logic [TAG_W-1:0]        map_next [NLREG], ckpt_map [NLREG];
  logic [NLREG-1:0]        ref_next;
  logic                    ckpt_take, stall_reg;
  logic [$clog2(W)-1:0]    ckpt_slot;
  int unsigned checks = 0, failures = 0;

  rename_unit #(.W(W), .IW(IW), .NUM_PREG(160)) dut (.*);

  function automatic tag_t tg(int ver, int st);
    return {VER_W'(ver), PREG_W'(st)};
  endfunction

  function automatic insn_t mk(op_e op, int d, int a, int b, logic imm_op = 0, int imm = 0);
    insn_t x;
    x = '0;
    x.op = op; x.has_dst = (op != OP_BR); x.dst = LREG_W'(d);
    x.src1 = LREG_W'(a); x.src2 = LREG_W'(b); x.use_imm = imm_op; x.imm = 16'(imm);
    return x;
  endfunction

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // Defaults: r_l in storage 40+l, version 0; all reference bits set.
  task automatic defaults();
    hold = 0; in_valid = '1; ref_q = '1; busy_q = '0; wake_valid = '0;
    fl_count = 50; rob_free = 100; iq_free = 40; ckpt_avail = 1;
    for (int l = 0; l < NLREG; l++) map_q[l] = (l == 0) ? '0 : tg(0, 40 + l);
    for (int k = 0; k < W; k++) fl_preg[k] = PREG_W'(100 + k);
    for (int k = 0; k < IW; k++) wake_tag[k] = '0;
    for (int k = 0; k < W; k++) in_insn[k] = mk(OP_ADD, 10 + k, 20, 21);
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1: allocation, dependence, trivial 0, SUSO
    defaults();
    ref_q[7] = 1'b0;
    in_insn[0] = mk(OP_ADD, 3, 1, 2);
    in_insn[1] = mk(OP_ADD, 4, 3, 1);
    in_insn[2] = mk(OP_XOR, 5, 6, 6);
    in_insn[3] = mk(OP_SUB, 7, 7, 1);
    #1;
    chk(acc == 4'b1111, "group 1 fully accepted");
    chk(alloc == 4'b0011 && n_alloc == 2, "two registers allocated");
    chk(dst_tag[0] == tg(0, 100) && dst_tag[1] == tg(0, 101), "allocated in free-list order");
    chk(prev_tag[0] == tg(0, 43) && s1_tag[0] == tg(0, 41) && s2_tag[0] == tg(0, 42), "slot 0 tags");
    chk(s1_tag[1] == tg(0, 100) && !s1_rdy[1] && s2_rdy[1], "slot 1 reads slot 0's result, not ready");
    chk(triv0 == 4'b0100 && dst_tag[2] == '0 && to_iq == 4'b1011, "xor r,r to P0");
    chk(suso == 4'b1000 && dst_tag[3] == tg(1, 47) && prev_tag[3] == tg(0, 47), "SUSO shares with version 1");
    chk(map_next[3] == tg(0, 100) && map_next[4] == tg(0, 101) && map_next[5] == '0
        && map_next[7] == tg(1, 47) && map_next[8] == tg(0, 48), "map after group 1");
    chk(ref_next[3] && !ref_next[4] && !ref_next[5] && !ref_next[7] && ref_next[1] && ref_next[6],
        "reference bits after group 1");
    chk(!ckpt_take && !stall_reg, "no checkpoint, no stall");

    // 2: SUSO refused when the reference bit is set or the version is full
    defaults();
    in_insn[0] = mk(OP_ADD, 7, 7, 0, 1, 5);
    ref_q[9] = 1'b0; map_q[9] = tg(3, 49);
    in_insn[1] = mk(OP_ADD, 9, 9, 0, 1, 5);
    ref_q[11] = 1'b0;
    in_insn[2] = mk(OP_MUL, 11, 11, 2);
    ref_q[12] = 1'b0;
    in_insn[3] = mk(OP_XOR, 12, 2, 12);
    #1;
    chk(suso == 4'b1000 && alloc == 4'b0111, "SUSO only for a clear ref bit, free version, reversible op");
    chk(dst_tag[3] == tg(1, 52), "SUSO on the second operand");

    // 3: trivial 0 from P0 operands and zero immediates
    defaults();
    map_q[2] = '0;
    in_insn[0] = mk(OP_MUL, 3, 1, 2);
    in_insn[1] = mk(OP_AND, 4, 1, 0, 1, 0);
    in_insn[2] = mk(OP_ADD, 5, 2, 0, 1, 0);
    in_insn[3] = mk(OP_ADD, 6, 2, 0, 1, 1);
    #1;
    chk(triv0 == 4'b0111 && alloc == 4'b1000 && dst_tag[3] == tg(0, 100), "trivial 0 with P0 and imm 0");

    // 4: free list runs out after one register
    defaults();
    fl_count = 1;
    #1;
    chk(acc == 4'b0001 && stall_reg, "register stall after one allocation");
    in_insn[1] = mk(OP_XOR, 5, 6, 6);
    #1;
    chk(acc == 4'b0011 && stall_reg, "trivial 0 needs no register");

    // 5: reorder buffer and issue queue room
    defaults();
    rob_free = 2;
    #1;
    chk(acc == 4'b0011 && !stall_reg, "reorder-buffer room limits the group");
    defaults();
    iq_free = 1;
    in_insn[0] = mk(OP_XOR, 5, 6, 6);
    #1;
    chk(acc == 4'b0011, "issue-queue room counts only issued slots");

    // 6: branches and checkpoints
    defaults();
    in_insn[0] = mk(OP_ADD, 3, 1, 2);
    in_insn[1] = mk(OP_BR, 0, 3, 0);
    in_insn[2] = mk(OP_ADD, 4, 1, 2);
    in_insn[3] = mk(OP_BR, 0, 4, 0);
    ref_q = '0;
    #1;
    chk(acc == 4'b0111 && ckpt_take && ckpt_slot == 1, "one branch per group");
    chk(ckpt_map[3] == tg(0, 100) && ckpt_map[4] == tg(0, 44), "checkpoint holds the map after the branch");
    chk(ref_next == ~(NLREG'(1) << 4), "reference bits all set after the branch");
    ckpt_avail = 0;
    #1;
    chk(acc == 4'b0001 && !ckpt_take, "branch waits for a free checkpoint");
    hold = 1;
    #1;
    chk(acc == 4'b0000 && n_alloc == 0, "hold refuses everything");

    // 7: readiness
    defaults();
    busy_q[tg(0, 41)] = 1'b1;
    busy_q[tg(0, 42)] = 1'b1;
    busy_q[1] = 1'b1;
    map_q[5] = tg(0, 1);
    in_insn[0] = mk(OP_ADD, 3, 1, 2);
    in_insn[1] = mk(OP_ADD, 4, 5, 6);
    wake_valid = 2'b10; wake_tag[1] = tg(0, 42);
    #1;
    chk(!s1_rdy[0] && s2_rdy[0], "busy source waits, woken source is ready");
    chk(s1_rdy[1] && s2_rdy[1], "P1 is always ready");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
