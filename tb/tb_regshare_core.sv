// tb_regshare_core: end-to-end test of the register-sharing backend at its
// default size (4-wide, 160 pooled registers, 40-entry issue queue,
// 256-entry reorder buffer).
//
// A random program is generated with patterns that provoke each mechanism:
// values 0 and 1 (early release), X xor X and operations on registers
// mapped to P0 (trivial 0), self-overwriting chains such as r5 = r5 + k
// (SUSO sharing), long dependent chains (register-pressure stalls and a full
// release queue), branches of which some are flagged as mispredicted (the
// testbench then feeds wrong-path instructions until the core redirects) and
// instructions flagged as excepting (the testbench resends from the
// excepting instruction once the core has unwound). Every CHECK_EVERY
// instructions the testbench lets the core drain and compares all logical
// registers, read through the inspection port, with an in-order reference
// model, and checks that no physical register was lost: free registers plus
// distinct mapped registers must equal the pool size. Each mechanism must
// have occurred at least once.
module tb_regshare_core;
  import rs_pkg::*;

  localparam int unsigned W           = 4;
  localparam int unsigned NUM_PREG    = 160;
  localparam int unsigned NPROG       = 4000;
  localparam int unsigned CHECK_EVERY = 400;
  localparam int unsigned MAX_CYCLES  = 400000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]      in_valid;
  insn_t             in_insn [W];
  logic [W-1:0]      in_acc;
  logic              redirect, exc_taken, exc_busy;
  logic [31:0]       exc_seq;
  logic [LREG_W-1:0] dbg_lreg;
  logic [XLEN-1:0]   dbg_value;
  tag_t              dbg_tag;
  logic [15:0]       rob_count, fl_count;
  perf_t             perf;

  regshare_core dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_insn(in_insn), .in_acc(in_acc),
    .redirect(redirect), .exc_taken(exc_taken), .exc_seq(exc_seq), .exc_busy(exc_busy),
    .dbg_lreg(dbg_lreg), .dbg_value(dbg_value), .dbg_tag(dbg_tag),
    .rob_count(rob_count), .fl_count(fl_count), .perf(perf));

  int unsigned checks = 0;
  int unsigned failures = 0;

  // ------------------------------------------------------------ program
  insn_t           prog [NPROG];
  logic [XLEN-1:0] gold [NLREG];

  function automatic insn_t mk(op_e op, int d, int a, int b, logic ui, int imm);
    insn_t i;
    i         = '0;
    i.op      = op;
    i.has_dst = (op != OP_BR);
    i.dst     = LREG_W'(d);
    i.src1    = LREG_W'(a);
    i.src2    = LREG_W'(b);
    i.use_imm = ui;
    i.imm     = 16'(imm);
    return i;
  endfunction

  function automatic int rr();   // random logical register 1..31
    return 1 + int'($urandom_range(30));
  endfunction

  function automatic insn_t rand_alu();
    op_e op;
    op = op_e'($urandom_range(8));
    if (op inside {OP_SLL, OP_SRL, OP_SRA})
      return mk(op, rr(), rr(), rr(), 1'b1, int'($urandom_range(63)));
    return mk(op, rr(), rr(), rr(), $urandom_range(1) == 1, int'($urandom_range(65535)));
  endfunction

  task automatic gen_program();
    int unsigned p, kind, n, r, s;
    p = 0;
    // give every register a non-trivial value first
    for (int r0 = 1; r0 < NLREG && p < NPROG; r0++)
      prog[p++] = mk(OP_ADD, r0, 0, 0, 1'b1, int'($urandom_range(1, 65535)));
    // Register pressure: a backlog of a dependent chain (r7/r8) keeps the
    // oldest instruction waiting while independent work behind it completes
    // and holds its registers until it can commit.
    for (int k = 0; k < 36 && p < NPROG; k++)
      prog[p++] = (k % 2 == 0) ? mk(OP_ADD, 8, 7, 0, 1'b1, 3) : mk(OP_ADD, 7, 8, 0, 1'b1, 5);
    for (int k = 0; k < 60 && p + 6 <= NPROG; k++) begin
      prog[p++] = (k % 2 == 0) ? mk(OP_ADD, 8, 7, 0, 1'b1, 3) : mk(OP_ADD, 7, 8, 0, 1'b1, 5);
      for (int j = 0; j < 5; j++)
        prog[p++] = mk(OP_ADD, 9 + int'($urandom_range(22)), 9 + int'($urandom_range(22)), 0,
                       1'b1, int'($urandom_range(1, 999)));
    end
    while (p < NPROG) begin
      kind = $urandom_range(99);
      if (kind < 30) begin
        prog[p++] = rand_alu();
      end else if (kind < 45) begin                  // 0/1 results
        r = rr();
        case ($urandom_range(2))
          0: prog[p++] = mk(OP_AND, r, rr(), 0, 1'b1, 1);
          1: prog[p++] = mk(OP_SRL, r, rr(), 0, 1'b1, 63);
          default: prog[p++] = mk(OP_ADD, r, 0, 0, 1'b1, int'($urandom_range(1)));
        endcase
      end else if (kind < 55) begin                  // trivial 0
        r = rr();
        prog[p++] = mk(OP_XOR, r, r, r, 1'b0, 0);
        if (p < NPROG) prog[p++] = mk(op_e'($urandom_range(8)), rr(), r, rr(), 1'b0, 0);
      end else if (kind < 70) begin                  // self-overwriting chain
        r = rr();
        n = $urandom_range(1, 5);
        if (p < NPROG) prog[p++] = mk(OP_ADD, r, rr(), rr(), 1'b0, 0);
        for (int k = 0; k < int'(n) && p < NPROG; k++) begin
          s = rr();
          case ($urandom_range(3))
            0: prog[p++] = mk(OP_ADD, r, r, 0, 1'b1, int'($urandom_range(1, 200)));
            1: prog[p++] = mk(OP_SUB, r, r, (s == r) ? 0 : s, 1'b0, 0);
            2: prog[p++] = mk(OP_SUB, r, (s == r) ? 0 : s, r, 1'b0, 0);
            default: prog[p++] = mk(OP_XOR, r, (s == r) ? 0 : s, r, 1'b0, 0);
          endcase
          if ($urandom_range(9) == 0 && p < NPROG) begin     // exception inside the chain
            prog[p] = rand_alu();
            prog[p].excpt = 1'b1;
            p++;
          end
        end
      end else if (kind < 73) begin                  // long dependent chain
        r = rr();
        s = (r == 31) ? 1 : r + 1;
        n = $urandom_range(100, 300);
        for (int k = 0; k < int'(n) && p < NPROG; k++)     // r <-> s ping-pong
          prog[p++] = (k % 2 == 0) ? mk(OP_ADD, s, r, 0, 1'b1, int'($urandom_range(2, 9)))
                                   : mk(OP_ADD, r, s, 0, 1'b1, int'($urandom_range(2, 9)));
      end else if (kind < 76) begin
        // a 0/1 value (r) that commits behind one dependent chain (a) while
        // its consumer still waits for a second, younger chain (b): the
        // consumer's operand is turned into a constant by the broadcast
        r = 1 + int'($urandom_range(9));
        s = 11 + int'($urandom_range(9));
        n = 21 + int'($urandom_range(9));
        for (int k = 0; k < 24 && p < NPROG; k++) prog[p++] = mk(OP_MUL, s, s, 0, 1'b1, 3);
        if (p < NPROG) prog[p++] = mk(OP_AND, r, n, 0, 1'b1, 1);
        for (int k = 0; k < 30 && p < NPROG; k++) prog[p++] = mk(OP_MUL, n, n, 0, 1'b1, 5);
        if (p < NPROG) prog[p++] = mk(OP_ADD, 31, r, n, 1'b0, 0);
      end else if (kind < 78) begin                  // burst of 0/1 results
        for (int k = 0; k < 12 && p < NPROG; k++)
          prog[p++] = mk(OP_AND, rr(), rr(), 0, 1'b1, 1);
      end else if (kind < 92) begin                  // branch
        prog[p] = mk(OP_BR, 0, rr(), rr(), 1'b0, 0);
        prog[p].mispred = ($urandom_range(3) == 0);
        p++;
      end else begin                                 // exception
        prog[p] = rand_alu();
        prog[p].excpt = ($urandom_range(3) == 0);
        p++;
      end
    end
    for (int i = 0; i < int'(NPROG); i++) prog[i].seq = 32'(i);
  endtask

  function automatic logic [XLEN-1:0] ref_alu(op_e op, logic [XLEN-1:0] a, logic [XLEN-1:0] b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_MUL: return a * b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_SLL: return a << b[5:0];
      OP_SRL: return a >> b[5:0];
      OP_SRA: return $signed(a) >>> b[5:0];
      default: return '0;
    endcase
  endfunction

  task automatic gold_exec(insn_t i);
    logic [XLEN-1:0] a, b;
    a = gold[i.src1];
    b = i.use_imm ? {{(XLEN-16){i.imm[15]}}, i.imm} : gold[i.src2];
    if (i.op != OP_BR && i.has_dst && i.dst != 0) gold[i.dst] = ref_alu(i.op, a, b);
  endtask

  // ------------------------------------------------------------ front end
  int unsigned pc, gpc, limit;
  logic        wrong_path;
  int          slot_src [W];       // program index of each slot, -1 for wrong path
  int unsigned cycles;
  int unsigned n_redirect, n_exc;

  task automatic drive();
    int unsigned p;
    logic        wp, stop;
    p    = pc;
    wp   = wrong_path;
    stop = 1'b0;
    for (int k = 0; k < W; k++) begin
      in_valid[k] = 1'b0;
      in_insn[k]  = '0;
      slot_src[k] = -1;
      if (stop) continue;
      if (wp) begin
        in_valid[k] = 1'b1;
        in_insn[k]  = rand_alu();
        in_insn[k].seq = 32'hFFFF_FFFF;
      end else if (p < limit) begin
        in_valid[k] = 1'b1;
        in_insn[k]  = prog[p];
        slot_src[k] = int'(p);
        if (prog[p].op == OP_BR && prog[p].mispred) wp = 1'b1;
        p++;
      end else stop = 1'b1;
    end
  endtask

  task automatic check_state(string where);
    int unsigned mapped;
    logic [NUM_PREG+1:0] seen;
    seen   = '0;
    mapped = 0;
    for (int r = 0; r < int'(NLREG); r++) begin
      dbg_lreg = LREG_W'(r);
      #1;
      checks++;
      if (dbg_value !== gold[r]) begin
        failures++;
        $display("FAIL %s: r%0d = %h, expected %h (tag %h)", where, r, dbg_value, gold[r], dbg_tag);
      end
      if (dbg_tag[PREG_W-1:0] > 1 && !seen[dbg_tag[PREG_W-1:0]]) begin
        seen[dbg_tag[PREG_W-1:0]] = 1'b1;
        mapped++;
      end
    end
    checks++;
    if (int'(fl_count) + mapped != NUM_PREG) begin
      failures++;
      $display("FAIL %s: %0d free + %0d mapped registers, pool is %0d",
               where, fl_count, mapped, NUM_PREG);
    end
  endtask

  task automatic expect_seen(string what, logic [31:0] n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin : watchdog
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired at pc %0d", pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int unsigned seed;
    seed = 32'd20240611;
    void'($value$plusargs("seed=%d", seed));
    void'($urandom(seed));
    gen_program();
    for (int r = 0; r < int'(NLREG); r++) gold[r] = '0;
    pc = 0; gpc = 0; wrong_path = 1'b0; cycles = 0; n_redirect = 0; n_exc = 0;
    limit = CHECK_EVERY;
    dbg_lreg = '0;
    drive();
    in_valid = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    drive();
    while (gpc < NPROG) begin
      logic [W-1:0] acc;
      @(posedge clk);
      acc = in_acc;                 // what the core took at this edge
      cycles++;
      for (int k = 0; k < W; k++)
        if (acc[k] && slot_src[k] >= 0) begin
          pc = 32'(slot_src[k]) + 1;
          if (prog[slot_src[k]].op == OP_BR && prog[slot_src[k]].mispred) wrong_path = 1'b1;
        end
      #1;
      if (redirect) begin
        wrong_path = 1'b0;
        n_redirect++;
      end
      if (exc_taken) begin
        n_exc++;
        checks++;
        if (exc_seq >= NPROG || !prog[exc_seq].excpt || exc_seq < gpc) begin
          failures++;
          $display("FAIL exception reported for instruction %0d", exc_seq);
        end else begin
          prog[exc_seq].excpt = 1'b0;   // the handler has dealt with it
          pc = exc_seq;
          wrong_path = 1'b0;
        end
      end
      // drain point: everything sent and committed
      if (pc == limit && !wrong_path && !exc_busy && rob_count == 0 && !exc_taken) begin
        repeat (3) @(posedge clk);
        #1;
        if (rob_count == 0 && !exc_busy) begin
          while (gpc < limit) gold_exec(prog[gpc++]);
          check_state($sformatf("after %0d instructions", limit));
          limit = (limit + CHECK_EVERY > NPROG) ? NPROG : limit + CHECK_EVERY;
        end
      end
      drive();
    end
    in_valid = '0;
    $display("cycles %0d, committed %0d, IPC x100 = %0d", perf.cycles, perf.committed,
             perf.committed * 100 / (perf.cycles == 0 ? 1 : perf.cycles));
    expect_seen("register stall cycles", perf.reg_stall);
    expect_seen("trivial-0 mappings", perf.triv0);
    expect_seen("SUSO sharings", perf.suso);
    expect_seen("0/1 release candidates", perf.er_cand);
    expect_seen("early releases", perf.er_release);
    expect_seen("candidates no longer mapped", perf.er_miss);
    expect_seen("release queue full cycles", perf.er_full);
    expect_seen("common-value operands", perf.cv_operand);
    expect_seen("mispredictions", perf.mispredict);
    expect_seen("exceptions", perf.exception);
    expect_seen("SUSO undone on exception", perf.suso_undo);
    checks++;
    if (perf.mispredict != n_redirect || perf.exception != n_exc) begin
      failures++;
      $display("FAIL recovery counts disagree");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
