// tb_sharing_modes: the same register-pressure program on four cores that
// differ only in which sharing mechanisms are switched on: none (a plain
// R10000-style core), value-based only (trivial 0 and early release of 0/1),
// lifetime-based only (SUSO), and both. This mirrors the comparison of the
// two kinds of sharing in isolation and combined.
//
// The program is a dependent multiply chain with two or three independent
// instructions after each link, so the instruction window grows until rename
// stalls. The independent instructions are self-overwriting increments
// (SUSO candidates), X xor X and AND with 0 (trivial 0) and AND with 1
// (0/1 results). Each core has its own driver that offers the next four
// instructions and advances by the accepted count. At the end every core's
// logical registers are compared with an in-order reference model, and the
// cycles in which rename waited for a free register are compared: each
// sharing configuration must stall less than the plain core, and the plain
// core must have stalled. All cores run at the default sizes (4-wide, 160
// registers, 40-entry issue queue, 256-entry reorder buffer).
module tb_sharing_modes;
  import rs_pkg::*;

  localparam int unsigned W     = 4;
  localparam int unsigned NPROG = 6000;
  localparam int unsigned NCFG  = 4;   // bit 0: value-based, bit 1: lifetime-based

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0;
  int unsigned failures = 0;

  insn_t           prog [NPROG];
  logic [XLEN-1:0] gold [NLREG];

  int unsigned       ptr       [NCFG];
  logic [31:0]       committed [NCFG];
  logic [31:0]       stalls    [NCFG];
  logic [31:0]       shares    [NCFG];
  logic [15:0]       occupancy [NCFG];
  logic [LREG_W-1:0] dbg_lreg;
  logic [XLEN-1:0]   dbg_value [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic [W-1:0]      in_valid, in_acc;
    insn_t             in_insn [W];
    logic              redirect, exc_taken, exc_busy;
    logic [31:0]       exc_seq;
    tag_t              dbg_tag;
    logic [15:0]       rob_count, fl_count;
    perf_t             perf;

    regshare_core #(.SHARE_VALUE(g[0]), .SHARE_LIFETIME(g[1])) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_insn(in_insn), .in_acc(in_acc),
      .redirect(redirect), .exc_taken(exc_taken), .exc_seq(exc_seq), .exc_busy(exc_busy),
      .dbg_lreg(dbg_lreg), .dbg_value(dbg_value[g]), .dbg_tag(dbg_tag),
      .rob_count(rob_count), .fl_count(fl_count), .perf(perf));

    always_comb begin
      for (int k = 0; k < W; k++) begin
        in_valid[k] = rst_n && (ptr[g] + k < NPROG);
        in_insn[k]  = (ptr[g] + k < NPROG) ? prog[ptr[g] + k] : '0;
      end
    end

    always_ff @(posedge clk) begin
      if (!rst_n) ptr[g] <= 0;
      else        ptr[g] <= ptr[g] + $countones(in_acc);
    end

    assign committed[g] = perf.committed;
    assign stalls[g]    = perf.reg_stall;
    assign shares[g]    = perf.triv0 + perf.suso + perf.er_release;
    assign occupancy[g] = rob_count;
  end

  function automatic insn_t mk(op_e op, int d, int a, int b, logic ui, int imm);
    insn_t i;
    i         = '0;
    i.op      = op;
    i.has_dst = 1'b1;
    i.dst     = LREG_W'(d);
    i.src1    = LREG_W'(a);
    i.src2    = LREG_W'(b);
    i.use_imm = ui;
    i.imm     = 16'(imm);
    return i;
  endfunction

  function automatic insn_t filler();
    int unsigned k;
    k = $urandom_range(9);
    if (k < 5) return mk(OP_ADD, 9 + int'($urandom_range(5)), 0, 0, 1'b1, 1 + int'($urandom_range(99)));
    if (k == 5) return mk(OP_XOR, 16, 16, 16, 1'b0, 0);
    if (k == 6) return mk(OP_AND, 17, 20, 0, 1'b1, 0);
    if (k == 7) return mk(OP_MUL, 18, 0, 21, 1'b0, 0);
    return mk(OP_AND, 19, 22 + int'($urandom_range(5)), 0, 1'b1, 1);
  endfunction

  task automatic gen_program();
    int unsigned p;
    p = 0;
    for (int r = 1; r < NLREG; r++) prog[p++] = mk(OP_ADD, r, 0, 0, 1'b1, 3 + r * 7);
    for (int link = 0; p < NPROG; link++) begin
      int unsigned nf;
      nf = (link % 4 == 0) ? 2 : 3;
      prog[p++] = mk(OP_MUL, 7, 7, 8, 1'b0, 0);
      for (int k = 0; k < nf && p < NPROG; k++) prog[p++] = filler();
    end
    // SUSO increments write dst = src1: make them real self-overwrites
    for (int i = 0; i < NPROG; i++)
      if (prog[i].op == OP_ADD && prog[i].use_imm && prog[i].dst >= 9 && prog[i].dst <= 14 && i >= NLREG)
        prog[i].src1 = prog[i].dst;
  endtask

  function automatic logic [XLEN-1:0] ref_alu(op_e op, logic [XLEN-1:0] a, logic [XLEN-1:0] b);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_MUL:  return a * b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_SLL:  return a << b[5:0];
      OP_SRL:  return a >> b[5:0];
      OP_SRA:  return $signed(a) >>> b[5:0];
      default: return '0;
    endcase
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned done_at [NCFG];
    int unsigned cyc;
    dbg_lreg = '0;
    gen_program();
    for (int r = 0; r < NLREG; r++) gold[r] = '0;
    for (int i = 0; i < NPROG; i++) begin
      logic [XLEN-1:0] b;
      b = prog[i].use_imm ? sext_imm(prog[i].imm) : gold[prog[i].src2];
      if (prog[i].dst != 0) gold[prog[i].dst] = ref_alu(prog[i].op, gold[prog[i].src1], b);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int g = 0; g < NCFG; g++) done_at[g] = 0;
    cyc = 0;
    while (done_at[0] == 0 || done_at[1] == 0 || done_at[2] == 0 || done_at[3] == 0) begin
      @(posedge clk);
      cyc++;
      for (int g = 0; g < NCFG; g++)
        if (done_at[g] == 0 && committed[g] == NPROG && occupancy[g] == 0) done_at[g] = cyc;
    end
    repeat (3) @(posedge clk);
    for (int r = 1; r < NLREG; r++) begin
      @(negedge clk) dbg_lreg = LREG_W'(r);
      #1;
      for (int g = 0; g < NCFG; g++) begin
        checks++;
        if (dbg_value[g] !== gold[r]) begin
          failures++;
          $display("FAIL config %0d r%0d = %h, expected %h", g, r, dbg_value[g], gold[r]);
        end
      end
    end
    for (int g = 0; g < NCFG; g++)
      $display("config value=%0d lifetime=%0d: %0d cycles, %0d register-stall cycles, %0d shared or released",
               g % 2, g / 2, done_at[g], stalls[g], shares[g]);
    checks++;
    if (stalls[0] == 0) begin
      failures++;
      $display("FAIL the plain core never waited for a register");
    end
    checks++;
    if (shares[0] != 0) begin
      failures++;
      $display("FAIL the plain core shared registers");
    end
    for (int g = 1; g < NCFG; g++) begin
      checks++;
      if (stalls[g] >= stalls[0] || shares[g] == 0) begin
        failures++;
        $display("FAIL config %0d does not reduce register stalls", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
