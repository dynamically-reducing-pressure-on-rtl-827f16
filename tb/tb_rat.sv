// tb_rat: random renaming, checkpoints, branch restores, unwinding writes and
// early-release searches against a model of the map table. Checks the map,
// the reference bits, the CAM match output, checkpoint availability and the
// restored free-list pointer every cycle.
module tb_rat;
  import rs_pkg::*;
  localparam int unsigned NUM_PREG = 160, NCKPT = 4, ROB_N = 32;
  localparam int unsigned FLP_W = $clog2(2 * NUM_PREG);
  logic clk = 1'b0, rst_n = 1'b0;
  logic [TAG_W-1:0] map_q [NLREG], map_next [NLREG], ckpt_map [NLREG];
  logic [NLREG-1:0] ref_q, ref_next;
  logic             ren_en, ckpt_avail, ckpt_take, br_bad, flush_all, walk_we;
  logic             er_valid, er_val, er_match;
  cki_t             ckpt_free_id, br_id;
  robi_t            ckpt_rob, rob_head;
  logic [FLP_W-1:0] ckpt_flp, restore_flp;
  logic [NCKPT-1:0] ck_free;
  logic [LREG_W-1:0] walk_lreg;
  logic [TAG_W-1:0] walk_tag, er_tag;
  int unsigned checks = 0, failures = 0;

  // model
  tag_t             m_map [NLREG];
  logic [NLREG-1:0] m_ref;
  tag_t             m_ck [NCKPT][NLREG];
  robi_t            m_rob [NCKPT];
  logic [FLP_W-1:0] m_flp [NCKPT];
  logic [NCKPT-1:0] m_vld;
  int unsigned nmatch = 0, nrestore = 0, ncheck_hit = 0;

  always #5 clk = ~clk;

  rat #(.NUM_PREG(NUM_PREG), .NCKPT(NCKPT), .ROB_N(ROB_N)) dut (.*);

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // small tag space so that searches hit
  function automatic tag_t rtag();
    return {VER_W'($urandom_range(1)), PREG_W'($urandom_range(0, 12))};
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ren_en = 0; ckpt_take = 0; br_bad = 0; flush_all = 0; walk_we = 0; er_valid = 0;
    er_val = 0; ck_free = '0; br_id = '0; ckpt_rob = '0; rob_head = '0; ckpt_flp = '0;
    walk_lreg = '0; walk_tag = '0; er_tag = '0; ref_next = '0;
    for (int l = 0; l < NLREG; l++) begin map_next[l] = '0; ckpt_map[l] = '0; m_map[l] = '0; end
    m_ref = '1; m_vld = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 5000; c++) begin
      tag_t after [NLREG];
      tag_t pv;
      logic exp_match, avail;
      int   fid, act;
      @(negedge clk);
      // stimulus
      ren_en = 0; ckpt_take = 0; br_bad = 0; flush_all = 0; walk_we = 0; ck_free = '0;
      act = $urandom_range(19);
      rob_head = robi_t'($urandom_range(ROB_N - 1));
      if (act == 0 && m_vld != 0) begin
        br_bad = 1;
        do br_id = cki_t'($urandom_range(NCKPT - 1)); while (!m_vld[br_id]);
      end else if (act == 1) begin
        walk_we = 1; walk_lreg = LREG_W'($urandom); walk_tag = rtag();
      end else if (act == 2) begin
        flush_all = 1;
      end else begin
        ren_en = $urandom_range(1);
        for (int l = 0; l < NLREG; l++) map_next[l] = ($urandom_range(3) == 0) ? rtag() : m_map[l];
        ref_next = {$urandom};
        ckpt_take = $urandom_range(2) == 0;
        for (int l = 0; l < NLREG; l++) ckpt_map[l] = ($urandom_range(3) == 0) ? rtag() : m_map[l];
        ckpt_rob = robi_t'($urandom_range(ROB_N - 1));
        ckpt_flp = FLP_W'($urandom);
        for (int k = 0; k < NCKPT; k++) ck_free[k] = m_vld[k] && $urandom_range(5) == 0;
      end
      er_valid = $urandom_range(1);
      er_tag   = ($urandom_range(1) != 0) ? m_map[$urandom_range(NLREG - 1)] : rtag();
      er_val   = $urandom_range(1);
      #1;
      // expected outputs
      avail = 0; fid = 0;
      for (int k = NCKPT - 1; k >= 0; k--) if (!m_vld[k]) begin avail = 1; fid = k; end
      if (!(act == 0 || act == 1 || act == 2)) ckpt_take = ckpt_take && avail;
      #1;
      chk(ckpt_avail == avail && (!avail || ckpt_free_id == cki_t'(fid)), $sformatf("cycle %0d checkpoint free id", c));
      for (int l = 0; l < NLREG; l++) after[l] = ren_en ? map_next[l] : m_map[l];
      exp_match = 0;
      for (int l = 0; l < NLREG; l++) if (er_valid && after[l] == er_tag) exp_match = 1;
      if (br_bad || walk_we || flush_all) exp_match = 0;
      chk(er_match == exp_match, $sformatf("cycle %0d er_match %b", c, er_match));
      if (exp_match) nmatch++;
      if (br_bad) chk(restore_flp == m_flp[br_id], $sformatf("cycle %0d restore pointer", c));
      // model update
      pv = {{(TAG_W-1){1'b0}}, er_val};
      if (walk_we || flush_all) begin
        if (walk_we) m_map[walk_lreg] = walk_tag;
        if (flush_all) begin m_vld = '0; m_ref = '1; end
      end else if (br_bad) begin
        int a;
        nrestore++;
        m_map = m_ck[br_id];
        m_ref = '1;
        a = rob_age(m_rob[br_id], rob_head, ROB_N);
        for (int k = 0; k < NCKPT; k++)
          if (m_vld[k] && rob_age(m_rob[k], rob_head, ROB_N) >= a) m_vld[k] = 0;
      end else begin
        for (int k = 0; k < NCKPT; k++)
          if (m_vld[k] && exp_match)
            for (int l = 0; l < NLREG; l++) if (m_ck[k][l] == er_tag) begin m_ck[k][l] = pv; ncheck_hit++; end
        for (int l = 0; l < NLREG; l++) m_map[l] = (er_valid && after[l] == er_tag) ? pv : after[l];
        if (ren_en) m_ref = ref_next;
        for (int k = 0; k < NCKPT; k++) if (ck_free[k]) m_vld[k] = 0;
        if (ckpt_take) begin
          m_vld[fid] = 1; m_rob[fid] = ckpt_rob; m_flp[fid] = ckpt_flp;
          for (int l = 0; l < NLREG; l++) m_ck[fid][l] = (exp_match && ckpt_map[l] == er_tag) ? pv : ckpt_map[l];
        end
      end
      @(posedge clk);
      #1;
      for (int l = 0; l < NLREG; l++)
        chk(map_q[l] == m_map[l], $sformatf("cycle %0d map[%0d]=%h expected %h", c, l, map_q[l], m_map[l]));
      chk(ref_q == m_ref, $sformatf("cycle %0d reference bits", c));
    end
    chk(nmatch > 200 && nrestore > 50 && ncheck_hit > 50,
        $sformatf("coverage: %0d matches, %0d restores, %0d checkpoint updates", nmatch, nrestore, ncheck_hit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
