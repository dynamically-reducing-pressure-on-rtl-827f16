// tb_rob: random dispatch, out-of-order completion with 0/1 marks, commit
// with a limited early-release queue, branch squashes, exception unwinding
// and early-release snoops of SUSO operand tags, against a queue model.
module tb_rob;
  import rs_pkg::*;
  localparam int unsigned ROB_N = 16, W = 4, IW = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0]   free_cnt, count, er_room;
  robi_t         head, sq_rob;
  robi_t         d_idx [W];
  logic [W-1:0]  d_valid, cm_valid;
  rob_entry_t    d_entry [W], cm_entry [W], head_entry, tail_entry;
  logic [IW-1:0] c_valid, c_cv, c_cvv;
  robi_t         c_idx [IW];
  logic          commit_en, exc_valid, er_block, sq_br, walk_pop, er_valid, er_val;
  tag_t          er_tag;
  int unsigned checks = 0, failures = 0;

  typedef struct { rob_entry_t e; robi_t idx; } me_t;
  me_t m[$];                 // model, oldest first
  robi_t m_tail;
  int unsigned seqn = 0, ncommit = 0, nblock = 0, nsq = 0, nwalk = 0, nsnoop = 0;

  always #5 clk = ~clk;

  rob #(.ROB_N(ROB_N), .W(W), .IW(IW)) dut (.*);

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic logic cand(rob_entry_t e);
    return e.wr && e.cv && e.tag[PREG_W-1:0] > 1;
  endfunction

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_valid = '0; c_valid = '0; commit_en = 0; er_room = 0; sq_br = 0; sq_rob = '0;
    walk_pop = 0; er_valid = 0; er_tag = '0; er_val = 0; c_cv = '0; c_cvv = '0;
    for (int k = 0; k < W; k++) d_entry[k] = '0;
    for (int k = 0; k < IW; k++) c_idx[k] = '0;
    m_tail = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 6000; c++) begin
      int nd, ncm, room, nexp;
      logic blk, stop;
      @(negedge clk);
      d_valid = '0; c_valid = '0; sq_br = 0; walk_pop = 0; er_valid = 0;
      commit_en = $urandom_range(3) != 0;
      er_room = 16'($urandom_range(2));
      chk(count == 16'(m.size()) && free_cnt == 16'(ROB_N - m.size()), $sformatf("cycle %0d count %0d model %0d", c, count, m.size()));
      if (m.size() != 0) chk(head == m[0].idx, $sformatf("cycle %0d head", c));
      // exception at the head: unwind everything from the tail
      if (m.size() != 0 && m[0].e.done && m[0].e.excpt) begin
        chk(exc_valid, $sformatf("cycle %0d exception not reported", c));
        chk(cm_valid == '0, "no commit past an exception");
        walk_pop = 1; commit_en = 0;
        #1;
        chk(tail_entry.seq == m[$].e.seq, $sformatf("cycle %0d walk sees seq %0d expected %0d", c, tail_entry.seq, m[$].e.seq));
        void'(m.pop_back());
        m_tail = robi_t'((int'(m_tail) + ROB_N - 1) % ROB_N);
        nwalk++;
      end else begin
        chk(!exc_valid, $sformatf("cycle %0d false exception", c));
        // dispatch
        nd = $urandom_range(W);
        if (nd > ROB_N - m.size()) nd = ROB_N - m.size();
        for (int k = 0; k < nd; k++) begin
          rob_entry_t e;
          e = '0;
          e.seq = seqn + k; e.wr = $urandom_range(3) != 0;
          e.tag = {VER_W'(0), PREG_W'($urandom_range(0, 7))};
          e.suso = $urandom_range(1); e.rem = {VER_W'(0), PREG_W'($urandom_range(2, 7))};
          e.excpt = $urandom_range(40) == 0;
          d_valid[k] = 1; d_entry[k] = e;
        end
        // completion of random pending entries
        for (int j = 0; j < IW; j++) begin
          int p;
          if (m.size() != 0) begin
            p = $urandom_range(m.size() - 1);
            if (!m[p].e.done && !(j == 1 && c_valid[0] && c_idx[0] == m[p].idx)) begin
              c_valid[j] = 1; c_idx[j] = m[p].idx;
              c_cv[j] = $urandom_range(1); c_cvv[j] = $urandom_range(1);
            end
          end
        end
        // early-release snoop
        if ($urandom_range(3) == 0) begin
          er_valid = 1; er_tag = {VER_W'(0), PREG_W'($urandom_range(2, 7))}; er_val = $urandom_range(1);
        end
        // branch squash to a random entry younger than what can commit now
        if ($urandom_range(15) == 0 && m.size() > W) begin
          int p;
          p = $urandom_range(W, m.size() - 1);
          sq_br = 1; sq_rob = m[p].idx;
        end
        #1;
        // expected commit
        ncm = 0; room = er_room; blk = 0; stop = !commit_en;
        for (int k = 0; k < W; k++) begin
          if (k >= m.size() || !m[k].e.done || m[k].e.excpt) stop = 1;
          if (k < m.size() && cand(m[k].e)) begin
            if (room == 0) begin
              if (!stop) blk = 1;
              stop = 1;
            end else if (!stop) room--;
          end
          if (!stop) ncm++;
        end
        for (int k = 0; k < W; k++) begin
          chk(cm_valid[k] == (k < ncm), $sformatf("cycle %0d cm_valid %b expected %0d", c, cm_valid, ncm));
          if (k < ncm) chk(cm_entry[k] == m[k].e, $sformatf("cycle %0d commit entry %0d", c, k));
        end
        chk(er_block == blk, $sformatf("cycle %0d er_block", c));
        for (int k = 0; k < nd; k++) chk(d_idx[k] == robi_t'((int'(m_tail) + k) % ROB_N), "dispatch index");
        // model update
        for (int j = 0; j < IW; j++)
          if (c_valid[j])
            for (int i = 0; i < m.size(); i++)
              if (m[i].idx == c_idx[j]) begin
                m[i].e.done = 1; m[i].e.cv = c_cv[j]; m[i].e.cvv = c_cvv[j];
              end
        if (er_valid)
          for (int i = 0; i < m.size(); i++)
            if (m[i].e.suso && m[i].e.rem == er_tag) begin
              m[i].e.rem = {{(TAG_W-1){1'b0}}, er_val};
              nsnoop++;
            end
        if (blk) nblock++;
        if (sq_br) begin
          nsq++;
          while (m[$].idx != sq_rob) void'(m.pop_back());
          m_tail = robi_t'((int'(sq_rob) + 1) % ROB_N);
        end else begin
          for (int k = 0; k < nd; k++) begin
            m.push_back('{d_entry[k], m_tail});
            m_tail = robi_t'((int'(m_tail) + 1) % ROB_N);
          end
          seqn += nd;
        end
        repeat (ncm) void'(m.pop_front());
        ncommit += ncm;
      end
      @(posedge clk);
    end
    chk(ncommit > 1000 && nblock > 20 && nsq > 20 && nwalk > 20 && nsnoop > 20,
        $sformatf("coverage: %0d commits %0d blocks %0d squashes %0d unwinds %0d snoops",
                  ncommit, nblock, nsq, nwalk, nsnoop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
