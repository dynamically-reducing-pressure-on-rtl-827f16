// tb_issue_queue: random dispatch, wakeup tags, early-release broadcasts,
// branch squashes and flushes against a model of the waiting instructions.
// Every issued instruction must be a ready one, as many as possible must
// issue, and operands made ready by an early-release broadcast must carry
// the common value.
module tb_issue_queue;
  import rs_pkg::*;
  localparam int unsigned N = 8, W = 4, IW = 2, ROB_N = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0]      free_cnt;
  logic [W-1:0]     d_valid;
  iq_entry_t        d_entry [W];
  logic             issue_en, er_valid, er_val, sq_br, flush_all;
  logic [IW-1:0]    i_valid, wk_valid;
  iq_entry_t        i_entry [IW];
  logic [TAG_W-1:0] wk_tag [IW], er_tag;
  logic [ROB_W-1:0] sq_rob, rob_head;
  int unsigned checks = 0, failures = 0;

  iq_entry_t m[$];
  int unsigned next_rob = 0, nissue = 0, ner = 0, nsq = 0;

  always #5 clk = ~clk;

  issue_queue #(.N(N), .W(W), .IW(IW), .ROB_N(ROB_N)) dut (.*);

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic tag_t rtag();
    return {VER_W'(0), PREG_W'($urandom_range(2, 9))};
  endfunction

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_valid = '0; issue_en = 0; er_valid = 0; er_val = 0; sq_br = 0; flush_all = 0;
    wk_valid = '0; er_tag = '0; sq_rob = '0; rob_head = '0;
    for (int k = 0; k < W; k++) d_entry[k] = '0;
    for (int k = 0; k < IW; k++) wk_tag[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 6000; c++) begin
      int nd, nrdy, oldest;
      iq_entry_t nm[$];
      nm = {};
      @(negedge clk);
      d_valid = '0; sq_br = 0; flush_all = 0; wk_valid = '0; er_valid = 0;
      issue_en = $urandom_range(4) != 0;
      oldest = next_rob;
      for (int i = 0; i < m.size(); i++)
        if ((next_rob - int'(m[i].rob)) % ROB_N > (next_rob - oldest) % ROB_N) oldest = m[i].rob;
      rob_head = ROB_W'(oldest);
      nd = $urandom_range(W);
      if (nd > N - m.size()) nd = N - m.size();
      if ((next_rob - oldest) % ROB_N > ROB_N - 2 * W) nd = 0;
      for (int k = 0; k < nd; k++) begin
        iq_entry_t e;
        e = '0;
        e.op = OP_ADD; e.use_imm = $urandom_range(3) == 0;
        e.s1 = rtag(); e.s2 = rtag();
        e.r1 = $urandom_range(2) == 0; e.r2 = e.use_imm || $urandom_range(2) == 0;
        e.rob = ROB_W'((next_rob + k) % ROB_N);
        d_valid[k] = 1; d_entry[k] = e;
      end
      for (int j = 0; j < IW; j++) begin wk_valid[j] = $urandom_range(2) == 0; wk_tag[j] = rtag(); end
      if ($urandom_range(3) == 0) begin er_valid = 1; er_tag = rtag(); er_val = $urandom_range(1); end
      if ($urandom_range(30) == 0 && m.size() != 0) begin
        sq_br = 1; sq_rob = m[$urandom_range(m.size() - 1)].rob;
      end
      flush_all = $urandom_range(200) == 0;
      #1;
      chk(free_cnt == 16'(N - m.size()), $sformatf("cycle %0d free %0d model %0d", c, free_cnt, m.size()));
      nrdy = 0;
      for (int i = 0; i < m.size(); i++) if (m[i].r1 && m[i].r2) nrdy++;
      if (nrdy > IW) nrdy = IW;
      if (!issue_en) nrdy = 0;
      for (int j = 0; j < IW; j++) chk(i_valid[j] == (j < nrdy), $sformatf("cycle %0d issued %b expected %0d", c, i_valid, nrdy));
      // match issued entries against the model and remove them
      for (int j = 0; j < IW; j++)
        if (i_valid[j]) begin
          int f;
          f = -1;
          for (int i = 0; i < m.size(); i++) if (m[i].rob == i_entry[j].rob) f = i;
          chk(f >= 0 && i_entry[j] == m[f] && m[f].r1 && m[f].r2,
              $sformatf("cycle %0d issued rob %0d not a ready waiting entry", c, i_entry[j].rob));
          if (f >= 0) m.delete(f);
          nissue++;
        end
      // remaining entries: squash, wakeup and broadcast
      if (flush_all) m = {};
      for (int i = 0; i < m.size(); i++) begin
        iq_entry_t y;
        y = m[i];
        if (sq_br && rob_age(y.rob, rob_head, ROB_N) > rob_age(sq_rob, rob_head, ROB_N)) begin
          nsq++;
          continue;
        end
        for (int j = 0; j < IW; j++)
          if (wk_valid[j]) begin
            if (y.s1 == wk_tag[j]) y.r1 = 1;
            if (y.s2 == wk_tag[j] && !y.use_imm) y.r2 = 1;
          end
        if (er_valid) begin
          if (y.s1 == er_tag) begin y.r1 = 1; y.c1 = 1; y.v1 = er_val; ner++; end
          if (y.s2 == er_tag && !y.use_imm) begin y.r2 = 1; y.c2 = 1; y.v2 = er_val; ner++; end
        end
        nm.push_back(y);
      end
      m = nm;
      if (!sq_br && !flush_all) begin
        for (int k = 0; k < nd; k++) m.push_back(d_entry[k]);
        next_rob = (next_rob + nd) % ROB_N;
      end
      @(posedge clk);
    end
    chk(nissue > 2000 && ner > 100 && nsq > 20, $sformatf("coverage: %0d issued %0d broadcasts %0d squashed", nissue, ner, nsq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
