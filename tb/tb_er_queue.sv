// tb_er_queue: random early-release candidates, RAT match answers, holds and
// commit-time frees against a queue model. Checks the searched candidate, the
// release output, the one-cycle delayed broadcast, the room output and that
// stale candidates for freed registers are dropped.
module tb_er_queue;
  import rs_pkg::*;
  localparam int unsigned DEPTH = 4, W = 4;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic [15:0]  room;
  logic [W-1:0] in_valid, in_val, kill_valid;
  tag_t         in_tag [W];
  preg_t        kill_preg [W];
  logic         hold, er_valid, er_val, er_match, rel_valid, bc_valid, bc_val;
  tag_t         er_tag, bc_tag;
  preg_t        rel_preg;
  int unsigned checks = 0, failures = 0;

  typedef struct { tag_t t; logic v; } cand_t;
  cand_t q[$];
  logic  exp_bc;
  tag_t  exp_bc_tag;
  logic  exp_bc_val;
  int unsigned nrel = 0, nkill = 0;

  always #5 clk = ~clk;

  er_queue #(.DEPTH(DEPTH), .W(W)) dut (.*);

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic logic killed_by(tag_t t, logic rv, preg_t rp);
    logic k;
    k = rv && t[PREG_W-1:0] == rp;
    for (int j = 0; j < W; j++) if (kill_valid[j] && kill_preg[j] == t[PREG_W-1:0]) k = 1'b1;
    return k;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = '0; in_val = '0; kill_valid = '0; hold = 1'b0; er_match = 1'b0;
    for (int k = 0; k < W; k++) begin in_tag[k] = '0; kill_preg[k] = '0; end
    exp_bc = 1'b0; exp_bc_tag = '0; exp_bc_val = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      logic ev, rv;
      int   nin;
      cand_t nq[$];
      nq = {};
      @(negedge clk);
      hold     = $urandom_range(7) == 0;
      er_match = $urandom_range(1);
      in_valid = '0; kill_valid = '0;
      nin = $urandom_range(W);
      if (nin > int'(room)) nin = room;
      for (int k = 0; k < W; k++) begin
        // small storage range so that kills hit queued candidates
        in_tag[k]    = {VER_W'($urandom), PREG_W'($urandom_range(2, 9))};
        in_val[k]    = $urandom_range(1);
        in_valid[k]  = k < nin;
        kill_preg[k] = PREG_W'($urandom_range(2, 9));
        kill_valid[k] = $urandom_range(5) == 0;
      end
      #1;
      chk(room == 16'(DEPTH - q.size()), $sformatf("cycle %0d room %0d, model holds %0d", c, room, q.size()));
      chk(bc_valid == exp_bc && (!exp_bc || (bc_tag == exp_bc_tag && bc_val == exp_bc_val)),
          $sformatf("cycle %0d broadcast %b %h", c, bc_valid, bc_tag));
      ev = q.size() != 0 && !hold;
      chk(er_valid == ev, $sformatf("cycle %0d er_valid %b", c, er_valid));
      if (ev) chk(er_tag == q[0].t && er_val == q[0].v, $sformatf("cycle %0d searched %h expected %h", c, er_tag, q[0].t));
      rv = ev && er_match;
      chk(rel_valid == rv && (!rv || rel_preg == q[0].t[PREG_W-1:0]), $sformatf("cycle %0d release", c));
      if (rv) nrel++;
      exp_bc = rv;
      if (ev) begin exp_bc_tag = q[0].t; exp_bc_val = q[0].v; end
      for (int i = 0; i < q.size(); i++)
        if (!(i == 0 && ev)) begin
          if (!killed_by(q[i].t, rv, q[0].t[PREG_W-1:0])) nq.push_back(q[i]);
          else nkill++;
        end
      for (int k = 0; k < W; k++)
        if (in_valid[k] && !killed_by(in_tag[k], rv, q.size() != 0 ? q[0].t[PREG_W-1:0] : '0))
          nq.push_back('{in_tag[k], in_val[k]});
      q = nq;
    end
    chk(nrel > 100 && nkill > 100, $sformatf("coverage: %0d releases, %0d kills", nrel, nkill));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
