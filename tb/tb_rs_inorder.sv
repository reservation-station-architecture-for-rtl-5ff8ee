// tb_rs_inorder: test of the in-order reservation station (RS-MFU / Address RS).
//
// Random traffic against a queue model kept in this test bench: up to four
// writes per cycle (as many as the model says are free), operands either
// ready or waiting for a random tag, random broadcasts on two result buses and
// on the address bus, and random issue of a ready head. Checked every cycle:
// the free count, head_valid (head present and both operands ready), the head's
// tag, and the captured operand values of each issued entry. Entries with
// agen_ext take their first operand only from the address bus.
module tb_rs_inorder;
  import mfu_pkg::*;

  localparam int DEPTH = 8;
  localparam int W = 4;
  localparam int NB = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] wr_en;
  rs_entry_t    wr_data [W];
  logic [7:0]   free_cnt;
  logic         full;
  result_t      bus [NB];
  agen_t        agen_in;
  logic         head_valid;
  rs_entry_t    head;
  logic         issue;

  rs_inorder #(.DEPTH(DEPTH), .W(W), .NB(NB), .AGEN(1'b1)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rs_entry_t q [$];
  int n_issued = 0, n_wait = 0;

  function automatic operand_t rnd_opnd();
    operand_t o;
    o.rdy = ($urandom % 3 == 0);
    o.tag = tag_t'($urandom % 16);
    o.val = o.rdy ? {$urandom, $urandom} : '0;
    return o;
  endfunction

  initial begin
    int ntag;
    ntag = 0;
    wr_en = '0;
    issue = 1'b0;
    agen_in = '0;
    for (int b = 0; b < NB; b++) bus[b] = '0;
    for (int i = 0; i < W; i++) wr_data[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      int nw;
      // compare outputs with the model
      check($sformatf("free_cnt %0d model %0d", free_cnt, DEPTH - q.size()),
            int'(free_cnt) == DEPTH - q.size());
      check("full flag", full == (q.size() == DEPTH));
      if (q.size() > 0) begin
        check("head_valid", head_valid == (q[0].s1.rdy && q[0].s2.rdy));
        check("head tag in order", head.tag == q[0].tag);
        if (q[0].s1.rdy && q[0].s2.rdy)
          check("head operand values", head.s1.val == q[0].s1.val && head.s2.val == q[0].s2.val);
        if (!head_valid) n_wait++;
      end else begin
        check("empty: no head", !head_valid);
      end
      // stimulus
      issue = head_valid && ($urandom % 3 != 0);
      nw = (c % 400 < 200) ? $urandom % (W + 1) : $urandom % 2;
      if (nw > DEPTH - q.size()) nw = DEPTH - q.size();
      wr_en = '0;
      for (int i = 0; i < W; i++) begin
        wr_data[i] = '0;
        if (i < nw) begin
          wr_en[i] = 1'b1;
          wr_data[i].op  = OP_LD;
          wr_data[i].tag = tag_t'(32 + ntag % 32);
          ntag++;
          wr_data[i].s1  = rnd_opnd();
          wr_data[i].s2  = rnd_opnd();
          wr_data[i].agen_ext = ($urandom % 4 == 0);
          if (wr_data[i].agen_ext) wr_data[i].s1 = '{rdy: 1'b0, tag: wr_data[i].tag, val: '0};
        end
      end
      for (int b = 0; b < NB; b++) begin
        bus[b].valid = ($urandom % 2);
        bus[b].tag   = ($urandom % 4 == 0) ? tag_t'(32 + $urandom % 32) : tag_t'($urandom % 16);
        bus[b].val   = {$urandom, $urandom};
      end
      agen_in.valid = ($urandom % 2);
      agen_in.tag   = (q.size() > 0 && $urandom % 2) ? q[$urandom % q.size()].tag
                                                     : tag_t'($urandom % 16);
      agen_in.addr  = {$urandom, $urandom};
      #1;
      // model update at the edge: wakeup, pop, push
      // (two buses with the same tag: the higher-numbered one is taken)
      for (int e = 0; e < q.size(); e++) begin
        logic r1, r2;
        r1 = q[e].s1.rdy;
        r2 = q[e].s2.rdy;
        for (int b = 0; b < NB; b++) begin
          if (bus[b].valid) begin
            if (!r1 && !q[e].agen_ext && q[e].s1.tag == bus[b].tag) begin
              q[e].s1.rdy = 1'b1; q[e].s1.val = bus[b].val;
            end
            if (!r2 && q[e].s2.tag == bus[b].tag) begin
              q[e].s2.rdy = 1'b1; q[e].s2.val = bus[b].val;
            end
          end
        end
        if (agen_in.valid && q[e].agen_ext && !q[e].s1.rdy && q[e].tag == agen_in.tag) begin
          q[e].s1.rdy = 1'b1; q[e].s1.val = agen_in.addr;
        end
      end
      if (issue) begin
        void'(q.pop_front());
        n_issued++;
      end
      for (int i = 0; i < W; i++) if (wr_en[i]) q.push_back(wr_data[i]);
      @(posedge clk);
      #1;
    end
    check($sformatf("traffic: %0d issued, %0d cycles head waiting", n_issued, n_wait),
          n_issued > 500 && n_wait > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
