// tb_rs_ooo: test of the out-of-order reservation station (integer RS
// configuration: 16 entries, port 0 = ALU1 without multiply, port 1 = ALU2
// without shifts).
//
// Random traffic against a model kept in this test bench (a list of waiting
// entries). Each cycle it checks: the free count; that every issued entry is
// waiting in the model, has both operands ready with the values the model
// captured, suits its port, and is not issued on both ports; that a port does
// not stay idle while an entry it could take is ready and its unit is ready
// (port_rdy, driven randomly), and never issues while its unit is busy; and that younger
// entries overtake older waiting ones (out-of-order issue) at least once.
module tb_rs_ooo;
  import mfu_pkg::*;

  localparam int DEPTH = 16;
  localparam int W = 4;
  localparam int NB = 2;
  localparam int PORTS = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]     wr_en;
  rs_entry_t        wr_data [W];
  logic [7:0]       free_cnt;
  result_t          bus [NB];
  logic [PORTS-1:0] port_rdy;
  logic [PORTS-1:0] iss_valid;
  rs_entry_t        iss_data [PORTS];

  rs_ooo #(.DEPTH(DEPTH), .W(W), .NB(NB), .PORTS(PORTS), .KIND_FP(1'b0)) dut (.*);

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

  rs_entry_t m [$];    // waiting entries, oldest first
  int n_issued = 0, n_ooo = 0;

  function automatic logic ok_port(int p, op_e op);
    if (p == 0) return op != OP_MUL;
    return !(op inside {OP_SLL, OP_SRL, OP_SRA});
  endfunction

  function automatic operand_t rnd_opnd();
    operand_t o;
    o.rdy = ($urandom % 3 == 0);
    o.tag = tag_t'($urandom % 16);
    o.val = o.rdy ? {$urandom, $urandom} : '0;
    return o;
  endfunction

  initial begin
    int ntag;
    op_e all[9] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA, OP_MUL};
    ntag = 0;
    wr_en = '0;
    port_rdy = '1;
    for (int b = 0; b < NB; b++) bus[b] = '0;
    for (int i = 0; i < W; i++) wr_data[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      int nw;
      int idx [PORTS];
      check($sformatf("free_cnt %0d model %0d", free_cnt, DEPTH - m.size()),
            int'(free_cnt) == DEPTH - m.size());
      // issued entries
      for (int p = 0; p < PORTS; p++) begin
        idx[p] = -1;
        if (iss_valid[p]) begin
          for (int e = 0; e < m.size(); e++) if (m[e].imm == iss_data[p].imm) idx[p] = e;
          check("issued entry is waiting", idx[p] >= 0);
          if (idx[p] >= 0) begin
            check("operands ready", m[idx[p]].s1.rdy && m[idx[p]].s2.rdy);
            check("operand values", iss_data[p].s1.val == m[idx[p]].s1.val
                                    && iss_data[p].s2.val == m[idx[p]].s2.val
                                    && iss_data[p].op == m[idx[p]].op);
            check("port capability", ok_port(p, iss_data[p].op));
            for (int e = 0; e < idx[p]; e++) if (!(m[e].s1.rdy && m[e].s2.rdy)) begin
              n_ooo++;
              break;
            end
          end
        end
      end
      if (iss_valid == 2'b11) check("two ports, two entries", idx[0] != idx[1]);
      // no idle port while it has work
      for (int p = 0; p < PORTS; p++) begin
        logic avail;
        avail = 1'b0;
        for (int e = 0; e < m.size(); e++)
          if (port_rdy[p] && m[e].s1.rdy && m[e].s2.rdy && ok_port(p, m[e].op) && (p == 0 || e != idx[0]))
            avail = 1'b1;
        check($sformatf("port %0d busy when work is ready", p), iss_valid[p] == avail);
      end
      // stimulus
      nw = (c % 400 < 250) ? $urandom % (W + 1) : $urandom % 2;
      if (nw > DEPTH - m.size()) nw = DEPTH - m.size();
      wr_en = '0;
      for (int i = 0; i < W; i++) begin
        wr_data[i] = '0;
        if (i < nw) begin
          wr_en[i] = 1'b1;
          wr_data[i].op  = all[$urandom % 9];
          wr_data[i].tag = tag_t'(32 + ntag % 32);
          wr_data[i].imm = word_t'(ntag);   // unique id
          ntag++;
          wr_data[i].s1  = rnd_opnd();
          wr_data[i].s2  = rnd_opnd();
        end
      end
      for (int b = 0; b < NB; b++) begin
        bus[b].valid = ($urandom % 3 == 0);
        bus[b].tag   = tag_t'(b * 8 + $urandom % 8);    // the two buses never share a tag
        bus[b].val   = {$urandom, $urandom};
      end
      #1;
      // model update at the edge
      for (int e = 0; e < m.size(); e++) begin
        for (int b = 0; b < NB; b++) begin
          if (bus[b].valid) begin
            if (!m[e].s1.rdy && m[e].s1.tag == bus[b].tag) begin
              m[e].s1.rdy = 1'b1; m[e].s1.val = bus[b].val;
            end
            if (!m[e].s2.rdy && m[e].s2.tag == bus[b].tag) begin
              m[e].s2.rdy = 1'b1; m[e].s2.val = bus[b].val;
            end
          end
        end
      end
      begin
        // delete the higher index first so the lower one stays valid
        int hi, lo;
        hi = (idx[0] > idx[1]) ? idx[0] : idx[1];
        lo = (idx[0] > idx[1]) ? idx[1] : idx[0];
        if (hi >= 0) begin m.delete(hi); n_issued++; end
        if (lo >= 0) begin m.delete(lo); n_issued++; end
      end
      for (int i = 0; i < W; i++) if (wr_en[i]) m.push_back(wr_data[i]);
      @(posedge clk);
      #1;
      for (int p = 0; p < PORTS; p++) port_rdy[p] = ($urandom % 8 != 0);
      #1;
    end
    check($sformatf("traffic: %0d issued, %0d out of order", n_issued, n_ooo),
          n_issued > 500 && n_ooo > 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
