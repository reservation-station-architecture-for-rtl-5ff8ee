// tb_mfu: test of the mutable functional unit.
//
// 1. Random integer operations, one at a time: the result must appear on
//    int_res exactly one cycle after issue, equal to a reference computed here.
// 2. Random FP add/sub of normal doubles: the result must appear on fp_res
//    exactly two cycles after issue and equal the simulator's IEEE `real` sum.
// 3. Memory instructions: base + offset on agen one cycle after issue.
// 4. The mutation penalties of every row of the penalty table: a drained unit
//    is given three back-to-back instructions and the idle issue cycles between
//    them are counted (Logic/Add->FP 0, Shift->FP 1, FP->Logic->non-add 0,
//    FP->Logic->Add 1, FP->Shift->int 1, FP->Add->int 2), together with the
//    mutation pulses.
module tb_mfu;
  import mfu_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      in_valid;
  rs_entry_t in;
  logic      in_ready;
  result_t   int_res, fp_res;
  agen_t     agen;
  logic      mode_fp, mutation, stall;

  mfu dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

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

  function automatic rs_entry_t mk(op_e op, word_t a, word_t b, word_t imm, tag_t t);
    rs_entry_t e;
    e = '0;
    e.op = op; e.tag = t;
    e.s1.rdy = 1'b1; e.s1.val = a;
    e.s2.rdy = 1'b1; e.s2.val = b;
    e.imm = imm;
    return e;
  endfunction

  function automatic word_t rand_fp();
    word_t v;
    v = {$urandom, $urandom};
    v[62:52] = 11'(1000 + $urandom % 48);
    return v;
  endfunction

  // issue one instruction, waiting for in_ready; returns the issue cycle
  task automatic issue(rs_entry_t e, output int at);
    in_valid = 1'b1;
    in       = e;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    at = cycle;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  task automatic drain();
    in_valid = 1'b0;
    repeat (6) @(posedge clk);
    #1;
  endtask

  // three back-to-back instructions; returns idle cycles between them
  task automatic seq3(op_e a, op_e b, op_e c, output int bubbles, output int muts);
    rs_entry_t q [3];
    int t [3];
    int m0;
    drain();
    m0 = 0;
    q[0] = mk(a, 64'd3, 64'd1, 0, 6'd1);
    q[1] = mk(b, 64'd3, 64'd1, 0, 6'd2);
    q[2] = mk(c, 64'd3, 64'd1, 0, 6'd3);
    for (int k = 0; k < 3; k++) begin
      in_valid = 1'b1;
      in       = q[k];
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      t[k] = cycle;
      if (k > 0) m0 += int'(mutation);
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    bubbles = (t[2] - t[0]) - 2;
    muts = m0;
  endtask

  initial begin
    int at, bub, muts;
    in_valid = 1'b0;
    in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;

    // 1. integer operations
    for (int k = 0; k < 200; k++) begin
      op_e   ops[8] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA};
      op_e   op;
      word_t a, b, exp;
      tag_t  t;
      op = ops[$urandom % 8];
      a  = {$urandom, $urandom};
      b  = {$urandom, $urandom};
      t  = tag_t'($urandom);
      case (op)
        OP_ADD: exp = a + b;
        OP_SUB: exp = a - b;
        OP_AND: exp = a & b;
        OP_OR:  exp = a | b;
        OP_XOR: exp = a ^ b;
        OP_SLL: exp = a << (b % 64);
        OP_SRL: exp = a >> (b % 64);
        default: exp = $signed(a) >>> (b % 64);
      endcase
      issue(mk(op, a, b, 0, t), at);
      // now just after the edge that follows issue: result visible
      check($sformatf("int %s latency/valid v=%0d cyc=%0d at=%0d", op.name(), int_res.valid, cycle, at), int_res.valid && cycle == at + 1);
      check($sformatf("int %s %h %h = %h (exp %h)", op.name(), a, b, int_res.val, exp),
            int_res.val == exp && int_res.tag == t);
      check("no FP result for int op", !fp_res.valid);
    end

    // 2. FP add / sub
    drain();
    for (int k = 0; k < 300; k++) begin
      word_t a, b, exp;
      real   x, y;
      logic  sub;
      tag_t  t;
      a = rand_fp();
      b = rand_fp();
      sub = $urandom % 2;
      if (k % 10 == 0) b = a ^ 64'h8000_0000_0000_0000;   // exact cancellation
      x = $bitstoreal(a);
      y = $bitstoreal(b);
      exp = sub ? $realtobits(x - y) : $realtobits(x + y);
      t = tag_t'($urandom);
      issue(mk(sub ? OP_FSUB : OP_FADD, a, b, 0, t), at);
      check("FP op gives no int result", !int_res.valid);
      check("FP not ready after 1 cycle", !fp_res.valid);
      @(posedge clk);
      #1;
      check("FP latency 2", fp_res.valid && cycle == at + 2 && fp_res.tag == t);
      check($sformatf("FP %h %s %h = %h (exp %h)", a, sub ? "-" : "+", b, fp_res.val, exp),
            fp_res.val == exp);
    end

    // 3. address generation
    drain();
    for (int k = 0; k < 50; k++) begin
      word_t a, imm;
      tag_t  t;
      a   = {$urandom, $urandom};
      imm = word_t'($signed(16'($urandom)));
      t   = tag_t'($urandom);
      issue(mk((k % 2) ? OP_LD : OP_SD, a, 0, imm, t), at);
      check($sformatf("agen v=%0d tag=%0d/%0d addr=%h exp=%h cyc=%0d at=%0d", agen.valid, agen.tag, t,
                      agen.addr, a + imm, cycle, at), agen.valid && agen.tag == t && agen.addr == a + imm
            && cycle == at + 1);
      check("agen gives no int result", !int_res.valid);
    end

    // 4. mutation penalty table (maximum penalties, pipeline drained before)
    seq3(OP_AND, OP_FADD, OP_FADD, bub, muts);
    check($sformatf("Logic->FP penalty %0d (exp 0)", bub), bub == 0 && muts == 1);
    seq3(OP_ADD, OP_FADD, OP_FADD, bub, muts);
    check($sformatf("Add->FP penalty %0d (exp 0)", bub), bub == 0 && muts == 1);
    seq3(OP_SLL, OP_FADD, OP_FADD, bub, muts);
    check($sformatf("Shift->FP penalty %0d (exp 1)", bub), bub == 1 && muts == 1);
    seq3(OP_FADD, OP_OR, OP_XOR, bub, muts);
    check($sformatf("FP->Logic->Logic penalty %0d (exp 0)", bub), bub == 0 && muts == 1);
    seq3(OP_FADD, OP_OR, OP_SRL, bub, muts);
    check($sformatf("FP->Logic->Shift penalty %0d (exp 0)", bub), bub == 0 && muts == 1);
    seq3(OP_FADD, OP_AND, OP_ADD, bub, muts);
    check($sformatf("FP->Logic->Add penalty %0d (exp 1)", bub), bub == 1 && muts == 1);
    seq3(OP_FADD, OP_SRA, OP_ADD, bub, muts);
    check($sformatf("FP->Shift->Add penalty %0d (exp 1)", bub), bub == 1 && muts == 1);
    seq3(OP_FADD, OP_SLL, OP_XOR, bub, muts);
    check($sformatf("FP->Shift->Logic penalty %0d (exp 1)", bub), bub == 1 && muts == 1);
    seq3(OP_FADD, OP_ADD, OP_SUB, bub, muts);
    check($sformatf("FP->Add->Int penalty %0d (exp 2)", bub), bub == 2 && muts == 1);
    seq3(OP_FADD, OP_LD, OP_ADD, bub, muts);
    check($sformatf("FP->Agen->Int penalty %0d (exp 2)", bub), bub == 2 && muts == 1);
    seq3(OP_FADD, OP_FSUB, OP_FADD, bub, muts);
    check($sformatf("FP->FP->FP penalty %0d (exp 0)", bub), bub == 0);
    seq3(OP_ADD, OP_SLL, OP_AND, bub, muts);
    check($sformatf("Int only penalty %0d (exp 0)", bub), bub == 0 && muts == 0);
    // a drained pipeline costs nothing: FP add, idle, then add
    drain();
    issue(mk(OP_FADD, 64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, 0, 6'd1), at);
    repeat (3) @(posedge clk);
    #1;
    check("mode is FP after an FP add", mode_fp);
    begin
      int at2;
      issue(mk(OP_ADD, 1, 2, 0, 6'd2), at2);
      check("no penalty after the pipeline drained", at2 == at + 4);
      check("mode is integer after an add", !mode_fp);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
