// tb_rob_rename: test of renaming through the reorder buffer.
//
// The test bench plays the rest of the core: it presents groups of random
// integer instructions (add/sub/xor/or with register or immediate operands,
// including dependences inside a group), accepts a random prefix of each
// group, keeps the renamed instructions, and "executes" them out of order:
// an instruction whose operands are known gets its result computed here and
// broadcast, after a random delay, on one of two result buses. Waiting
// operands are resolved only through those broadcasts, so a wrong tag or a wrong
// ready value gives a wrong final state. At the end the architectural
// registers (read on the debug port) must equal a sequential reference run
// of the accepted instructions, the ROB must be empty, and every instruction
// must have been committed; the commit width of 4 per cycle must be reached.
module tb_rob_rename;
  import mfu_pkg::*;

  localparam int W = 4;
  localparam int NB = 2;
  localparam int DEPTH = 64;
  localparam int NINST = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  uop_t         uops [W];
  logic [W-1:0] accept;
  rs_entry_t    ren [W];
  logic [7:0]   rob_free;
  result_t      bus [NB];
  logic [2:0]   n_commit;
  logic         empty;
  logic [5:0]   dbg_reg;
  word_t        dbg_val;

  rob_rename #(.W(W), .DEPTH(DEPTH), .NB(NB), .CW(4)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t     ref_r [32];
  rs_entry_t pend [$];        // renamed, not yet executed
  int        n_acc = 0, n_cmt = 0, max_cmt = 0;

  function automatic uop_t gen();
    uop_t u;
    op_e  ops[4] = '{OP_ADD, OP_SUB, OP_XOR, OP_OR};
    u = '0;
    u.valid = 1'b1;
    u.op  = ops[$urandom % 4];
    u.rd  = 5'($urandom % 8);          // includes r0, which is never written
    u.rs1 = 5'($urandom % 8);
    u.rs2 = 5'($urandom % 8);
    u.use_imm = ($urandom % 4 == 0);
    u.imm = 16'($urandom);
    return u;
  endfunction

  function automatic word_t alu(op_e op, word_t a, word_t b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_XOR: return a ^ b;
      default: return a | b;
    endcase
  endfunction

  initial begin
    for (int r = 0; r < 32; r++) ref_r[r] = '0;
    for (int i = 0; i < W; i++) uops[i] = '0;
    accept = '0;
    for (int b = 0; b < NB; b++) bus[b] = '0;
    dbg_reg = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    while (n_acc < NINST || pend.size() > 0 || !empty) begin
      int na, nb;
      for (int i = 0; i < W; i++) uops[i] = (n_acc < NINST) ? gen() : '0;
      #1;
      // accept a random prefix that fits in the ROB
      na = (n_acc < NINST) ? $urandom % (W + 1) : 0;
      if (na > int'(rob_free)) na = int'(rob_free);
      accept = '0;
      for (int i = 0; i < na; i++) accept[i] = 1'b1;
      // choose broadcasts among pending instructions with known operands
      nb = 0;
      for (int b = 0; b < NB; b++) bus[b] = '0;
      for (int k = 0; k < pend.size() && nb < NB; k++) begin
        rs_entry_t e;
        e = pend[k];
        if (e.s1.rdy && e.s2.rdy && $urandom % 2) begin
          bus[nb] = '{valid: 1'b1, tag: e.tag, val: alu(e.op, e.s1.val, e.s2.val)};
          nb++;
          pend.delete(k);
          k--;
        end
      end
      #1;
      // record accepted instructions (operands as delivered by the DUT)
      for (int i = 0; i < na; i++) begin
        rs_entry_t e;
        word_t a, b;
        e = ren[i];
        pend.push_back(e);
        a = ref_r[uops[i].rs1];
        b = uops[i].use_imm ? word_t'($signed(uops[i].imm)) : ref_r[uops[i].rs2];
        if (uops[i].rd != 0) ref_r[uops[i].rd] = alu(uops[i].op, a, b);
        n_acc++;
      end
      @(posedge clk);
      // waiting instructions capture broadcast values, as a station would
      for (int b = 0; b < NB; b++) if (bus[b].valid) begin
        for (int k = 0; k < pend.size(); k++) begin
          if (!pend[k].s1.rdy && pend[k].s1.tag == bus[b].tag) begin
            pend[k].s1.rdy = 1'b1; pend[k].s1.val = bus[b].val;
          end
          if (!pend[k].s2.rdy && pend[k].s2.tag == bus[b].tag) begin
            pend[k].s2.rdy = 1'b1; pend[k].s2.val = bus[b].val;
          end
        end
      end
      if (int'(n_commit) > max_cmt) max_cmt = int'(n_commit);
      n_cmt += int'(n_commit);
      #1;
      accept = '0;
      for (int b = 0; b < NB; b++) bus[b] = '0;
    end
    repeat (2) @(posedge clk);
    #1;
    check($sformatf("committed %0d of %0d", n_cmt, n_acc), n_cmt == n_acc && n_acc == NINST);
    check("ROB empty and fully free", empty && rob_free == 8'(DEPTH));
    check($sformatf("commit width reached (max %0d)", max_cmt), max_cmt == 4);
    for (int r = 0; r < 32; r++) begin
      dbg_reg = {1'b0, 5'(r)};
      #1;
      check($sformatf("r%0d = %h (exp %h)", r, dbg_val, ref_r[r]), dbg_val == ref_r[r]);
    end
    dbg_reg = {1'b1, 5'd3};
    #1;
    check("FP register untouched", dbg_val == '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
