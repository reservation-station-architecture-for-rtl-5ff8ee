// tb_steering_logic: test of the RS-MFU steering logic.
//
// Directed part: with every station free, a stream of integer operations is
// split in chunks of 4 to RS-MFU and 12 to the other stations; an FP add
// goes to RS-MFU and keeps integer operations away for the next Cfp_increment
// instructions; a full RS-MFU redirects integer operations and stops FP adds.
// Random part: groups of random instructions with random free counts are
// compared, cycle by cycle, against a sequential model of the steering
// algorithm kept in this test bench.
module tb_steering_logic;
  import mfu_pkg::*;

  localparam int W = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  op_e          ops [W];
  logic [W-1:0] vld;
  logic [7:0]   rob_free, int_free, addr_free, fp_free, mfu_free;
  logic [W-1:0] accept, to_mfu, to_home, redirect;
  logic [2:0]   n_accept;
  logic [7:0]   cfp_o;
  logic signed [7:0] crr_o;

  steering_logic dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  int m_cfp = 0, m_crr = 0;

  // model of one cycle; returns expected masks and updates the model state
  task automatic model(output logic [W-1:0] e_acc, e_mfu, e_home, e_red);
    int  cfp, crr, nm, ni, na, nf, nr;
    logic stop;
    cfp = m_cfp; crr = m_crr;
    nm = 0; ni = 0; na = 0; nf = 0; nr = 0; stop = 0;
    e_acc = 0; e_mfu = 0; e_home = 0; e_red = 0;
    for (int i = 0; i < W; i++) begin
      int  c2, r2;
      logic want, fadd, elig, mem, room_home, ok, gm;
      op_e o;
      o = ops[i];
      fadd = (o == OP_FADD || o == OP_FSUB);
      mem  = (o == OP_LD || o == OP_SD || o == OP_LDF || o == OP_SDF);
      elig = !fadd && o != OP_MUL && o != OP_FMUL;
      c2 = cfp; r2 = crr; want = 0;
      if (fadd) begin
        c2 = cfp + 4; if (c2 > 16) c2 = 16; want = 1;
      end else begin
        c2 = (cfp > 0) ? cfp - 1 : 0;
        if (c2 == 0 && elig) begin
          r2 = crr + 1;
          if (r2 >= 4) r2 = r2 - 16;
          want = (r2 >= 0);
        end
      end
      gm = want && (nm < mfu_free);
      if (mem)                       room_home = na < addr_free;
      else if (fadd || o == OP_FMUL) room_home = nf < fp_free;
      else                           room_home = ni < int_free;
      ok = vld[i] && !stop && nr < rob_free;
      if (fadd) ok = ok && gm;
      else if (!gm || mem) ok = ok && room_home;
      if (ok) begin
        e_acc[i] = 1; e_mfu[i] = gm; e_red[i] = want && !gm;
        e_home[i] = !fadd && (!gm || mem);
        nr++;
        if (gm) nm++;
        if (e_home[i]) begin
          if (mem) na++; else if (o == OP_FMUL) nf++; else ni++;
        end
        cfp = c2; crr = r2;
      end else stop = 1;
    end
    m_cfp = cfp; m_crr = crr;
  endtask

  task automatic set_all_free();
    rob_free = 64; int_free = 16; addr_free = 16; fp_free = 8; mfu_free = 8;
  endtask

  initial begin
    logic [W-1:0] e_acc, e_mfu, e_home, e_red;
    int n_mfu;
    for (int i = 0; i < W; i++) ops[i] = OP_ADD;
    vld = '0;
    set_all_free();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // directed: 64 integer adds (16 groups of 4)
    n_mfu = 0;
    for (int g = 0; g < 16; g++) begin
      for (int i = 0; i < W; i++) ops[i] = OP_ADD;
      vld = '1;
      #1;
      model(e_acc, e_mfu, e_home, e_red);
      check("all four dispatched", n_accept == 3'd4);
      check($sformatf("group %0d: to_mfu %b (exp %b)", g, to_mfu, e_mfu), to_mfu == e_mfu);
      if (g >= 1 && g <= 12) n_mfu += $countones(to_mfu);
      @(posedge clk);
      #1;
    end
    // instructions 5..52: exactly 4 of every 16 go to RS-MFU
    check($sformatf("4-of-16 round robin: %0d of 48", n_mfu), n_mfu == 12);

    // directed: FP add then integer ops
    ops = '{OP_FADD, OP_ADD, OP_ADD, OP_ADD};
    vld = '1;
    #1;
    model(e_acc, e_mfu, e_home, e_red);
    check("FP add to RS-MFU, integer ops kept away", to_mfu == 4'b0001 && to_home == 4'b1110);
    @(posedge clk);
    #1;
    check("Cfp = 4 + 0 - 3", cfp_o == 8'd1);
    // RS-MFU full: FP add in slot 1 stops the group
    mfu_free = 0;
    ops = '{OP_ADD, OP_FADD, OP_ADD, OP_ADD};
    #1;
    model(e_acc, e_mfu, e_home, e_red);
    check("FP add waits for a full RS-MFU", n_accept == 3'd1 && accept == 4'b0001);
    @(posedge clk);
    #1;

    // random
    for (int c = 0; c < 3000; c++) begin
      op_e all[16] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA,
                       OP_MUL, OP_LD, OP_SD, OP_LDF, OP_SDF, OP_FADD, OP_FSUB, OP_FMUL};
      for (int i = 0; i < W; i++) ops[i] = all[(c / 500) % 2 ? $urandom % 16 : $urandom % 13];
      vld = '0;
      for (int i = 0; i < W; i++) if (i < $urandom % 5) vld[i] = 1'b1;
      rob_free  = 8'($urandom % 6);
      int_free  = 8'($urandom % 6);
      addr_free = 8'($urandom % 6);
      fp_free   = 8'($urandom % 6);
      mfu_free  = 8'($urandom % 6);
      if ($urandom % 3 == 0) set_all_free();
      #1;
      model(e_acc, e_mfu, e_home, e_red);
      check($sformatf("cycle %0d accept %b exp %b", c, accept, e_acc), accept == e_acc);
      check($sformatf("cycle %0d to_mfu %b exp %b", c, to_mfu, e_mfu), to_mfu == e_mfu);
      check($sformatf("cycle %0d to_home %b exp %b", c, to_home, e_home), to_home == e_home);
      check($sformatf("cycle %0d redirect %b exp %b", c, redirect, e_red), redirect == e_red);
      check("n_accept", int'(n_accept) == $countones(e_acc));
      @(posedge clk);
      #1;
      check("Cfp state", int'(cfp_o) == m_cfp);
      check("Crr state", int'(crr_o) == m_crr);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
