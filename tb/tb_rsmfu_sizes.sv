// tb_rsmfu_sizes: the RS-MFU size study, run on the core.
//
// Four copies of the core run the same random program side by side: the main
// configuration (8-entry RS-MFU, 8-entry FP station) and the three sizes of
// the size study (16-, 8- and 4-entry RS-MFU, each with a 16-entry FP
// station). The program alternates integer/memory-only stretches (no FP adds,
// as in integer codes) with FP-add-heavy stretches, and ends mixed. For each
// copy the test bench checks the final registers and data memory against a
// sequential reference model, and reports the IPC, the share of cycles the
// RS-MFU was full, the number of instructions per mutation and the number
// of integer/memory instructions the MFU took. It checks that a smaller
// RS-MFU is full at least as often as a larger one, and that the 16-entry
// RS-MFU is full least often.
module tb_rsmfu_sizes;
  import mfu_pkg::*;

  localparam int W     = 4;
  localparam int NPROG = 2400;
  localparam int MEMW  = 256;
  localparam int NC    = 4;
  localparam int MFU_N [NC] = '{8, 16, 8, 4};
  localparam int FP_N  [NC] = '{8, 16, 16, 16};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [5:0]  dbg_reg;
  logic        dbg_mem_we;
  logic [11:0] dbg_mem_addr;
  word_t       dbg_mem_wdata;

  uop_t        uops_c [NC][W];
  logic [2:0]  n_acc_c [NC];
  logic        idle_c [NC];
  word_t       reg_c [NC];
  word_t       mem_c [NC];
  logic        mode_c [NC];
  stats_t      stats_c [NC];
  int          pc_c [NC];

  for (genvar g = 0; g < NC; g++) begin : g_core
    mfu_core #(.MFU_RS_N(MFU_N[g]), .FP_RS_N(FP_N[g])) u_core (
      .clk, .rst_n, .uops(uops_c[g]), .n_accept(n_acc_c[g]), .idle(idle_c[g]),
      .dbg_reg, .dbg_reg_val(reg_c[g]), .dbg_mem_we, .dbg_mem_addr, .dbg_mem_wdata,
      .dbg_mem_rdata(mem_c[g]), .mfu_mode_fp(mode_c[g]), .stats(stats_c[g]));

    always_comb begin
      for (int i = 0; i < W; i++)
        uops_c[g][i] = (pc_c[g] + i < NPROG && rst_n) ? prog[pc_c[g] + i] : '0;
    end

    always_ff @(posedge clk) begin
      if (!rst_n) pc_c[g] <= 0;
      else        pc_c[g] <= pc_c[g] + int'(n_acc_c[g]);
    end
  end

  int checks = 0, failures = 0;

  uop_t  prog [NPROG];
  word_t ref_i [32];
  word_t ref_f [32];
  word_t ref_m [MEMW];
  word_t init_m [MEMW];

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic word_t rand_fp();
    word_t v;
    v = {$urandom, $urandom};
    v[62:52] = ($urandom % 2) ? 11'd1023 : 11'd1022;
    return v;
  endfunction

  function automatic uop_t gen(int phase);
    uop_t u;
    int   r;
    u = '0;
    u.valid = 1'b1;
    r = $urandom % 100;
    if (phase == 0) r = r % 60;                  // integer and memory only
    else if (phase == 1) r = 40 + (r % 60);      // mostly FP
    if (r < 35) begin
      op_e ops[9] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA, OP_MUL};
      u.op  = ops[$urandom % 9];
      if ($urandom % 100 == 0) u.op = OP_DIV;
      u.rd  = 5'(2 + $urandom % 14);
      u.rs1 = 5'($urandom % 16);
      u.rs2 = 5'($urandom % 16);
      u.use_imm = ($urandom % 3 == 0);
      u.imm = 16'($signed(($urandom % 200) - 100));
    end else if (r < 60) begin
      op_e mops[4] = '{OP_LD, OP_SD, OP_LDF, OP_SDF};
      u.op = mops[$urandom % 4];
      // FP data lives in words 0..127 (base r0), integer data in
      // words 128..255 (base r1 = 1024)
      if (u.op inside {OP_LDF, OP_SDF}) begin
        u.rs1 = 5'd0;  u.imm = 16'(8 * ($urandom % 128));
      end else begin
        u.rs1 = 5'd1;  u.imm = 16'(8 * ($urandom % 128));
      end
      if (u.op inside {OP_LD}) u.rd = 5'(2 + $urandom % 14);
      if (u.op inside {OP_LDF}) u.rd = 5'($urandom % 8);
      if (u.op inside {OP_SD}) u.rs2 = 5'($urandom % 16);
      if (u.op inside {OP_SDF}) u.rs2 = 5'($urandom % 8);
    end else begin
      // multiplies and divides take their second operand from f0..f3
      // (loaded values) so that the registers do not all overflow
      u.op  = ($urandom % 3 == 0) ? OP_FMUL : (($urandom % 2) ? OP_FADD : OP_FSUB);
      if ($urandom % 100 == 0) u.op = ($urandom % 2) ? OP_FDIV : OP_FSQRT;
      u.rd  = 5'($urandom % 8);
      u.rs1 = 5'($urandom % 8);
      u.rs2 = 5'($urandom % 8);
      if (u.op inside {OP_FMUL, OP_FDIV, OP_FSQRT}) begin
        u.rd  = 5'(4 + $urandom % 4);
        u.rs2 = 5'($urandom % 4);
      end
    end
    return u;
  endfunction

  // reference model, written independently of the RTL
  function automatic word_t fref(op_e op, word_t a, word_t b);
    real   x, y;
    word_t r;
    x = $bitstoreal(a);
    y = $bitstoreal(b);
    case (op)
      OP_FADD: r = $realtobits(x + y);
      OP_FSUB: r = $realtobits(x - y);
      OP_FDIV: r = $realtobits(x / y);
      OP_FSQRT: r = $realtobits($sqrt(x));
      default: r = $realtobits(x * y);
    endcase
    // the core produces a single quiet NaN
    if (r[62:52] == 11'h7FF && r[51:0] != 0) r = 64'h7FF8_0000_0000_0000;
    return r;
  endfunction

  task automatic run_ref();
    for (int i = 0; i < 32; i++) begin ref_i[i] = '0; ref_f[i] = '0; end
    for (int i = 0; i < MEMW; i++) ref_m[i] = init_m[i];
    for (int k = 0; k < NPROG; k++) begin
      uop_t  u;
      word_t a, b, ea, res;
      int    wi;
      u  = prog[k];
      a  = ref_i[u.rs1];
      b  = u.use_imm ? word_t'($signed(u.imm)) : ref_i[u.rs2];
      ea = a + word_t'($signed(u.imm));
      wi = int'(ea[14:3]);
      res = '0;
      case (u.op)
        OP_ADD: res = a + b;
        OP_SUB: res = a - b;
        OP_AND: res = a & b;
        OP_OR:  res = a | b;
        OP_XOR: res = a ^ b;
        OP_SLL: res = a << b[5:0];
        OP_SRL: res = a >> b[5:0];
        OP_SRA: res = $signed(a) >>> b[5:0];
        OP_MUL: res = a * b;
        OP_DIV: res = (b == '0) ? '1 :
                      (a == 64'h8000_0000_0000_0000 && b == '1) ? a :
                      word_t'($signed(a) / $signed(b));
        default: ;
      endcase
      if (u.op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA, OP_MUL, OP_DIV}) begin
        if (u.rd != 0) ref_i[u.rd] = res;
      end else if (u.op == OP_LD) begin
        if (u.rd != 0) ref_i[u.rd] = ref_m[wi];
      end else if (u.op == OP_LDF) begin
        ref_f[u.rd] = ref_m[wi];
      end else if (u.op == OP_SD) begin
        ref_m[wi] = ref_i[u.rs2];
      end else if (u.op == OP_SDF) begin
        ref_m[wi] = ref_f[u.rs2];
      end else begin
        ref_f[u.rd] = fref(u.op, ref_f[u.rs1], ref_f[u.rs2]);
      end
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic all_done();
    for (int g = 0; g < NC; g++) if (!(pc_c[g] >= NPROG && idle_c[g])) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    real full_pct [NC];
    dbg_reg = '0;
    dbg_mem_we = 1'b0;
    dbg_mem_addr = '0;
    dbg_mem_wdata = '0;
    prog[0] = '{valid: 1'b1, op: OP_ADD, rd: 5'd1, rs1: 5'd0, rs2: 5'd0, use_imm: 1'b1, imm: 16'd1024};
    for (int k = 1; k < 9; k++)
      prog[k] = '{valid: 1'b1, op: OP_LDF, rd: 5'(k - 1), rs1: 5'd0, rs2: 5'd0, use_imm: 1'b0,
                  imm: 16'(8 * k)};
    // stretches of 200: integer/memory only, then FP heavy; last 400 mixed
    for (int k = 9; k < NPROG; k++)
      prog[k] = gen(k >= NPROG - 400 ? 2 : ((k / 200) % 2));
    for (int i = 0; i < MEMW; i++) init_m[i] = (i < 128) ? rand_fp() : {$urandom, $urandom};
    run_ref();

    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < MEMW; i++) begin
      dbg_mem_we = 1'b1; dbg_mem_addr = 12'(i); dbg_mem_wdata = init_m[i];
      @(posedge clk);
      #1;
    end
    dbg_mem_we = 1'b0;
    rst_n = 1'b1;
    while (!all_done()) begin
      @(posedge clk);
      #1;
    end
    repeat (2) @(posedge clk);
    #1;
    for (int g = 0; g < NC; g++) begin
      full_pct[g] = 100.0 * real'(stats_c[g].rsmfu_full) / real'(stats_c[g].cycles);
      $display("RS-MFU %2d / FP RS %2d: cycles=%0d IPC=%0.3f RS-MFU full %0.2f%% instr/mutation=%0.1f int+mem to MFU=%0d redirects=%0d",
               MFU_N[g], FP_N[g], stats_c[g].cycles,
               real'(stats_c[g].committed) / real'(stats_c[g].cycles), full_pct[g],
               real'(stats_c[g].committed) / real'(stats_c[g].mutations + 1),
               stats_c[g].to_mfu_int, stats_c[g].redirects);
      check($sformatf("config %0d: all committed", g), stats_c[g].committed == NPROG);
      check($sformatf("config %0d: MFU took integer/memory work", g), stats_c[g].to_mfu_int > 0);
    end
    for (int r = 0; r < 32; r++) begin
      dbg_reg = {1'b0, 5'(r)};
      #1;
      for (int g = 0; g < NC; g++)
        check($sformatf("config %0d: r%0d = %h (expected %h)", g, r, reg_c[g], ref_i[r]), reg_c[g] == ref_i[r]);
      dbg_reg = {1'b1, 5'(r)};
      #1;
      for (int g = 0; g < NC; g++)
        check($sformatf("config %0d: f%0d = %h (expected %h)", g, r, reg_c[g], ref_f[r]), reg_c[g] == ref_f[r]);
    end
    for (int i = 0; i < MEMW; i++) begin
      dbg_mem_addr = 12'(i);
      #1;
      for (int g = 0; g < NC; g++)
        check($sformatf("config %0d: mem[%0d] = %h (expected %h)", g, i, mem_c[g], ref_m[i]), mem_c[g] == ref_m[i]);
    end
    check("RS-MFU full: 4 entries at least as often as 8", full_pct[3] >= full_pct[2]);
    check("RS-MFU full: 8 entries at least as often as 16", full_pct[2] >= full_pct[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
