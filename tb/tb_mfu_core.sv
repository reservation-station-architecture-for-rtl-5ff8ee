// tb_mfu_core: end-to-end test of the mutable-functional-unit core.
//
// Generates a random program in three phases (integer and memory only, FP
// heavy, mixed), loads the data memory, feeds the program through the
// dispatch port and lets the core drain. A sequential reference model runs
// the same program on its own register and memory arrays (FP arithmetic
// through the simulator's IEEE double `real`), and every integer register,
// every FP register and every data word used is compared at the end.
// It also checks that each mechanism of the design happened: integer/memory
// instructions and FP adds steered to RS-MFU, addresses computed by the MFU,
// RS-MFU full, redirects away from a full RS-MFU, mutations, mutation-penalty
// stalls, dispatch stalls, dual ALU issue, FPU2 busy with a divide or
// square root, and ALU2 busy with an integer divide. All parameters are the
// core's defaults.
module tb_mfu_core;
  import mfu_pkg::*;

  localparam int W        = 4;
  localparam int NPROG    = 1500;
  localparam int MEMW     = 256;    // data words used by the program
  localparam int DMEM     = 4096;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  uop_t   uops [W];
  logic [2:0] n_accept;
  logic   idle;
  logic [5:0] dbg_reg;
  word_t  dbg_reg_val;
  logic   dbg_mem_we;
  logic [11:0] dbg_mem_addr;
  word_t  dbg_mem_wdata, dbg_mem_rdata;
  logic   mfu_mode_fp;
  stats_t stats;

  mfu_core dut (.*);

  int checks = 0, failures = 0;

  uop_t  prog [NPROG];
  word_t ref_i [32];
  word_t ref_f [32];
  word_t ref_m [MEMW];
  word_t init_m [MEMW];
  int    pc = 0;

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

  // instruction feed
  always_comb begin
    for (int i = 0; i < W; i++) begin
      uops[i] = (pc + i < NPROG && rst_n) ? prog[pc + i] : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) pc <= pc + int'(n_accept);
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc0;
    dbg_reg = '0;
    dbg_mem_we = 1'b0;
    dbg_mem_addr = '0;
    dbg_mem_wdata = '0;
    // program: set r1 = 1024, then load some FP values, then three phases
    prog[0] = '{valid: 1'b1, op: OP_ADD, rd: 5'd1, rs1: 5'd0, rs2: 5'd0, use_imm: 1'b1, imm: 16'd1024};
    for (int k = 1; k < 9; k++)
      prog[k] = '{valid: 1'b1, op: OP_LDF, rd: 5'(k - 1), rs1: 5'd0, rs2: 5'd0, use_imm: 1'b0,
                  imm: 16'(8 * k)};
    // alternating blocks of 60: integer/memory only, then FP heavy; the last
    // 300 instructions are mixed
    for (int k = 9; k < NPROG; k++)
      prog[k] = gen(k >= NPROG - 300 ? 2 : ((k / 60) % 2));
    // each FP block ends with a chain of dependent FP adds, so the following
    // integer work queues behind it in RS-MFU (RS-MFU full, mutation stalls)
    for (int b = 60; b < NPROG - 300; b += 120)
      for (int k = b + 48; k < b + 60; k++)
        prog[k] = '{valid: 1'b1, op: OP_FADD, rd: 5'd7, rs1: 5'd7, rs2: 5'(k % 7), use_imm: 1'b0,
                    imm: 16'd0};
    for (int i = 0; i < MEMW; i++) init_m[i] = (i < 128) ? rand_fp() : {$urandom, $urandom};
    run_ref();

    // load the data memory
    repeat (2) @(posedge clk);
    for (int i = 0; i < MEMW; i++) begin
      dbg_mem_we    <= 1'b1;
      dbg_mem_addr  <= 12'(i);
      dbg_mem_wdata <= init_m[i];
      @(posedge clk);
    end
    dbg_mem_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    cyc0 = 0;
    // run until the program is in and the core is idle
    while (!(pc >= NPROG && idle)) begin
      @(posedge clk);
      cyc0++;
    end
    repeat (2) @(posedge clk);
    $display("cycles=%0d committed=%0d IPC=%0.3f", stats.cycles, stats.committed,
             real'(stats.committed) / real'(stats.cycles));
    $display("to_mfu_int=%0d to_mfu_fadd=%0d redirects=%0d rsmfu_full=%0d mutations=%0d mut_stalls=%0d agens=%0d disp_stalls=%0d dual_alu=%0d fpu2_busy=%0d alu2_busy=%0d",
             stats.to_mfu_int, stats.to_mfu_fadd, stats.redirects, stats.rsmfu_full,
             stats.mutations, stats.mut_stalls, stats.agens, stats.disp_stalls, stats.dual_alu, stats.fpu2_busy, stats.alu2_busy);
    check("all instructions committed", stats.committed == NPROG);
    // architectural state
    begin
      int finite = 0;
      for (int r = 0; r < 8; r++) if (ref_f[r][62:52] != 11'h7FF) finite++;
      $display("finite FP registers at the end: %0d of 8", finite);
    end
    for (int r = 0; r < 32; r++) begin
      dbg_reg = {1'b0, 5'(r)};
      #1;
      check($sformatf("int r%0d = %h (expected %h)", r, dbg_reg_val, ref_i[r]), dbg_reg_val == ref_i[r]);
      dbg_reg = {1'b1, 5'(r)};
      #1;
      check($sformatf("fp f%0d = %h (expected %h)", r, dbg_reg_val, ref_f[r]), dbg_reg_val == ref_f[r]);
    end
    for (int i = 0; i < MEMW; i++) begin
      dbg_mem_addr = 12'(i);
      #1;
      check($sformatf("mem[%0d] = %h (expected %h)", i, dbg_mem_rdata, ref_m[i]), dbg_mem_rdata == ref_m[i]);
    end
    // every mechanism happened at least once
    check("integer/memory steered to RS-MFU", stats.to_mfu_int > 0);
    check("FP adds dispatched to RS-MFU",     stats.to_mfu_fadd > 0);
    check("MFU address generation",           stats.agens > 0);
    check("RS-MFU full",                      stats.rsmfu_full > 0);
    check("redirect from full RS-MFU",        stats.redirects > 0);
    check("MFU mutation",                     stats.mutations > 0);
    check("mutation penalty stall",           stats.mut_stalls > 0);
    check("dispatch stall",                   stats.disp_stalls > 0);
    check("both ALUs issue in one cycle",     stats.dual_alu > 0);
    check("FPU2 busy with divide/square root", stats.fpu2_busy > 0);
    check("ALU2 busy with an integer divide", stats.alu2_busy > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
