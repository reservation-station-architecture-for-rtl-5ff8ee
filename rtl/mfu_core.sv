// mfu_core: back end of an R10000-like superscalar core in which the
// floating-point adder is a mutable functional unit (MFU) with its own
// in-order reservation station (RS-MFU).
//
// Structure (follows the document's RS-MFU organisation):
//   decoded group (W = 4 per cycle)
//     -> rob_rename (64-entry ROB renaming) in parallel with steering_logic
//     -> Int RS (16, out of order)  -> ALU1, ALU2
//        Address RS (16, in order)  -> LSU + data memory
//        RS-MFU (8, in order)       -> MFU (FP add, int add/logic/shift, agen)
//        FP RS (8, out of order)    -> FPU2 (FP multiply, divide, sqrt)
//     -> six result buses (ALU1, ALU2, LSU, MFU-int, MFU-fp, FPU2) that wake
//        the stations and complete ROB entries; in-order commit, 4 per cycle.
// Memory instructions steered to RS-MFU are entered in both RS-MFU and the
// Address RS; the MFU computes the address and passes it on its address bus to
// the Address RS entry with the same ROB tag, which then issues to the LSU.
// All FP additions execute in the MFU. FPU2 holds its station port back
// (port_rdy) while an iterative divide or square root runs.
//
// Interface: the producer presents up to W decoded instructions on uops
// (slot 0 oldest, valid bits forming a prefix); n_accept says how many of
// them were taken this cycle (always a prefix), and the producer advances by
// that amount. There is no branch or exception handling, so everything
// dispatched commits. idle is high when no instruction is in flight.
// dbg_reg reads an architectural register ({fp, index}); dbg_mem_* loads and
// reads the data memory (word index). mfu_mode_fp shows the MFU's current
// mode and stats counts the core's events.
//
// This design's own choices: the instruction set (uop_t), the select policy of
// the stations, unit latencies other than the MFU's integer ones, and the
// in-order Address RS.
module mfu_core
  import mfu_pkg::*;
#(
  parameter int W          = DISP_W,
  parameter int ROB_N      = ROB_DEPTH,
  parameter int INT_RS_N   = 16,
  parameter int ADDR_RS_N  = 16,
  parameter int MFU_RS_N   = 8,
  parameter int FP_RS_N    = 8,
  parameter int CFP_MAX    = 16,
  parameter int CFP_INC    = 4,
  parameter int N_CHUNK    = 4,
  parameter int DMEM_WORDS = 4096
) (
  input  logic         clk,
  input  logic         rst_n,
  input  uop_t         uops [W],
  output logic [$clog2(W+1)-1:0] n_accept,
  output logic         idle,
  input  logic [5:0]   dbg_reg,
  output word_t        dbg_reg_val,
  input  logic         dbg_mem_we,
  input  logic [$clog2(DMEM_WORDS)-1:0] dbg_mem_addr,
  input  word_t        dbg_mem_wdata,
  output word_t        dbg_mem_rdata,
  output logic         mfu_mode_fp,
  output stats_t       stats
);

  localparam int NB = NUM_BUSES;

  result_t   bus [NB];
  agen_t     agen;

  // ---------------- steering + rename ----------------
  op_e          ops [W];
  logic [W-1:0] vld;
  logic [W-1:0] accept, to_mfu, to_home, redirect;
  logic [7:0]   rob_free, int_free, addr_free, mfu_free, fp_free;
  rs_entry_t    ren [W];
  logic [$clog2(4+1)-1:0] n_commit;
  logic         rob_empty;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      ops[i] = uops[i].op;
      vld[i] = uops[i].valid;
    end
  end

  steering_logic #(.W(W), .CFP_MAX(CFP_MAX), .CFP_INC(CFP_INC), .N_CHUNK(N_CHUNK)) u_steer (
    .clk, .rst_n, .ops, .vld,
    .rob_free, .int_free, .addr_free, .fp_free, .mfu_free,
    .accept, .to_mfu, .to_home, .redirect, .n_accept, .cfp_o(), .crr_o());

  rob_rename #(.W(W), .DEPTH(ROB_N), .NB(NB), .CW(4)) u_rob (
    .clk, .rst_n, .uops, .accept, .ren, .rob_free, .bus,
    .n_commit, .empty(rob_empty), .dbg_reg, .dbg_val(dbg_reg_val));

  // ---------------- dispatch into the stations ----------------
  logic [W-1:0] int_we, addr_we, mfu_we, fp_we;
  rs_entry_t    addr_wd [W];

  always_comb begin
    for (int i = 0; i < W; i++) begin
      rs_kind_e hk;
      hk         = home_rs(ren[i].op);
      int_we[i]  = accept[i] && to_home[i] && hk == RS_INT;
      addr_we[i] = accept[i] && to_home[i] && hk == RS_ADDR;
      fp_we[i]   = accept[i] && to_home[i] && hk == RS_FP;
      mfu_we[i]  = accept[i] && to_mfu[i];
      addr_wd[i] = ren[i];
      if (to_mfu[i]) begin
        // the address will arrive from the MFU, tagged with this instruction
        addr_wd[i].agen_ext = 1'b1;
        addr_wd[i].s1.rdy   = 1'b0;
        addr_wd[i].s1.tag   = ren[i].tag;
        addr_wd[i].s1.val   = '0;
      end
    end
  end

  // Int RS -> ALU1 / ALU2
  logic [1:0] int_iv;
  logic       alu2_rdy;
  rs_entry_t  int_id [2];
  rs_ooo #(.DEPTH(INT_RS_N), .W(W), .NB(NB), .PORTS(2), .KIND_FP(1'b0)) u_int_rs (
    .clk, .rst_n, .wr_en(int_we), .wr_data(ren), .free_cnt(int_free), .bus,
    .port_rdy({alu2_rdy, 1'b1}), .iss_valid(int_iv), .iss_data(int_id));

  int_alu #(.HAS_SHIFT(1'b1), .HAS_MUL(1'b0), .HAS_DIV(1'b0)) u_alu1 (
    .clk, .rst_n, .in_valid(int_iv[0]), .in(int_id[0]), .in_ready(), .res(bus[BUS_ALU1]));
  int_alu #(.HAS_SHIFT(1'b0), .HAS_MUL(1'b1), .HAS_DIV(1'b1)) u_alu2 (
    .clk, .rst_n, .in_valid(int_iv[1]), .in(int_id[1]), .in_ready(alu2_rdy),
    .res(bus[BUS_ALU2]));

  // Address RS -> LSU
  logic      addr_hv;
  rs_entry_t addr_hd;
  rs_inorder #(.DEPTH(ADDR_RS_N), .W(W), .NB(NB), .AGEN(1'b1)) u_addr_rs (
    .clk, .rst_n, .wr_en(addr_we), .wr_data(addr_wd), .free_cnt(addr_free), .full(),
    .bus, .agen_in(agen), .head_valid(addr_hv), .head(addr_hd), .issue(addr_hv));

  lsu #(.DMEM_WORDS(DMEM_WORDS)) u_lsu (
    .clk, .rst_n, .in_valid(addr_hv), .in(addr_hd), .res(bus[BUS_LSU]),
    .dbg_we(dbg_mem_we), .dbg_addr(dbg_mem_addr), .dbg_wdata(dbg_mem_wdata),
    .dbg_rdata(dbg_mem_rdata));

  // RS-MFU -> MFU
  logic      mfu_hv, mfu_rdy, mfu_full;
  rs_entry_t mfu_hd;
  logic      mode_fp, mutation, mut_stall;
  rs_inorder #(.DEPTH(MFU_RS_N), .W(W), .NB(NB), .AGEN(1'b0)) u_mfu_rs (
    .clk, .rst_n, .wr_en(mfu_we), .wr_data(ren), .free_cnt(mfu_free), .full(mfu_full),
    .bus, .agen_in('0), .head_valid(mfu_hv), .head(mfu_hd), .issue(mfu_hv && mfu_rdy));

  mfu u_mfu (
    .clk, .rst_n, .in_valid(mfu_hv), .in(mfu_hd), .in_ready(mfu_rdy),
    .int_res(bus[BUS_MFU_I]), .fp_res(bus[BUS_MFU_F]), .agen,
    .mode_fp, .mutation, .stall(mut_stall));

  // FP RS -> FPU2
  logic [0:0] fp_iv;
  logic       fpu2_rdy;
  rs_entry_t  fp_id [1];
  rs_ooo #(.DEPTH(FP_RS_N), .W(W), .NB(NB), .PORTS(1), .KIND_FP(1'b1)) u_fp_rs (
    .clk, .rst_n, .wr_en(fp_we), .wr_data(ren), .free_cnt(fp_free), .bus,
    .port_rdy(fpu2_rdy), .iss_valid(fp_iv), .iss_data(fp_id));

  fpu2 u_fpu2 (
    .clk, .rst_n, .in_valid(fp_iv[0]), .in(fp_id[0]), .in_ready(fpu2_rdy),
    .res(bus[BUS_FPU2]));

  assign idle        = rob_empty;
  assign mfu_mode_fp = mode_fp;

  // ---------------- event counters ----------------
  logic [3:0] n_int, n_fadd, n_red;
  always_comb begin
    n_int = 0; n_fadd = 0; n_red = 0;
    for (int i = 0; i < W; i++) begin
      if (accept[i] && to_mfu[i]) begin
        if (mfu_class(ops[i]) == MC_FADD) n_fadd++;
        else                              n_int++;
      end
      if (accept[i] && redirect[i]) n_red++;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stats <= '0;
    end else begin
      stats.cycles      <= stats.cycles + 1;
      stats.committed   <= stats.committed + 32'(n_commit);
      stats.to_mfu_int  <= stats.to_mfu_int + 32'(n_int);
      stats.to_mfu_fadd <= stats.to_mfu_fadd + 32'(n_fadd);
      stats.redirects   <= stats.redirects + 32'(n_red);
      stats.rsmfu_full  <= stats.rsmfu_full + 32'(mfu_full);
      stats.mutations   <= stats.mutations + 32'(mutation);
      stats.mut_stalls  <= stats.mut_stalls + 32'(mut_stall);
      stats.agens       <= stats.agens + 32'(agen.valid);
      stats.disp_stalls <= stats.disp_stalls + 32'(vld[0] && !accept[0]);
      stats.dual_alu    <= stats.dual_alu + 32'(&int_iv);
      stats.fpu2_busy   <= stats.fpu2_busy + 32'(!fpu2_rdy);
      stats.alu2_busy   <= stats.alu2_busy + 32'(!alu2_rdy);
    end
  end

endmodule
