// mfu: mutable functional unit, a floating-point adder that can also work as
// a 64-bit integer adder, logic unit and shifter, and compute memory addresses.
//
// Operation (the functions follow the document; the timing model and the
// internal split are this design's own):
//   * FP add/sub: double precision, two-cycle pipeline, result on fp_res two
//     cycles after issue.
//   * integer add/sub, and/or/xor, shifts: one cycle, result on int_res.
//   * memory instructions: base + offset, one cycle, the address is sent on
//     agen to the Address RS entry with the same ROB tag.
// Mutation: the unit is in FP mode or integer mode. Switching costs the
// document's maximum mutation penalties, which this design reproduces as
// minimum issue distances measured from the last FP add and the last shift:
//   integer add/agen  >= 3 cycles after an FP add   (2 bubbles)
//   shift             >= 2 cycles after an FP add   (1 bubble)
//   logic             >= 1 cycle  after an FP add   (no bubble)
//   FP add            >= 2 cycles after a shift     (1 bubble)
// So FP-add, logic, add costs 1 bubble before the add, and a pipeline that has
// already drained costs nothing. in_ready reports whether the operation
// presented on `in` may issue this cycle; it depends only on in.op and state.
//
// Interface: in_valid & in_ready issue `in` (operands must be ready).
// mode_fp is the current mode, mutation pulses in the cycle a mutating
// instruction issues, stall pulses when a valid instruction waits for the
// mutation penalty.
module mfu
  import mfu_pkg::*;
  import fp64_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  rs_entry_t in,
  output logic      in_ready,
  output result_t   int_res,
  output result_t   fp_res,
  output agen_t     agen,
  output logic      mode_fp,
  output logic      mutation,
  output logic      stall
);

  mclass_e    mc;
  logic [1:0] since_fp, since_sh;   // cycles since last FP add / shift, saturating
  logic       fire;

  assign mc = mfu_class(in.op);

  always_comb begin
    unique case (mc)
      MC_ADD:   in_ready = (since_fp >= 2'd3);
      MC_SHIFT: in_ready = (since_fp >= 2'd2);
      MC_LOGIC: in_ready = (since_fp >= 2'd1);
      MC_FADD:  in_ready = (since_sh >= 2'd2);
      default:  in_ready = 1'b0;
    endcase
  end

  assign fire     = in_valid && in_ready;
  assign stall    = in_valid && !in_ready;
  assign mutation = fire && ((mc == MC_FADD) != mode_fp);

  // FP pipeline: stage 1 holds the rounded sum, stage 2 drives the bus.
  result_t fp_s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      since_fp <= 2'd3;
      since_sh <= 2'd3;
      mode_fp  <= 1'b0;
      int_res  <= '0;
      agen     <= '0;
      fp_s1    <= '0;
      fp_res   <= '0;
    end else begin
      since_fp <= (fire && mc == MC_FADD)  ? 2'd1 : (since_fp == 2'd3 ? 2'd3 : since_fp + 2'd1);
      since_sh <= (fire && mc == MC_SHIFT) ? 2'd1 : (since_sh == 2'd3 ? 2'd3 : since_sh + 2'd1);
      if (fire) mode_fp <= (mc == MC_FADD);

      int_res.valid <= fire && (mc inside {MC_ADD, MC_LOGIC, MC_SHIFT}) && !is_mem(in.op);
      int_res.tag   <= in.tag;
      int_res.val   <= int_op(in.op, in.s1.val, in.s2.val);

      agen.valid    <= fire && is_mem(in.op);
      agen.tag      <= in.tag;
      agen.addr     <= in.s1.val + in.imm;

      fp_s1.valid   <= fire && (mc == MC_FADD);
      fp_s1.tag     <= in.tag;
      fp_s1.val     <= fp_add(in.s1.val, in.s2.val, in.op == OP_FSUB);
      fp_res        <= fp_s1;
    end
  end

endmodule
