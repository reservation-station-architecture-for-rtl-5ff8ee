// fpu2: second floating-point unit: double-precision multiply, divide and
// square root. In the RS-MFU configuration it keeps this multiply / divide /
// square-root role, while all FP additions go to the mutable functional unit.
//
// Multiply (fp_mul from fp64_pkg) is fully pipelined: one per cycle, result on
// `res` two cycles after issue. Divide and square root are iterative and
// produce one result bit per cycle:
//   * divide: restoring division of the 53-bit significands, 55 quotient
//     bits plus a sticky bit from the remainder;
//   * square root: digit-by-digit integer square root of the significand
//     shifted left by 54 or 55 bits (odd exponents take the extra bit), 54
//     root bits plus a sticky bit.
// Both then round to nearest even. A divide or square root occupies the unit
// from issue until its result is on `res`, ITER + 2 cycles later (57 cycles).
// in_ready is low during that time, so nothing issues, and the result bus
// never sees two results at once. A multiply already in the pipeline when a
// divide issues leaves before the divide's result.
//
// What follows the document: the unit's set of operations. Latencies, the
// algorithms and the treatment of special values are this design's choices.
// Special values are as in fp64_pkg: subnormals are read as zero and
// subnormal results flush to zero; NaN inputs, 0/0, inf/inf and the square
// root of a negative number give the quiet NaN 0x7FF8...0; x/0 gives a signed
// infinity.
//
// Interface: in_valid & in_ready issue `in`. The second operand of a square
// root is ignored.
module fpu2
  import mfu_pkg::*;
  import fp64_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  rs_entry_t in,
  output logic      in_ready,
  output result_t   res
);

  localparam int ITER = 55;

  result_t s1;                       // multiply pipeline stage

  // iterative divide / square root
  typedef enum logic [1:0] { I_IDLE, I_RUN, I_DONE } istate_e;
  istate_e      ist;
  logic         is_sqrt;
  logic [5:0]   cnt;
  tag_t         itag;
  logic         isign;
  logic signed [13:0] iexp;           // unbiased result exponent
  logic         ispecial;             // result already known (NaN, inf, zero)
  word_t        ispecial_val;
  logic [55:0]  rem;                  // divide: partial remainder
  logic [52:0]  dvs;                  // divide: divisor significand
  logic [109:0] rad;                  // square root: radicand, two bits per step
  logic [57:0]  srem;                 // square root: partial remainder
  logic [54:0]  q;                    // quotient / root bits

  assign in_ready = (ist == I_IDLE);

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> in.op inside {OP_FMUL, OP_FDIV, OP_FSQRT})
    else $error("fpu2: operation not supported");
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_ready)
    else $error("fpu2: issue while busy");

  // Round a significand given as {53 bits, guard} plus sticky, with unbiased
  // exponent e for the leading bit, to nearest even and pack it.
  function automatic word_t pack(logic s, logic signed [13:0] e, logic [53:0] m, logic sticky);
    logic [53:0] r;
    logic signed [13:0] eb;
    logic up;
    up = m[0] && (sticky || m[1]);
    r  = {1'b0, m[53:1]} + 54'(up);
    eb = e + 14'sd1023;
    if (r[53]) begin
      r  = r >> 1;
      eb = eb + 14'sd1;
    end
    if (eb >= 14'sd2047) return {s, 11'h7FF, 52'd0};
    if (eb <= 14'sd0)    return {s, 63'd0};
    return {s, eb[10:0], r[51:0]};
  endfunction

  // Result of a finished divide / square root.
  function automatic word_t finish();
    if (ispecial) return ispecial_val;
    if (is_sqrt) return pack(1'b0, iexp, q[53:0], srem != '0);
    // quotient bits q[54:0] = floor(ma * 2^54 / mb)
    if (q[54]) return pack(isign, iexp, q[54:1], q[0] || rem != '0);
    return pack(isign, iexp - 14'sd1, q[53:0], rem != '0);
  endfunction

  // one square-root step: bring down two radicand bits, try (root << 2) | 1
  logic [57:0] sq_r2, sq_trial;
  assign sq_r2    = {srem[55:0], rad[109:108]};
  assign sq_trial = {2'b0, q[53:0], 2'b01};

  // decode of the operands at issue
  logic [10:0] ea, eb;
  logic [52:0] ma, mb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan, sa, sb;
  always_comb begin
    ea = in.s1.val[62:52];
    eb = in.s2.val[62:52];
    sa = in.s1.val[63];
    sb = in.s2.val[63];
    ma = {1'b1, in.s1.val[51:0]};
    mb = {1'b1, in.s2.val[51:0]};
    a_zero = (ea == 11'd0);
    b_zero = (eb == 11'd0);
    a_inf  = (ea == 11'h7FF) && in.s1.val[51:0] == '0;
    b_inf  = (eb == 11'h7FF) && in.s2.val[51:0] == '0;
    a_nan  = (ea == 11'h7FF) && in.s1.val[51:0] != '0;
    b_nan  = (eb == 11'h7FF) && in.s2.val[51:0] != '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1           <= '0;
      res          <= '0;
      ist          <= I_IDLE;
      is_sqrt      <= 1'b0;
      cnt          <= '0;
      itag         <= '0;
      isign        <= 1'b0;
      iexp         <= '0;
      ispecial     <= 1'b0;
      ispecial_val <= '0;
      rem          <= '0;
      dvs          <= '0;
      rad          <= '0;
      srem         <= '0;
      q            <= '0;
    end else begin
      // multiply pipeline
      s1.valid <= in_valid && in.op == OP_FMUL;
      s1.tag   <= in.tag;
      s1.val   <= fp_mul(in.s1.val, in.s2.val);
      res      <= s1;

      unique case (ist)
        I_IDLE: begin
          if (in_valid && in.op inside {OP_FDIV, OP_FSQRT}) begin
            ist      <= I_RUN;
            cnt      <= 6'(ITER);
            itag     <= in.tag;
            q        <= '0;
            ispecial <= 1'b1;
            if (in.op == OP_FDIV) begin
              is_sqrt <= 1'b0;
              isign   <= sa ^ sb;
              iexp    <= 14'(signed'({3'b0, ea})) - 14'(signed'({3'b0, eb}));
              rem     <= {3'b0, ma};
              dvs     <= mb;
              if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf))
                ispecial_val <= QNAN;
              else if (a_inf || b_zero)
                ispecial_val <= {sa ^ sb, 11'h7FF, 52'd0};
              else if (a_zero || b_inf)
                ispecial_val <= {sa ^ sb, 63'd0};
              else
                ispecial <= 1'b0;
            end else begin
              is_sqrt <= 1'b1;
              isign   <= 1'b0;
              // unbiased exponent E; odd E uses one more radicand bit
              iexp    <= (14'(signed'({3'b0, ea})) - 14'sd1023) >>> 1;
              rad     <= ea[0] ? {1'b0, ma, 56'd0} : {ma, 57'd0};
              srem    <= '0;
              if (a_nan || (sa && !a_zero))
                ispecial_val <= QNAN;
              else if (a_zero)
                ispecial_val <= {sa, 63'd0};
              else if (a_inf)
                ispecial_val <= {1'b0, 11'h7FF, 52'd0};
              else
                ispecial <= 1'b0;
            end
          end
        end
        I_RUN: begin
          if (!is_sqrt) begin
            if (rem >= {3'b0, dvs}) begin
              q   <= {q[53:0], 1'b1};
              rem <= (rem - {3'b0, dvs}) << 1;
            end else begin
              q   <= {q[53:0], 1'b0};
              rem <= rem << 1;
            end
          end else if (cnt > 6'd1) begin
            // 54 root bits: steps ITER .. 2
            rad <= rad << 2;
            if (sq_r2 >= sq_trial) begin
              srem <= sq_r2 - sq_trial;
              q    <= {q[53:0], 1'b1};
            end else begin
              srem <= sq_r2;
              q    <= {q[53:0], 1'b0};
            end
          end
          cnt <= cnt - 6'd1;
          if (cnt == 6'd1) ist <= I_DONE;
        end
        default: begin  // I_DONE: result to the bus
          res.valid <= 1'b1;
          res.tag   <= itag;
          res.val   <= finish();
          ist       <= I_IDLE;
        end
      endcase
    end
  end

endmodule
