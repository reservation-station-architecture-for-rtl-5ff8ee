// int_alu: integer ALU of the base core (ALU1 and ALU2).
//
// The document's ALU1 does add/sub, logic, shift (and branches); ALU2 does
// add/sub, logic, integer multiply and divide. This design builds add/sub,
// logic, shift, multiply and signed divide; branches are not part of its
// instruction set. The integer reservation station only sends an operation
// to a unit that has it (HAS_SHIFT, HAS_MUL, HAS_DIV), which the assertion
// checks.
//
// Timing (this design's choice): add/sub, logic, shift and multiply take one
// cycle each, back to back, with the result registered on `res` in the cycle
// after issue; the multiply is a single-cycle 64x64 product (low 64 bits).
// Divide (OP_DIV: signed 64-bit quotient, rounded toward zero) is a restoring
// divider on the magnitudes, one quotient bit per cycle: its result is on
// `res` 66 cycles after issue, and in_ready is low from issue until then, so
// the unit takes nothing else meanwhile. Division by zero gives all ones;
// the most negative number divided by -1 gives the most negative number.
module int_alu
  import mfu_pkg::*;
#(
  parameter bit HAS_SHIFT = 1'b1,
  parameter bit HAS_MUL   = 1'b0,
  parameter bit HAS_DIV   = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  rs_entry_t in,
  output logic      in_ready,
  output result_t   res
);

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> ((HAS_SHIFT || !(in.op inside {OP_SLL, OP_SRL, OP_SRA}))
                                 && (HAS_MUL || in.op != OP_MUL)
                                 && (HAS_DIV || in.op != OP_DIV)
                                 && in.op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR,
                                                  OP_SLL, OP_SRL, OP_SRA, OP_MUL, OP_DIV}))
    else $error("int_alu: operation not supported by this unit");
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_ready)
    else $error("int_alu: issue while busy");

  // iterative divider
  typedef enum logic [1:0] { D_IDLE, D_RUN, D_DONE } dstate_e;
  dstate_e     dst;
  logic [6:0]  dcnt;
  tag_t        dtag;
  logic        dneg;      // quotient negative
  logic        dzero;     // divisor zero
  logic [63:0] dvs;       // |divisor|
  logic [63:0] dq;        // |dividend| shifted out, quotient bits shifted in
  logic [64:0] drem;      // partial remainder
  logic [64:0] dtry;

  assign in_ready = !HAS_DIV || dst == D_IDLE;
  assign dtry     = {drem[63:0], dq[63]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res   <= '0;
      dst   <= D_IDLE;
      dcnt  <= '0;
      dtag  <= '0;
      dneg  <= 1'b0;
      dzero <= 1'b0;
      dvs   <= '0;
      dq    <= '0;
      drem  <= '0;
    end else begin
      res.valid <= in_valid && in.op != OP_DIV;
      res.tag   <= in.tag;
      res.val   <= int_op(in.op, in.s1.val, in.s2.val);
      if (HAS_DIV) begin
        unique case (dst)
          D_IDLE: begin
            if (in_valid && in.op == OP_DIV) begin
              dst   <= D_RUN;
              dcnt  <= 7'd64;
              dtag  <= in.tag;
              dneg  <= in.s1.val[63] ^ in.s2.val[63];
              dzero <= (in.s2.val == '0);
              dq    <= in.s1.val[63] ? -in.s1.val : in.s1.val;
              dvs   <= in.s2.val[63] ? -in.s2.val : in.s2.val;
              drem  <= '0;
            end
          end
          D_RUN: begin
            // bring down the next dividend bit and try to subtract
            if (dtry >= {1'b0, dvs}) begin
              drem <= dtry - {1'b0, dvs};
              dq   <= {dq[62:0], 1'b1};
            end else begin
              drem <= dtry;
              dq   <= {dq[62:0], 1'b0};
            end
            dcnt <= dcnt - 7'd1;
            if (dcnt == 7'd1) dst <= D_DONE;
          end
          default: begin  // D_DONE
            res.valid <= 1'b1;
            res.tag   <= dtag;
            res.val   <= dzero ? '1 : (dneg ? -dq : dq);
            dst       <= D_IDLE;
          end
        endcase
      end
    end
  end

endmodule
