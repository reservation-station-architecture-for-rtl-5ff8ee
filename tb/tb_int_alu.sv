// tb_int_alu: test of the integer ALU.
//
// One unit with all optional parts enabled (shifter, multiplier, divider).
// 1. A random single-cycle instruction every cycle, back to back. Each result
//    must appear on the result bus exactly one cycle after issue, with the
//    issuing tag, and equal a reference computed in this test bench. Idle
//    cycles must give no valid result. Shift amounts use the low six bits of
//    the second operand, and the multiply keeps the low 64 bits.
// 2. Signed divides (random, small, negative, by zero, most negative by -1),
//    each right after an add: the add's result must arrive after one cycle,
//    in_ready must stay low while dividing, and the quotient must arrive
//    exactly 66 cycles after issue. The latencies are this design's choices.
module tb_int_alu;
  import mfu_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      in_valid;
  rs_entry_t in;
  logic      in_ready;
  result_t   res;

  int_alu #(.HAS_SHIFT(1'b1), .HAS_MUL(1'b1), .HAS_DIV(1'b1)) dut (.*);

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

  function automatic word_t ref_op(op_e op, word_t a, word_t b);
    logic [127:0] p;
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_SLL: return a << b[5:0];
      OP_SRL: return a >> b[5:0];
      OP_SRA: return word_t'($signed(a) >>> b[5:0]);
      default: begin
        p = {64'd0, a} * {64'd0, b};
        return p[63:0];
      end
    endcase
  endfunction

  initial begin
    op_e   ops[9] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA, OP_MUL};
    logic  pv;
    word_t pexp;
    tag_t  ptag;
    in_valid = 1'b0;
    in = '0;
    pv = 1'b0; pexp = '0; ptag = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      word_t a, b;
      // the instruction issued in the previous cycle must now be on the bus
      check($sformatf("cycle %0d: valid %0d exp %0d", c, res.valid, pv), res.valid == pv);
      if (pv)
        check($sformatf("cycle %0d: result %h tag %0d (exp %h tag %0d)", c, res.val, res.tag,
                        pexp, ptag), res.val == pexp && res.tag == ptag);
      in_valid = ($urandom % 5 != 0);
      a = {$urandom, $urandom};
      b = ($urandom % 4 == 0) ? word_t'($urandom % 70) : {$urandom, $urandom};
      in = '0;
      in.op = ops[$urandom % 9];
      in.tag = tag_t'($urandom);
      in.s1 = '{rdy: 1'b1, tag: '0, val: a};
      in.s2 = '{rdy: 1'b1, tag: '0, val: b};
      pv = in_valid;
      pexp = ref_op(in.op, a, b);
      ptag = in.tag;
      @(posedge clk);
      #1;
    end
    // 2. divide
    in_valid = 1'b0;
    @(posedge clk);
    #1;
    for (int k = 0; k < 400; k++) begin
      word_t a, b, q;
      int    lat;
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      case (k % 5)
        1: b = word_t'($signed(32'($urandom) % 1000));
        2: begin a = word_t'($signed(32'($urandom))); b = word_t'($signed(16'($urandom))); end
        3: if (k % 15 == 3) b = '0; else a = 64'h8000_0000_0000_0000;
        4: if (k % 20 == 4) begin a = 64'h8000_0000_0000_0000; b = '1; end
        default: ;
      endcase
      if (b == '0) q = '1;
      else if (a == 64'h8000_0000_0000_0000 && b == '1) q = a;
      else q = word_t'($signed(a) / $signed(b));
      check("ready before the add", in_ready);
      in_valid = 1'b1;
      in = '0; in.op = OP_ADD; in.tag = 6'd1;
      in.s1 = '{rdy: 1'b1, tag: '0, val: a};
      in.s2 = '{rdy: 1'b1, tag: '0, val: b};
      @(posedge clk);
      #1;
      check("add result after one cycle", res.valid && res.tag == 6'd1 && res.val == a + b);
      in.op = OP_DIV; in.tag = 6'd2;
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      lat = 1;
      while (!res.valid && lat < 100) begin
        check("busy while dividing", !in_ready);
        @(posedge clk);
        #1;
        lat++;
      end
      check($sformatf("div %h / %h = %h (exp %h), latency %0d", a, b, res.val, q, lat),
            res.valid && res.tag == 6'd2 && res.val == q && lat == 66);
      check("ready after the divide", in_ready);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
