// tb_fpu2: test of the second floating-point unit.
//
// 1. A double-precision multiply is issued on most cycles, back to back, with
//    random normal operands whose product stays in the normal range, plus some
//    zero operands. Every result must appear on the result bus exactly two
//    cycles after issue with its tag (one multiply per cycle, in_ready stays
//    high) and be bit-equal to the simulator's own IEEE double multiply.
// 2. Divides and square roots of random normal numbers, and special cases
//    (zeros, infinities, NaN, negative square root, x/0), each issued right
//    after a multiply: the multiply's result must still arrive after two
//    cycles, in_ready must be low while the divide/square root runs, and its
//    result must appear exactly 57 cycles after issue, bit-equal to the
//    simulator's IEEE division or $sqrt (NaN compared as the single quiet NaN).
// The latencies checked are this design's choices.
module tb_fpu2;
  import mfu_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      in_valid;
  rs_entry_t in;
  logic      in_ready;
  result_t   res;

  fpu2 dut (.*);

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

  function automatic word_t rand_fp();
    word_t v;
    v = {$urandom, $urandom};
    v[62:52] = 11'(900 + $urandom % 250);
    if ($urandom % 20 == 0) v[62:0] = '0;   // signed zero
    return v;
  endfunction

  // expected results by issue cycle
  logic  ev [3];
  word_t ex [3];
  tag_t  et [3];

  initial begin
    int n_mul;
    n_mul = 0;
    in_valid = 1'b0;
    in = '0;
    for (int i = 0; i < 3; i++) begin ev[i] = 1'b0; ex[i] = '0; et[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      word_t a, b;
      // ev[1] was issued two cycles ago
      check($sformatf("cycle %0d: valid %0d exp %0d", c, res.valid, ev[1]), res.valid == ev[1]);
      if (ev[1])
        check($sformatf("cycle %0d: %h tag %0d (exp %h tag %0d)", c, res.val, res.tag, ex[1], et[1]),
              res.val == ex[1] && res.tag == et[1]);
      a = rand_fp();
      b = rand_fp();
      in_valid = ($urandom % 4 != 0);
      in = '0;
      in.op = OP_FMUL;
      in.tag = tag_t'($urandom);
      in.s1 = '{rdy: 1'b1, tag: '0, val: a};
      in.s2 = '{rdy: 1'b1, tag: '0, val: b};
      if (in_valid) n_mul++;
      ev[1] = ev[0]; ex[1] = ex[0]; et[1] = et[0];
      ev[0] = in_valid;
      ex[0] = $realtobits($bitstoreal(a) * $bitstoreal(b));
      et[0] = in.tag;
      @(posedge clk);
      #1;
    end
    check($sformatf("%0d multiplies issued", n_mul), n_mul > 2000);
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    // 2. divide and square root
    for (int k = 0; k < 600; k++) begin
      word_t a, b, ex_d, ex_m, m1, m2;
      logic  sq;
      int    lat;
      sq = (k % 2 == 1);
      a = rand_fp();
      b = rand_fp();
      if (k % 3 == 0) a[63] = 1'b0;                // many positive square roots
      if (k >= 560) begin                          // special operands
        word_t sp[6] = '{64'h0, 64'h8000_0000_0000_0000, 64'h7FF0_0000_0000_0000,
                         64'hFFF0_0000_0000_0000, 64'h7FF8_0000_0000_0001, 64'h3FF0_0000_0000_0000};
        a = ($urandom % 2) ? sp[$urandom % 6] : a;
        b = ($urandom % 2) ? sp[$urandom % 6] : b;
      end
      ex_d = sq ? $realtobits($sqrt($bitstoreal(a))) : $realtobits($bitstoreal(a) / $bitstoreal(b));
      if (ex_d[62:52] == 11'h7FF && ex_d[51:0] != 0) ex_d = 64'h7FF8_0000_0000_0000;
      // a multiply first
      m1 = rand_fp(); m2 = rand_fp();
      ex_m = $realtobits($bitstoreal(m1) * $bitstoreal(m2));
      check("ready before the multiply", in_ready);
      in_valid = 1'b1;
      in = '0; in.op = OP_FMUL; in.tag = 6'd1;
      in.s1 = '{rdy: 1'b1, tag: '0, val: m1};
      in.s2 = '{rdy: 1'b1, tag: '0, val: m2};
      @(posedge clk);
      #1;
      check("ready right after a multiply", in_ready);
      in = '0; in.op = sq ? OP_FSQRT : OP_FDIV; in.tag = 6'd2;
      in.s1 = '{rdy: 1'b1, tag: '0, val: a};
      in.s2 = '{rdy: 1'b1, tag: '0, val: b};
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      check("multiply result after 2 cycles", res.valid && res.tag == 6'd1 && res.val == ex_m);
      check("busy while dividing", !in_ready);
      @(posedge clk);
      #1;
      lat = 2;
      while (!res.valid && lat < 100) begin
        check("busy while dividing", !in_ready);
        @(posedge clk);
        #1;
        lat++;
      end
      check($sformatf("%s %h %h = %h (exp %h), latency %0d", sq ? "sqrt" : "div", a, b, res.val, ex_d, lat),
            res.valid && res.tag == 6'd2 && res.val == ex_d && lat == 57);
      check("ready again", in_ready);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
