// tb_lsu: test of the load/store unit and its data memory.
//
// The memory region used is first filled through the debug port. Then random
// loads and stores are issued, one per cycle, with addresses either formed in
// the unit (base + offset) or handed over already computed (agen_ext, the
// case of a memory instruction whose address came from the mutable unit).
// A load's data must appear on the result bus exactly one cycle after issue,
// with its tag, and equal a word model kept here; a store must put a valid
// result (value 0) on the bus one cycle after issue. At the end every word is
// read back through the debug port and compared with the model.
module tb_lsu;
  import mfu_pkg::*;

  localparam int DMEM_WORDS = 4096;
  localparam int NW = 256;          // words exercised

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid;
  rs_entry_t   in;
  result_t     res;
  logic        dbg_we;
  logic [11:0] dbg_addr;
  word_t       dbg_wdata, dbg_rdata;

  lsu #(.DMEM_WORDS(DMEM_WORDS)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t m [NW];

  initial begin
    logic  pv;
    word_t pexp;
    tag_t  ptag;
    int    n_ld, n_st, n_ext;
    n_ld = 0; n_st = 0; n_ext = 0;
    in_valid = 1'b0;
    in = '0;
    dbg_we = 1'b0; dbg_addr = '0; dbg_wdata = '0;
    pv = 1'b0; pexp = '0; ptag = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < NW; w++) begin
      m[w] = {$urandom, $urandom};
      dbg_we = 1'b1; dbg_addr = 12'(w); dbg_wdata = m[w];
      @(posedge clk);
      #1;
    end
    dbg_we = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      int    w;
      word_t base, off;
      check($sformatf("cycle %0d: valid %0d exp %0d", c, res.valid, pv), res.valid == pv);
      if (pv)
        check($sformatf("cycle %0d: data %h tag %0d (exp %h tag %0d)", c, res.val, res.tag,
                        pexp, ptag), res.val == pexp && res.tag == ptag);
      in_valid = ($urandom % 5 != 0);
      w = $urandom % NW;
      in = '0;
      in.op  = ($urandom % 2) ? (($urandom % 2) ? OP_LD : OP_LDF) : (($urandom % 2) ? OP_SD : OP_SDF);
      in.tag = tag_t'($urandom);
      in.agen_ext = ($urandom % 3 == 0);
      off  = word_t'($signed(16'($urandom % 512) - 16'sd256)) * 8;
      base = word_t'(w * 8) - off;
      in.s1  = '{rdy: 1'b1, tag: '0, val: in.agen_ext ? word_t'(w * 8) : base};
      in.imm = in.agen_ext ? word_t'($urandom) : off;   // ignored with agen_ext
      in.s2  = '{rdy: 1'b1, tag: '0, val: {$urandom, $urandom}};
      pv   = in_valid;
      ptag = in.tag;
      if (is_store(in.op)) begin
        pexp = '0;
        if (in_valid) begin m[w] = in.s2.val; n_st++; end
      end else begin
        pexp = m[w];
        if (in_valid) n_ld++;
      end
      if (in_valid && in.agen_ext) n_ext++;
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    @(posedge clk);
    #1;
    for (int w = 0; w < NW; w++) begin
      dbg_addr = 12'(w);
      #1;
      check($sformatf("word %0d = %h (exp %h)", w, dbg_rdata, m[w]), dbg_rdata == m[w]);
    end
    check($sformatf("traffic: %0d loads, %0d stores, %0d with address given", n_ld, n_st, n_ext),
          n_ld > 500 && n_st > 500 && n_ext > 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
