// tb_arch_regfile: test of the architectural register file.
//
// Two instances: the integer file (register 0 reads as zero and ignores
// writes) and the floating-point file (all 32 registers writable). Each cycle
// random read addresses are checked combinationally against a model, then up
// to four random writes are applied at the clock edge, sometimes several to
// the same register, where the highest-numbered write port must win. Reset
// must clear every register.
module tb_arch_regfile;
  import mfu_pkg::*;

  localparam int RP = 9;
  localparam int WP = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]    ra [RP];
  word_t         rd_i [RP], rd_f [RP];
  logic [WP-1:0] we;
  logic [4:0]    wa [WP];
  word_t         wd [WP];

  arch_regfile #(.RP(RP), .WP(WP), .ZERO_R0(1'b1)) u_int
    (.clk, .rst_n, .ra, .rd(rd_i), .we, .wa, .wd);
  arch_regfile #(.RP(RP), .WP(WP), .ZERO_R0(1'b0)) u_fp
    (.clk, .rst_n, .ra, .rd(rd_f), .we, .wa, .wd);

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

  word_t mi [32], mf [32];
  int    n_same;

  initial begin
    n_same = 0;
    we = '0;
    for (int p = 0; p < WP; p++) begin wa[p] = '0; wd[p] = '0; end
    for (int p = 0; p < RP; p++) ra[p] = '0;
    for (int r = 0; r < 32; r++) begin mi[r] = '0; mf[r] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      for (int p = 0; p < RP; p++) ra[p] = 5'($urandom);
      if (c < 32) ra[0] = 5'(c);          // every register right after reset
      #1;
      for (int p = 0; p < RP; p++) begin
        check($sformatf("int r%0d = %h (exp %h)", ra[p], rd_i[p], mi[ra[p]]), rd_i[p] == mi[ra[p]]);
        check($sformatf("fp f%0d = %h (exp %h)", ra[p], rd_f[p], mf[ra[p]]), rd_f[p] == mf[ra[p]]);
      end
      for (int p = 0; p < WP; p++) begin
        we[p] = (c >= 32) && ($urandom % 2);
        wa[p] = ($urandom % 4 == 0) ? 5'($urandom % 3) : 5'($urandom);
        wd[p] = {$urandom, $urandom};
      end
      for (int p = 0; p < WP; p++) if (we[p]) begin
        for (int q = p + 1; q < WP; q++) if (we[q] && wa[q] == wa[p]) n_same++;
        if (wa[p] != 0) mi[wa[p]] = wd[p];
        mf[wa[p]] = wd[p];
      end
      @(posedge clk);
      #1;
      we = '0;
    end
    check($sformatf("%0d same-register write pairs", n_same), n_same > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
