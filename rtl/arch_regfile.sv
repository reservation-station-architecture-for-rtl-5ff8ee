// arch_regfile: architectural (committed) register file.
//
// One instance holds the 32 integer registers (ZERO_R0 = 1: register 0 reads
// as zero and ignores writes, as in MIPS) and one the 32 floating-point
// registers. The register counts follow the document's simulated machine
// (32 int + 32 fp, renaming through the reorder buffer); the port counts and
// timing are this design's.
//
// Interface: RP combinational read ports (ra/rd), WP write ports written at
// the rising clock edge; if two write ports name the same register in one
// cycle, the higher-numbered port wins (the reorder buffer commits in program
// order on ascending ports). A read in the cycle of a write sees the old value.
// Reset clears all registers.
module arch_regfile
  import mfu_pkg::*;
#(
  parameter int  N       = 32,
  parameter int  RP      = 9,
  parameter int  WP      = 4,
  parameter bit  ZERO_R0 = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [4:0]    ra [RP],
  output word_t         rd [RP],
  input  logic [WP-1:0] we,
  input  logic [4:0]    wa [WP],
  input  word_t         wd [WP]
);

  word_t regs [N];

  always_comb begin
    for (int p = 0; p < RP; p++) begin
      rd[p] = (ZERO_R0 && ra[p] == 5'd0) ? '0 : regs[ra[p]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < WP; p++) begin
        if (we[p] && !(ZERO_R0 && wa[p] == 5'd0)) regs[wa[p]] <= wd[p];
      end
    end
  end

endmodule
