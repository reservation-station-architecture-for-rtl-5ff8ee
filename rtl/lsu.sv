// lsu: load/store unit with its data memory.
//
// Executes the memory instruction at the head of the in-order Address RS: the
// address is base + offset, or, for an instruction whose address the mutable
// functional unit computed (agen_ext), the base operand already holds the
// address. Loads return the 64-bit word on `res` one cycle after issue
// (the document's 1-cycle L1 hit); stores write the word at the clock edge and
// report completion on `res` one cycle later (value ignored).
//
// The memory is a flat array of DMEM_WORDS 64-bit words standing in for the
// 32 KB L1 data cache (4096 words); caches, misses and the L2 are not modelled.
// Accesses are 8-byte words: address bits [2:0] are ignored and the word index
// wraps at DMEM_WORDS (a power of two). The port dbg_* lets a test bench load
// and inspect the memory; a dbg write takes effect at the edge like a store.
// The memory is not reset.
module lsu
  import mfu_pkg::*;
#(
  parameter int DMEM_WORDS = 4096
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  rs_entry_t in,
  output result_t   res,
  input  logic      dbg_we,
  input  logic [$clog2(DMEM_WORDS)-1:0] dbg_addr,
  input  word_t     dbg_wdata,
  output word_t     dbg_rdata
);

  localparam int AW = $clog2(DMEM_WORDS);

  word_t         dmem [DMEM_WORDS];
  word_t         addr;
  logic [AW-1:0] widx;

  assign addr      = in.agen_ext ? in.s1.val : in.s1.val + in.imm;
  assign widx      = addr[3 +: AW];
  assign dbg_rdata = dmem[dbg_addr];

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> is_mem(in.op))
    else $error("lsu: non-memory operation");

  always_ff @(posedge clk) begin
    if (in_valid && is_store(in.op)) dmem[widx] <= in.s2.val;
    else if (dbg_we)                 dmem[dbg_addr] <= dbg_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res <= '0;
    end else begin
      res.valid <= in_valid;
      res.tag   <= in.tag;
      res.val   <= is_store(in.op) ? '0 : dmem[widx];
    end
  end

endmodule
