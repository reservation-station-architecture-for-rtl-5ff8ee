// rs_inorder: reservation station with in-order issue.
//
// Used twice in the core:
//   * RS-MFU, the station dedicated to the mutable functional unit (8 entries,
//     the document's main configuration). Instructions leave in arrival order.
//   * the Address RS (16 entries, AGEN = 1). Memory instructions whose address
//     the MFU computes carry agen_ext; their base operand is then filled from
//     the MFU's address bus rather than from the result buses.
// The document makes RS-MFU in-order; issuing the Address RS in order is this
// design's choice (it keeps loads and stores in program order, so no memory
// disambiguation is needed).
//
// How it works: a circular buffer. Up to W entries are written per cycle, in
// slot order, at the tail (wr_en need not be contiguous). Every waiting
// operand compares its ROB tag with all result buses each cycle and captures
// the value on a match. The head is offered on head_valid/head when both of
// its operands are ready; the consumer pops it with issue. Operands that the
// instruction does not use must be written as ready.
//
// Timing: an entry written at edge t can issue in the cycle after t; a value
// broadcast in cycle t makes the operand ready from the cycle after t.
module rs_inorder
  import mfu_pkg::*;
#(
  parameter int DEPTH = 8,
  parameter int W     = 4,
  parameter int NB    = 6,
  parameter bit AGEN  = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] wr_en,
  input  rs_entry_t    wr_data [W],
  output logic [7:0]   free_cnt,
  output logic         full,
  input  result_t      bus     [NB],
  input  agen_t        agen_in,
  output logic         head_valid,
  output rs_entry_t    head,
  input  logic         issue
);

  localparam int PW = $clog2(DEPTH);

  rs_entry_t   mem   [DEPTH];
  logic [PW-1:0] hd, tl;
  logic [PW:0]   cnt;
  logic [PW:0]   n_wr;

  assign free_cnt   = 8'(DEPTH - int'(cnt));
  assign full       = (int'(cnt) == DEPTH);
  assign head       = mem[hd];
  assign head_valid = (cnt != 0) && mem[hd].s1.rdy && mem[hd].s2.rdy;

  logic [PW:0] wr_rank [W];   // position of each write among this cycle's writes

  always_comb begin
    n_wr = '0;
    for (int i = 0; i < W; i++) begin
      wr_rank[i] = n_wr;
      n_wr = n_wr + (PW+1)'(wr_en[i]);
    end
  end

  // Overflow and underflow are the producer's responsibility.
  assert property (@(posedge clk) disable iff (!rst_n) int'(n_wr) <= DEPTH - int'(cnt))
    else $error("rs_inorder: write beyond capacity");
  assert property (@(posedge clk) disable iff (!rst_n) issue |-> head_valid)
    else $error("rs_inorder: issue without a ready head");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hd  <= '0;
      tl  <= '0;
      cnt <= '0;
      for (int e = 0; e < DEPTH; e++) mem[e] <= '0;
    end else begin
      // wakeup of waiting entries
      for (int e = 0; e < DEPTH; e++) begin
        for (int b = 0; b < NB; b++) begin
          if (bus[b].valid) begin
            if (!mem[e].s1.rdy && !(AGEN && mem[e].agen_ext) && mem[e].s1.tag == bus[b].tag) begin
              mem[e].s1.rdy <= 1'b1;
              mem[e].s1.val <= bus[b].val;
            end
            if (!mem[e].s2.rdy && mem[e].s2.tag == bus[b].tag) begin
              mem[e].s2.rdy <= 1'b1;
              mem[e].s2.val <= bus[b].val;
            end
          end
        end
        if (AGEN && agen_in.valid && mem[e].agen_ext && !mem[e].s1.rdy
            && mem[e].tag == agen_in.tag) begin
          mem[e].s1.rdy <= 1'b1;
          mem[e].s1.val <= agen_in.addr;
        end
      end
      // enqueue (new entries overwrite free slots only)
      for (int i = 0; i < W; i++) begin
        if (wr_en[i]) mem[PW'(int'(tl) + int'(wr_rank[i]))] <= wr_data[i];
      end
      tl  <= PW'(int'(tl) + int'(n_wr));
      if (issue) hd <= PW'(int'(hd) + 1);
      cnt <= cnt + n_wr - (PW+1)'(issue);
    end
  end

endmodule
