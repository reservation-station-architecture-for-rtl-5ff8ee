// rs_ooo: reservation station with out-of-order issue.
//
// Used for the integer RS (16 entries, two issue ports: port 0 feeds ALU1,
// port 1 feeds ALU2) and for the floating-point RS (8 entries in the main
// RS-MFU configuration, one port feeding FPU2). The entry counts and the
// out-of-order issue follow the document; the select policy is this design's.
//
// How it works: entries carry a valid bit. Up to W new entries per cycle go to
// the lowest-numbered free entries, in slot order. Waiting operands compare
// their ROB tag with every result bus each cycle and capture the value on a
// match. Each cycle each issue port takes the lowest-numbered entry whose
// operands are ready and whose operation the port's unit can execute
// (KIND_INT: port 0 cannot multiply or divide, port 1 cannot shift;
// KIND_FP: any), and
// skips entries taken by a lower port. Issued entries are freed at the edge.
// A port issues only while port_rdy says its unit can take an instruction
// (FPU2 is busy during a divide or square root; the ALUs are always ready).
//
// Timing: an entry written at edge t can issue in the cycle after t; a value
// broadcast in cycle t makes the operand ready from the cycle after t.
module rs_ooo
  import mfu_pkg::*;
#(
  parameter int DEPTH = 16,
  parameter int W     = 4,
  parameter int NB    = 6,
  parameter int PORTS = 2,
  parameter bit KIND_FP = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     wr_en,
  input  rs_entry_t        wr_data [W],
  output logic [7:0]       free_cnt,
  input  result_t          bus     [NB],
  input  logic [PORTS-1:0] port_rdy,   // the port's unit can take an instruction
  output logic [PORTS-1:0] iss_valid,
  output rs_entry_t        iss_data [PORTS]
);

  rs_entry_t        mem [DEPTH];
  logic [DEPTH-1:0] vld;
  logic [DEPTH-1:0] taken;            // selected by some port this cycle
  localparam int SW = $clog2(DEPTH) + 2;
  logic signed [SW-1:0] wr_slot [W];  // entry chosen for each write slot, -1 if none

  function automatic logic port_ok(int p, op_e op);
    if (KIND_FP) return 1'b1;
    if (p == 0)  return !(op inside {OP_MUL, OP_DIV});
    return !(op inside {OP_SLL, OP_SRL, OP_SRA});
  endfunction

  always_comb begin
    int n;
    n = 0;
    for (int e = 0; e < DEPTH; e++) if (!vld[e]) n++;
    free_cnt = 8'(n);
  end

  // allocation: the k-th enabled write slot gets the k-th free entry
  logic signed [SW-1:0] free_idx [W];
  always_comb begin
    int nf, k;
    nf = 0;
    for (int i = 0; i < W; i++) free_idx[i] = -1;
    for (int e = 0; e < DEPTH; e++) begin
      if (!vld[e] && nf < W) begin
        free_idx[nf] = SW'(e);
        nf++;
      end
    end
    k = 0;
    for (int i = 0; i < W; i++) begin
      wr_slot[i] = -1;
      if (wr_en[i]) begin
        wr_slot[i] = free_idx[k];
        k++;
      end
    end
  end

  // select
  always_comb begin
    taken = '0;
    for (int p = 0; p < PORTS; p++) begin
      iss_valid[p] = 1'b0;
      iss_data[p]  = mem[0];
      for (int e = 0; e < DEPTH; e++) begin
        if (port_rdy[p] && !iss_valid[p] && vld[e] && !taken[e] && mem[e].s1.rdy && mem[e].s2.rdy
            && port_ok(p, mem[e].op)) begin
          iss_valid[p] = 1'b1;
          iss_data[p]  = mem[e];
          taken[e]     = 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   $countones(wr_en) <= int'(free_cnt))
    else $error("rs_ooo: write beyond capacity");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      for (int e = 0; e < DEPTH; e++) mem[e] <= '0;
    end else begin
      for (int e = 0; e < DEPTH; e++) begin
        for (int b = 0; b < NB; b++) begin
          if (bus[b].valid) begin
            if (!mem[e].s1.rdy && mem[e].s1.tag == bus[b].tag) begin
              mem[e].s1.rdy <= 1'b1;
              mem[e].s1.val <= bus[b].val;
            end
            if (!mem[e].s2.rdy && mem[e].s2.tag == bus[b].tag) begin
              mem[e].s2.rdy <= 1'b1;
              mem[e].s2.val <= bus[b].val;
            end
          end
        end
        if (taken[e]) vld[e] <= 1'b0;
      end
      for (int i = 0; i < W; i++) begin
        if (wr_slot[i] >= 0) begin
          mem[int'(wr_slot[i])] <= wr_data[i];
          vld[int'(wr_slot[i])] <= 1'b1;
        end
      end
    end
  end

endmodule
