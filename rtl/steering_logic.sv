// steering_logic: decides, for each instruction of a dispatch group, whether it
// goes to the in-order reservation station of the mutable functional unit
// (RS-MFU) or to its ordinary reservation station, and how many instructions
// of the group can be dispatched this cycle.
//
// Steering rule (follows the document's steering algorithm, applied to the
// group's instructions one after another in program order):
//   * an FP add/sub always goes to RS-MFU and raises the saturating counter
//     Cfp by CFP_INC, up to CFP_MAX;
//   * any other instruction lowers Cfp by one (not below zero); when Cfp is
//     then zero and the instruction is one the MFU can run (integer add/sub,
//     logic, shift, or a memory access, whose address the MFU computes),
//     the round-robin counter Crr is incremented, reduced by 4*N_CHUNK when it
//     reaches N_CHUNK, and the instruction goes to RS-MFU if Crr >= 0.
//     With N_CHUNK = 4 this gives 4 instructions to RS-MFU, then 12 to the
//     other stations.
//   * a memory access steered to RS-MFU also takes an Address RS entry: the MFU
//     only computes its address.
// Design choices: an integer or memory instruction that the rule sends to a
// full RS-MFU goes to its ordinary station instead (reported on redirect);
// an FP add that finds RS-MFU full, or any instruction whose station or the ROB
// is full, stops dispatch of itself and the rest of the group (in-order
// dispatch). Cfp and Crr change only for instructions that are dispatched.
// Crr resets to 0 and Cfp to 0.
//
// Interface: ops/vld describe the group (slot 0 oldest); *_free give the free
// entries of each structure this cycle. Outputs are combinational: accept is a
// prefix mask, to_mfu/to_home the destinations, n_accept the prefix length.
// The counters advance at the clock edge.
module steering_logic
  import mfu_pkg::*;
#(
  parameter int W        = 4,
  parameter int CFP_MAX  = 16,
  parameter int CFP_INC  = 4,
  parameter int N_CHUNK  = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  op_e          ops      [W],
  input  logic [W-1:0] vld,
  input  logic [7:0]   rob_free,
  input  logic [7:0]   int_free,
  input  logic [7:0]   addr_free,
  input  logic [7:0]   fp_free,
  input  logic [7:0]   mfu_free,
  output logic [W-1:0] accept,
  output logic [W-1:0] to_mfu,    // entry in RS-MFU
  output logic [W-1:0] to_home,   // entry in the instruction's ordinary RS
  output logic [W-1:0] redirect,  // wanted RS-MFU but it was full
  output logic [$clog2(W+1)-1:0] n_accept,
  output logic [7:0]   cfp_o,
  output logic signed [7:0] crr_o
);

  logic [7:0]        cfp_q, cfp_d;
  logic signed [7:0] crr_q, crr_d;

  always_comb begin
    int cfp, crr, ncfp, ncrr;
    int n_rob, n_int, n_addr, n_fp, n_mfu;
    logic stop, want, mfu_ok, fits, go_mfu, go_home;
    mclass_e  mc;
    rs_kind_e hk;
    cfp = int'(cfp_q);
    crr = int'(crr_q);
    n_rob = 0; n_int = 0; n_addr = 0; n_fp = 0; n_mfu = 0;
    stop = 1'b0;
    accept = '0; to_mfu = '0; to_home = '0; redirect = '0;
    n_accept = '0;
    for (int i = 0; i < W; i++) begin
      mc = mfu_class(ops[i]);
      hk = home_rs(ops[i]);
      ncfp = cfp; ncrr = crr; want = 1'b0;
      if (mc == MC_FADD) begin
        want = 1'b1;
        ncfp = (cfp + CFP_INC > CFP_MAX) ? CFP_MAX : cfp + CFP_INC;
      end else begin
        ncfp = (cfp > 0) ? cfp - 1 : 0;
        if (ncfp == 0 && mc != MC_NONE) begin
          ncrr = crr + 1;
          if (ncrr >= N_CHUNK) ncrr = ncrr - 4 * N_CHUNK;
          want = (ncrr >= 0);
        end
      end
      mfu_ok  = (n_mfu < int'(mfu_free));
      go_mfu  = want && mfu_ok;
      // FP adds never use the FP RS; other instructions use their own RS
      // unless steered away, memory ops always keep their Address RS entry.
      go_home = (mc != MC_FADD) && (!go_mfu || is_mem(ops[i]));
      fits = (n_rob < int'(rob_free)) && !(want && mc == MC_FADD && !mfu_ok);
      if (go_home) begin
        unique case (hk)
          RS_INT:  fits = fits && (n_int  < int'(int_free));
          RS_ADDR: fits = fits && (n_addr < int'(addr_free));
          default: fits = fits && (n_fp   < int'(fp_free));
        endcase
      end
      if (vld[i] && !stop && fits) begin
        accept[i]   = 1'b1;
        to_mfu[i]   = go_mfu;
        to_home[i]  = go_home;
        redirect[i] = want && !mfu_ok;
        n_rob++;
        if (go_mfu) n_mfu++;
        if (go_home) begin
          unique case (hk)
            RS_INT:  n_int++;
            RS_ADDR: n_addr++;
            default: n_fp++;
          endcase
        end
        cfp = ncfp;
        crr = ncrr;
        n_accept = n_accept + 1'b1;
      end else begin
        stop = 1'b1;
      end
    end
    cfp_d = 8'(cfp);
    crr_d = 8'(crr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfp_q <= '0;
      crr_q <= '0;
    end else begin
      cfp_q <= cfp_d;
      crr_q <= crr_d;
    end
  end

  assign cfp_o = cfp_q;
  assign crr_o = crr_q;

endmodule
