// rob_rename: register renaming through a reorder buffer (ROB), with in-order
// commit into the architectural integer and floating-point register files.
//
// The document's simulated machine renames with a 64-entry reorder buffer
// and 32 int + 32 fp architectural registers; those sizes are the defaults.
// The organisation below is this design's.
//
// Rename (combinational, for the W instructions of a dispatch group): each
// instruction gets the ROB entry tail+i as its tag. A source register is
// taken, in this order of priority, from an older instruction of the same
// group that writes it (not ready, that instruction's tag), from the register
// alias table (RAT) if a ROB entry is still to write it (its value if that
// entry is done or its value is on a result bus this cycle, else its tag),
// or from the architectural register file. Unused second operands and
// immediates are delivered as ready values. The first `n_accept` instructions
// (accept is a prefix mask) are entered into the ROB and the RAT at the edge.
//
// Completion: a valid result bus marks its ROB entry done and stores the value
// (for stores the LSU's bus only marks it done).
// Commit: up to CW done entries at the head per cycle, in order, write the
// register files and release their RAT mapping if it is still theirs.
//
// Debug: dbg_reg = {fp, index} reads an architectural register.
module rob_rename
  import mfu_pkg::*;
#(
  parameter int W     = 4,
  parameter int DEPTH = 64,
  parameter int NB    = 6,
  parameter int CW    = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  uop_t         uops    [W],
  input  logic [W-1:0] accept,
  output rs_entry_t    ren     [W],
  output logic [7:0]   rob_free,
  input  result_t      bus     [NB],
  output logic [$clog2(CW+1)-1:0] n_commit,
  output logic         empty,
  input  logic [5:0]   dbg_reg,
  output word_t        dbg_val
);

  localparam int PW = $clog2(DEPTH);

  typedef struct packed {
    logic       done;
    logic       wr;      // writes a register
    logic       fp;
    logic [4:0] rd;
    word_t      val;
  } rob_t;

  rob_t          rob [DEPTH];
  logic [PW-1:0] hd, tl;
  logic [PW:0]   cnt;
  logic          rat_busy [64];
  tag_t          rat_tag  [64];

  // register file ports: 2 reads per slot plus one debug read
  localparam int RP = 2 * W + 1;
  logic [4:0]    ira [RP], fra [RP];
  word_t         ird [RP], frd [RP];
  logic [CW-1:0] iwe, fwe;
  logic [4:0]    wa  [CW];
  word_t         wd  [CW];

  arch_regfile #(.N(32), .RP(RP), .WP(CW), .ZERO_R0(1'b1)) u_irf (
    .clk, .rst_n, .ra(ira), .rd(ird), .we(iwe), .wa(wa), .wd(wd));
  arch_regfile #(.N(32), .RP(RP), .WP(CW), .ZERO_R0(1'b0)) u_frf (
    .clk, .rst_n, .ra(fra), .rd(frd), .we(fwe), .wa(wa), .wd(wd));

  function automatic logic writes_reg(op_e op, logic [4:0] rd);
    return has_dst(op) && (dst_fp(op) || rd != 5'd0);
  endfunction

  assign rob_free = 8'(DEPTH - int'(cnt));
  assign empty    = (cnt == 0);

  // read-port addresses
  always_comb begin
    for (int i = 0; i < W; i++) begin
      ira[2*i]   = uops[i].rs1;  fra[2*i]   = uops[i].rs1;
      ira[2*i+1] = uops[i].rs2;  fra[2*i+1] = uops[i].rs2;
    end
    ira[2*W] = dbg_reg[4:0];
    fra[2*W] = dbg_reg[4:0];
    dbg_val  = dbg_reg[5] ? frd[2*W] : ird[2*W];
  end

  // look up one source register
  function automatic operand_t lookup(logic fp, logic [4:0] r, word_t arf_val,
                                      logic busy, tag_t t, rob_t e, result_t b [NB]);
    operand_t o;
    o.rdy = 1'b1;
    o.tag = '0;
    o.val = arf_val;
    if (!fp && r == 5'd0) begin
      o.val = '0;
    end else if (busy) begin
      o.tag = t;
      if (e.done) begin
        o.val = e.val;
      end else begin
        o.rdy = 1'b0;
        for (int k = 0; k < NB; k++) begin
          if (b[k].valid && b[k].tag == t) begin
            o.rdy = 1'b1;
            o.val = b[k].val;
          end
        end
      end
    end
    return o;
  endfunction

  always_comb begin
    for (int i = 0; i < W; i++) begin
      logic [5:0] r1, r2;
      tag_t       mytag;
      op_e        op;
      op    = uops[i].op;
      mytag = tag_t'(int'(tl) + i);
      r1    = {src1_fp(op), uops[i].rs1};
      r2    = {src2_fp(op), uops[i].rs2};
      ren[i].op       = op;
      ren[i].tag      = mytag;
      ren[i].imm      = word_t'($signed(uops[i].imm));
      ren[i].agen_ext = 1'b0;
      ren[i].s1 = lookup(r1[5], r1[4:0], r1[5] ? frd[2*i] : ird[2*i],
                         rat_busy[r1], rat_tag[r1], rob[rat_tag[r1]], bus);
      if (!uses_src2(op, uops[i].use_imm)) begin
        ren[i].s2.rdy = 1'b1;
        ren[i].s2.tag = '0;
        ren[i].s2.val = uops[i].use_imm ? word_t'($signed(uops[i].imm)) : '0;
      end else begin
        ren[i].s2 = lookup(r2[5], r2[4:0], r2[5] ? frd[2*i+1] : ird[2*i+1],
                           rat_busy[r2], rat_tag[r2], rob[rat_tag[r2]], bus);
      end
      // younger-than-older dependences inside the group
      for (int j = 0; j < i; j++) begin
        if (writes_reg(uops[j].op, uops[j].rd) && {dst_fp(uops[j].op), uops[j].rd} == r1
            && (r1[5] || r1[4:0] != 5'd0)) begin
          ren[i].s1.rdy = 1'b0;
          ren[i].s1.tag = tag_t'(int'(tl) + j);
        end
        if (uses_src2(op, uops[i].use_imm) && writes_reg(uops[j].op, uops[j].rd)
            && {dst_fp(uops[j].op), uops[j].rd} == r2 && (r2[5] || r2[4:0] != 5'd0)) begin
          ren[i].s2.rdy = 1'b0;
          ren[i].s2.tag = tag_t'(int'(tl) + j);
        end
      end
    end
  end

  // commit selection
  logic [CW-1:0] cmt;
  logic [5:0]    cmt_reg [CW];   // {fp, rd} of a committing register write
  tag_t          cmt_tag [CW];
  always_comb begin
    logic go;
    go = 1'b1;
    n_commit = '0;
    for (int c = 0; c < CW; c++) begin
      rob_t e;
      e = rob[PW'(int'(hd) + c)];
      cmt[c] = go && (c < int'(cnt)) && e.done;
      cmt_reg[c] = {e.fp, e.rd};
      cmt_tag[c] = tag_t'(int'(hd) + c);
      go     = cmt[c];
      iwe[c] = cmt[c] && e.wr && !e.fp;
      fwe[c] = cmt[c] && e.wr && e.fp;
      wa[c]  = e.rd;
      wd[c]  = e.val;
      if (cmt[c]) n_commit = n_commit + 1'b1;
    end
  end

  logic [PW:0] n_acc;
  always_comb begin
    n_acc = '0;
    for (int i = 0; i < W; i++) n_acc = n_acc + (PW+1)'(accept[i]);
  end

  assert property (@(posedge clk) disable iff (!rst_n) int'(n_acc) <= DEPTH - int'(cnt))
    else $error("rob_rename: ROB overflow");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hd  <= '0;
      tl  <= '0;
      cnt <= '0;
      for (int e = 0; e < DEPTH; e++) rob[e] <= '0;
      for (int r = 0; r < 64; r++) begin
        rat_busy[r] <= 1'b0;
        rat_tag[r]  <= '0;
      end
    end else begin
      // completion
      for (int b = 0; b < NB; b++) begin
        if (bus[b].valid) begin
          rob[bus[b].tag].done <= 1'b1;
          rob[bus[b].tag].val  <= bus[b].val;
        end
      end
      // commit: release RAT mappings that still point at the committing entry
      for (int c = 0; c < CW; c++) begin
        if (cmt[c] && (iwe[c] || fwe[c]) && rat_busy[cmt_reg[c]] && rat_tag[cmt_reg[c]] == cmt_tag[c])
          rat_busy[cmt_reg[c]] <= 1'b0;
      end
      // allocation and RAT update (later slots win)
      for (int i = 0; i < W; i++) begin
        if (accept[i]) begin
          rob[PW'(int'(tl) + i)].done <= 1'b0;
          rob[PW'(int'(tl) + i)].wr   <= writes_reg(uops[i].op, uops[i].rd);
          rob[PW'(int'(tl) + i)].fp   <= dst_fp(uops[i].op);
          rob[PW'(int'(tl) + i)].rd   <= uops[i].rd;
          rob[PW'(int'(tl) + i)].val  <= '0;
          if (writes_reg(uops[i].op, uops[i].rd)) begin
            rat_busy[{dst_fp(uops[i].op), uops[i].rd}] <= 1'b1;
            rat_tag[{dst_fp(uops[i].op), uops[i].rd}]  <= tag_t'(int'(tl) + i);
          end
        end
      end
      tl  <= PW'(int'(tl) + int'(n_acc));
      hd  <= PW'(int'(hd) + int'(n_commit));
      cnt <= cnt + n_acc - (PW+1)'(n_commit);
    end
  end

endmodule
