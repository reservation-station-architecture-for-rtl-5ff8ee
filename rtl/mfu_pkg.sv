// mfu_pkg: types and constants shared by the mutable-functional-unit back end.
//
// The back end models an R10000-like out-of-order core whose floating-point
// adder has been replaced by a mutable functional unit (MFU) fed by its own
// in-order reservation station (RS-MFU). Instructions enter already decoded
// (uop_t), are renamed against a reorder buffer (ROB tags), steered, and wait
// in reservation stations as rs_entry_t until their operands arrive on the
// result buses (result_t).
//
// Sizes that follow the document: 4-wide dispatch, 64 ROB entries, 32 integer
// and 32 floating-point registers, 64-bit data path. The operation set, the
// uop encoding and the result-bus layout are this design's own choices.
package mfu_pkg;

  localparam int XLEN       = 64;   // data path width (integer and double FP)
  localparam int NUM_AREGS  = 32;   // architectural registers per file
  localparam int ROB_DEPTH  = 64;   // ROB entries (renaming through the ROB)
  localparam int TAG_W      = $clog2(ROB_DEPTH);
  localparam int DISP_W     = 4;    // instructions dispatched per cycle
  localparam int NUM_BUSES  = 6;    // ALU1, ALU2, LSU, MFU-int, MFU-fp, FPU2

  // Result bus indices
  localparam int BUS_ALU1   = 0;
  localparam int BUS_ALU2   = 1;
  localparam int BUS_LSU    = 2;
  localparam int BUS_MFU_I  = 3;
  localparam int BUS_MFU_F  = 4;
  localparam int BUS_FPU2   = 5;

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [4:0]       areg_t;

  typedef enum logic [4:0] {
    OP_ADD  = 5'd0,  OP_SUB  = 5'd1,  OP_AND  = 5'd2,  OP_OR   = 5'd3,
    OP_XOR  = 5'd4,  OP_SLL  = 5'd5,  OP_SRL  = 5'd6,  OP_SRA  = 5'd7,
    OP_MUL  = 5'd8,  OP_LD   = 5'd9,  OP_SD   = 5'd10, OP_LDF  = 5'd11,
    OP_SDF  = 5'd12, OP_FADD = 5'd13, OP_FSUB = 5'd14, OP_FMUL = 5'd15,
    OP_FDIV = 5'd16, OP_FSQRT = 5'd17, OP_DIV = 5'd18
  } op_e;

  // Class of an operation as seen by the MFU's mutation logic.
  typedef enum logic [2:0] {
    MC_NONE  = 3'd0,  // not executable by the MFU
    MC_ADD   = 3'd1,  // integer add/sub and address generation
    MC_LOGIC = 3'd2,
    MC_SHIFT = 3'd3,
    MC_FADD  = 3'd4
  } mclass_e;

  // Which reservation station an instruction normally goes to.
  typedef enum logic [1:0] { RS_INT = 2'd0, RS_ADDR = 2'd1, RS_FP = 2'd2 } rs_kind_e;

  // Decoded instruction as it leaves the instruction buffer.
  typedef struct packed {
    logic        valid;
    op_e         op;
    areg_t       rd;
    areg_t       rs1;
    areg_t       rs2;
    logic        use_imm;   // ALU ops: second operand is imm
    logic [15:0] imm;       // sign-extended; memory ops: byte offset
  } uop_t;

  // Source operand after renaming: a value, or the ROB tag that will produce it.
  typedef struct packed {
    logic  rdy;
    tag_t  tag;
    word_t val;
  } operand_t;

  // Reservation-station entry.
  typedef struct packed {
    op_e      op;
    tag_t     tag;       // ROB entry of this instruction
    operand_t s1;        // base for memory ops
    operand_t s2;        // store data for stores
    word_t    imm;
    logic     agen_ext;  // Address RS only: address comes from the MFU
  } rs_entry_t;

  // Result bus (one per functional-unit output).
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t val;
  } result_t;

  // Address bus from the MFU to the Address RS.
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t addr;
  } agen_t;

  // Event counters brought out of the core.
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] committed;      // instructions committed
    logic [31:0] to_mfu_int;     // integer/memory instructions steered to RS-MFU
    logic [31:0] to_mfu_fadd;    // FP adds dispatched to RS-MFU
    logic [31:0] redirects;      // steered to RS-MFU but it was full
    logic [31:0] rsmfu_full;     // cycles RS-MFU was full
    logic [31:0] mutations;      // MFU mode switches
    logic [31:0] mut_stalls;     // cycles the RS-MFU head waited for a mutation penalty
    logic [31:0] agens;          // addresses computed by the MFU
    logic [31:0] disp_stalls;    // cycles a valid instruction could not be dispatched
    logic [31:0] dual_alu;       // cycles both ALUs issued
    logic [31:0] fpu2_busy;      // cycles FPU2 was busy with a divide / square root
    logic [31:0] alu2_busy;      // cycles ALU2 was busy with an integer divide
  } stats_t;

  function automatic logic is_mem(op_e op);
    return op inside {OP_LD, OP_SD, OP_LDF, OP_SDF};
  endfunction

  function automatic logic is_store(op_e op);
    return op inside {OP_SD, OP_SDF};
  endfunction

  function automatic logic has_dst(op_e op);
    return !(op inside {OP_SD, OP_SDF});
  endfunction

  function automatic logic dst_fp(op_e op);
    return op inside {OP_LDF, OP_FADD, OP_FSUB, OP_FMUL, OP_FDIV, OP_FSQRT};
  endfunction

  function automatic logic src1_fp(op_e op);
    return op inside {OP_FADD, OP_FSUB, OP_FMUL, OP_FDIV, OP_FSQRT};
  endfunction

  function automatic logic src2_fp(op_e op);
    return op inside {OP_FADD, OP_FSUB, OP_FMUL, OP_FDIV, OP_SDF};
  endfunction

  // Does the instruction read its second register operand?
  function automatic logic uses_src2(op_e op, logic use_imm);
    if (op inside {OP_LD, OP_LDF, OP_FSQRT}) return 1'b0;
    if (op inside {OP_SD, OP_SDF, OP_FADD, OP_FSUB, OP_FMUL, OP_FDIV}) return 1'b1;
    return !use_imm;
  endfunction

  function automatic rs_kind_e home_rs(op_e op);
    if (is_mem(op)) return RS_ADDR;
    if (op inside {OP_FADD, OP_FSUB, OP_FMUL, OP_FDIV, OP_FSQRT}) return RS_FP;
    return RS_INT;
  endfunction

  function automatic mclass_e mfu_class(op_e op);
    unique case (op)
      OP_ADD, OP_SUB, OP_LD, OP_SD, OP_LDF, OP_SDF: return MC_ADD;
      OP_AND, OP_OR, OP_XOR:                        return MC_LOGIC;
      OP_SLL, OP_SRL, OP_SRA:                       return MC_SHIFT;
      OP_FADD, OP_FSUB:                             return MC_FADD;
      default:                                      return MC_NONE;
    endcase
  endfunction

  // Integer operation shared by the ALUs and the MFU in integer mode.
  function automatic word_t int_op(op_e op, word_t a, word_t b);
    unique case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_SLL:  return a << b[5:0];
      OP_SRL:  return a >> b[5:0];
      OP_SRA:  return word_t'($signed(a) >>> b[5:0]);
      OP_MUL:  return a * b;
      default: return a + b;
    endcase
  endfunction

endpackage
