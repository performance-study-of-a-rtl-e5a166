// mtss_pkg: types and constants shared by the multithreaded superscalar core.
//
// The core fetches one block of FETCH_W=4 instructions per cycle from one of
// NTHREADS=4 threads, holds them in a 32-entry scheduling unit (combined
// reorder buffer and instruction window, 8 blocks of 4), issues up to 8 per
// cycle oldest-first to the functional units of the default configuration,
// and commits one block per cycle from any of the bottom 4 blocks.
// Those sizes follow the document. The instruction set below is this design's
// own: the document does not give the SDSP encoding.
//
// Instruction format (32 bits, word-addressed PCs):
//   [31:26] opcode  [25:21] rd  [20:16] rs1  [15:11] rs2  [15:0] imm (signed)
// Instructions that read rs2 (stores, branches) use imm = [10:0] (signed).
// Register numbers are thread-relative (32 per thread); the physical register
// is {tid, r}, so the 128 registers are split equally between 4 threads.
package mtss_pkg;

  localparam int unsigned XLEN      = 32;
  localparam int unsigned NTHREADS  = 4;
  localparam int unsigned TID_W     = $clog2(NTHREADS);
  localparam int unsigned NREGS     = 128;
  localparam int unsigned REGS_PER_THREAD = NREGS / NTHREADS;  // 32
  localparam int unsigned RREG_W    = 5;                       // thread-relative register field
  localparam int unsigned PREG_W    = $clog2(NREGS);
  localparam int unsigned FETCH_W   = 4;                       // block size
  localparam int unsigned SU_BLOCKS = 8;                       // 32 entries
  localparam int unsigned SU_ENTRIES = SU_BLOCKS * FETCH_W;
  localparam int unsigned COMMIT_BLOCKS = 4;                   // Flexible Result Commit window
  localparam int unsigned ISSUE_W   = 8;
  localparam int unsigned NTAGS     = 2 * SU_ENTRIES;           // renaming tags
  localparam int unsigned TAG_W     = $clog2(NTAGS);
  localparam int unsigned PC_W      = 16;

  // Functional unit classes of the default configuration.
  typedef enum logic [3:0] {
    FU_ALU, FU_MUL, FU_DIV, FU_LD, FU_ST, FU_CT, FU_FADD, FU_FMUL, FU_FDIV, FU_NONE
  } fu_type_e;

  // Default number of units per class and latency in cycles.
  localparam int unsigned N_ALU = 4, N_MUL = 1, N_DIV = 1, N_LD = 1, N_ST = 1,
                          N_CT = 1, N_FADD = 1, N_FMUL = 1, N_FDIV = 1;
  localparam int unsigned LAT_ALU = 1, LAT_MUL = 2, LAT_DIV = 15, LAT_LD = 1,
                          LAT_ST = 1, LAT_CT = 1, LAT_FADD = 3, LAT_FMUL = 6,
                          LAT_FDIV = 40;
  localparam int unsigned NFU = N_ALU + N_MUL + N_DIV + N_LD + N_ST + N_CT
                              + N_FADD + N_FMUL + N_FDIV;      // 12

  // Unit index -> class. Units are numbered class by class in the order above.
  function automatic fu_type_e fu_class(input int unsigned idx);
    int unsigned b;
    b = 0;
    if (idx < b + N_ALU)  return FU_ALU;  b += N_ALU;
    if (idx < b + N_MUL)  return FU_MUL;  b += N_MUL;
    if (idx < b + N_DIV)  return FU_DIV;  b += N_DIV;
    if (idx < b + N_LD)   return FU_LD;   b += N_LD;
    if (idx < b + N_ST)   return FU_ST;   b += N_ST;
    if (idx < b + N_CT)   return FU_CT;   b += N_CT;
    if (idx < b + N_FADD) return FU_FADD; b += N_FADD;
    if (idx < b + N_FMUL) return FU_FMUL;
    return FU_FDIV;
  endfunction

  typedef enum logic [5:0] {
    OP_NOP  = 6'h00, OP_HALT = 6'h01,
    OP_ADD  = 6'h02, OP_SUB  = 6'h03, OP_AND = 6'h04, OP_OR  = 6'h05,
    OP_XOR  = 6'h06, OP_SLL  = 6'h07, OP_SRL = 6'h08, OP_SRA = 6'h09,
    OP_SLT  = 6'h0A, OP_SLTU = 6'h0B,
    OP_ADDI = 6'h10, OP_ANDI = 6'h11, OP_ORI = 6'h12, OP_XORI = 6'h13,
    OP_SLTI = 6'h14, OP_LUI  = 6'h15, OP_TID = 6'h16,
    OP_MUL  = 6'h18, OP_DIV  = 6'h19, OP_REM = 6'h1A,
    OP_LW   = 6'h20, OP_SW   = 6'h21,
    OP_BEQ  = 6'h28, OP_BNE  = 6'h29, OP_BLT = 6'h2A, OP_BGE = 6'h2B,
    OP_JAL  = 6'h2C, OP_JALR = 6'h2D,
    OP_FADD = 6'h30, OP_FSUB = 6'h31, OP_FMUL = 6'h32, OP_FDIV = 6'h33
  } opcode_e;

  function automatic fu_type_e op_class(input logic [5:0] op);
    case (op)
      OP_MUL:                           return FU_MUL;
      OP_DIV, OP_REM:                   return FU_DIV;
      OP_LW:                            return FU_LD;
      OP_SW:                            return FU_ST;
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE,
      OP_JAL, OP_JALR:                  return FU_CT;
      OP_FADD, OP_FSUB:                 return FU_FADD;
      OP_FMUL:                          return FU_FMUL;
      OP_FDIV:                          return FU_FDIV;
      OP_NOP, OP_HALT:                  return FU_NONE;
      default:                          return FU_ALU;
    endcase
  endfunction

  // Operation sent to a functional unit.
  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [TID_W-1:0]  tid;
    logic [5:0]        op;
    logic [XLEN-1:0]   a;        // rs1 value
    logic [XLEN-1:0]   b;        // rs2 value
    logic [15:0]       imm;
    logic [PC_W-1:0]   pc;
    logic              pred_taken;
    logic [PC_W-1:0]   pred_target;
  } fu_req_t;

  // Result written back to the scheduling unit.
  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [XLEN-1:0]   value;
    logic              mispredict;   // control transfer only
    logic              taken;
    logic [PC_W-1:0]   target;       // resolved next PC
  } fu_res_t;

  // One instruction as the decoder hands it to the scheduling unit.
  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [5:0]        op;
    fu_type_e          fu;
    logic              has_dest;
    logic [RREG_W-1:0] rd;
    logic              s1_rdy;
    logic [XLEN-1:0]   s1_val;
    logic [TAG_W-1:0]  s1_tag;
    logic              s2_rdy;
    logic [XLEN-1:0]   s2_val;
    logic [TAG_W-1:0]  s2_tag;
    logic [15:0]       imm;
    logic [PC_W-1:0]   pc;
    logic              pred_taken;
    logic [PC_W-1:0]   pred_target;
  } dec_t;

  // Scheduling unit entry: the decoded instruction plus its execution state.
  typedef struct packed {
    dec_t              d;
    logic              killed;     // squashed by a mispredicted branch of its thread
    logic              issued;
    logic              done;
    logic [XLEN-1:0]   result;
    logic              ct_taken;
    logic [PC_W-1:0]   ct_target;
  } su_entry_t;

  // The part of an entry the decoder's associative lookup sees.
  typedef struct packed {
    logic              valid;      // live, not killed, writes a register
    logic [TID_W-1:0]  tid;
    logic [RREG_W-1:0] rd;
    logic [TAG_W-1:0]  tag;
    logic              done;
    logic [XLEN-1:0]   result;
  } su_view_t;

  // Instruction block from the instruction unit.
  typedef struct packed {
    logic                          valid;
    logic [TID_W-1:0]              tid;
    logic [FETCH_W-1:0]            slot_valid;
    logic [FETCH_W-1:0][XLEN-1:0]  instr;
    logic [FETCH_W-1:0][PC_W-1:0]  pc;
    logic [FETCH_W-1:0]            pred_taken;
    logic [FETCH_W-1:0][PC_W-1:0]  pred_target;
  } fetch_blk_t;

  // Branch predictor update from result commit.
  typedef struct packed {
    logic            valid;
    logic [PC_W-1:0] pc;
    logic            taken;
    logic [PC_W-1:0] target;
  } bp_upd_t;

  function automatic logic [XLEN-1:0] sext16(input logic [15:0] v);
    return {{(XLEN-16){v[15]}}, v};
  endfunction

endpackage
