// decoder: the four instruction decoders in front of the scheduling unit.
//
// For each valid instruction of the fetched block it decodes the opcode, picks
// the functional unit class, takes a fresh renaming tag for it, and finds each
// source operand's value or tag. The lookup follows the document: an
// associative search of the reorder buffer keyed by the register number, which
// with multithreading must also match the thread ID; if several entries match,
// the most recent one wins; if none does, the value comes from the register
// file. An entry whose result is already there gives its value, otherwise its
// tag. Earlier instructions of the same block are searched first (they are
// newer than anything in the buffer). Operands an instruction does not use are
// marked ready with value 0.
//
// Interface: purely combinational; the scheduling unit captures `dec` when it
// accepts the block. `rf_raddr` ports 2i and 2i+1 carry slot i's rs1 and rs2.
module decoder
  import mtss_pkg::*;
(
  input  fetch_blk_t                          blk,
  input  su_view_t [SU_ENTRIES-1:0]           view,   // index 0 = oldest
  input  logic [FETCH_W-1:0][TAG_W-1:0]       new_tags,
  output logic [2*FETCH_W-1:0][PREG_W-1:0]    rf_raddr,
  input  logic [2*FETCH_W-1:0][XLEN-1:0]      rf_rdata,
  output dec_t [FETCH_W-1:0]                  dec
);
  function automatic logic uses_rs1(input logic [5:0] op);
    return !(op inside {OP_NOP, OP_HALT, OP_LUI, OP_TID, OP_JAL});
  endfunction
  function automatic logic uses_rs2(input logic [5:0] op);
    return op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA,
                      OP_SLT, OP_SLTU, OP_MUL, OP_DIV, OP_REM, OP_SW,
                      OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_FADD, OP_FSUB, OP_FMUL, OP_FDIV};
  endfunction
  function automatic logic writes_rd(input logic [5:0] op);
    return !(op inside {OP_NOP, OP_HALT, OP_SW, OP_BEQ, OP_BNE, OP_BLT, OP_BGE});
  endfunction

  always_comb
    for (int i = 0; i < FETCH_W; i++) begin
      rf_raddr[2*i]   = {blk.tid, blk.instr[i][20:16]};
      rf_raddr[2*i+1] = {blk.tid, blk.instr[i][15:11]};
    end

  always_comb begin
    for (int i = 0; i < FETCH_W; i++) begin
      logic [31:0]       ins;
      logic [RREG_W-1:0] src [2];
      logic              use_src [2];
      ins = blk.instr[i];
      src[0] = ins[20:16];
      src[1] = ins[15:11];
      use_src[0] = uses_rs1(ins[31:26]);
      use_src[1] = uses_rs2(ins[31:26]);

      dec[i]             = '0;
      dec[i].valid       = blk.valid && blk.slot_valid[i];
      dec[i].tag         = new_tags[i];
      dec[i].op          = ins[31:26];
      dec[i].fu          = op_class(ins[31:26]);
      dec[i].has_dest    = writes_rd(ins[31:26]);
      dec[i].rd          = ins[25:21];
      // instructions with a second source register carry an 11-bit immediate
      dec[i].imm         = use_src[1] ? {{5{ins[10]}}, ins[10:0]} : ins[15:0];
      dec[i].pc          = blk.pc[i];
      dec[i].pred_taken  = blk.pred_taken[i];
      dec[i].pred_target = blk.pred_target[i];

      for (int s = 0; s < 2; s++) begin
        logic             rdy, found;
        logic [XLEN-1:0]  val;
        logic [TAG_W-1:0] tg;
        rdy   = 1'b1;
        found = 1'b0;
        val   = '0;
        tg    = '0;
        if (use_src[s]) begin
          found = 1'b0;
          val   = rf_rdata[2*i+s];
          // reorder buffer, oldest to newest: the last match is the most recent
          for (int e = 0; e < SU_ENTRIES; e++)
            if (view[e].valid && view[e].tid == blk.tid && view[e].rd == src[s]) begin
              found = 1'b1;
              rdy   = view[e].done;
              val   = view[e].result;
              tg    = view[e].tag;
            end
          // earlier instructions of this block are newer still
          for (int j = 0; j < i; j++)
            if (blk.slot_valid[j] && writes_rd(blk.instr[j][31:26]) &&
                blk.instr[j][25:21] == src[s]) begin
              found = 1'b1;
              rdy   = 1'b0;
              val   = '0;
              tg    = new_tags[j];
            end
          if (!found) rdy = 1'b1;
        end
        if (s == 0) begin dec[i].s1_rdy = rdy; dec[i].s1_val = val; dec[i].s1_tag = tg; end
        else        begin dec[i].s2_rdy = rdy; dec[i].s2_val = val; dec[i].s2_tag = tg; end
      end
    end
  end
endmodule
