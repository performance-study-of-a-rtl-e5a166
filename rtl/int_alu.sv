// int_alu: integer ALU of the execution unit (four of them in the default
// configuration), one-cycle latency as in the document's unit table.
//
// Performs the register-register and register-immediate integer operations of
// this design's instruction set (add, subtract, logic, shifts, set-less-than,
// load-upper-immediate) and OP_TID, which returns the issuing thread's ID so
// that threads running the same code can work on different data. The
// operation set and encoding are this design's own.
//
// Interface: `req` is sampled when req.valid; `res` carries the result with
// the instruction's renaming tag exactly one cycle later. Fully pipelined,
// so `ready` is always high.
module int_alu
  import mtss_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  fu_req_t req,
  output logic    ready,
  output fu_res_t res
);
  logic [XLEN-1:0] v, bi;

  always_comb begin
    bi = sext16(req.imm);
    unique case (req.op)
      OP_ADD:  v = req.a + req.b;
      OP_SUB:  v = req.a - req.b;
      OP_AND:  v = req.a & req.b;
      OP_OR:   v = req.a | req.b;
      OP_XOR:  v = req.a ^ req.b;
      OP_SLL:  v = req.a << req.b[4:0];
      OP_SRL:  v = req.a >> req.b[4:0];
      OP_SRA:  v = $unsigned($signed(req.a) >>> req.b[4:0]);
      OP_SLT:  v = {31'd0, $signed(req.a) < $signed(req.b)};
      OP_SLTU: v = {31'd0, req.a < req.b};
      OP_ADDI: v = req.a + bi;
      OP_ANDI: v = req.a & {16'd0, req.imm};
      OP_ORI:  v = req.a | {16'd0, req.imm};
      OP_XORI: v = req.a ^ {16'd0, req.imm};
      OP_SLTI: v = {31'd0, $signed(req.a) < $signed(bi)};
      OP_LUI:  v = {req.imm, 16'd0};
      OP_TID:  v = XLEN'(req.tid);
      default: v = '0;
    endcase
  end

  assign ready = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) res <= '0;
    else begin
      res            <= '0;
      res.valid      <= req.valid;
      res.tag        <= req.tag;
      res.value      <= v;
    end
  end
endmodule
