// ctu: control transfer unit, one-cycle latency (document's unit table).
//
// Resolves conditional branches (BEQ/BNE/BLT/BGE: target = pc + imm) and
// jumps (JAL: target = pc + imm, JALR: target = rs1 + imm), and compares the
// outcome with the prediction made at fetch. A wrong direction or a wrong
// target raises `mispredict`, and `target` then holds the correct next PC.
// JAL/JALR write pc+1 (the return address) to rd. The instruction set is this
// design's own; PCs count 32-bit instruction words.
//
// Interface: `req` sampled when req.valid, `res` one cycle later.
module ctu
  import mtss_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  fu_req_t req,
  output logic    ready,
  output fu_res_t res
);
  logic            taken;
  logic [PC_W-1:0] tgt, nxt;

  always_comb begin
    tgt = req.pc + req.imm[PC_W-1:0];
    unique case (req.op)
      OP_BEQ:  taken = (req.a == req.b);
      OP_BNE:  taken = (req.a != req.b);
      OP_BLT:  taken = ($signed(req.a) <  $signed(req.b));
      OP_BGE:  taken = ($signed(req.a) >= $signed(req.b));
      OP_JAL:  taken = 1'b1;
      OP_JALR: begin taken = 1'b1; tgt = req.a[PC_W-1:0] + req.imm[PC_W-1:0]; end
      default: taken = 1'b0;
    endcase
    nxt = taken ? tgt : req.pc + 1'b1;
  end

  assign ready = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) res <= '0;
    else begin
      res            <= '0;
      res.valid      <= req.valid;
      res.tag        <= req.tag;
      res.value      <= XLEN'(req.pc + 1'b1);
      res.taken      <= taken;
      res.target     <= nxt;
      res.mispredict <= req.valid && ((taken != req.pred_taken) ||
                                      (taken && tgt != req.pred_target));
    end
  end
endmodule
