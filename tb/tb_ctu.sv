// tb_ctu: branch and jump resolution. Checks taken/not taken for each
// condition, the resolved next PC, the return address, and that
// `mispredict` is raised exactly when direction or target was predicted wrong.
module tb_ctu;
  import mtss_pkg::*;
  logic clk = 0, rst = 1, ready;
  fu_req_t req;
  fu_res_t res;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ctu dut (.*);

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 300; n++) begin
      logic [5:0] op; logic tk; logic [15:0] tgt, nxt; logic mis;
      int a, b;
      case (n % 6)
        0: op = OP_BEQ; 1: op = OP_BNE; 2: op = OP_BLT; 3: op = OP_BGE;
        4: op = OP_JAL; default: op = OP_JALR;
      endcase
      a = ($urandom % 2) ? $urandom % 4 - 2 : $urandom;
      b = $urandom % 4 - 2;
      @(negedge clk);
      req = '0; req.valid = 1; req.op = op; req.a = a; req.b = b;
      req.pc = $urandom; req.imm = $urandom % 64 - 32; req.tag = $urandom;
      case (op)
        OP_BEQ: tk = (a == b);  OP_BNE: tk = (a != b);
        OP_BLT: tk = (a < b);   OP_BGE: tk = (a >= b);
        default: tk = 1;
      endcase
      tgt = (op == OP_JALR) ? 16'(a) + req.imm : req.pc + req.imm;
      nxt = tk ? tgt : req.pc + 1;
      req.pred_taken  = $urandom % 2;
      req.pred_target = ($urandom % 2) ? tgt : tgt + 1;
      mis = (tk != req.pred_taken) || (tk && req.pred_target != tgt);
      @(posedge clk); #1;
      checks++;
      if (!(res.valid && res.taken == tk && res.target == nxt && res.mispredict == mis &&
            res.value == 32'(req.pc + 16'd1) && res.tag == req.tag)) begin
        failures++;
        $display("FAIL op=%h a=%0d b=%0d tk=%b/%b nxt=%h/%h mis=%b/%b", op, a, b, res.taken, tk,
                 res.target, nxt, res.mispredict, mis);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
