// tb_int_alu: random operations on the integer ALU against a reference model
// written here; checks value, tag and the one-cycle latency.
module tb_int_alu;
  import mtss_pkg::*;
  logic clk = 0, rst = 1, ready;
  fu_req_t req;
  fu_res_t res;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  int_alu dut (.*);

  function automatic logic [31:0] ref_alu(logic [5:0] op, logic [31:0] a, logic [31:0] b,
                                          logic [15:0] imm, logic [1:0] tid);
    logic signed [31:0] sa, sb, si;
    sa = a; sb = b; si = {{16{imm[15]}}, imm};
    case (op)
      OP_ADD: return a + b;         OP_SUB: return a - b;
      OP_AND: return a & b;         OP_OR:  return a | b;
      OP_XOR: return a ^ b;         OP_SLL: return a << (b % 32);
      OP_SRL: return a >> (b % 32); OP_SRA: return sa >>> (b % 32);
      OP_SLT: return (sa < sb) ? 1 : 0;
      OP_SLTU: return (a < b) ? 1 : 0;
      OP_ADDI: return a + si;
      OP_ANDI: return a & imm;      OP_ORI: return a | imm;  OP_XORI: return a ^ imm;
      OP_SLTI: return (sa < si) ? 1 : 0;
      OP_LUI:  return imm * 65536;
      OP_TID:  return tid;
      default: return 0;
    endcase
  endfunction

  logic [5:0] ops [17] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA,
                           OP_SLT, OP_SLTU, OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SLTI,
                           OP_LUI, OP_TID};
  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 400; n++) begin
      logic [31:0] exp;
      @(negedge clk);
      req = '0;
      req.valid = 1;
      req.op  = ops[n % 17];
      req.a   = $urandom; req.b = (n % 3 == 0) ? $urandom % 40 : $urandom;
      req.imm = $urandom; req.tid = $urandom; req.tag = $urandom;
      exp = ref_alu(req.op, req.a, req.b, req.imm, req.tid);
      @(posedge clk); #1;
      checks++;
      if (!(res.valid && res.value == exp && res.tag == req.tag && ready)) begin
        failures++;
        $display("FAIL op=%h a=%h b=%h imm=%h got %h exp %h", req.op, req.a, req.b, req.imm, res.value, exp);
      end
    end
    @(negedge clk) req = '0;
    @(posedge clk); #1;
    checks++; if (res.valid) failures++;
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
