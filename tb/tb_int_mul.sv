// tb_int_mul: back-to-back random multiplies; each result must appear exactly
// two cycles after issue with its tag and the low 32 bits of the product.
module tb_int_mul;
  import mtss_pkg::*;
  logic clk = 0, rst = 1, ready;
  fu_req_t req;
  fu_res_t res;
  int checks = 0, failures = 0;
  logic [31:0] exp_v [$];
  logic [TAG_W-1:0] exp_t [$];
  int exp_c [$];
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  int_mul dut (.*);

  always @(posedge clk) #1 if (!rst && res.valid) begin
    checks++;
    if (exp_v.size() == 0) begin failures++; $display("FAIL spurious"); end
    else begin
      logic [31:0] v; logic [TAG_W-1:0] t; int c;
      v = exp_v.pop_front(); t = exp_t.pop_front(); c = exp_c.pop_front();
      if (res.value != v || res.tag != t || cyc - c != 2) begin
        failures++; $display("FAIL got %h exp %h lat %0d", res.value, v, cyc - c);
      end
    end
  end

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      req = '0;
      req.valid = ($urandom % 4) != 0;
      req.a = (n < 4) ? -n : $urandom; req.b = $urandom; req.tag = $urandom; req.op = OP_MUL;
      if (req.valid) begin
        exp_v.push_back(32'(longint'(req.a) * longint'(req.b)));
        exp_t.push_back(req.tag);
        exp_c.push_back(cyc);
      end
    end
    @(negedge clk) req = '0;
    repeat (4) @(posedge clk);
    checks++; if (exp_v.size() != 0) failures++;
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
