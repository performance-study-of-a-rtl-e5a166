// tb_fp_add: operands chosen so the exact result is representable in single
// precision (small integers and quarters), so the expected bits come from the
// simulator's own floating-point arithmetic. Checks value, tag and the
// 3-cycle latency.
module tb_fp_add;
  import mtss_pkg::*;
  logic clk = 0, rst = 1, ready;
  fu_req_t req;
  fu_res_t res;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  fp_add dut (.*);

  function automatic logic [31:0] f2b(real r);
    // exact values only: re-pack the double's fields as single precision
    logic [63:0] d;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'd0};
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  function automatic int rnd(int n);
    int unsigned u;
    u = $urandom;
    return int'(u % n);
  endfunction

  task automatic one(logic [5:0] op, real a, real b, real exp);
    int lat;
    @(negedge clk);
    while (!ready) @(negedge clk);
    req = '0; req.valid = 1; req.op = op; req.a = f2b(a); req.b = f2b(b); req.tag = $urandom;
    @(negedge clk); req.valid = 0;
    lat = 1;
    while (!res.valid && lat < 100) begin @(negedge clk); lat++; end
    checks++;
    if (res.value != f2b(exp) || lat != 3 || res.tag != req.tag) begin
      failures++;
      $display("FAIL %f op %f: got %h exp %h lat %0d", a, b, res.value, f2b(exp), lat);
    end
  endtask

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    one(OP_FADD, 1.5, 2.25, 3.75);
    one(OP_FADD, 1.0, -1.0, 0.0);
    one(OP_FADD, 0.0, 3.0, 3.0);
    one(OP_FSUB, 6.0, 1.5, 4.5);
    one(OP_FSUB, 1.5, 6.0, -4.5);
    for (int i = 0; i < 30; i++) begin
      real a, b;
      a = (rnd(2001) - 1000) / 4.0;
      b = (rnd(2001) - 1000) / 4.0;
      if (i % 2) one(OP_FADD, a, b, a + b); else one(OP_FSUB, a, b, a - b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
