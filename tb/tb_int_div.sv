// tb_int_div: signed divide and remainder, including negative operands and
// division by zero; checks the 15-cycle latency and that the unit refuses
// work (ready low) while busy.
module tb_int_div;
  import mtss_pkg::*;
  logic clk = 0, rst = 1, ready;
  fu_req_t req;
  fu_res_t res;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  int_div dut (.*);

  task automatic one(logic [5:0] op, int a, int b, logic [31:0] exp);
    int lat;
    @(negedge clk);
    req = '0; req.valid = 1; req.op = op; req.a = a; req.b = b; req.tag = $urandom;
    checks++; if (!ready) begin failures++; $display("FAIL not ready"); end
    @(negedge clk); req.valid = 0;
    lat = 1;
    while (!res.valid && lat < 100) begin
      checks++; if (ready) begin failures++; $display("FAIL ready while busy"); end
      @(negedge clk); lat++;
    end
    checks++;
    if (res.value != exp || lat != 15) begin
      failures++; $display("FAIL op=%h %0d,%0d got %0d exp %0d lat %0d", op, a, b, $signed(res.value), $signed(exp), lat);
    end
  endtask

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    one(OP_DIV, 100, 7, 14);
    one(OP_REM, 100, 7, 2);
    one(OP_DIV, -100, 7, -14);
    one(OP_REM, -100, 7, -2);
    one(OP_DIV, 5, 0, 32'hFFFFFFFF);
    one(OP_REM, 5, 0, 5);
    for (int i = 0; i < 20; i++) begin
      int a, b;
      a = $urandom; b = ($urandom % 1000) + 1;
      one(OP_DIV, a, b, a / b);
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
