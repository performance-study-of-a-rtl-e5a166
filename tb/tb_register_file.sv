// tb_register_file: random writes on the four commit ports (a later port wins
// on the same register) and reads on the eight read ports, against a model.
module tb_register_file;
  import mtss_pkg::*;
  logic clk = 0, rst = 1;
  logic [2*FETCH_W-1:0][PREG_W-1:0] raddr;
  logic [2*FETCH_W-1:0][XLEN-1:0] rdata;
  logic [FETCH_W-1:0] we;
  logic [FETCH_W-1:0][PREG_W-1:0] waddr;
  logic [FETCH_W-1:0][XLEN-1:0] wdata;
  logic [31:0] model [NREGS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  register_file dut (.*);
  initial begin
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    for (int r = 0; r < NREGS; r++) model[r] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int i = 0; i < 2*FETCH_W; i++) raddr[i] = PREG_W'($urandom);
      #1;
      for (int i = 0; i < 2*FETCH_W; i++) begin
        checks++;
        if (rdata[i] != model[raddr[i]]) begin failures++; $display("FAIL r%0d", raddr[i]); end
      end
      we = FETCH_W'($urandom);
      for (int k = 0; k < FETCH_W; k++) begin
        waddr[k] = PREG_W'($urandom % 16); wdata[k] = $urandom;
      end
      @(posedge clk);
      for (int k = 0; k < FETCH_W; k++) if (we[k]) model[waddr[k]] = wdata[k];
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
