// tb_icache: loads random words and reads them back as aligned blocks of
// four, from every PC inside each block.
module tb_icache;
  import mtss_pkg::*;
  logic clk = 0, wr_en = 0;
  logic [PC_W-1:0] wr_addr = '0, rd_pc = '0;
  logic [XLEN-1:0] wr_data = '0;
  logic [FETCH_W-1:0][XLEN-1:0] rd_block;
  logic [31:0] model [256];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  icache #(.WORDS(256)) dut (.*);
  initial begin
    for (int i = 0; i < 256; i++) begin
      model[i] = $urandom;
      @(negedge clk); wr_en = 1; wr_addr = PC_W'(i); wr_data = model[i];
    end
    @(negedge clk) wr_en = 0;
    for (int n = 0; n < 300; n++) begin
      rd_pc = PC_W'($urandom % 256);
      #1;
      for (int i = 0; i < FETCH_W; i++) begin
        checks++;
        if (rd_block[i] != model[(rd_pc & ~16'd3) + i]) begin
          failures++; $display("FAIL pc %0d slot %0d", rd_pc, i);
        end
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
