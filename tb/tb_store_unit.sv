// tb_store_unit: checks the address (rs1 + signed imm), data, thread and tag
// handed to the store buffer in the issue cycle, `ready` following the
// buffer's full flag, and completion reported one cycle later.
module tb_store_unit;
  import mtss_pkg::*;
  logic clk = 0, rst = 1, ready, sb_push, sb_full;
  fu_req_t req;
  fu_res_t res;
  logic [TID_W-1:0] sb_tid;
  logic [TAG_W-1:0] sb_tag;
  logic [XLEN-1:0] sb_addr, sb_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  store_unit dut (.*);
  initial begin
    req = '0; sb_full = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 200; n++) begin
      logic [31:0] ea;
      @(negedge clk);
      sb_full = $urandom % 4 == 0;
      req = '0; req.valid = !sb_full; req.op = OP_SW; req.a = $urandom; req.b = $urandom;
      req.imm = $urandom; req.tid = $urandom; req.tag = $urandom;
      ea = req.a + {{16{req.imm[15]}}, req.imm};
      #1;
      checks++;
      if (ready == sb_full || sb_push != req.valid || (req.valid && (sb_addr != ea ||
          sb_data != req.b || sb_tid != req.tid || sb_tag != req.tag))) begin
        failures++; $display("FAIL push");
      end
      @(posedge clk); #1;
      checks++;
      if (res.valid != req.valid || (req.valid && res.tag != req.tag)) begin failures++; $display("FAIL done"); end
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
