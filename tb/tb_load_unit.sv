// tb_load_unit: with a store-buffer stub (hits on a chosen address) and a
// cache stub answering one cycle later. Checks the effective address sent
// out, that a forwarded load never reaches the cache and returns the
// buffered word one cycle later, that other loads return the cache's word
// with their tag, and that `ready` follows the cache.
module tb_load_unit;
  import mtss_pkg::*;
  logic clk = 0, rst = 1, ready, fwd_hit, dc_valid, dc_ready, dc_resp_valid, ev_forward;
  fu_req_t req;
  fu_res_t res;
  logic [XLEN-1:0] fwd_addr, fwd_data, dc_addr, dc_resp_data;
  logic [TID_W-1:0] fwd_tid;
  logic [TAG_W-1:0] dc_id, dc_resp_id;
  int checks = 0, failures = 0, n_fwd = 0, n_dc = 0;
  always #5 clk = ~clk;
  load_unit dut (.*);

  // stubs
  assign fwd_hit  = (fwd_addr[7:0] == 8'h40) && fwd_tid == 1;
  assign fwd_data = 32'hF0F0_0000 | fwd_addr;
  always @(posedge clk) begin
    dc_resp_valid <= dc_valid;
    dc_resp_id    <= dc_id;
    dc_resp_data  <= ~dc_addr;
  end

  initial begin
    req = '0; dc_ready = 1;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 300; n++) begin
      logic [31:0] ea; bit f;
      @(negedge clk);
      dc_ready = $urandom % 5 != 0;
      req = '0; req.valid = 1; req.op = OP_LW; req.tid = TID_W'($urandom % 2);
      req.a = ($urandom % 2) ? 32'h1000 : $urandom; req.imm = ($urandom % 2) ? 16'h40 : $urandom;
      req.tag = $urandom;
      ea = req.a + {{16{req.imm[15]}}, req.imm};
      f = (ea[7:0] == 8'h40) && req.tid == 1;
      #1;
      checks++;
      if (ready != dc_ready || fwd_addr != ea || dc_valid != !f || (!f && (dc_addr != ea || dc_id != req.tag))) begin
        failures++; $display("FAIL request");
      end
      @(posedge clk); #1;
      checks++;
      if (!(res.valid && res.tag == req.tag && res.value == (f ? (32'hF0F0_0000 | ea) : ~ea))) begin
        failures++; $display("FAIL response f=%b", f);
      end
      n_fwd += int'(f); n_dc += int'(!f);
      @(negedge clk) req = '0;
    end
    checks++; if (n_fwd == 0 || n_dc == 0) failures++;
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
