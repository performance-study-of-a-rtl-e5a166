// tb_exec_unit: sends one operation to every unit of the execution unit at
// once and checks that each answer comes back on that unit's own result bus
// with the unit's latency from the default table (ALU 1, multiply 2, divide
// 15, load 1 on a hit, store 1, control transfer 1, FP add 3, FP multiply 6,
// FP divide 40) and the right value.
module tb_exec_unit;
  import mtss_pkg::*;
  logic clk = 0, rst = 1;
  fu_req_t [NFU-1:0] issue;
  logic [NFU-1:0] fu_ready;
  fu_res_t [NFU-1:0] wb;
  logic sb_push, sb_full, fwd_hit, dc_valid, dc_ready, dc_resp_valid, ev_forward;
  logic [TID_W-1:0] sb_tid, fwd_tid;
  logic [TAG_W-1:0] sb_tag, dc_id, dc_resp_id;
  logic [XLEN-1:0] sb_addr, sb_data, fwd_addr, fwd_data, dc_addr, dc_resp_data;
  int checks = 0, failures = 0;
  int lat [NFU];
  logic [31:0] expv [NFU];
  always #5 clk = ~clk;
  exec_unit dut (.*);

  assign sb_full = 0;
  assign fwd_hit = 0;
  assign fwd_data = 0;
  assign dc_ready = 1;
  always @(posedge clk) begin
    dc_resp_valid <= dc_valid; dc_resp_id <= dc_id; dc_resp_data <= dc_addr + 1;
  end

  initial begin
    issue = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int k = 0; k < NFU; k++) begin
      issue[k].valid = 1; issue[k].tag = TAG_W'(k + 1);
      issue[k].a = 32'd12; issue[k].b = 32'd4;
      case (fu_class(k))
        FU_ALU:  begin issue[k].op = OP_SUB; expv[k] = 8;  lat[k] = 1; end
        FU_MUL:  begin issue[k].op = OP_MUL; expv[k] = 48; lat[k] = 2; end
        FU_DIV:  begin issue[k].op = OP_DIV; expv[k] = 3;  lat[k] = 15; end
        FU_LD:   begin issue[k].op = OP_LW;  expv[k] = 13; lat[k] = 1; end
        FU_ST:   begin issue[k].op = OP_SW;  expv[k] = 0;  lat[k] = 1; end
        FU_CT:   begin issue[k].op = OP_JAL; issue[k].pc = 16'd9; expv[k] = 10; lat[k] = 1; end
        FU_FADD: begin issue[k].op = OP_FADD; issue[k].a = 32'h40C00000; issue[k].b = 32'h3FC00000;
                       expv[k] = 32'h40F00000; lat[k] = 3; end
        FU_FMUL: begin issue[k].op = OP_FMUL; issue[k].a = 32'h40C00000; issue[k].b = 32'h3FC00000;
                       expv[k] = 32'h41100000; lat[k] = 6; end
        default: begin issue[k].op = OP_FDIV; issue[k].a = 32'h40C00000; issue[k].b = 32'h3FC00000;
                       expv[k] = 32'h40800000; lat[k] = 40; end
      endcase
    end
    #1;
    checks++; if (!(sb_push && sb_addr == 12 && sb_data == 4)) begin failures++; $display("FAIL store push"); end
    for (int c = 1; c <= 41; c++) begin
      @(negedge clk);
      issue = '0;
      for (int k = 0; k < NFU; k++) begin
        if (c == lat[k]) begin
          checks++;
          if (!(wb[k].valid && wb[k].tag == TAG_W'(k + 1) && (fu_class(k) == FU_ST || wb[k].value == expv[k]))) begin
            failures++; $display("FAIL unit %0d at %0d: v=%b val=%h", k, c, wb[k].valid, wb[k].value);
          end
        end else if (wb[k].valid) begin
          failures++; $display("FAIL unit %0d early/late at %0d", k, c);
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
