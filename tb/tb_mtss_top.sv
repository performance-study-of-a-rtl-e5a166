// tb_mtss_top: end-to-end test of the four-thread core at its default sizes.
//
// All four threads run the same program (homogeneous multitasking) and pick
// their data by thread ID. Each thread: a counted loop of loads, multiplies
// and adds over its own array, integer divide and remainder, a store
// followed by a load of the same word (store-buffer forwarding), the four FP
// operations, and a jump over a store that must never reach memory. The
// results in memory are compared with values computed here. The test also
// counts how often each mechanism of the design occurred (scheduling-unit
// stall, Flexible Result Commit from a block above the bottom one, branch
// misprediction with selective squash, cache hit, cache miss, store-buffer
// forwarding, result bypass) and fails any that never happened.
module tb_mtss_top;
  import mtss_pkg::*;

  logic clk = 0, rst = 1, run = 0;
  logic prog_we = 0;
  logic [PC_W-1:0] prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic mem_rd_valid, mem_rd_resp_valid, mem_wr_valid, mem_wr_ready;
  logic [31:0] mem_rd_addr, mem_wr_addr, mem_wr_data;
  logic [127:0] mem_rd_resp_data;
  logic [NTHREADS-1:0] thread_done;
  logic sb_empty, ev_stall, ev_commit, ev_flex_commit, ev_mispredict;
  logic ev_dc_hit, ev_dc_miss, ev_forward, ev_bypass;
  logic [2:0] ev_ninstr;
  logic [3:0] ev_nissue;

  int checks = 0, failures = 0;
  int n_stall = 0, n_flex = 0, n_mis = 0, n_hit = 0, n_miss = 0, n_fwd = 0, n_byp = 0;
  int n_instr = 0, cycles = 0;

  always #5 clk = ~clk;

  mtss_top dut (.*);

  main_memory #(.WORDS(1024), .LAT(10)) u_mem (
    .clk, .rd_valid(mem_rd_valid), .rd_addr(mem_rd_addr), .resp_valid(mem_rd_resp_valid),
    .resp_data(mem_rd_resp_data), .wr_valid(mem_wr_valid), .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data), .wr_ready(mem_wr_ready));

  function automatic logic [31:0] enc(opcode_e op, int rd, int rs1, int rs2, int imm);
    logic [31:0] w;
    w = {op, 5'(rd), 5'(rs1), 16'(imm)};
    if (rs2 >= 0) w[15:0] = {5'(rs2), 11'(imm)};
    return w;
  endfunction

  logic [31:0] prog [38];
  initial begin
    prog[0]  = enc(OP_TID,  1, 0, -1, 0);
    prog[1]  = enc(OP_ADDI, 3, 0, -1, 6);
    prog[2]  = enc(OP_SLL,  2, 1, 3, 0);        // r2 = tid*64
    prog[3]  = enc(OP_ADDI, 4, 2, -1, 256);     // array base
    prog[4]  = enc(OP_ADDI, 5, 2, -1, 2048);    // output base
    prog[5]  = enc(OP_ADDI, 6, 0, -1, 0);       // i
    prog[6]  = enc(OP_ADDI, 7, 0, -1, 0);       // sum
    prog[7]  = enc(OP_ADDI, 8, 0, -1, 8);       // N
    prog[8]  = enc(OP_LW,   9, 4, -1, 0);
    prog[9]  = enc(OP_ADDI, 10, 6, -1, 1);
    prog[10] = enc(OP_MUL,  11, 9, 10, 0);
    prog[11] = enc(OP_ADD,  7, 7, 11, 0);
    prog[12] = enc(OP_ADDI, 4, 4, -1, 4);
    prog[13] = enc(OP_ADDI, 6, 6, -1, 1);
    prog[14] = enc(OP_BLT,  0, 6, 8, -6);       // back to 8
    prog[15] = enc(OP_SW,   0, 5, 7, 0);
    prog[16] = enc(OP_ADDI, 12, 1, -1, 1);
    prog[17] = enc(OP_DIV,  13, 7, 12, 0);
    prog[18] = enc(OP_REM,  14, 7, 12, 0);
    prog[19] = enc(OP_SW,   0, 5, 13, 4);
    prog[20] = enc(OP_SW,   0, 5, 14, 8);
    prog[21] = enc(OP_LW,   15, 5, -1, 4);
    prog[22] = enc(OP_ADDI, 15, 15, -1, 1);
    prog[23] = enc(OP_SW,   0, 5, 15, 12);
    prog[24] = enc(OP_LW,   16, 0, -1, 1024);
    prog[25] = enc(OP_LW,   17, 0, -1, 1028);
    prog[26] = enc(OP_FADD, 18, 16, 17, 0);
    prog[27] = enc(OP_FMUL, 19, 16, 17, 0);
    prog[28] = enc(OP_FDIV, 20, 16, 17, 0);
    prog[29] = enc(OP_SW,   0, 5, 18, 16);
    prog[30] = enc(OP_SW,   0, 5, 19, 20);
    prog[31] = enc(OP_SW,   0, 5, 20, 24);
    prog[32] = enc(OP_FSUB, 21, 16, 17, 0);
    prog[33] = enc(OP_SW,   0, 5, 21, 28);
    prog[34] = enc(OP_JAL,  22, 0, -1, 2);      // to 36
    prog[35] = enc(OP_SW,   0, 5, 3, 36);       // wrong path only
    prog[36] = enc(OP_SW,   0, 5, 22, 32);
    prog[37] = enc(OP_HALT, 0, 0, -1, 0);
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  always @(posedge clk) if (run) begin
    cycles++;
    n_stall += int'(ev_stall);
    n_flex  += int'(ev_flex_commit);
    n_mis   += int'(ev_mispredict);
    n_hit   += int'(ev_dc_hit);
    n_miss  += int'(ev_dc_miss);
    n_fwd   += int'(ev_forward);
    n_byp   += int'(ev_bypass);
    n_instr += int'(ev_ninstr);
  end

  initial begin
    for (int i = 0; i < 1024; i++) u_mem.mem[i] = 32'hDEADBEEF;
    for (int t = 0; t < NTHREADS; t++)
      for (int i = 0; i < 8; i++) u_mem.mem[(256 + t*64)/4 + i] = t*100 + i*3 + 1;
    u_mem.mem[1024/4] = 32'h40C00000;   // 6.0
    u_mem.mem[1028/4] = 32'h3FC00000;   // 1.5
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 38; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = PC_W'(i); prog_data = prog[i];
    end
    @(negedge clk) prog_we = 0;
    run = 1;
    wait (thread_done == '1);
    wait (sb_empty);
    repeat (5) @(posedge clk);
    for (int t = 0; t < NTHREADS; t++) begin
      int sum, base;
      sum = 0;
      for (int i = 0; i < 8; i++) sum += (t*100 + i*3 + 1) * (i + 1);
      base = (2048 + t*64) / 4;
      expect_eq($sformatf("t%0d sum", t),  u_mem.mem[base+0], sum);
      expect_eq($sformatf("t%0d div", t),  u_mem.mem[base+1], sum / (t + 1));
      expect_eq($sformatf("t%0d rem", t),  u_mem.mem[base+2], sum % (t + 1));
      expect_eq($sformatf("t%0d fwd", t),  u_mem.mem[base+3], sum / (t + 1) + 1);
      expect_eq($sformatf("t%0d fadd", t), u_mem.mem[base+4], 32'h40F00000);  // 7.5
      expect_eq($sformatf("t%0d fmul", t), u_mem.mem[base+5], 32'h41100000);  // 9.0
      expect_eq($sformatf("t%0d fdiv", t), u_mem.mem[base+6], 32'h40800000);  // 4.0
      expect_eq($sformatf("t%0d fsub", t), u_mem.mem[base+7], 32'h40900000);  // 4.5
      expect_eq($sformatf("t%0d jal", t),  u_mem.mem[base+8], 32'd35);
      expect_eq($sformatf("t%0d squash", t), u_mem.mem[base+9], 32'hDEADBEEF);
    end
    // every thread commits 8 + 8*7 + 23 instructions
    expect_eq("committed instructions", n_instr, NTHREADS * (8 + 8*7 + 23 - 1));
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no SU stall"); end
    checks++; if (n_flex  == 0) begin failures++; $display("FAIL no flexible commit"); end
    checks++; if (n_mis   == 0) begin failures++; $display("FAIL no misprediction"); end
    checks++; if (n_hit   == 0) begin failures++; $display("FAIL no cache hit"); end
    checks++; if (n_miss  == 0) begin failures++; $display("FAIL no cache miss"); end
    checks++; if (n_fwd   == 0) begin failures++; $display("FAIL no forwarding"); end
    checks++; if (n_byp   == 0) begin failures++; $display("FAIL no bypass"); end
    $display("cycles=%0d instr=%0d stall=%0d flex=%0d mispredict=%0d hit=%0d miss=%0d fwd=%0d bypass=%0d",
             cycles, n_instr, n_stall, n_flex, n_mis, n_hit, n_miss, n_fwd, n_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
