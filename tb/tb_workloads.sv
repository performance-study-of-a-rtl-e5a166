// tb_workloads: small versions of three of the benchmark kernels the core is
// meant for, each written for this core's own instruction set and run on
// all four threads in the homogeneous style (same code, data chosen by
// thread ID):
//   Matrix  - 8x8 integer matrix multiply, each thread computes two rows
//   LL1     - Livermore loop 1 (hydro fragment), single-precision FP,
//             x[k] = q + y[k]*(r*z[k+10] + t*z[k+11]), k = 0..31, 8 per thread
//   Sieve   - sieve of Eratosthenes over 0..127, thread t strikes out the
//             multiples of p = 2+t, 6+t, 10+t
// The core is reset and reloaded before each kernel; main memory keeps its
// contents. Results in memory are compared with values computed here (the
// LL1 operands are small integers, so every FP result is exact and is
// converted here from an integer). Cycles, committed instructions and event
// counts are printed for each kernel.
//
// Every kernel runs on two cores side by side: one with Flexible Result
// Commit over the bottom four blocks (the default) and one that may commit
// only the bottom block. Both must produce the same correct results; the
// test checks that the flexible core never needs more cycles and prints the
// stall counts of both.
module tb_workloads;
  import mtss_pkg::*;

  logic clk = 0, rst = 1, run = 0, clr = 1;
  logic prog_we = 0;
  logic [PC_W-1:0] prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic [NTHREADS-1:0] done_f, done_s;
  logic sbe_f, sbe_s;
  int cyc_f, ins_f, stl_f, flx_f, mis_f, hit_f, mss_f;
  int cyc_s, ins_s, stl_s, flx_s, mis_s, hit_s, mss_s;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  workload_sys #(.NCOMMIT(4)) sf (.clk, .rst, .run, .clr, .prog_we, .prog_addr, .prog_data,
    .thread_done(done_f), .sb_empty(sbe_f), .cycles(cyc_f), .n_instr(ins_f), .n_stall(stl_f),
    .n_flex(flx_f), .n_mis(mis_f), .n_hit(hit_f), .n_miss(mss_f));
  workload_sys #(.NCOMMIT(1)) ss (.clk, .rst, .run, .clr, .prog_we, .prog_addr, .prog_data,
    .thread_done(done_s), .sb_empty(sbe_s), .cycles(cyc_s), .n_instr(ins_s), .n_stall(stl_s),
    .n_flex(flx_s), .n_mis(mis_s), .n_hit(hit_s), .n_miss(mss_s));

  task automatic wr(int a, logic [31:0] v);
    sf.u_mem.mem[a] = v;
    ss.u_mem.mem[a] = v;
  endtask

  function automatic logic [31:0] rd(int c, int a);
    return (c == 0) ? sf.u_mem.mem[a] : ss.u_mem.mem[a];
  endfunction

  function automatic logic [31:0] enc(opcode_e op, int rd, int rs1, int rs2, int imm);
    logic [31:0] w;
    w = {op, 5'(rd), 5'(rs1), 16'(imm)};
    if (rs2 >= 0) w[15:0] = {5'(rs2), 11'(imm)};
    return w;
  endfunction

  // exact integer -> single precision (|v| < 2^24)
  function automatic logic [31:0] i2f(int v);
    int a, e;
    logic [31:0] m;
    if (v == 0) return 32'h0;
    a = (v < 0) ? -v : v;
    e = 0;
    for (int b = 0; b < 24; b++) if (a >= (1 << b)) e = b;
    m = 32'(a) << (23 - e);
    return {v < 0, 8'(127 + e), m[22:0]};
  endfunction

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask


  logic [31:0] prog [32];

  task automatic run_prog(string name, int len);
    run = 0;
    rst = 1;
    clr = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = PC_W'(i); prog_data = prog[i];
    end
    @(negedge clk) prog_we = 0;
    clr = 0;
    run = 1;
    wait (done_f == '1 && done_s == '1);
    wait (sbe_f && sbe_s);
    repeat (3) @(posedge clk);
    $display("%s, flexible commit: cycles=%0d instr=%0d IPC=%0.2f stall=%0d flex=%0d mispredict=%0d hit=%0d miss=%0d",
             name, cyc_f, ins_f, real'(ins_f) / real'(cyc_f), stl_f, flx_f, mis_f, hit_f, mss_f);
    $display("%s, bottom block only: cycles=%0d instr=%0d IPC=%0.2f stall=%0d mispredict=%0d hit=%0d miss=%0d",
             name, cyc_s, ins_s, real'(ins_s) / real'(cyc_s), stl_s, mis_s, hit_s, mss_s);
    checks++;
    if (ins_f != ins_s) begin failures++; $display("FAIL %s: instruction counts differ", name); end
    checks++;
    if (cyc_f > cyc_s) begin failures++; $display("FAIL %s: flexible commit slower", name); end
    checks++;
    if (flx_s != 0) begin failures++; $display("FAIL %s: single-block core committed above the bottom", name); end
  endtask

  localparam int A_B = 32'h000, B_B = 32'h100, C_B = 32'h200;      // matrix
  localparam int Y_B = 32'h300, Z_B = 32'h380, X_B = 32'h440, K_B = 32'h4C0;  // LL1
  localparam int F_B = 32'h500;                                     // sieve flags

  int av [8][8], bv [8][8];

  initial begin
    for (int i = 0; i < 1024; i++) wr(i, 32'h0);
    // ---------------------------------------------------------------- Matrix
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        av[i][j] = i * 3 + j + 1;
        bv[i][j] = (i + 2 * j) % 5 - 1;
        wr((A_B >> 2) + i * 8 + j, av[i][j]);
        wr((B_B >> 2) + i * 8 + j, bv[i][j]);
      end
    prog = '{default: enc(OP_NOP, 0, 0, -1, 0)};
    prog[0]  = enc(OP_TID,  1, 0, -1, 0);
    prog[1]  = enc(OP_ADDI, 3, 0, -1, 1);
    prog[2]  = enc(OP_SLL,  2, 1, 3, 0);        // i = 2*tid
    prog[3]  = enc(OP_ADDI, 4, 2, -1, 2);       // i end
    prog[4]  = enc(OP_ADDI, 9, 0, -1, 5);
    prog[5]  = enc(OP_ADDI, 11, 0, -1, 2);
    prog[6]  = enc(OP_ADDI, 19, 0, -1, 8);
    prog[7]  = enc(OP_ADDI, 5, 0, -1, 0);       // L_i: j = 0
    prog[8]  = enc(OP_ADDI, 6, 0, -1, 0);       // L_j: k = 0
    prog[9]  = enc(OP_ADDI, 7, 0, -1, 0);       // acc = 0
    prog[10] = enc(OP_SLL,  8, 2, 9, 0);        // i*32
    prog[11] = enc(OP_SLL,  15, 5, 11, 0);      // j*4
    prog[12] = enc(OP_SLL,  10, 6, 11, 0);      // L_k: k*4
    prog[13] = enc(OP_ADD,  12, 8, 10, 0);
    prog[14] = enc(OP_LW,   13, 12, -1, A_B);
    prog[15] = enc(OP_SLL,  14, 6, 9, 0);       // k*32
    prog[16] = enc(OP_ADD,  16, 14, 15, 0);
    prog[17] = enc(OP_LW,   17, 16, -1, B_B);
    prog[18] = enc(OP_MUL,  18, 13, 17, 0);
    prog[19] = enc(OP_ADD,  7, 7, 18, 0);
    prog[20] = enc(OP_ADDI, 6, 6, -1, 1);
    prog[21] = enc(OP_BLT,  0, 6, 19, -9);      // -> L_k
    prog[22] = enc(OP_ADD,  20, 8, 15, 0);
    prog[23] = enc(OP_SW,   0, 20, 7, C_B);
    prog[24] = enc(OP_ADDI, 5, 5, -1, 1);
    prog[25] = enc(OP_BLT,  0, 5, 19, -17);     // -> L_j
    prog[26] = enc(OP_ADDI, 2, 2, -1, 1);
    prog[27] = enc(OP_BLT,  0, 2, 4, -20);      // -> L_i
    prog[28] = enc(OP_HALT, 0, 0, -1, 0);
    run_prog("Matrix", 29);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        int c;
        c = 0;
        for (int k = 0; k < 8; k++) c += av[i][k] * bv[k][j];
        for (int q = 0; q < 2; q++) expect_eq($sformatf("core %0d C[%0d][%0d]", q, i, j), rd(q, (C_B >> 2) + i * 8 + j), c);
      end

    // ------------------------------------------------------------------- LL1
    for (int k = 0; k < 32; k++) wr((Y_B >> 2) + k, i2f(k + 1));
    for (int m = 0; m < 43; m++) wr((Z_B >> 2) + m, i2f(m % 7 + 1));
    wr((K_B >> 2) + 0, i2f(2));         // q
    wr((K_B >> 2) + 1, i2f(3));         // r
    wr((K_B >> 2) + 2, i2f(2));         // t
    prog = '{default: enc(OP_NOP, 0, 0, -1, 0)};
    prog[0]  = enc(OP_TID,  1, 0, -1, 0);
    prog[1]  = enc(OP_ADDI, 3, 0, -1, 5);
    prog[2]  = enc(OP_SLL,  2, 1, 3, 0);        // byte offset of k = 8*tid
    prog[3]  = enc(OP_ADDI, 4, 2, -1, 32);
    prog[4]  = enc(OP_LW,   5, 0, -1, K_B);
    prog[5]  = enc(OP_LW,   6, 0, -1, K_B + 4);
    prog[6]  = enc(OP_LW,   7, 0, -1, K_B + 8);
    prog[7]  = enc(OP_LW,   8, 2, -1, Z_B + 40);  // loop: z[k+10]
    prog[8]  = enc(OP_LW,   9, 2, -1, Z_B + 44);  // z[k+11]
    prog[9]  = enc(OP_LW,   10, 2, -1, Y_B);      // y[k]
    prog[10] = enc(OP_FMUL, 11, 6, 8, 0);
    prog[11] = enc(OP_FMUL, 12, 7, 9, 0);
    prog[12] = enc(OP_FADD, 13, 11, 12, 0);
    prog[13] = enc(OP_FMUL, 14, 10, 13, 0);
    prog[14] = enc(OP_FADD, 15, 5, 14, 0);
    prog[15] = enc(OP_ADDI, 16, 2, -1, X_B);
    prog[16] = enc(OP_SW,   0, 16, 15, 0);
    prog[17] = enc(OP_ADDI, 2, 2, -1, 4);
    prog[18] = enc(OP_BLT,  0, 2, 4, -11);        // -> loop
    prog[19] = enc(OP_HALT, 0, 0, -1, 0);
    run_prog("LL1", 20);
    for (int k = 0; k < 32; k++)
      for (int q = 0; q < 2; q++) expect_eq($sformatf("core %0d x[%0d]", q, k), rd(q, (X_B >> 2) + k),
                i2f(2 + (k + 1) * (3 * ((k + 10) % 7 + 1) + 2 * ((k + 11) % 7 + 1))));

    // ----------------------------------------------------------------- Sieve
    prog = '{default: enc(OP_NOP, 0, 0, -1, 0)};
    prog[0]  = enc(OP_TID,  1, 0, -1, 0);
    prog[1]  = enc(OP_ADDI, 2, 1, -1, 2);       // p = 2 + tid
    prog[2]  = enc(OP_ADDI, 3, 0, -1, 12);
    prog[3]  = enc(OP_ADDI, 4, 0, -1, 128);
    prog[4]  = enc(OP_ADDI, 5, 0, -1, 1);
    prog[5]  = enc(OP_ADDI, 6, 0, -1, 2);
    prog[6]  = enc(OP_ADDI, 10, 0, -1, F_B);
    prog[7]  = enc(OP_BGE,  0, 2, 3, 10);       // L_p: p >= 12 -> halt
    prog[8]  = enc(OP_MUL,  7, 2, 2, 0);        // m = p*p
    prog[9]  = enc(OP_BGE,  0, 7, 4, 6);        // L_m: m >= 128 -> next p
    prog[10] = enc(OP_SLL,  8, 7, 6, 0);
    prog[11] = enc(OP_ADD,  11, 8, 10, 0);
    prog[12] = enc(OP_SW,   0, 11, 5, 0);       // flag[m] = 1
    prog[13] = enc(OP_ADD,  7, 7, 2, 0);
    prog[14] = enc(OP_JAL,  31, 0, -1, -5);     // -> L_m
    prog[15] = enc(OP_ADDI, 2, 2, -1, 4);
    prog[16] = enc(OP_JAL,  31, 0, -1, -9);     // -> L_p
    prog[17] = enc(OP_HALT, 0, 0, -1, 0);
    run_prog("Sieve", 18);
    for (int m = 2; m < 128; m++) begin
      bit comp;
      comp = 0;
      for (int d = 2; d * d <= m; d++) if (m % d == 0) comp = 1;
      for (int q = 0; q < 2; q++) expect_eq($sformatf("core %0d flag[%0d]", q, m), rd(q, (F_B >> 2) + m), 32'(comp));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
