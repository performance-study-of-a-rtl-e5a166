// tb_fetch_unit: runs the instruction unit against an instruction store and
// a predictor stub (PC 6 predicted taken to 22) and compares every fetched
// block with a model of the policy: strict round robin over the four threads
// every cycle, aligned blocks, slots before the PC invalid, block cut after a
// predicted-taken slot or a HALT, a halted thread fetching nothing, refused
// blocks fetched again, and redirects reloading a thread's PC.
module tb_fetch_unit;
  import mtss_pkg::*;
  logic clk = 0, rst = 1, run = 0;
  logic [PC_W-1:0] imem_pc;
  logic [FETCH_W-1:0][XLEN-1:0] imem_block;
  logic [FETCH_W-1:0][PC_W-1:0] bp_pc, bp_target;
  logic [FETCH_W-1:0] bp_taken;
  fetch_blk_t blk;
  logic accept, redirect_valid;
  logic [TID_W-1:0] redirect_tid;
  logic [PC_W-1:0] redirect_pc;
  logic [NTHREADS-1:0] halted;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  fetch_unit dut (.*);

  logic [31:0] prog [64];
  always_comb
    for (int i = 0; i < FETCH_W; i++) begin
      imem_block[i] = prog[(imem_pc & ~16'd3) + i];
      bp_taken[i]   = (bp_pc[i] == 6);
      bp_target[i]  = 22;
    end

  int mpc [NTHREADS];
  bit mhalt [NTHREADS];
  int rr = 0;

  task automatic check_cycle(bit acc, bit rv, int rt, int rp);
    logic [FETCH_W-1:0] sv; int nxt; bit stop, hs, vld;
    @(negedge clk);
    run = 1; accept = acc; redirect_valid = rv; redirect_tid = TID_W'(rt); redirect_pc = PC_W'(rp);
    #1;
    vld = !mhalt[rr] && !(rv && rt == rr);
    sv = '0; stop = 0; hs = 0; nxt = (mpc[rr] & ~3) + 4;
    for (int i = 0; i < 4; i++) begin
      int p; p = (mpc[rr] & ~3) + i;
      if (!stop && i >= mpc[rr] % 4) begin
        sv[i] = 1;
        if (prog[p][31:26] == OP_HALT) begin stop = 1; hs = 1; end
        else if (p == 6) begin stop = 1; nxt = 22; end
      end
    end
    if (!vld) sv = '0;
    checks++;
    if (blk.valid != vld || blk.tid != TID_W'(rr) || blk.slot_valid != sv ||
        (vld && blk.pc[0] != PC_W'(mpc[rr] & ~3))) begin
      failures++;
      $display("FAIL tid %0d/%0d valid %b/%b sv %b/%b pc %0d/%0d", blk.tid, rr, blk.valid, vld,
               blk.slot_valid, sv, blk.pc[0], mpc[rr] & ~3);
    end
    @(posedge clk);
    if (vld && acc) begin mpc[rr] = nxt; if (hs) mhalt[rr] = 1; end
    if (rv) begin mpc[rt] = rp; mhalt[rt] = 0; end
    rr = (rr + 1) % NTHREADS;
  endtask

  initial begin
    for (int i = 0; i < 64; i++) prog[i] = {OP_ADD, 26'd0};
    prog[29] = {OP_HALT, 26'd0};
    for (int t = 0; t < NTHREADS; t++) begin mpc[t] = 0; mhalt[t] = 0; end
    accept = 1; redirect_valid = 0; redirect_tid = '0; redirect_pc = '0;
    repeat (2) @(posedge clk);
    rst <= 0;

    for (int n = 0; n < 400; n++) begin
      bit acc, rv; int rt, rp;
      acc = ($urandom % 5) != 0;
      rv  = ($urandom % 7) == 0;
      rt  = $urandom % NTHREADS;
      rp  = $urandom % 30;
      check_cycle(acc, rv, rt, rp);
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
