// tb_branch_predictor: trains entries through the commit update port and
// checks predictions against a 2-bit saturating counter model kept here:
// a miss predicts not taken, a taken update allocates at "weakly taken",
// two not-taken updates from there turn the prediction to not taken, and
// the stored target follows the last taken outcome.
module tb_branch_predictor;
  import mtss_pkg::*;
  logic clk = 0, rst = 1;
  logic [FETCH_W-1:0][PC_W-1:0] pc, target;
  logic [FETCH_W-1:0] taken;
  bp_upd_t [FETCH_W-1:0] upd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  branch_predictor #(.ENTRIES(64)) dut (.*);

  // model, keyed by full PC; the test uses distinct index bits per PC
  int ctr [int];
  logic [PC_W-1:0] tgt [int];

  task automatic update(logic [PC_W-1:0] p, logic t, logic [PC_W-1:0] tg);
    @(negedge clk);
    upd = '0; upd[0] = '{valid: 1'b1, pc: p, taken: t, target: tg};
    @(negedge clk) upd = '0;
    if (ctr.exists(p)) begin
      if (t) begin if (ctr[p] < 3) ctr[p]++; tgt[p] = tg; end
      else if (ctr[p] > 0) ctr[p]--;
    end else if (t) begin ctr[p] = 2; tgt[p] = tg; end
  endtask

  task automatic probe(logic [PC_W-1:0] p);
    logic et;
    pc = '0; pc[1] = p; #1;
    et = ctr.exists(p) && ctr[p] >= 2;
    checks++;
    if (taken[1] != et || (et && target[1] != tgt[p])) begin
      failures++; $display("FAIL pc %h taken %b exp %b", p, taken[1], et);
    end
  endtask

  initial begin
    upd = '0; pc = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    probe(16'h0010);
    for (int n = 0; n < 300; n++) begin
      logic [PC_W-1:0] p;
      p = PC_W'(($urandom % 16) * 3 + 16'h0100);
      update(p, $urandom % 3 != 0, PC_W'($urandom));
      probe(p);
    end
    // a PC with the same index but another tag does not hit
    update(16'h0040, 1, 16'h1234);
    probe(16'h0040);
    pc[1] = 16'h0080; #1;
    checks++; if (taken[1]) begin failures++; $display("FAIL alias hit"); end
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
