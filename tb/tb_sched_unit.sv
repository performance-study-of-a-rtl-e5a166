// tb_sched_unit: the scheduling unit with a stand-in execution unit written
// here (every unit returns a + b + imm; the divider class after 20 cycles,
// the rest after 1; a control transfer with imm = 99 reports a
// misprediction to PC 77). Directed phases check:
//  1. Flexible Result Commit: a block of another thread commits from above a
//     stalled bottom block; a block of the stalled thread does not.
//  2. Selective squash: only younger entries of the mispredicting thread
//     are discarded (not written at commit, tags reported), with a redirect.
//  3. Tag dependencies resolved through write back, values committed to the
//     right {thread, register}.
//  4. Oldest-first issue when more instructions are ready than units.
//  5. A scheduling unit stall when all eight blocks are waiting.
module tb_sched_unit;
  import mtss_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid, in_ready;
  logic [TID_W-1:0] in_tid;
  dec_t [FETCH_W-1:0] in_d;
  su_view_t [SU_ENTRIES-1:0] view;
  fu_req_t [NFU-1:0] issue;
  logic [NFU-1:0] fu_ready;
  fu_res_t [NFU-1:0] wb;
  logic redirect_valid, halt_commit, ev_stall, ev_commit, ev_flex_commit, ev_bypass;
  logic [TID_W-1:0] redirect_tid, halt_tid;
  logic [PC_W-1:0] redirect_pc;
  logic [NTAGS-1:0] kill_tags, commit_tags, free_tags;
  logic [FETCH_W-1:0] rf_we;
  logic [FETCH_W-1:0][PREG_W-1:0] rf_waddr;
  logic [FETCH_W-1:0][XLEN-1:0] rf_wdata;
  bp_upd_t [FETCH_W-1:0] bp_upd;
  logic [2:0] ev_ninstr;
  logic [3:0] ev_nissue;
  int checks = 0, failures = 0;
  int cyc = 0, n_flex = 0, n_stall = 0, n_redirect = 0;
  always #5 clk = ~clk;
  sched_unit dut (.*);

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- stand-in execution unit
  typedef struct { int due; int k; fu_res_t r; } pend_t;
  pend_t pq [$];
  always_comb begin
    wb = '0;
    foreach (pq[i]) if (pq[i].due == cyc) wb[pq[i].k] = pq[i].r;
  end
  always @(posedge clk) begin
    pend_t keep [$];
    foreach (pq[i]) if (pq[i].due > cyc) keep.push_back(pq[i]);
    pq = keep;
    for (int k = 0; k < NFU; k++) if (issue[k].valid) begin
      pend_t p;
      p.k = k;
      p.due = cyc + ((fu_class(k) == FU_DIV) ? 20 : 1);
      p.r = '0;
      p.r.valid = 1; p.r.tag = issue[k].tag;
      p.r.value = issue[k].a + issue[k].b + sext16(issue[k].imm);
      if (fu_class(k) == FU_CT && issue[k].imm == 99) begin
        p.r.mispredict = 1; p.r.taken = 1; p.r.target = 77;
      end
      pq.push_back(p);
    end
    cyc++;
  end

  // ---------------- commit log
  int wr_val [int];     // {tid,reg} -> value
  int wr_cyc [int];     // {tid,reg} -> cycle
  logic [NTAGS-1:0] killed_seen;
  always @(posedge clk) if (!rst) begin
    for (int s = 0; s < FETCH_W; s++) if (rf_we[s]) begin
      wr_val[rf_waddr[s]] = rf_wdata[s];
      wr_cyc[rf_waddr[s]] = cyc;
    end
    killed_seen |= kill_tags;
    n_flex += int'(ev_flex_commit);
    n_stall += int'(ev_stall);
    if (redirect_valid) begin
      n_redirect++;
      chk(redirect_tid == 2 && redirect_pc == 77, "redirect target");
    end
  end

  int tagc = 0;
  function automatic dec_t mk(logic [5:0] op, int rd, int a, int imm, int src_tag = -1);
    dec_t d;
    d = '0;
    d.valid = 1; d.tag = TAG_W'(tagc); tagc = (tagc + 1) % NTAGS;
    d.op = op; d.fu = op_class(op); d.has_dest = !(d.fu inside {FU_CT, FU_ST, FU_NONE});
    d.rd = RREG_W'(rd); d.imm = 16'(imm);
    d.s2_rdy = 1;
    if (src_tag >= 0) begin d.s1_rdy = 0; d.s1_tag = TAG_W'(src_tag); end
    else begin d.s1_rdy = 1; d.s1_val = a; end
    return d;
  endfunction

  task automatic put(int tid, dec_t d0, dec_t d1 = '0, dec_t d2 = '0, dec_t d3 = '0);
    @(negedge clk);
    in_valid = 1; in_tid = TID_W'(tid); in_d = '{d3, d2, d1, d0};
    while (!in_ready) @(negedge clk);
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    dec_t a0, c1, b40;
    int flex0;
    in_valid = 0; in_tid = '0; in_d = '0; fu_ready = '1; killed_seen = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    // ---- phases 1-3
    a0 = mk(OP_DIV, 1, 5, 0);
    put(0, a0, mk(OP_ADD, 2, 0, 0, a0.tag));              // rd2 waits on the divide
    put(1, mk(OP_ADD, 3, 10, 1), mk(OP_ADD, 4, 20, 2));
    put(0, mk(OP_ADD, 5, 7, 0));
    c1 = mk(OP_ADD, 6, 1, 0);
    put(2, mk(OP_BEQ, 0, 0, 99, a0.tag), c1);               // mispredicts once the divide is back
    b40 = mk(OP_ADD, 7, 1, 0);
    put(2, b40);
    put(3, mk(OP_ADD, 8, 3, 0));
    repeat (40) @(negedge clk);
    chk(wr_val.exists({2'd0, 5'd1}) && wr_val[{2'd0, 5'd1}] == 5, "divide result");
    chk(wr_val.exists({2'd0, 5'd2}) && wr_val[{2'd0, 5'd2}] == 5, "dependent result");
    chk(wr_val.exists({2'd1, 5'd3}) && wr_val[{2'd1, 5'd3}] == 11, "t1 r3");
    chk(wr_val.exists({2'd1, 5'd4}) && wr_val[{2'd1, 5'd4}] == 22, "t1 r4");
    chk(wr_val.exists({2'd0, 5'd5}) && wr_val[{2'd0, 5'd5}] == 7, "t0 r5");
    chk(wr_val.exists({2'd3, 5'd8}) && wr_val[{2'd3, 5'd8}] == 3, "t3 r8");
    chk(!wr_val.exists({2'd2, 5'd6}), "squashed slot after branch not written");
    chk(!wr_val.exists({2'd2, 5'd7}), "squashed block not written");
    chk(killed_seen[c1.tag] && killed_seen[b40.tag], "kill tags reported");
    chk(!killed_seen[a0.tag], "other threads untouched");
    chk(wr_cyc[{2'd1, 5'd3}] < wr_cyc[{2'd0, 5'd1}], "thread 1 committed past stalled thread 0");
    chk(wr_cyc[{2'd0, 5'd5}] > wr_cyc[{2'd0, 5'd1}], "thread 0 kept in order");
    chk(n_flex > 0, "flexible commit happened");
    chk(n_redirect == 1, "one redirect");
    flex0 = n_flex;
    // ---- phase 4: oldest first with units held busy
    @(negedge clk) fu_ready = '0;
    put(3, mk(OP_ADD, 10, 1, 0), mk(OP_ADD, 11, 1, 0), mk(OP_ADD, 12, 1, 0), mk(OP_ADD, 13, 1, 0));
    put(1, mk(OP_ADD, 14, 1, 0), mk(OP_ADD, 15, 1, 0), mk(OP_ADD, 16, 1, 0), mk(OP_ADD, 17, 1, 0));
    @(negedge clk) fu_ready = '1;
    #1;
    for (int k = 0; k < N_ALU; k++)
      chk(issue[k].valid && issue[k].tid == 3 && issue[k].tag == TAG_W'(tagc - 8 + k), "oldest first");
    repeat (10) @(negedge clk);
    for (int r = 10; r < 18; r++)
      chk(wr_val.exists({(r < 14) ? 2'd3 : 2'd1, 5'(r)}), "phase 4 commit");
    // ---- phase 5: stall with every block waiting on a divide
    for (int b = 0; b < SU_BLOCKS; b++) put(b % 4, mk(OP_DIV, 20 + b, b, 0));
    @(negedge clk);
    in_valid = 1; in_tid = 0; in_d = '{'0, '0, '0, mk(OP_ADD, 30, 4, 0)};
    #1;
    chk(!in_ready, "full scheduling unit refuses a block");
    while (!in_ready) @(negedge clk);
    @(negedge clk) in_valid = 0;
    repeat (200) @(negedge clk);
    chk(n_stall > 0, "stall counted");
    for (int b = 0; b < SU_BLOCKS; b++)
      chk(wr_val.exists({2'(b % 4), 5'(20 + b)}) && wr_val[{2'(b % 4), 5'(20 + b)}] == b, "phase 5 results");
    chk(wr_val.exists({2'd0, 5'd30}) && wr_val[{2'd0, 5'd30}] == 4, "stalled block got in");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
