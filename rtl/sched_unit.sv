// sched_unit: the scheduling unit (SU), i.e. the combined reorder buffer and
// instruction window with its dynamic scheduling logic.
//
// Organisation (document): NBLK blocks of FETCH_W entries (8 x 4 = 32) kept in
// FIFO order, oldest block at the bottom (index 0). A decoded block enters at
// the lowest free block position; when a block leaves, the blocks above it
// shift down by one. Each block belongs to one thread (a fetched block is
// single-threaded), so the thread ID field is held per block.
//
// Issue: "oldest first". Entries are examined from the bottom up and every
// entry whose operands are available is sent to a free unit of its class, up
// to ISSUE_W (8) per cycle. A result on a write-back bus in the same cycle
// counts as available (bypassing). Loads and stores of one thread issue in
// program order (this design's reading of the document's "restricted
// load/store policy").
//
// Write back: every unit has its own result bus; the entry with the matching
// tag takes the result, and waiting operands with that tag capture it. Tags
// are unique across threads, so the thread ID plays no part here.
//
// Selective squash: when the control transfer unit reports a misprediction,
// only entries above the branch *and* of the same thread are discarded. A
// discarded entry that is still executing stays until its unit returns, so
// that its tag cannot be reused while a result for it is in flight.
//
// Flexible Result Commit: of the bottom NCOMMIT (4) blocks, the lowest one
// whose entries are all finished and whose thread differs from every block
// below it commits: its results go to the register file (one of NCOMMIT
// block positions is multiplexed onto the write ports) and it leaves the SU.
// With NCOMMIT = 1 only the bottom block may commit. When no block commits
// and the SU is full, an arriving block is refused: a scheduling unit stall.
//
// Timing: issue requests are combinational from the registered state;
// results, squashes, commit and insertion all take effect at one clock edge.
module sched_unit
  import mtss_pkg::*;
#(
  parameter int unsigned NBLK    = SU_BLOCKS,
  parameter int unsigned NCOMMIT = COMMIT_BLOCKS
)(
  input  logic                               clk,
  input  logic                               rst,
  // from the decoder
  input  logic                               in_valid,
  input  logic [TID_W-1:0]                   in_tid,
  input  dec_t [FETCH_W-1:0]                 in_d,
  output logic                               in_ready,
  output su_view_t [NBLK*FETCH_W-1:0]        view,
  // execution unit
  output fu_req_t [NFU-1:0]                  issue,
  input  logic [NFU-1:0]                     fu_ready,
  input  fu_res_t [NFU-1:0]                  wb,
  // misprediction
  output logic                               redirect_valid,
  output logic [TID_W-1:0]                   redirect_tid,
  output logic [PC_W-1:0]                    redirect_pc,
  output logic [NTAGS-1:0]                   kill_tags,
  // result commit
  output logic [FETCH_W-1:0]                 rf_we,
  output logic [FETCH_W-1:0][PREG_W-1:0]     rf_waddr,
  output logic [FETCH_W-1:0][XLEN-1:0]       rf_wdata,
  output logic [NTAGS-1:0]                   commit_tags,
  output logic [NTAGS-1:0]                   free_tags,
  output bp_upd_t [FETCH_W-1:0]              bp_upd,
  output logic                               halt_commit,
  output logic [TID_W-1:0]                   halt_tid,
  // events
  output logic                               ev_stall,
  output logic                               ev_commit,
  output logic                               ev_flex_commit,
  output logic [$clog2(FETCH_W+1)-1:0]       ev_ninstr,
  output logic [$clog2(NFU+1)-1:0]           ev_nissue,
  output logic                               ev_bypass
);
  logic                   blk_v   [NBLK];
  logic [TID_W-1:0]       blk_tid [NBLK];
  su_entry_t              ent     [NBLK][FETCH_W];
  su_entry_t              upd     [NBLK][FETCH_W];
  logic [NBLK-1:0]        blk_rdy;
  logic                   cfire;
  int unsigned            csel, count, kill_pos;
  logic                   kill_v;
  logic                   sel     [NBLK][FETCH_W];

  // ---------------------------------------------------------------- view
  always_comb
    for (int b = 0; b < NBLK; b++)
      for (int s = 0; s < FETCH_W; s++) begin
        view[b*FETCH_W+s].valid  = blk_v[b] && ent[b][s].d.valid && !ent[b][s].killed &&
                                   ent[b][s].d.has_dest;
        view[b*FETCH_W+s].tid    = blk_tid[b];
        view[b*FETCH_W+s].rd     = ent[b][s].d.rd;
        view[b*FETCH_W+s].tag    = ent[b][s].d.tag;
        view[b*FETCH_W+s].done   = ent[b][s].done;
        view[b*FETCH_W+s].result = ent[b][s].result;
      end

  // ------------------------------------------- write back and mispredicts
  always_comb begin
    kill_v         = 1'b0;
    kill_pos       = 0;
    redirect_valid = 1'b0;
    redirect_tid   = '0;
    redirect_pc    = '0;
    kill_tags      = '0;
    for (int b = 0; b < NBLK; b++)
      for (int s = 0; s < FETCH_W; s++) begin
        upd[b][s] = ent[b][s];
        for (int k = 0; k < NFU; k++) begin
          if (wb[k].valid && blk_v[b] && ent[b][s].d.valid) begin
            if (ent[b][s].issued && !ent[b][s].done && wb[k].tag == ent[b][s].d.tag) begin
              upd[b][s].done      = 1'b1;
              upd[b][s].result    = wb[k].value;
              upd[b][s].ct_taken  = wb[k].taken;
              upd[b][s].ct_target = wb[k].target;
              if (fu_class(k) == FU_CT && wb[k].mispredict && !ent[b][s].killed && !kill_v) begin
                kill_v         = 1'b1;
                kill_pos       = b * FETCH_W + s;
                redirect_valid = 1'b1;
                redirect_tid   = blk_tid[b];
                redirect_pc    = wb[k].target;
              end
            end
            if (!ent[b][s].d.s1_rdy && wb[k].tag == ent[b][s].d.s1_tag) begin
              upd[b][s].d.s1_rdy = 1'b1;
              upd[b][s].d.s1_val = wb[k].value;
            end
            if (!ent[b][s].d.s2_rdy && wb[k].tag == ent[b][s].d.s2_tag) begin
              upd[b][s].d.s2_rdy = 1'b1;
              upd[b][s].d.s2_val = wb[k].value;
            end
          end
        end
      end
    // selective squash: younger entries of the mispredicting thread only
    if (kill_v)
      for (int b = 0; b < NBLK; b++)
        for (int s = 0; s < FETCH_W; s++)
          if (blk_v[b] && blk_tid[b] == redirect_tid && b * FETCH_W + s > kill_pos &&
              ent[b][s].d.valid && !ent[b][s].killed) begin
            upd[b][s].killed = 1'b1;
            kill_tags[ent[b][s].d.tag] = 1'b1;
            if (!ent[b][s].issued) upd[b][s].done = 1'b1;
          end
  end

  // ------------------------------------------------------ oldest-first issue
  always_comb begin
    logic [NFU-1:0]      used;
    logic [NTHREADS-1:0] mem_wait;
    int unsigned         n;
    used      = '0;
    mem_wait  = '0;
    n         = 0;
    ev_bypass = 1'b0;
    issue     = '0;
    ev_nissue = '0;
    for (int b = 0; b < NBLK; b++)
      for (int s = 0; s < FETCH_W; s++) begin
        su_entry_t e;
        logic      r1, r2, byp, memop, blocked;
        logic [XLEN-1:0] v1, v2;
        e        = ent[b][s];
        sel[b][s] = 1'b0;
        memop    = e.d.fu inside {FU_LD, FU_ST};
        r1 = e.d.s1_rdy; v1 = e.d.s1_val;
        r2 = e.d.s2_rdy; v2 = e.d.s2_val;
        byp = 1'b0;
        blocked = 1'b0;
        for (int k = 0; k < NFU; k++) begin
          if (!r1 && wb[k].valid && wb[k].tag == e.d.s1_tag) begin r1 = 1'b1; v1 = wb[k].value; byp = 1'b1; end
          if (!r2 && wb[k].valid && wb[k].tag == e.d.s2_tag) begin r2 = 1'b1; v2 = wb[k].value; byp = 1'b1; end
        end
        if (blk_v[b] && e.d.valid && !e.killed && !e.issued && !e.done && e.d.fu != FU_NONE) begin
          blocked = memop && mem_wait[blk_tid[b]];
          if (memop) mem_wait[blk_tid[b]] = 1'b1;
          if (r1 && r2 && !blocked && n < ISSUE_W) begin
            for (int k = 0; k < NFU; k++)
              if (!sel[b][s] && !used[k] && fu_ready[k] && fu_class(k) == e.d.fu) begin
                used[k]             = 1'b1;
                sel[b][s]           = 1'b1;
                issue[k].valid      = 1'b1;
                issue[k].tag        = e.d.tag;
                issue[k].tid        = blk_tid[b];
                issue[k].op         = e.d.op;
                issue[k].a          = v1;
                issue[k].b          = v2;
                issue[k].imm        = e.d.imm;
                issue[k].pc         = e.d.pc;
                issue[k].pred_taken = e.d.pred_taken;
                issue[k].pred_target = e.d.pred_target;
              end
            if (sel[b][s]) begin
              n++;
              if (byp) ev_bypass = 1'b1;
            end
          end
        end
      end
    ev_nissue = ($clog2(NFU+1))'(n);
  end

  // ------------------------------------------------ Flexible Result Commit
  always_comb begin
    cfire = 1'b0;
    csel  = 0;
    count = 0;
    for (int b = 0; b < NBLK; b++) begin
      blk_rdy[b] = blk_v[b];
      for (int s = 0; s < FETCH_W; s++)
        if (ent[b][s].d.valid && !ent[b][s].done) blk_rdy[b] = 1'b0;
      if (blk_v[b]) count++;
    end
    for (int b = 0; b < NCOMMIT && b < NBLK; b++) begin
      logic clash;
      clash = 1'b0;
      for (int j = 0; j < b; j++)
        if (blk_v[j] && blk_tid[j] == blk_tid[b]) clash = 1'b1;
      if (!cfire && blk_rdy[b] && !clash) begin
        cfire = 1'b1;
        csel  = b;
      end
    end

    rf_we       = '0;
    rf_waddr    = '0;
    rf_wdata    = '0;
    commit_tags = '0;
    free_tags   = '0;
    bp_upd      = '0;
    halt_commit = 1'b0;
    halt_tid    = blk_tid[csel];
    ev_ninstr   = '0;
    for (int s = 0; s < FETCH_W; s++) begin
        su_entry_t e;
        e = ent[csel][s];
        if (cfire && e.d.valid) begin
          free_tags[e.d.tag] = 1'b1;
          if (!e.killed) begin
            ev_ninstr++;
            commit_tags[e.d.tag] = 1'b1;
            rf_we[s]    = e.d.has_dest;
            rf_waddr[s] = {blk_tid[csel], e.d.rd};
            rf_wdata[s] = e.result;
            if (e.d.fu == FU_CT) begin
              bp_upd[s].valid  = 1'b1;
              bp_upd[s].pc     = e.d.pc;
              bp_upd[s].taken  = e.ct_taken;
              bp_upd[s].target = e.ct_target;
            end
            if (e.d.op == OP_HALT) halt_commit = 1'b1;
          end
        end
      end
  end

  assign in_ready       = (count < NBLK) || cfire;
  assign ev_stall       = in_valid && !in_ready;
  assign ev_commit      = cfire;
  assign ev_flex_commit = cfire && csel != 0;

  // ---------------------------------------------------------- state update
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int b = 0; b < NBLK; b++) begin
        blk_v[b]   <= 1'b0;
        blk_tid[b] <= '0;
        for (int s = 0; s < FETCH_W; s++) ent[b][s] <= '0;
      end
    end else begin
      su_entry_t nx [NBLK][FETCH_W];
      logic      nv [NBLK];
      logic [TID_W-1:0] nt [NBLK];
      int unsigned ins;
      for (int b = 0; b < NBLK; b++) begin
        nv[b] = blk_v[b];
        nt[b] = blk_tid[b];
        for (int s = 0; s < FETCH_W; s++) begin
          nx[b][s] = upd[b][s];
          if (sel[b][s]) nx[b][s].issued = 1'b1;
        end
      end
      if (cfire) begin
        for (int b = 0; b < NBLK; b++)
          if (b >= csel) begin
            if (b + 1 < NBLK) begin
              nv[b] = nv[b+1];
              nt[b] = nt[b+1];
              for (int s = 0; s < FETCH_W; s++) nx[b][s] = nx[b+1][s];
            end else begin
              nv[b] = 1'b0;
              for (int s = 0; s < FETCH_W; s++) nx[b][s] = '0;
            end
          end
      end
      ins = cfire ? count - 1 : count;
      if (in_valid && in_ready && !(kill_v && in_tid == redirect_tid) && ins < NBLK) begin
        nv[ins] = 1'b1;
        nt[ins] = in_tid;
        for (int s = 0; s < FETCH_W; s++) begin
          su_entry_t e;
          e        = '0;
          e.d      = in_d[s];
          e.done   = in_d[s].valid && in_d[s].fu == FU_NONE;
          for (int k = 0; k < NFU; k++) begin
            if (wb[k].valid && !e.d.s1_rdy && wb[k].tag == e.d.s1_tag) begin
              e.d.s1_rdy = 1'b1; e.d.s1_val = wb[k].value;
            end
            if (wb[k].valid && !e.d.s2_rdy && wb[k].tag == e.d.s2_tag) begin
              e.d.s2_rdy = 1'b1; e.d.s2_val = wb[k].value;
            end
          end
          nx[ins][s] = e;
        end
      end
      for (int b = 0; b < NBLK; b++) begin
        blk_v[b]   <= nv[b];
        blk_tid[b] <= nt[b];
        for (int s = 0; s < FETCH_W; s++) ent[b][s] <= nx[b][s];
      end
    end
  end

`ifndef SYNTHESIS
  // blocks are kept as a contiguous run from the bottom
  property p_compact;
    @(posedge clk) disable iff (rst)
      1'b1 |-> (blk_v[NBLK-1] -> blk_v[0]);
  endproperty
  a_compact: assert property (p_compact);
`endif
endmodule
