// fetch_unit: the instruction unit, extended for NTHREADS threads.
//
// It holds one program counter per thread and fetches, each cycle, one block
// of FETCH_W contiguous instructions, all from the same thread, choosing the
// thread with the True Round Robin policy of the document: a modulo-N counter
// that advances on every clock tick whatever the state of the threads, so
// thread k gets the fetch slot every N cycles. Blocks are aligned: slots before
// the PC within its block are invalid (this alignment is this design's reading
// of the document's remark that branch targets in mid-block waste slots).
//
// Each slot is looked up in the shared branch predictor; the block ends after
// the first slot predicted taken, and the thread's PC moves to its target,
// otherwise to the next block. A HALT instruction (this design's own) ends the
// block and stops fetching for that thread. A redirect from the scheduling
// unit (a mispredicted control transfer of one thread) reloads that thread's
// PC, restarts it if halted, and cancels its fetch in the same cycle.
// If the scheduling unit cannot accept the block, the PC stays and the thread
// tries again at its next turn.
//
// Interface: combinational fetch (instruction memory and predictor are read
// in the same cycle), PCs and counter update at the clock edge.
module fetch_unit
  import mtss_pkg::*;
#(
  parameter int unsigned N        = NTHREADS,
  parameter logic [PC_W-1:0] RESET_PC = '0
)(
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         run,        // threads released after program load
  // instruction memory
  output logic [PC_W-1:0]              imem_pc,
  input  logic [FETCH_W-1:0][XLEN-1:0] imem_block,
  // branch predictor
  output logic [FETCH_W-1:0][PC_W-1:0] bp_pc,
  input  logic [FETCH_W-1:0]           bp_taken,
  input  logic [FETCH_W-1:0][PC_W-1:0] bp_target,
  // scheduling unit
  output fetch_blk_t                   blk,
  input  logic                         accept,
  input  logic                         redirect_valid,
  input  logic [TID_W-1:0]             redirect_tid,
  input  logic [PC_W-1:0]              redirect_pc,
  output logic [N-1:0]                 halted
);
  logic [PC_W-1:0]  pcs [N];
  logic [TID_W-1:0] rr;
  logic [PC_W-1:0]  base, next_pc;
  logic             halt_seen;

  assign base    = {pcs[rr][PC_W-1:2], 2'b00};
  assign imem_pc = base;
  always_comb
    for (int i = 0; i < FETCH_W; i++) bp_pc[i] = base + PC_W'(i);

  always_comb begin
    logic stop;
    next_pc = base + PC_W'(FETCH_W);
    halt_seen = 1'b0;
    stop    = 1'b0;
    blk     = '0;
    blk.tid = rr;
    blk.valid = run && !halted[rr] && !(redirect_valid && redirect_tid == rr);
    for (int i = 0; i < FETCH_W; i++) begin
      blk.pc[i]         = base + PC_W'(i);
      blk.instr[i]      = imem_block[i];
      blk.pred_taken[i] = 1'b0;
      blk.pred_target[i] = '0;
      if (!stop && 2'(i) >= pcs[rr][1:0]) begin
        blk.slot_valid[i] = 1'b1;
        if (imem_block[i][31:26] == OP_HALT) begin
          stop      = 1'b1;
          halt_seen = 1'b1;
        end else if (bp_taken[i]) begin
          stop               = 1'b1;
          blk.pred_taken[i]  = 1'b1;
          blk.pred_target[i] = bp_target[i];
          next_pc            = bp_target[i];
        end
      end
    end
    if (!blk.valid) blk.slot_valid = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rr <= '0;
      for (int t = 0; t < N; t++) pcs[t] <= RESET_PC;
      halted <= '0;
    end else if (run) begin
      rr <= (rr == TID_W'(N - 1)) ? '0 : rr + 1'b1;
      if (blk.valid && accept) begin
        pcs[rr] <= next_pc;
        if (halt_seen) halted[rr] <= 1'b1;
      end
      if (redirect_valid) begin
        pcs[redirect_tid]    <= redirect_pc;
        halted[redirect_tid] <= 1'b0;
      end
    end
  end
endmodule
