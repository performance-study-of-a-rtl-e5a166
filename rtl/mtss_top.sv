// mtss_top: a four-thread superscalar processor core in the style of the
// document's SDSP, extended for simultaneous multithreading.
//
// Data flow per cycle: the instruction unit picks a thread by True Round
// Robin and fetches an aligned block of four instructions from the
// instruction cache, with predictions from the shared branch predictor; the
// decoder renames the block (TID-qualified associative lookup in the
// reorder buffer, fresh unique tags) and the scheduling unit takes it in;
// ready instructions of any thread issue oldest-first to the execution unit;
// results come back on the result buses; one finished block per cycle
// commits to the register file from any of the bottom four block positions
// (Flexible Result Commit). Stores wait in the store buffer until committed
// and then go through the write-through data cache to memory.
//
// Outside: the program is written through `prog_*` while `run` is low; all
// threads start at PC 0 when `run` rises. Main memory is external: line
// refills on `mem_rd_*`, single-word writes on `mem_wr_*`. `thread_done[t]`
// rises when thread t commits HALT. The `ev_*` outputs pulse on the events
// the document discusses (stall, flexible commit, misprediction, cache
// hit/miss, forwarding, bypass) for performance counting.
//
// Parameter: NCOMMIT (default 4, the document's configuration) sets how many
// bottom blocks Flexible Result Commit examines; 1 gives the single-block
// commit of a plain reorder buffer, which the document compares against.
module mtss_top
  import mtss_pkg::*;
#(
  // blocks examined for commit: 4 = Flexible Result Commit, 1 = bottom block only
  parameter int unsigned NCOMMIT = COMMIT_BLOCKS
)
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  run,
  input  logic                  prog_we,
  input  logic [PC_W-1:0]       prog_addr,
  input  logic [XLEN-1:0]       prog_data,
  output logic                  mem_rd_valid,
  output logic [XLEN-1:0]       mem_rd_addr,
  input  logic                  mem_rd_resp_valid,
  input  logic [127:0]          mem_rd_resp_data,
  output logic                  mem_wr_valid,
  output logic [XLEN-1:0]       mem_wr_addr,
  output logic [XLEN-1:0]       mem_wr_data,
  input  logic                  mem_wr_ready,
  output logic [NTHREADS-1:0]   thread_done,
  output logic                  sb_empty,
  output logic                  ev_stall,
  output logic                  ev_commit,
  output logic                  ev_flex_commit,
  output logic [2:0]            ev_ninstr,
  output logic [3:0]            ev_nissue,
  output logic                  ev_mispredict,
  output logic                  ev_dc_hit,
  output logic                  ev_dc_miss,
  output logic                  ev_forward,
  output logic                  ev_bypass
);
  // instruction unit
  logic [PC_W-1:0]              imem_pc;
  logic [FETCH_W-1:0][XLEN-1:0] imem_block;
  logic [FETCH_W-1:0][PC_W-1:0] bp_pc, bp_target;
  logic [FETCH_W-1:0]           bp_taken;
  fetch_blk_t                   fblk;
  logic [NTHREADS-1:0]          halted;
  // decode / scheduling
  logic [FETCH_W-1:0][TAG_W-1:0] new_tags;
  logic                          tags_avail;
  logic [2*FETCH_W-1:0][PREG_W-1:0] rf_raddr;
  logic [2*FETCH_W-1:0][XLEN-1:0]   rf_rdata;
  dec_t [FETCH_W-1:0]            dec;
  su_view_t [SU_ENTRIES-1:0]     view;
  logic                          su_ready, accept;
  fu_req_t [NFU-1:0]             issue;
  logic [NFU-1:0]                fu_ready;
  fu_res_t [NFU-1:0]             wb;
  logic                          redirect_valid;
  logic [TID_W-1:0]              redirect_tid;
  logic [PC_W-1:0]               redirect_pc;
  logic [NTAGS-1:0]              kill_tags, commit_tags, free_tags;
  logic [FETCH_W-1:0]            rf_we;
  logic [FETCH_W-1:0][PREG_W-1:0] rf_waddr;
  logic [FETCH_W-1:0][XLEN-1:0]  rf_wdata;
  bp_upd_t [FETCH_W-1:0]         bp_upd;
  logic                          halt_commit;
  logic [TID_W-1:0]              halt_tid;
  logic [FETCH_W-1:0]            take;
  // memory side
  logic                          sb_push, sb_full, fwd_hit;
  logic [TID_W-1:0]              sb_tid, fwd_tid;
  logic [TAG_W-1:0]              sb_tag, dc_id, dc_resp_id;
  logic [XLEN-1:0]               sb_addr, sb_data, fwd_addr, fwd_data;
  logic                          dc_valid, dc_ready, dc_resp_valid;
  logic [XLEN-1:0]               dc_addr, dc_resp_data;
  logic                          drain_valid, drain_ready;
  logic [XLEN-1:0]               drain_addr, drain_data;

  icache u_icache (.clk, .wr_en(prog_we), .wr_addr(prog_addr), .wr_data(prog_data),
                   .rd_pc(imem_pc), .rd_block(imem_block));

  branch_predictor u_bp (.clk, .rst, .pc(bp_pc), .taken(bp_taken), .target(bp_target),
                         .upd(bp_upd));

  fetch_unit u_fetch (.clk, .rst, .run, .imem_pc, .imem_block, .bp_pc, .bp_taken,
                      .bp_target, .blk(fblk), .accept, .redirect_valid, .redirect_tid,
                      .redirect_pc, .halted);

  tag_allocator u_tags (.clk, .rst, .tags(new_tags), .avail(tags_avail), .take,
                        .release_mask(free_tags));

  decoder u_dec (.blk(fblk), .view, .new_tags, .rf_raddr, .rf_rdata, .dec);

  register_file u_rf (.clk, .rst, .raddr(rf_raddr), .rdata(rf_rdata), .we(rf_we),
                      .waddr(rf_waddr), .wdata(rf_wdata));

  // a block enters the scheduling unit when there is room and tags to give
  assign accept = su_ready && tags_avail;
  always_comb
    for (int i = 0; i < FETCH_W; i++)
      take[i] = fblk.valid && accept && fblk.slot_valid[i];

  sched_unit #(.NCOMMIT(NCOMMIT)) u_su (.clk, .rst, .in_valid(fblk.valid && tags_avail), .in_tid(fblk.tid),
                   .in_d(dec), .in_ready(su_ready), .view, .issue, .fu_ready, .wb,
                   .redirect_valid, .redirect_tid, .redirect_pc, .kill_tags,
                   .rf_we, .rf_waddr, .rf_wdata, .commit_tags, .free_tags, .bp_upd,
                   .halt_commit, .halt_tid, .ev_stall, .ev_commit, .ev_flex_commit,
                   .ev_ninstr, .ev_nissue, .ev_bypass);

  exec_unit u_eu (.clk, .rst, .issue, .fu_ready, .wb, .sb_push, .sb_tid, .sb_tag,
                  .sb_addr, .sb_data, .sb_full, .fwd_addr, .fwd_tid, .fwd_hit, .fwd_data,
                  .dc_valid, .dc_addr, .dc_id, .dc_ready, .dc_resp_valid, .dc_resp_id,
                  .dc_resp_data, .ev_forward);

  store_buffer u_sb (.clk, .rst, .push(sb_push), .push_tid(sb_tid), .push_tag(sb_tag),
                     .push_addr(sb_addr), .push_data(sb_data), .full(sb_full),
                     .empty(sb_empty), .kill_tags, .commit_tags, .fwd_addr, .fwd_tid,
                     .fwd_hit, .fwd_data, .out_valid(drain_valid), .out_addr(drain_addr),
                     .out_data(drain_data), .out_ready(drain_ready));

  dcache u_dc (.clk, .rst, .ld_valid(dc_valid), .ld_addr(dc_addr), .ld_id(dc_id),
               .ld_ready(dc_ready), .resp_valid(dc_resp_valid), .resp_id(dc_resp_id),
               .resp_data(dc_resp_data), .st_valid(drain_valid), .st_addr(drain_addr),
               .st_data(drain_data), .st_ready(drain_ready), .mem_rd_valid, .mem_rd_addr,
               .mem_rd_resp_valid, .mem_rd_resp_data, .mem_wr_valid, .mem_wr_addr,
               .mem_wr_data, .mem_wr_ready, .ev_hit(ev_dc_hit), .ev_miss(ev_dc_miss));

  assign ev_mispredict = redirect_valid;

  always_ff @(posedge clk) begin
    if (rst) thread_done <= '0;
    else if (halt_commit) thread_done[halt_tid] <= 1'b1;
  end
endmodule
