// workload_sys: a core with its main memory and event counters, for running
// whole programs in testbenches. NCOMMIT is passed to the core (4 = Flexible
// Result Commit, 1 = bottom block only). The counters clear while `clr` is
// high and count while `run` is high. Programs are written through `prog_*`;
// the memory array `u_mem.mem` is loaded and read hierarchically.
module workload_sys
  import mtss_pkg::*;
#(
  parameter int unsigned NCOMMIT = COMMIT_BLOCKS
)
(
  input  logic                clk,
  input  logic                rst,
  input  logic                run,
  input  logic                clr,
  input  logic                prog_we,
  input  logic [PC_W-1:0]     prog_addr,
  input  logic [31:0]         prog_data,
  output logic [NTHREADS-1:0] thread_done,
  output logic                sb_empty,
  output int                  cycles,
  output int                  n_instr,
  output int                  n_stall,
  output int                  n_flex,
  output int                  n_mis,
  output int                  n_hit,
  output int                  n_miss
);
  logic mem_rd_valid, mem_rd_resp_valid, mem_wr_valid, mem_wr_ready;
  logic [31:0] mem_rd_addr, mem_wr_addr, mem_wr_data;
  logic [127:0] mem_rd_resp_data;
  logic ev_stall, ev_commit, ev_flex_commit, ev_mispredict;
  logic ev_dc_hit, ev_dc_miss, ev_forward, ev_bypass;
  logic [2:0] ev_ninstr;
  logic [3:0] ev_nissue;

  mtss_top #(.NCOMMIT(NCOMMIT)) u_core (.*);

  main_memory #(.WORDS(1024), .LAT(10)) u_mem (
    .clk, .rd_valid(mem_rd_valid), .rd_addr(mem_rd_addr), .resp_valid(mem_rd_resp_valid),
    .resp_data(mem_rd_resp_data), .wr_valid(mem_wr_valid), .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data), .wr_ready(mem_wr_ready));

  always @(posedge clk)
    if (clr) begin
      cycles <= 0; n_instr <= 0; n_stall <= 0; n_flex <= 0; n_mis <= 0; n_hit <= 0; n_miss <= 0;
    end else if (run && thread_done != '1) begin
      cycles  <= cycles + 1;
      n_instr <= n_instr + int'(ev_ninstr);
      n_stall <= n_stall + int'(ev_stall);
      n_flex  <= n_flex + int'(ev_flex_commit);
      n_mis   <= n_mis + int'(ev_mispredict);
      n_hit   <= n_hit + int'(ev_dc_hit);
      n_miss  <= n_miss + int'(ev_dc_miss);
    end
endmodule
