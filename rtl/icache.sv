// icache: instruction memory of the instruction unit. The default
// configuration takes a perfect instruction cache (every access hits), so it
// is modelled as an instruction store that returns the aligned block of four
// 32-bit instructions containing `rd_pc` in the same cycle.
//
// The capacity (WORDS) is this design's choice; the document gives none.
// A write port lets the program be loaded before the threads are released.
// Interface: combinational read, synchronous write.
module icache
  import mtss_pkg::*;
#(
  parameter int unsigned WORDS = 1024
)(
  input  logic                         clk,
  input  logic                         wr_en,
  input  logic [PC_W-1:0]              wr_addr,
  input  logic [XLEN-1:0]              wr_data,
  input  logic [PC_W-1:0]              rd_pc,
  output logic [FETCH_W-1:0][XLEN-1:0] rd_block
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [XLEN-1:0] mem [WORDS];

  always_ff @(posedge clk)
    if (wr_en) mem[wr_addr[AW-1:0]] <= wr_data;

  always_comb
    for (int i = 0; i < FETCH_W; i++)
      rd_block[i] = mem[{rd_pc[AW-1:2], 2'(i)}];
endmodule
