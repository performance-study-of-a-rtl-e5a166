// register_file: the 128-entry architectural register file shared by all
// threads. The register set is split statically and equally between the
// threads (the document's default: 128 registers, equal shares); a thread's
// register r lives at physical index {tid, r}. Only result commit writes it.
//
// Read ports: 2*FETCH_W = 8, combinational, enough for two source operands of
// each of the four instructions decoded per cycle (the document's block
// diagram shows an 8-port register file). Write ports: FETCH_W, one per
// instruction of the block being committed; a higher port wins on the same
// register. Reset clears every register (this design's choice).
module register_file
  import mtss_pkg::*;
#(
  parameter int unsigned REGS = NREGS
)(
  input  logic                                  clk,
  input  logic                                  rst,
  input  logic [2*FETCH_W-1:0][$clog2(REGS)-1:0] raddr,
  output logic [2*FETCH_W-1:0][XLEN-1:0]        rdata,
  input  logic [FETCH_W-1:0]                    we,
  input  logic [FETCH_W-1:0][$clog2(REGS)-1:0]  waddr,
  input  logic [FETCH_W-1:0][XLEN-1:0]          wdata
);
  logic [XLEN-1:0] regs [REGS];

  always_comb
    for (int i = 0; i < 2*FETCH_W; i++) rdata[i] = regs[raddr[i]];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < REGS; r++) regs[r] <= '0;
    end else begin
      for (int k = 0; k < FETCH_W; k++)
        if (we[k]) regs[waddr[k]] <= wdata[k];
    end
  end
endmodule
