// main_memory: behavioural model of the main memory behind the data cache,
// for simulation only. It answers a line read LAT cycles after the request
// with the 16-byte line, and takes single-word writes at once. Contents are
// held in `mem` (WORDS 32-bit words, byte address / 4), which a testbench
// may preload and inspect hierarchically.
module main_memory #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned LAT   = 10
)(
  input  logic         clk,
  input  logic         rd_valid,
  input  logic [31:0]  rd_addr,
  output logic         resp_valid,
  output logic [127:0] resp_data,
  input  logic         wr_valid,
  input  logic [31:0]  wr_addr,
  input  logic [31:0]  wr_data,
  output logic         wr_ready
);
  logic [31:0] mem [WORDS];
  int unsigned cnt = 0;
  logic [31:0] pend_addr;

  assign wr_ready = 1'b1;

  always_ff @(posedge clk) begin
    resp_valid <= 1'b0;
    if (wr_valid) mem[wr_addr[31:2] % WORDS] <= wr_data;
    if (rd_valid) begin
      cnt       <= LAT;
      pend_addr <= rd_addr;
    end else if (cnt > 1) cnt <= cnt - 1;
    else if (cnt == 1) begin
      cnt        <= 0;
      resp_valid <= 1'b1;
      for (int w = 0; w < 4; w++)
        resp_data[32*w +: 32] <= mem[(pend_addr[31:2] + w) % WORDS];
    end
  end
endmodule
