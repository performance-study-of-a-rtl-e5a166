// fp_mul: floating-point multiplier (FMUL), latency 6 cycles (document's unit
// table), fully pipelined: a new operation may start every cycle (pipelining
// is this design's choice). The arithmetic itself is in fp32_pkg: IEEE-754
// single precision, truncating, denormals flushed to zero.
//
// Interface: `req` sampled when req.valid; `res` valid LAT cycles later.
module fp_mul
  import mtss_pkg::*;
#(
  parameter int unsigned LAT = LAT_FMUL
)(
  input  logic    clk,
  input  logic    rst,
  input  fu_req_t req,
  output logic    ready,
  output fu_res_t res
);
  fu_res_t pipe [LAT];
  fu_res_t in;

  always_comb begin
    in       = '0;
    in.valid = req.valid;
    in.tag   = req.tag;
    in.value = fp32_pkg::fp_mul(req.a, req.b);
  end

  assign ready = 1'b1;
  assign res   = pipe[LAT-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LAT; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= in;
      for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
    end
  end
endmodule
