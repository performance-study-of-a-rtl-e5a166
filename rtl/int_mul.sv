// int_mul: integer multiplier, two-cycle latency, fully pipelined (a new
// operation may start every cycle). Returns the low 32 bits of rs1*rs2.
// Latency follows the document's unit table; pipelining and the low-half
// result are this design's choices.
//
// Interface: `req` sampled when req.valid; `res` valid LAT cycles later.
module int_mul
  import mtss_pkg::*;
#(
  parameter int unsigned LAT = LAT_MUL
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
    in.value = req.a * req.b;
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
