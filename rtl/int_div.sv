// int_div: integer divider, 15-cycle latency (document's unit table).
//
// Signed division (OP_DIV) or remainder (OP_REM). This design takes the unit
// as not pipelined: it is busy for LAT cycles after accepting an operation and
// drops `ready` meanwhile, so the scheduler holds further divides back.
// Division by zero returns all ones for the quotient and the dividend for the
// remainder (this design's choice; the document gives no rule).
//
// Interface: `req` accepted when req.valid && ready; `res` valid exactly LAT
// cycles after acceptance, for one cycle.
module int_div
  import mtss_pkg::*;
#(
  parameter int unsigned LAT = LAT_DIV
)(
  input  logic    clk,
  input  logic    rst,
  input  fu_req_t req,
  output logic    ready,
  output fu_res_t res
);
  logic [$clog2(LAT+1)-1:0] cnt;
  fu_res_t held;
  logic [XLEN-1:0] q;

  always_comb begin
    if (req.b == '0)
      q = (req.op == OP_REM) ? req.a : '1;
    else if (req.op == OP_REM)
      q = $unsigned($signed(req.a) % $signed(req.b));
    else
      q = $unsigned($signed(req.a) / $signed(req.b));
  end

  assign ready = (cnt == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      held <= '0;
      res  <= '0;
    end else begin
      res <= '0;
      if (cnt != '0) begin
        cnt <= cnt - 1'b1;
        if (cnt == 1) res <= held;
      end else if (req.valid) begin
        held       <= '0;
        held.valid <= 1'b1;
        held.tag   <= req.tag;
        held.value <= q;
        if (LAT == 1) begin
          res       <= '0;
          res.valid <= 1'b1;
          res.tag   <= req.tag;
          res.value <= q;
        end else cnt <= ($clog2(LAT+1))'(LAT - 1);
      end
    end
  end
endmodule
