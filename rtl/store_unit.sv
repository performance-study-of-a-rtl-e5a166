// store_unit: the store functional unit, one-cycle latency (document's unit
// table). It forms the effective address rs1 + imm and places address, data
// (rs2), thread ID and tag into the store buffer in the cycle it is issued;
// memory is written only after the store commits (see store_buffer). One
// cycle later it reports completion to the scheduling unit. `ready` falls
// when the store buffer is full, which holds stores (and, through the
// in-order memory rule, later loads) back in the scheduling unit.
module store_unit
  import mtss_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  fu_req_t          req,
  output logic             ready,
  output fu_res_t          res,
  // store buffer
  output logic             sb_push,
  output logic [TID_W-1:0] sb_tid,
  output logic [TAG_W-1:0] sb_tag,
  output logic [XLEN-1:0]  sb_addr,
  output logic [XLEN-1:0]  sb_data,
  input  logic             sb_full
);
  assign ready   = !sb_full;
  assign sb_push = req.valid;
  assign sb_tid  = req.tid;
  assign sb_tag  = req.tag;
  assign sb_addr = req.a + sext16(req.imm);
  assign sb_data = req.b;

  always_ff @(posedge clk) begin
    if (rst) res <= '0;
    else begin
      res       <= '0;
      res.valid <= req.valid;
      res.tag   <= req.tag;
    end
  end
endmodule
