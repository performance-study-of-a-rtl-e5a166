// load_unit: the load functional unit, one-cycle latency on a cache hit
// (document's unit table).
//
// It forms the effective address rs1 + imm and first asks the store buffer:
// if a buffered store to the same word is visible to this thread (its own
// store, or any committed store) the youngest such value is returned without
// touching the cache. Otherwise the request goes to the data cache, which
// answers one cycle later on a hit, or later after a line refill on a miss
// (the load unit is then free for further loads: hit under one miss).
// Forwarding from the store buffer is this design's choice; the document
// only states that stores wait in the buffer until they commit.
//
// Interface: `ready` follows the cache's request readiness. `res` carries
// either the forwarded word or the cache's answer, never both in one cycle.
module load_unit
  import mtss_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  fu_req_t          req,
  output logic             ready,
  output fu_res_t          res,
  // store buffer forwarding
  output logic [XLEN-1:0]  fwd_addr,
  output logic [TID_W-1:0] fwd_tid,
  input  logic             fwd_hit,
  input  logic [XLEN-1:0]  fwd_data,
  // data cache
  output logic             dc_valid,
  output logic [XLEN-1:0]  dc_addr,
  output logic [TAG_W-1:0] dc_id,
  input  logic             dc_ready,
  input  logic             dc_resp_valid,
  input  logic [TAG_W-1:0] dc_resp_id,
  input  logic [XLEN-1:0]  dc_resp_data,
  output logic             ev_forward
);
  fu_res_t fwd_q;

  assign fwd_addr   = req.a + sext16(req.imm);
  assign fwd_tid    = req.tid;
  assign ready      = dc_ready;
  assign dc_valid   = req.valid && !fwd_hit;
  assign dc_addr    = fwd_addr;
  assign dc_id      = req.tag;
  assign ev_forward = req.valid && fwd_hit;

  always_ff @(posedge clk) begin
    if (rst) fwd_q <= '0;
    else begin
      fwd_q       <= '0;
      fwd_q.valid <= req.valid && fwd_hit;
      fwd_q.tag   <= req.tag;
      fwd_q.value <= fwd_data;
    end
  end

  always_comb begin
    res = fwd_q;
    if (dc_resp_valid) begin
      res       = '0;
      res.valid = 1'b1;
      res.tag   = dc_resp_id;
      res.value = dc_resp_data;
    end
  end

`ifndef SYNTHESIS
  a_one_result: assert property (@(posedge clk) disable iff (rst) !(dc_resp_valid && fwd_q.valid));
`endif
endmodule
