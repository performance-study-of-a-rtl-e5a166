// exec_unit: the execution unit, holding the functional units of the
// document's default configuration: 4 integer ALUs, 1 integer multiplier,
// 1 integer divider, 1 load unit, 1 store unit, 1 control transfer unit, and
// one FP adder, FP multiplier and FP divider (the FP units the document adds
// to the integer-only original processor).
//
// Unit k has issue port issue[k] and result bus wb[k]; the numbering is class
// by class in the order of mtss_pkg::fu_class. Giving each unit its own result
// bus (12 in total) is this design's simplification of the document's eight
// write-back ports. The load and store units reach out to the store buffer and
// the data cache through the ports below.
module exec_unit
  import mtss_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  fu_req_t [NFU-1:0]  issue,
  output logic    [NFU-1:0]  fu_ready,
  output fu_res_t [NFU-1:0]  wb,
  // store buffer
  output logic               sb_push,
  output logic [TID_W-1:0]   sb_tid,
  output logic [TAG_W-1:0]   sb_tag,
  output logic [XLEN-1:0]    sb_addr,
  output logic [XLEN-1:0]    sb_data,
  input  logic               sb_full,
  output logic [XLEN-1:0]    fwd_addr,
  output logic [TID_W-1:0]   fwd_tid,
  input  logic               fwd_hit,
  input  logic [XLEN-1:0]    fwd_data,
  // data cache
  output logic               dc_valid,
  output logic [XLEN-1:0]    dc_addr,
  output logic [TAG_W-1:0]   dc_id,
  input  logic               dc_ready,
  input  logic               dc_resp_valid,
  input  logic [TAG_W-1:0]   dc_resp_id,
  input  logic [XLEN-1:0]    dc_resp_data,
  output logic               ev_forward
);
  for (genvar k = 0; k < NFU; k++) begin : g_fu
    if (fu_class(k) == FU_ALU) begin : g_alu
      int_alu u (.clk, .rst, .req(issue[k]), .ready(fu_ready[k]), .res(wb[k]));
    end else if (fu_class(k) == FU_MUL) begin : g_mul
      int_mul u (.clk, .rst, .req(issue[k]), .ready(fu_ready[k]), .res(wb[k]));
    end else if (fu_class(k) == FU_DIV) begin : g_div
      int_div u (.clk, .rst, .req(issue[k]), .ready(fu_ready[k]), .res(wb[k]));
    end else if (fu_class(k) == FU_LD) begin : g_ld
      load_unit u (.clk, .rst, .req(issue[k]), .ready(fu_ready[k]), .res(wb[k]),
                   .fwd_addr, .fwd_tid, .fwd_hit, .fwd_data,
                   .dc_valid, .dc_addr, .dc_id, .dc_ready,
                   .dc_resp_valid, .dc_resp_id, .dc_resp_data, .ev_forward);
    end else if (fu_class(k) == FU_ST) begin : g_st
      store_unit u (.clk, .rst, .req(issue[k]), .ready(fu_ready[k]), .res(wb[k]),
                    .sb_push, .sb_tid, .sb_tag, .sb_addr, .sb_data, .sb_full);
    end else if (fu_class(k) == FU_CT) begin : g_ct
      ctu u (.clk, .rst, .req(issue[k]), .ready(fu_ready[k]), .res(wb[k]));
    end else if (fu_class(k) == FU_FADD) begin : g_fadd
      fp_add u (.clk, .rst, .req(issue[k]), .ready(fu_ready[k]), .res(wb[k]));
    end else if (fu_class(k) == FU_FMUL) begin : g_fmul
      fp_mul u (.clk, .rst, .req(issue[k]), .ready(fu_ready[k]), .res(wb[k]));
    end else begin : g_fdiv
      fp_div u (.clk, .rst, .req(issue[k]), .ready(fu_ready[k]), .res(wb[k]));
    end
  end
endmodule
