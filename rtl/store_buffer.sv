// store_buffer: the DEPTH-entry (default 8, as in the document) buffer
// between the scheduling unit and the data cache.
//
// A store enters when the store unit executes it and stays until its
// scheduling-unit entry has been committed; only then may it be written to
// the cache and memory (document: "an instruction stays in the store buffer
// until its entry in the SU is shifted out"). Entries are kept in arrival
// order. Each cycle: stores whose tags appear in `kill_tags` (squashed by a
// misprediction) are dropped, tags in `commit_tags` are marked committed, the
// oldest committed entry is offered to the cache and removed when accepted,
// and a new store is appended. Stores of one thread arrive in program order,
// so draining committed entries oldest first keeps each thread's order.
//
// Forwarding port (this design's choice): returns the youngest entry for the
// same word that the asking thread may see (its own, or committed).
module store_buffer
  import mtss_pkg::*;
#(
  parameter int unsigned DEPTH = 8
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [TID_W-1:0] push_tid,
  input  logic [TAG_W-1:0] push_tag,
  input  logic [XLEN-1:0]  push_addr,
  input  logic [XLEN-1:0]  push_data,
  output logic             full,
  output logic             empty,
  input  logic [NTAGS-1:0] kill_tags,
  input  logic [NTAGS-1:0] commit_tags,
  input  logic [XLEN-1:0]  fwd_addr,
  input  logic [TID_W-1:0] fwd_tid,
  output logic             fwd_hit,
  output logic [XLEN-1:0]  fwd_data,
  output logic             out_valid,
  output logic [XLEN-1:0]  out_addr,
  output logic [XLEN-1:0]  out_data,
  input  logic             out_ready
);
  typedef struct packed {
    logic             valid;
    logic             committed;
    logic [TID_W-1:0] tid;
    logic [TAG_W-1:0] tag;
    logic [XLEN-1:0]  addr;
    logic [XLEN-1:0]  data;
  } sb_entry_t;

  sb_entry_t q [DEPTH];
  int unsigned out_idx;

  always_comb begin
    full  = q[DEPTH-1].valid;
    empty = !q[0].valid;
    fwd_hit  = 1'b0;
    fwd_data = '0;
    out_valid = 1'b0;
    out_idx   = 0;
    for (int i = 0; i < DEPTH; i++) begin
      if (q[i].valid && q[i].addr[XLEN-1:2] == fwd_addr[XLEN-1:2] &&
          (q[i].committed || q[i].tid == fwd_tid)) begin
        fwd_hit  = 1'b1;
        fwd_data = q[i].data;
      end
    end
    for (int i = DEPTH - 1; i >= 0; i--)
      if (q[i].valid && q[i].committed) begin
        out_valid = 1'b1;
        out_idx   = i;
      end
    out_addr = q[out_idx].addr;
    out_data = q[out_idx].data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      sb_entry_t   n [DEPTH];
      int unsigned k;
      for (int i = 0; i < DEPTH; i++) n[i] = '0;
      k = 0;
      for (int i = 0; i < DEPTH; i++) begin
        sb_entry_t e;
        e = q[i];
        if (e.valid && !e.committed && kill_tags[e.tag]) e.valid = 1'b0;
        if (e.valid && commit_tags[e.tag]) e.committed = 1'b1;
        if (out_valid && out_ready && out_idx == i) e.valid = 1'b0;
        if (e.valid) begin
          n[k] = e;
          k++;
        end
      end
      if (push && !kill_tags[push_tag] && k < DEPTH)
        n[k] = '{valid: 1'b1, committed: 1'b0, tid: push_tid, tag: push_tag,
                 addr: push_addr, data: push_data};
      for (int i = 0; i < DEPTH; i++) q[i] <= n[i];
    end
  end

`ifndef SYNTHESIS
  a_no_push_when_full: assert property (@(posedge clk) disable iff (rst) !(push && full));
`endif
endmodule
