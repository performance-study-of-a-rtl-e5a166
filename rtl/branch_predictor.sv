// branch_predictor: branch target buffer with 2-bit saturating counters.
//
// One BTB serves all threads (they run the same code), and branches of every
// thread train the same counters, as the document describes. Each of the
// FETCH_W fetch slots looks up its PC: a hit whose counter is 2 or 3 predicts
// "taken" to the stored target, anything else "not taken". Training happens
// at result commit, when a control-transfer instruction leaves the scheduling
// unit: the counter moves toward the outcome, the target is refreshed when
// taken, and a taken branch that misses allocates an entry at "weakly taken".
// Size (ENTRIES, direct mapped, PC-indexed) and allocation rule are this
// design's choices. Up to FETCH_W updates per cycle; a later port wins on the
// same entry.
//
// Interface: combinational lookup, updates take effect on the next edge.
module branch_predictor
  import mtss_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
)(
  input  logic                         clk,
  input  logic                         rst,
  input  logic [FETCH_W-1:0][PC_W-1:0] pc,
  output logic [FETCH_W-1:0]           taken,
  output logic [FETCH_W-1:0][PC_W-1:0] target,
  input  bp_upd_t [FETCH_W-1:0]        upd
);
  localparam int unsigned IW = $clog2(ENTRIES);

  typedef struct packed {
    logic               valid;
    logic [PC_W-IW-1:0] tag;
    logic [PC_W-1:0]    target;
    logic [1:0]         ctr;
  } btb_t;

  btb_t btb [ENTRIES];

  always_comb
    for (int i = 0; i < FETCH_W; i++) begin
      btb_t e;
      e = btb[pc[i][IW-1:0]];
      taken[i]  = e.valid && e.tag == pc[i][PC_W-1:IW] && e.ctr[1];
      target[i] = e.target;
    end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ENTRIES; i++) btb[i] <= '0;
    end else begin
      for (int k = 0; k < FETCH_W; k++) begin
        if (upd[k].valid) begin
          btb_t e;
          logic hit;
          e   = btb[upd[k].pc[IW-1:0]];
          hit = e.valid && e.tag == upd[k].pc[PC_W-1:IW];
          if (hit) begin
            if (upd[k].taken) begin
              if (e.ctr != 2'b11) e.ctr = e.ctr + 1'b1;
              e.target = upd[k].target;
            end else if (e.ctr != 2'b00) e.ctr = e.ctr - 1'b1;
            btb[upd[k].pc[IW-1:0]] <= e;
          end else if (upd[k].taken) begin
            btb[upd[k].pc[IW-1:0]] <= '{valid: 1'b1, tag: upd[k].pc[PC_W-1:IW],
                                        target: upd[k].target, ctr: 2'b10};
          end
        end
      end
    end
  end
endmodule
