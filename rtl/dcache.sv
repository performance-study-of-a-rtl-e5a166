// dcache: the data cache. Default geometry from the document: 8 KB, 4-way
// set associative, 16-byte lines, true LRU replacement, one cache shared by
// all threads (not partitioned).
//
// Misses: as in the document, the cache can refill one line while it keeps
// serving hits. A load that misses is parked in a single miss register and
// the line is requested from memory; the load unit is free meanwhile. A
// second miss while the refill is outstanding is held, and the cache stops
// taking requests until the refill has arrived and the held load has been
// replayed. When the line arrives it is installed in the LRU way and the
// parked load is answered in the same edge.
//
// Stores (from the store buffer, committed only) are write-through without
// write-allocate: memory is always written, and a hit also updates the line.
// A store to the line being refilled waits until the refill is done. The
// write policy, the memory interface and the replay mechanism are this
// design's choices; the document does not describe them.
//
// Timing: a hit answers one cycle after the request. `ld_ready` is low while
// a held miss waits and in the cycle a refill arrives.
module dcache
  import mtss_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 16,
  parameter int unsigned ID_W       = TAG_W
)(
  input  logic                      clk,
  input  logic                      rst,
  // loads
  input  logic                      ld_valid,
  input  logic [XLEN-1:0]           ld_addr,
  input  logic [ID_W-1:0]           ld_id,
  output logic                      ld_ready,
  output logic                      resp_valid,
  output logic [ID_W-1:0]           resp_id,
  output logic [XLEN-1:0]           resp_data,
  // committed stores
  input  logic                      st_valid,
  input  logic [XLEN-1:0]           st_addr,
  input  logic [XLEN-1:0]           st_data,
  output logic                      st_ready,
  // memory
  output logic                      mem_rd_valid,
  output logic [XLEN-1:0]           mem_rd_addr,
  input  logic                      mem_rd_resp_valid,
  input  logic [8*LINE_BYTES-1:0]   mem_rd_resp_data,
  output logic                      mem_wr_valid,
  output logic [XLEN-1:0]           mem_wr_addr,
  output logic [XLEN-1:0]           mem_wr_data,
  input  logic                      mem_wr_ready,
  // events
  output logic                      ev_hit,
  output logic                      ev_miss
);
  localparam int unsigned SETS  = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_B = XLEN - OFF_W - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic [TAG_B-1:0]          tags  [SETS][WAYS];
  logic [8*LINE_BYTES-1:0]   data  [SETS][WAYS];
  logic [SETS-1:0][WAYS-1:0] vld;
  logic [WAY_W-1:0]          age   [SETS][WAYS];   // 0 = most recently used

  logic            mshr_v, held_v;
  logic [XLEN-1:0] mshr_addr, held_addr;
  logic [ID_W-1:0] mshr_id, held_id;

  // lookup request: a held load is replayed once the refill is done
  logic            lk_v;
  logic [XLEN-1:0] lk_addr;
  logic [ID_W-1:0] lk_id;
  logic            lk_hit;
  logic [WAY_W-1:0] lk_way;

  function automatic logic [IDX_W-1:0] idx_of(input logic [XLEN-1:0] a);
    return a[OFF_W +: IDX_W];
  endfunction
  function automatic logic [TAG_B-1:0] tag_of(input logic [XLEN-1:0] a);
    return a[XLEN-1 -: TAG_B];
  endfunction

  assign ld_ready = !held_v && !mem_rd_resp_valid;

  always_comb begin
    if (held_v) begin
      lk_v = !mshr_v; lk_addr = held_addr; lk_id = held_id;
    end else begin
      lk_v = ld_valid && ld_ready; lk_addr = ld_addr; lk_id = ld_id;
    end
    lk_hit = 1'b0;
    lk_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[idx_of(lk_addr)][w] && tags[idx_of(lk_addr)][w] == tag_of(lk_addr)) begin
        lk_hit = 1'b1;
        lk_way = WAY_W'(w);
      end
  end

  assign ev_hit  = lk_v && lk_hit;
  assign ev_miss = lk_v && !lk_hit;

  // store hit check
  logic             st_hit;
  logic [WAY_W-1:0] st_way;
  always_comb begin
    st_hit = 1'b0;
    st_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[idx_of(st_addr)][w] && tags[idx_of(st_addr)][w] == tag_of(st_addr)) begin
        st_hit = 1'b1;
        st_way = WAY_W'(w);
      end
  end
  assign st_ready     = mem_wr_ready &&
                        !(mshr_v && st_addr[XLEN-1:OFF_W] == mshr_addr[XLEN-1:OFF_W]);
  assign mem_wr_valid = st_valid && st_ready;
  assign mem_wr_addr  = st_addr;
  assign mem_wr_data  = st_data;

  // replacement victim in the refill set: an invalid way, else the LRU way
  logic [WAY_W-1:0] victim;
  always_comb begin
    victim = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (age[idx_of(mshr_addr)][w] == WAY_W'(WAYS - 1)) victim = WAY_W'(w);
    for (int w = WAYS - 1; w >= 0; w--)
      if (!vld[idx_of(mshr_addr)][w]) victim = WAY_W'(w);
  end

  function automatic logic [XLEN-1:0] word_of(input logic [8*LINE_BYTES-1:0] line,
                                               input logic [XLEN-1:0] a);
    return line[32*a[OFF_W-1:2] +: 32];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      vld          <= '0;
      mshr_v       <= 1'b0;
      held_v       <= 1'b0;
      mshr_addr    <= '0;
      mshr_id      <= '0;
      held_addr    <= '0;
      held_id      <= '0;
      resp_valid   <= 1'b0;
      resp_id      <= '0;
      resp_data    <= '0;
      mem_rd_valid <= 1'b0;
      mem_rd_addr  <= '0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) age[s][w] <= WAY_W'(w);
    end else begin
      resp_valid   <= 1'b0;
      mem_rd_valid <= 1'b0;
      // committed store: update a hit line (write-through)
      if (mem_wr_valid && st_hit)
        data[idx_of(st_addr)][st_way][32*st_addr[OFF_W-1:2] +: 32] <= st_data;
      // refill arrives: install and answer the parked load
      if (mem_rd_resp_valid && mshr_v) begin
        tags[idx_of(mshr_addr)][victim] <= tag_of(mshr_addr);
        data[idx_of(mshr_addr)][victim] <= mem_rd_resp_data;
        vld[idx_of(mshr_addr)][victim]  <= 1'b1;
        for (int w = 0; w < WAYS; w++)
          if (age[idx_of(mshr_addr)][w] < age[idx_of(mshr_addr)][victim])
            age[idx_of(mshr_addr)][w] <= age[idx_of(mshr_addr)][w] + 1'b1;
        age[idx_of(mshr_addr)][victim] <= '0;
        mshr_v     <= 1'b0;
        resp_valid <= 1'b1;
        resp_id    <= mshr_id;
        resp_data  <= word_of(mem_rd_resp_data, mshr_addr);
      end
      // lookup
      if (lk_v) begin
        if (lk_hit) begin
          resp_valid <= 1'b1;
          resp_id    <= lk_id;
          resp_data  <= word_of(data[idx_of(lk_addr)][lk_way], lk_addr);
          for (int w = 0; w < WAYS; w++)
            if (age[idx_of(lk_addr)][w] < age[idx_of(lk_addr)][lk_way])
              age[idx_of(lk_addr)][w] <= age[idx_of(lk_addr)][w] + 1'b1;
          age[idx_of(lk_addr)][lk_way] <= '0;
          if (held_v) held_v <= 1'b0;
        end else if (!mshr_v) begin
          mshr_v       <= 1'b1;
          mshr_addr    <= lk_addr;
          mshr_id      <= lk_id;
          mem_rd_valid <= 1'b1;
          mem_rd_addr  <= {lk_addr[XLEN-1:OFF_W], {OFF_W{1'b0}}};
          if (held_v) held_v <= 1'b0;
        end else begin
          held_v    <= 1'b1;
          held_addr <= lk_addr;
          held_id   <= lk_id;
        end
      end
    end
  end

`ifndef SYNTHESIS
  a_refill_expected: assert property (@(posedge clk) disable iff (rst)
                                      mem_rd_resp_valid |-> mshr_v);
`endif
endmodule
