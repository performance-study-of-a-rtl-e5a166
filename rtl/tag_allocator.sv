// tag_allocator: renaming tag pool of the decoder.
//
// Every valid decoded instruction receives a tag that differs from every
// other tag in use, whatever its thread; a tag is not handed out again until
// the instruction that held it has left the scheduling unit (document,
// decoder and scheduling unit section). The pool is a free bitmap of NTAGS
// tags; the FETCH_W lowest free tags are offered each cycle. With NTAGS at
// twice the scheduling unit's entries, at least FETCH_W tags are always free.
// The bitmap implementation and pool size are this design's choices.
//
// Interface: `tags` and `avail` are combinational; `take[i]` marks tags[i]
// used at the edge, `release_mask` frees tags at the same edge.
module tag_allocator
  import mtss_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst,
  output logic [FETCH_W-1:0][TAG_W-1:0] tags,
  output logic                        avail,
  input  logic [FETCH_W-1:0]          take,
  input  logic [NTAGS-1:0]            release_mask
);
  logic [NTAGS-1:0] free_q;

  always_comb begin
    logic [NTAGS-1:0] f;
    int unsigned      n;
    f = free_q;
    n = 0;
    tags = '0;
    for (int i = 0; i < FETCH_W; i++) begin
      for (int t = NTAGS - 1; t >= 0; t--)
        if (f[t]) tags[i] = TAG_W'(t);
      if (f != '0) n++;
      f[tags[i]] = 1'b0;
    end
    avail = (n == FETCH_W);
  end

  always_ff @(posedge clk) begin
    if (rst) free_q <= '1;
    else begin
      logic [NTAGS-1:0] f;
      f = free_q | release_mask;
      for (int i = 0; i < FETCH_W; i++)
        if (take[i]) f[tags[i]] = 1'b0;
      free_q <= f;
    end
  end
endmodule
