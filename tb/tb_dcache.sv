// tb_dcache: the data cache with the behavioural main memory. Random loads
// and stores over a region larger than the cache, so that hits, misses, LRU
// replacement, hit-under-miss and held second misses all occur. Every load
// answer is compared with a flat memory model updated by the stores; a
// sequence at the start checks the one-cycle hit latency and that a miss
// does not block a following hit.
module tb_dcache;
  import mtss_pkg::*;
  logic clk = 0, rst = 1;
  logic ld_valid, ld_ready, resp_valid, st_valid, st_ready;
  logic [XLEN-1:0] ld_addr, st_addr, st_data, resp_data;
  logic [TAG_W-1:0] ld_id, resp_id;
  logic mem_rd_valid, mem_rd_resp_valid, mem_wr_valid, mem_wr_ready, ev_hit, ev_miss;
  logic [XLEN-1:0] mem_rd_addr, mem_wr_addr, mem_wr_data;
  logic [127:0] mem_rd_resp_data;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;
  always #5 clk = ~clk;
  dcache dut (.*);
  main_memory #(.WORDS(8192), .LAT(8)) u_mem (.clk, .rd_valid(mem_rd_valid), .rd_addr(mem_rd_addr),
    .resp_valid(mem_rd_resp_valid), .resp_data(mem_rd_resp_data), .wr_valid(mem_wr_valid),
    .wr_addr(mem_wr_addr), .wr_data(mem_wr_data), .wr_ready(mem_wr_ready));

  logic [31:0] model [8192];
  logic [31:0] pend [int];     // id -> expected data
  always @(posedge clk) begin
    n_hit += int'(ev_hit); n_miss += int'(ev_miss);
  end
  always @(posedge clk) #1 if (!rst && resp_valid) begin
    checks++;
    if (!pend.exists(resp_id) || pend[resp_id] != resp_data) begin
      failures++; $display("FAIL id %0d data %h", resp_id, resp_data);
    end
    pend.delete(resp_id);
  end

  task automatic load(logic [31:0] a, int id);
    @(negedge clk);
    while (!ld_ready) @(negedge clk);
    ld_valid = 1; ld_addr = a; ld_id = TAG_W'(id);
    pend[id] = model[a[14:2]];
    @(negedge clk) ld_valid = 0;
  endtask

  initial begin
    ld_valid = 0; st_valid = 0; ld_addr = 0; ld_id = 0; st_addr = 0; st_data = 0;
    for (int i = 0; i < 8192; i++) begin model[i] = $urandom; u_mem.mem[i] = model[i]; end
    repeat (2) @(posedge clk);
    rst <= 0;
    // miss, then a hit under the miss, then latency of a hit
    load(32'h100, 1);
    repeat (12) @(negedge clk);
    checks++; if (pend.size() != 0) begin failures++; $display("FAIL refill"); end
    load(32'h2000, 2);                 // miss, refill outstanding
    @(negedge clk);
    ld_valid = 1; ld_addr = 32'h104; ld_id = 3; pend[3] = model[32'h104 >> 2];
    @(posedge clk); #2;
    checks++; if (!(resp_valid && resp_id == 3)) begin failures++; $display("FAIL hit under miss"); end
    @(negedge clk) ld_valid = 0;
    repeat (12) @(negedge clk);
    // random traffic: 32 KB region, 4x the cache
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] a;
      a = 32'(($urandom % 8192) * 4);
      if ($urandom % 8 < 5) a = a & 32'h0000_0FFC;   // hot region
      if ($urandom % 4 == 0) begin
        @(negedge clk);
        st_valid = 1; st_addr = a; st_data = $urandom;
        #1;
        while (!st_ready) begin @(negedge clk); #1; end
        @(posedge clk); model[a[14:2]] = st_data;
        @(negedge clk) st_valid = 0;
      end else begin
        int id; id = 4 + (n % 50);
        while (pend.exists(id)) @(negedge clk);
        load(a, id);
      end
    end
    repeat (30) @(negedge clk);
    checks++; if (pend.size() != 0) begin failures++; $display("FAIL %0d loads unanswered", pend.size()); end
    checks++; if (n_hit == 0 || n_miss == 0) failures++;
    $display("hits=%0d misses=%0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
