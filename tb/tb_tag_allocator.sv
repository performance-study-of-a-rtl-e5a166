// tb_tag_allocator: takes tags block by block until the pool is nearly
// empty and checks that no tag is handed out twice while in use, that
// `avail` falls when fewer than four are free, and that released tags return.
module tb_tag_allocator;
  import mtss_pkg::*;
  logic clk = 0, rst = 1, avail;
  logic [FETCH_W-1:0][TAG_W-1:0] tags;
  logic [FETCH_W-1:0] take;
  logic [NTAGS-1:0] release_mask;
  logic [NTAGS-1:0] inuse;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  tag_allocator dut (.*);

  initial begin
    take = '0; release_mask = '0; inuse = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 400; n++) begin
      int nfree;
      @(negedge clk);
      nfree = NTAGS - $countones(inuse);
      checks++;
      if (avail != (nfree >= FETCH_W)) begin failures++; $display("FAIL avail %b free %0d", avail, nfree); end
      take = '0; release_mask = '0;
      if (avail && ($urandom % 3 != 0)) begin
        take = FETCH_W'($urandom);
        for (int i = 0; i < FETCH_W; i++) begin
          checks++;
          if (inuse[tags[i]]) begin failures++; $display("FAIL tag %0d in use", tags[i]); end
          for (int j = 0; j < i; j++) if (tags[j] == tags[i]) begin failures++; $display("FAIL duplicate"); end
        end
      end
      if ($urandom % 4 == 0) release_mask = NTAGS'({$urandom, $urandom}) & inuse;
      @(posedge clk);
      inuse &= ~release_mask;
      for (int i = 0; i < FETCH_W; i++) if (take[i]) inuse[tags[i]] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
