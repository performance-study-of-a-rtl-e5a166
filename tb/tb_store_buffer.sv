// tb_store_buffer: random pushes, commits, squashes and drains against a
// queue model. Checks that only committed stores leave, oldest committed
// first; that squashed uncommitted stores vanish; forwarding (youngest
// visible match: own thread or committed); and the full flag.
module tb_store_buffer;
  import mtss_pkg::*;
  logic clk = 0, rst = 1;
  logic push, full, empty, fwd_hit, out_valid, out_ready;
  logic [TID_W-1:0] push_tid, fwd_tid;
  logic [TAG_W-1:0] push_tag;
  logic [XLEN-1:0] push_addr, push_data, fwd_addr, fwd_data, out_addr, out_data;
  logic [NTAGS-1:0] kill_tags, commit_tags;
  int checks = 0, failures = 0, n_out = 0, n_fwd = 0;
  always #5 clk = ~clk;
  store_buffer #(.DEPTH(8)) dut (.*);

  typedef struct { bit c; int tid; int tag; logic [31:0] a, d; } e_t;
  e_t q [$];
  int next_tag = 0;

  initial begin
    push = 0; kill_tags = '0; commit_tags = '0; out_ready = 0;
    push_tid = '0; push_tag = '0; push_addr = '0; push_data = '0; fwd_addr = '0; fwd_tid = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      int oi; bit eh; logic [31:0] ed;
      @(negedge clk);
      push = 0; kill_tags = '0; commit_tags = '0;
      out_ready = $urandom % 3 == 0;
      fwd_addr = 32'(($urandom % 8) * 4); fwd_tid = TID_W'($urandom);
      if (!full && $urandom % 2) begin
        push = 1; push_tid = TID_W'($urandom); push_tag = TAG_W'(next_tag);
        next_tag = (next_tag + 1) % NTAGS;
        push_addr = 32'(($urandom % 8) * 4); push_data = $urandom;
      end
      foreach (q[i]) begin
        if (!q[i].c && $urandom % 6 == 0) commit_tags[q[i].tag] = 1;
        else if (!q[i].c && $urandom % 15 == 0) kill_tags[q[i].tag] = 1;
      end
      #1;
      // model outputs
      oi = -1;
      foreach (q[i]) if (q[i].c && oi < 0) oi = i;
      eh = 0; ed = 0;
      foreach (q[i]) if (q[i].a[31:2] == fwd_addr[31:2] && (q[i].c || q[i].tid == fwd_tid)) begin eh = 1; ed = q[i].d; end
      checks++;
      if (full != (q.size() == 8) || empty != (q.size() == 0) || out_valid != (oi >= 0) ||
          (oi >= 0 && (out_addr != q[oi].a || out_data != q[oi].d)) ||
          fwd_hit != eh || (eh && fwd_data != ed)) begin
        failures++; $display("FAIL n=%0d size %0d", n, q.size());
      end
      n_fwd += int'(eh);
      @(posedge clk);
      // model update
      begin
        e_t nq [$];
        nq.delete();
        foreach (q[i]) begin
          e_t e; e = q[i];
          if (!(!e.c && kill_tags[e.tag]) && !(i == oi && out_ready)) begin
            if (commit_tags[e.tag]) e.c = 1;
            nq.push_back(e);
          end
        end
        if (oi >= 0 && out_ready) n_out++;
        if (push) nq.push_back('{0, push_tid, push_tag, push_addr, push_data});
        q = nq;
      end
    end
    checks++; if (n_out == 0 || n_fwd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
