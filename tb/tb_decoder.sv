// tb_decoder: random reorder-buffer contents (few registers and threads, so
// that matches are frequent) and random instruction blocks. For every source
// operand the expected value/tag is worked out here: newest earlier slot of
// the block, else the newest buffer entry of the *same thread* with that
// destination (its value if finished, its tag if not), else the register
// file. Also checks the unit class, destination flag and immediate.
module tb_decoder;
  import mtss_pkg::*;
  fetch_blk_t blk;
  su_view_t [SU_ENTRIES-1:0] view;
  logic [FETCH_W-1:0][TAG_W-1:0] new_tags;
  logic [2*FETCH_W-1:0][PREG_W-1:0] rf_raddr;
  logic [2*FETCH_W-1:0][XLEN-1:0] rf_rdata;
  dec_t [FETCH_W-1:0] dec;
  logic [31:0] rf [NREGS];
  int checks = 0, failures = 0;
  decoder dut (.*);

  always_comb for (int i = 0; i < 2*FETCH_W; i++) rf_rdata[i] = rf[rf_raddr[i]];

  logic [5:0] ops [8] = '{OP_ADD, OP_ADDI, OP_SW, OP_BEQ, OP_LW, OP_LUI, OP_FMUL, OP_HALT};

  initial begin
    for (int r = 0; r < NREGS; r++) rf[r] = $urandom;
    for (int n = 0; n < 500; n++) begin
      blk = '0;
      blk.valid = 1; blk.tid = TID_W'($urandom);
      for (int i = 0; i < FETCH_W; i++) begin
        logic [5:0] op;
        op = ops[$urandom % 8];
        blk.instr[i] = {op, 5'($urandom % 4), 5'($urandom % 4), 5'($urandom % 4), 11'($urandom)};
        blk.slot_valid[i] = $urandom % 4 != 0;
        new_tags[i] = TAG_W'(40 + i);
      end
      for (int e = 0; e < SU_ENTRIES; e++) begin
        view[e].valid = $urandom % 3 == 0;
        view[e].tid = TID_W'($urandom);
        view[e].rd = RREG_W'($urandom % 4);
        view[e].tag = TAG_W'(e);
        view[e].done = $urandom % 2;
        view[e].result = $urandom;
      end
      #1;
      for (int i = 0; i < FETCH_W; i++) begin
        logic [5:0] op; bit u1, u2, wr;
        op = blk.instr[i][31:26];
        u1 = !(op inside {OP_LUI, OP_HALT});
        u2 = op inside {OP_ADD, OP_SW, OP_BEQ, OP_FMUL};
        wr = op inside {OP_ADD, OP_ADDI, OP_LW, OP_LUI, OP_FMUL};
        checks++;
        if (dec[i].valid != blk.slot_valid[i] || dec[i].fu != op_class(op) ||
            dec[i].has_dest != wr || dec[i].tag != new_tags[i] ||
            dec[i].imm != (u2 ? 16'($signed(blk.instr[i][10:0])) : blk.instr[i][15:0])) begin
          failures++; $display("FAIL slot %0d fields", i);
        end
        for (int s = 0; s < 2; s++) begin
          bit use_s, rdy; logic [31:0] val; logic [TAG_W-1:0] tg; logic [4:0] r;
          use_s = (s == 0) ? u1 : u2;
          r = (s == 0) ? blk.instr[i][20:16] : blk.instr[i][15:11];
          rdy = 1; val = 0; tg = 0;
          if (use_s) begin
            int found; found = 0;
            for (int j = i - 1; j >= 0 && !found; j--)
              if (blk.slot_valid[j] && blk.instr[j][31:26] inside {OP_ADD, OP_ADDI, OP_LW, OP_LUI, OP_FMUL}
                  && blk.instr[j][25:21] == r) begin found = 1; rdy = 0; tg = new_tags[j]; end
            for (int e = SU_ENTRIES - 1; e >= 0 && !found; e--)
              if (view[e].valid && view[e].tid == blk.tid && view[e].rd == r) begin
                found = 1; rdy = view[e].done; tg = view[e].tag; val = view[e].result;
              end
            if (!found) val = rf[{blk.tid, r}];
          end
          checks++;
          if (s == 0 ? (dec[i].s1_rdy != rdy || (rdy && dec[i].s1_val != val) || (!rdy && dec[i].s1_tag != tg))
                     : (dec[i].s2_rdy != rdy || (rdy && dec[i].s2_val != val) || (!rdy && dec[i].s2_tag != tg))) begin
            failures++; $display("FAIL slot %0d src %0d", i, s);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
