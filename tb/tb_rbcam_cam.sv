// tb_rbcam_cam: random writes and clears on the 1024-slot, four-partition CAM
// against a model of keys and valid bits. Each cycle it checks the lookup
// bitmap of a random (partition, key), and wr_slot_live for the slot being
// written (an unread hit, unless cleared in the same cycle). It also checks
// that a write beats a clear of the same slot, and that flush empties all.
`timescale 1ns/1ps
module tb_rbcam_cam;
  localparam int DEPTH = 1024, NP = 4, PD = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic flush = 1'b0, wr_en = 1'b0, clr_en = 1'b0;
  logic [9:0] wr_addr = '0, clr_addr = '0;
  logic [7:0] wr_key = '0, lk_key = '0;
  logic [1:0] lk_part = '0;
  logic wr_slot_live;
  logic [PD-1:0] lk_match;

  rbcam_cam #(.DEPTH(DEPTH), .N_PART(NP), .TS_W(8)) dut (
    .clk, .rst_n, .flush, .wr_en, .wr_addr, .wr_key, .wr_slot_live,
    .clr_en, .clr_addr, .lk_part, .lk_key, .lk_match);

  logic [7:0] mkey [DEPTH];
  bit mval [DEPTH];
  int checks = 0, failures = 0;

  task automatic cmp_lookup();
    logic [PD-1:0] e;
    for (int i = 0; i < PD; i++) e[i] = mval[int'(lk_part) * PD + i] && mkey[int'(lk_part) * PD + i] == lk_key;
    checks++;
    if (lk_match != e) begin
      failures++;
      if (failures < 10) $display("FAIL lookup part %0d key %0d", lk_part, lk_key);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin mval[i] = 0; mkey[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 1) == 1);
      wr_addr = 10'($urandom_range(0, DEPTH-1));
      wr_key = 8'($urandom_range(0, 15));   // few distinct keys: many matches
      clr_en = ($urandom_range(0, 2) == 0);
      clr_addr = (t % 11 == 0) ? wr_addr : 10'($urandom_range(0, DEPTH-1));
      lk_part = 2'($urandom_range(0, 3));
      lk_key = 8'($urandom_range(0, 15));
      #1;
      cmp_lookup();
      if (wr_en) begin
        checks++;
        if (wr_slot_live != (mval[wr_addr] && !(clr_en && clr_addr == wr_addr))) failures++;
      end
      @(posedge clk);
      if (clr_en) mval[clr_addr] = 0;
      if (wr_en) begin mval[wr_addr] = 1; mkey[wr_addr] = wr_key; end
    end
    @(negedge clk);
    wr_en = 0; clr_en = 0;
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    for (int i = 0; i < DEPTH; i++) mval[i] = 0;
    for (int p = 0; p < NP; p++) for (int k = 0; k < 16; k++) begin
      lk_part = 2'(p); lk_key = 8'(k);
      #1;
      cmp_lookup();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
