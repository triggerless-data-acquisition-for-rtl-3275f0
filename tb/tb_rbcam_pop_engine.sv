// tb_rbcam_pop_engine: the pop engine on a 64-slot, four-partition ring whose
// CAM and side RAM are modelled here. Slots are filled with hits of keys
// p, p+4 and p+8 in partition p (unique ids as data). Pop commands for keys
// 0..15 must emit, per key, exactly the slots holding it, oldest first from
// the partition's write pointer, 5 cycles apart, clearing each slot; an empty
// key must give one cache-miss pulse; done_key must follow each command.
// Further checks: a command FIFO full flag; egress drops counted while
// out_ready is low; and a slot overwritten during its read (clobber) is
// neither emitted nor cleared.
`timescale 1ns/1ps
module tb_rbcam_pop_engine;
  import rbcam_pkg::*;
  localparam int DEPTH = 64, NP = 4, PD = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;

  logic flush = 1'b0, cmd_valid = 1'b0, cmd_full;
  key_t cmd_key = '0;
  logic [1:0] lk_part;
  key_t lk_key;
  logic [PD-1:0] lk_match = '0;
  logic clr_en, rd_en;
  logic [5:0] clr_addr, rd_addr;
  logic [NP-1:0][3:0] wptr;
  logic wr_en = 1'b0;
  logic [5:0] wr_addr = '0;
  hit_t rd_hit = '0;
  logic out_valid, out_ready = 1'b1, done_seen, busy;
  hit_t out_hit;
  key_t done_key;
  logic ev_pop, ev_miss, ev_egress_drop;

  rbcam_pop_engine #(.DEPTH(DEPTH), .N_PART(NP), .PART_LSB(0), .CMD_DEPTH(4)) dut (
    .clk, .rst_n, .flush, .cmd_valid, .cmd_key, .cmd_full,
    .lk_part, .lk_key, .lk_match, .clr_en, .clr_addr, .wptr, .wr_en, .wr_addr,
    .rd_en, .rd_addr, .rd_hit, .out_valid, .out_hit, .out_ready,
    .done_seen, .done_key, .busy, .ev_pop, .ev_miss, .ev_egress_drop);

  // CAM / RAM model
  bit   mval [DEPTH];
  key_t mkey [DEPTH];
  hit_t mdat [DEPTH];
  always @(posedge clk) begin
    if (rd_en) rd_hit <= mdat[rd_addr];
    if (clr_en) mval[clr_addr] = 1'b0;
  end
  always @(negedge clk)
    for (int i = 0; i < PD; i++) lk_match[i] <= mval[int'(lk_part) * PD + i] && mkey[int'(lk_part) * PD + i] == lk_key;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s t=%0t", what, $time); end
  endtask

  // expected output queue, built from the model n_before the commands run
  int exp_q [$];
  int cyc = 0, last_out = -100, n_out = 0, n_miss = 0, n_drop = 0;
  int cur_key_of_last = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid && out_ready) begin
      int id;
      id = int'(out_hit.side);
      check(exp_q.size() > 0, "unexpected output");
      if (exp_q.size() > 0) begin
        check(id == exp_q[0], $sformatf("output id %0d expected %0d", id, exp_q[0]));
        void'(exp_q.pop_front());
      end
      if (int'(out_hit.ts) == cur_key_of_last)
        check(cyc - last_out == 5, $sformatf("gap %0d", cyc - last_out));
      cur_key_of_last = int'(out_hit.ts);
      last_out = cyc;
      n_out++;
    end
    if (rst_n && ev_miss) n_miss++;
    if (rst_n && ev_egress_drop) n_drop++;
  end

  task automatic expect_key(input int k);
    int p;
    p = k % NP;
    for (int j = 0; j < PD; j++) begin
      int s;
      s = p * PD + (int'(wptr[p]) + j) % PD;
      if (mval[s] && int'(mkey[s]) == k) exp_q.push_back(int'(mdat[s].side));
    end
  endtask

  task automatic command(input int k);
    @(negedge clk);
    while (cmd_full) @(negedge clk);
    cmd_valid = 1'b1; cmd_key = key_t'(k);
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  int nid = 0, exp_miss = 0;
  initial begin
    for (int i = 0; i < DEPTH; i++) begin mval[i] = 0; mkey[i] = 0; mdat[i] = '0; end
    for (int p = 0; p < NP; p++) wptr[p] = 4'($urandom_range(0, PD-1));
    for (int s = 0; s < DEPTH; s++) if ($urandom_range(0, 3) != 0) begin
      mval[s] = 1;
      mkey[s] = key_t'((s / PD) + 4 * $urandom_range(0, 2));
      mdat[s].ts = mkey[s];
      mdat[s].side = 31'(nid++);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 16; k++) begin
      int n_before;
      n_before = exp_q.size();
      expect_key(k);                               // keys 12..15 are empty
      if (exp_q.size() == n_before) exp_miss++;
    end
    for (int k = 0; k < 16; k++) command(k);
    repeat (600) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d hits not emitted", exp_q.size()));
    check(n_miss == exp_miss && exp_miss >= 4, $sformatf("cache misses %0d expected %0d", n_miss, exp_miss));
    check(done_seen && done_key == 8'd15, "done_key after last command");
    for (int s = 0; s < DEPTH; s++) check(!mval[s] || mkey[s] >= 12, "slot cleared");
    check(n_out == nid, "every stored hit emitted");

    // command FIFO full: five back-to-back commands while busy
    for (int s = 0; s < 8; s++) begin mval[s] = 1; mkey[s] = 8'd20; mdat[s].ts = 8'd20; mdat[s].side = 31'(nid++); end
    wptr[0] = 4'd0;
    expect_key(20);
    @(negedge clk); cmd_valid = 1'b1; cmd_key = 8'd20;
    @(negedge clk); cmd_key = 8'd24;
    @(negedge clk); cmd_key = 8'd28;
    @(negedge clk); cmd_key = 8'd32;
    @(negedge clk); cmd_key = 8'd36;
    @(negedge clk); cmd_valid = 1'b0;
    check(cmd_full, "command FIFO full");
    repeat (200) @(negedge clk);
    check(exp_q.size() == 0, "burst key emitted");

    // egress not ready: hits are dropped and counted
    for (int s = 16; s < 19; s++) begin mval[s] = 1; mkey[s] = 8'd41; mdat[s].ts = 8'd41; mdat[s].side = 31'(nid++); end
    wptr[1] = 4'd0;
    out_ready = 1'b0;
    command(41);
    repeat (60) @(negedge clk);
    out_ready = 1'b1;
    check(n_drop == 3, $sformatf("egress drops %0d expected 3", n_drop));

    // clobber: overwrite the slot while it is being read
    mval[32] = 1; mkey[32] = 8'd46; mdat[32].ts = 8'd46; mdat[32].side = 31'(nid++);
    wptr[2] = 4'd0;
    command(46);
    while (!rd_en) @(negedge clk);
    wr_en = 1'b1; wr_addr = 6'd32;
    mkey[32] = 8'd99;       // the push engine stores a new hit of another key
    mdat[32].ts = 8'd99;
    @(negedge clk);
    wr_en = 1'b0;
    repeat (40) @(negedge clk);
    check(mval[32], "clobbered slot not cleared");
    check(exp_q.size() == 0, "clobbered hit not emitted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
