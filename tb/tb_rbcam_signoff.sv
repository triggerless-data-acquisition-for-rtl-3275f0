// tb_rbcam_signoff: run-control sign-off sequences on one Ring-CAM at its
// default size and default read delay (1024 slots, 8-bit key, 16 cycles per
// key, EXPECTED_LATENCY 2000 cycles from reset, no CSR writes except CTRL).
//
// Two sequences, each with 2048-hit phases at 0.125 hit/cycle, arrival skew
// up to 1500 cycles and occasional bursts of 16 hits on one key:
//   A: GOOD(2048) -> ERROR(64) -> FLUSH -> GOOD(2048)
//   B: GOOD(2048) -> TERMINATING -> IDLE -> RUN_PREPARE -> RUNNING -> GOOD(2048)
// ERROR hits carry the error flag and must be dropped and counted by the
// timestamp-error filter. Before FLUSH a few fresh hits are left in the ring;
// the flush (entering RUN_PREPARE) must discard them and zero the fill level.
// In B the hits still stored at TERMINATING must drain before IDLE, and
// nothing may come out while IDLE.
//
// A scoreboard indexed by a unique id in the side data checks, for every
// output: no ghost or repeated hit, the key it was sent with, keys
// non-decreasing within a run, and that the key's last cycle is at least
// 2000 cycles old. At the end of every GOOD phase all its hits must be out.
// Each mechanism (error filter, flush discard, drain at TERMINATING, quiet
// IDLE, bursts) is counted and must have happened.
`timescale 1ns/1ps
module tb_rbcam_signoff;
  import rbcam_pkg::*;

  localparam int LAT      = 2000;
  localparam int MAX_SKEW = 1500;
  localparam int MAXH     = 16384;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #4 clk = ~clk;

  logic [4:0]  csr_addr = '0;
  logic        csr_rd = 1'b0, csr_wr = 1'b0;
  logic [31:0] csr_wdata = '0, csr_rdata;
  logic        in_valid = 1'b0;
  hit_t        in_hit = '0;
  logic        out_valid;
  hit_t        out_hit;
  logic        run_valid = 1'b0;
  run_state_e  run_state = RUN_IDLE;
  logic        done_seen;
  key_t        done_key;
  logic [31:0] filllevel;

  ring_buffer_cam dut (
    .clk, .rst_n,
    .avs_csr_address(csr_addr), .avs_csr_read(csr_rd), .avs_csr_write(csr_wr),
    .avs_csr_writedata(csr_wdata), .avs_csr_readdata(csr_rdata),
    .asi_hit_type1_valid(in_valid), .asi_hit_type1_data(in_hit),
    .aso_hit_type2_valid(out_valid), .aso_hit_type2_data(out_hit), .aso_hit_type2_ready(1'b1),
    .asi_run_control_valid(run_valid), .asi_run_control_data(run_state),
    .filllevel, .done_seen, .done_key
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // run clock kept by the testbench, in step with the design's
  int unsigned tnow = 0;
  bit counting = 1'b0;
  always @(posedge clk) if (counting) tnow <= tnow + 1;

  int exp_key [MAXH];
  bit sent    [MAXH];
  bit seen    [MAXH];
  bit doomed  [MAXH];   // flushed or filtered: must never come out
  int sent_t  [MAXH];   // run time at which it was sent
  int nsent = 0, nseen = 0;
  int last_key = -1;
  int out_while_idle = 0;
  bit in_idle = 1'b0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int id;
      id = int'(out_hit.side[15:0]);
      if (in_idle) out_while_idle++;
      check(id < nsent && sent[id] && !seen[id] && !doomed[id], $sformatf("ghost, repeated or flushed id %0d", id));
      if (id < nsent && sent[id] && !seen[id]) begin
        seen[id] = 1'b1;
        nseen++;
        check(int'(out_hit.ts) == (exp_key[id] & 255) && !out_hit.err, $sformatf("key/err of id %0d", id));
        check(int'(tnow) - LAT >= exp_key[id] * 16 + 15, $sformatf("early output id %0d", id));
        check(exp_key[id] >= last_key, $sformatf("misordered: key %0d after %0d", exp_key[id], last_key));
        last_key = exp_key[id];
      end
    end
  end

  task automatic csr_write(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk);
    csr_addr = a; csr_wdata = d; csr_wr = 1'b1;
    @(negedge clk);
    csr_wr = 1'b0;
  endtask
  task automatic csr_read(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    csr_addr = a; csr_rd = 1'b1;
    @(negedge clk);
    csr_rd = 1'b0;
    d = csr_rdata;
  endtask

  task automatic run_to(input run_state_e s);
    @(negedge clk);
    run_valid = 1'b1; run_state = s;
    @(negedge clk);
    run_valid = 1'b0;
    counting = (s == RUN_RUNNING || s == RUN_TERMINATING);
    if (s == RUN_PREPARE) begin tnow = 0; last_key = -1; end
  endtask

  task automatic send(input int g, input bit err);
    @(negedge clk);
    in_valid = 1'b1;
    in_hit.err  = err;
    in_hit.ts   = 8'((g >> 4) & 255);
    in_hit.side = 31'(nsent);
    exp_key[nsent] = g >> 4;
    sent[nsent] = 1'b1;
    seen[nsent] = 1'b0;
    doomed[nsent] = err;
    sent_t[nsent] = int'(tnow);
    nsent++;
  endtask
  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  int bursts = 0;
  // 2048 hits at about 0.125 hit/cycle, skewed, with bursts of 16
  task automatic good_phase(output int first_id);
    int n = 0;
    first_id = nsent;
    while (n < 2048) begin
      int g;
      if ($urandom_range(0, 999) < 3 && n <= 2048 - 16) begin
        g = (int'(tnow) > 200) ? int'(tnow) - 200 : 0;
        for (int b = 0; b < 16; b++) send(g, 1'b0);
        n += 16;
        bursts++;
        repeat (112) idle();   // keep the long-run rate at 0.125
      end else if ($urandom_range(0, 7) == 0) begin
        g = int'(tnow) - int'($urandom_range(0, MAX_SKEW));
        if (g < 0) g = 0;
        send(g, 1'b0);
        n++;
      end else idle();
    end
    idle();
  endtask

  task automatic expect_all_out(input int from, input int to, input string what);
    int miss = 0;
    for (int i = from; i < to; i++) if (!seen[i]) begin
      miss++;
      if (miss < 4) $display("missing id %0d key %0d sent_at %0d", i, exp_key[i], sent_t[i]);
    end
    check(miss == 0, $sformatf("%s: %0d hits missing", what, miss));
  endtask

  logic [31:0] r, inerr0, inerr1;
  int a0, a1, b0, b1, first_doomed, n_flushed = 0, n_drained = 0, n_filtered = 0;
  int seen_at_term;

  initial begin
    for (int i = 0; i < MAXH; i++) begin sent[i] = 0; seen[i] = 0; doomed[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    csr_read(CSR_EXPECTED_LATENCY, r);
    check(r == 32'd2000, "default read delay 2000 cycles");

    // ---------------- sequence A
    run_to(RUN_PREPARE);
    run_to(RUN_RUNNING);
    good_phase(a0);
    repeat (LAT + 600) idle();
    expect_all_out(a0, nsent, "A first GOOD");
    check(filllevel == 0, "A fill level empty after GOOD");

    csr_read(CSR_CNT_LO_BASE + 5'(CNT_INERR), inerr0);
    check(inerr0 == 0, $sformatf("A no timestamp errors in GOOD, got %0d", inerr0));
    csr_read(CSR_CNT_LO_BASE + 5'(CNT_OVERWRITE), r);
    check(r == 0, $sformatf("A no overwrites in GOOD, got %0d", r));
    for (int i = 0; i < 64; i++) begin
      send(int'(tnow), 1'b1);
      idle();
    end
    repeat (LAT + 100) idle();
    csr_read(CSR_CNT_LO_BASE + 5'(CNT_INERR), inerr1);
    n_filtered = int'(inerr1 - inerr0);
    check(n_filtered == 64, $sformatf("A ERROR(64) filtered %0d", n_filtered));
    check(filllevel == 0, "A error hits not stored");

    // fresh hits that are not yet due, then the flush discards them
    first_doomed = nsent;
    for (int i = 0; i < 40; i++) begin
      send(int'(tnow), 1'b0);
      doomed[nsent - 1] = 1'b1;
      idle();
    end
    repeat (3) idle();
    check(filllevel == 40, $sformatf("A 40 hits pending before flush, fill %0d", filllevel));
    run_to(RUN_PREPARE);
    repeat (2) idle();
    check(filllevel == 0, "A fill level zero after flush");
    run_to(RUN_RUNNING);
    good_phase(a1);
    repeat (LAT + 600) idle();
    expect_all_out(a1, nsent, "A second GOOD");
    for (int i = first_doomed; i < first_doomed + 40; i++) if (!seen[i]) n_flushed++;
    check(n_flushed == 40, "A all flushed hits discarded");

    // ---------------- sequence B
    good_phase(b0);
    seen_at_term = nseen;
    run_to(RUN_TERMINATING);
    repeat (LAT + 600) idle();
    n_drained = nseen - seen_at_term;
    expect_all_out(b0, nsent, "B GOOD drained during TERMINATING");
    check(filllevel == 0, "B empty after TERMINATING");
    run_to(RUN_IDLE);
    in_idle = 1'b1;
    // hits sent while IDLE are not taken
    for (int i = 0; i < 8; i++) begin
      send(int'(tnow), 1'b0);
      doomed[nsent - 1] = 1'b1;
      idle();
    end
    repeat (3000) idle();
    in_idle = 1'b0;
    check(filllevel == 0, "B IDLE stores nothing");
    run_to(RUN_PREPARE);
    run_to(RUN_RUNNING);
    good_phase(b1);
    repeat (LAT + 600) idle();
    expect_all_out(b1, nsent, "B second GOOD");

    // mechanisms
    $display("mechanisms: filtered=%0d flushed=%0d drained_in_TERM=%0d bursts=%0d out_while_idle=%0d",
             n_filtered, n_flushed, n_drained, bursts, out_while_idle);
    check(n_drained > 0, "TERMINATING drained stored hits");
    check(bursts > 0, "bursts happened");
    check(out_while_idle == 0, "no output while IDLE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
