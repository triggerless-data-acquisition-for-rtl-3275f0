// tb_ring_buffer_cam: self-checking test of one Ring-CAM resequencer at its
// default size (1024 slots, four partitions, 8-bit key, 16 cycles per key).
//
// Stimulus: hits are generated at run time g with key (g >> 4) mod 256 and
// reach the input after a random skew of up to MAX_SKEW cycles, so they arrive
// out of key order; occasional bursts put many hits on one key. Every hit
// carries a unique id in its side data. A scoreboard indexed by id checks
// every output: no ghost (unknown or repeated id), the key it was sent with,
// keys non-decreasing (modulo 256), no output before the key has aged past
// the configured latency, and consecutive hits of one key exactly 5 cycles
// apart (the pop-engine service time). At the end every hit must have come
// out. Further phases check the identity registers, late-hit filtering, the
// error tag with filtering off, ring overwrite (oldest hits lost, newest
// kept), pop-command backlog, egress-not-ready drops, cache misses and the
// counter freeze snapshot.
`timescale 1ns/1ps
module tb_ring_buffer_cam;
  import rbcam_pkg::*;

  localparam int LAT      = 400;
  localparam int MAX_SKEW = 300;
  localparam int MAXH     = 8192;

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
  logic        out_ready = 1'b1;
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
    .aso_hit_type2_valid(out_valid), .aso_hit_type2_data(out_hit), .aso_hit_type2_ready(out_ready),
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

  // ---------------- run clock kept by the testbench
  int unsigned tnow = 0;   // cycles since the run started counting
  bit counting = 1'b0;
  always @(posedge clk) if (counting) tnow <= tnow + 1;

  // ---------------- scoreboard
  int   exp_key  [MAXH];
  int   exp_gen  [MAXH];
  bit   sent     [MAXH];
  bit   seen     [MAXH];
  bit   expect_err [MAXH];
  int   nsent = 0, nseen = 0;
  int   last_key = -1;
  int   last_out_cyc = -100;
  int   cyc = 0;
  int   same_key_gap_ok = 0, same_key_pairs = 0;
  int   latency_checks = 0;
  bit   check_gaps = 1'b1;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int id;
      id = int'(out_hit.side[15:0]);
      check(id < nsent && sent[id] && !seen[id], $sformatf("ghost or duplicate id %0d", id));
      if (id < nsent && sent[id] && !seen[id]) begin
        seen[id] = 1'b1;
        nseen++;
        check(int'(out_hit.ts) == (exp_key[id] & 255), $sformatf("key of id %0d", id));
        check(out_hit.err == expect_err[id], $sformatf("err tag of id %0d", id));
        // ready rule: key's last cycle is at least LAT cycles old
        if (!expect_err[id]) begin
          check(int'(tnow) - LAT >= exp_key[id] * 16 + 15, $sformatf("early output id %0d", id));
          latency_checks++;
        end
        if (last_key >= 0 && !expect_err[id]) begin
          check(exp_key[id] >= last_key, $sformatf("misordered: key %0d after %0d", exp_key[id], last_key));
          if (check_gaps && exp_key[id] == last_key) begin
            same_key_pairs++;
            check(cyc - last_out_cyc == 5, $sformatf("service gap %0d != 5", cyc - last_out_cyc));
          end
        end
        if (!expect_err[id]) last_key = exp_key[id];
        last_out_cyc = cyc;
      end
    end
  end

  // ---------------- CSR access
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
  task automatic csr_read64(input logic [4:0] lo, input logic [4:0] hi, output logic [63:0] v);
    logic [31:0] a, b;
    csr_read(lo, a);
    csr_read(hi, b);
    v = {b, a};
  endtask

  task automatic run_to(input run_state_e s);
    @(negedge clk);
    run_valid = 1'b1; run_state = s;
    @(negedge clk);
    run_valid = 1'b0;
    if (s == RUN_RUNNING || s == RUN_TERMINATING) counting = 1'b1;
    else counting = 1'b0;
    if (s == RUN_PREPARE) tnow = 0;
  endtask

  // send one hit now (at the next negedge) whose generation time is g
  task automatic send(input int g, input bit err);
    @(negedge clk);
    in_valid = 1'b1;
    in_hit.err  = err;
    in_hit.ts   = 8'((g >> 4) & 255);
    in_hit.side = 31'(nsent);
    exp_key[nsent] = g >> 4;
    exp_gen[nsent] = g;
    expect_err[nsent] = err;
    sent[nsent] = 1'b1;
    seen[nsent] = 1'b0;
    nsent++;
  endtask
  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  logic [31:0] r;
  logic [63:0] v, v2;
  int n_keys_with_hits;

  initial begin
    for (int i = 0; i < MAXH; i++) begin sent[i] = 0; seen[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- identity and defaults
    csr_read(CSR_UID, r);                check(r == 32'h5242434D, "UID RBCM");
    csr_read(CSR_META, r);               check(r == {8'd26, 8'd2, 4'd13, 12'd516}, "META VERSION");
    csr_write(CSR_META, 32'd2);
    csr_read(CSR_META, r);               check(r == 32'h23CE513F, "META GIT");
    csr_write(CSR_META, 32'd3);
    csr_read(CSR_META, r);               check(r == 32'd0, "META INSTANCE_ID");
    csr_read(CSR_EXPECTED_LATENCY, r);   check(r == 32'd2000, "EXPECTED_LATENCY reset 2000");
    csr_read(CSR_CTRL, r);               check(r[0] == 1'b1 && r[4] == 1'b1, "CTRL reset go, filter");
    csr_write(CSR_EXPECTED_LATENCY, LAT);

    // ---- phase 1: skewed stream with bursts, 0.1 hit/cycle on average
    run_to(RUN_PREPARE);
    run_to(RUN_RUNNING);
    for (int c = 0; c < 6000; c++) begin
      int g;
      if (c % 1000 == 500) begin
        // burst: 12 hits on one key, back to back
        g = (int'(tnow) > 50) ? int'(tnow) - 50 : 0;
        for (int b = 0; b < 12; b++) send(g, 1'b0);
        c += 12;
      end else if ($urandom_range(0, 99) < 9) begin
        g = int'(tnow) - int'($urandom_range(0, MAX_SKEW));
        if (g < 0) g = 0;
        send(g, 1'b0);
      end else idle();
    end
    idle();
    repeat (LAT + 400) @(negedge clk);
    check(nseen == nsent, $sformatf("phase 1 lost hits: sent %0d seen %0d", nsent, nseen));
    check(same_key_pairs > 20, "same-key pairs observed");
    csr_read64(5'h06, 5'h0B, v);  check(v == 64'(nsent), "PUSH count");
    csr_read64(5'h07, 5'h0C, v);  check(v == 64'(nsent), "POP count");
    csr_read64(5'h08, 5'h0D, v);  check(v == 0, "no overwrite");
    csr_read(CSR_FILL_LEVEL, r);  check(r == 0 && filllevel == 0, "fill level 0 after drain");
    csr_read64(5'h09, 5'h0E, v);  check(v > 0, "cache misses on empty keys");

    // ---- phase 2: late hit is filtered, error hit with filter off is tagged
    begin
      int late_g;
      late_g = int'(tnow) - LAT - 200;   // key long issued
      @(negedge clk);
      in_valid = 1'b1;
      in_hit.err = 1'b0; in_hit.ts = 8'((late_g >> 4) & 255); in_hit.side = 31'(MAXH - 1);
      idle();
      repeat (4) @(negedge clk);
      csr_read64(5'h05, 5'h0A, v); check(v == 1, "late hit counted as INERR");
    end
    csr_write(CSR_CTRL, 32'h01);      // go, filter off
    send(int'(tnow) - 20, 1'b1);
    idle();
    repeat (LAT + 100) @(negedge clk);
    check(nseen == nsent, "error-tagged hit emitted with filter off");
    csr_write(CSR_CTRL, 32'h11);

    // ---- phase 3: egress not ready drops and counts
    begin
      int id0;
      id0 = nsent;
      send(int'(tnow), 1'b0);
      idle();
      out_ready = 1'b0;
      repeat (LAT + 100) @(negedge clk);
      out_ready = 1'b1;
      seen[id0] = 1'b1; nseen++;     // dropped at egress by design
      csr_read64(5'h13, 5'h14, v); check(v == 1, "egress not-ready drop counted");
    end

    // ---- phase 4: counter freeze snapshot
    csr_write(CSR_CTRL, 32'h31);     // go, filter, freeze
    csr_read64(5'h06, 5'h0B, v);
    send(int'(tnow), 1'b0);
    idle();
    repeat (4) @(negedge clk);
    csr_read64(5'h06, 5'h0B, v2);   check(v2 == v, "frozen PUSH count unchanged");
    csr_write(CSR_CTRL, 32'h11);
    csr_read64(5'h06, 5'h0B, v2);   check(v2 == v + 1, "live PUSH count after unfreeze");
    repeat (LAT + 100) @(negedge clk);
    check(nseen == nsent, "hit after freeze emitted");

    // ---- phase 5: overwrite: 300 hits on one key overflow its 256-slot partition
    csr_write(CSR_CTRL, 32'h13);     // soft reset (clears counters and storage)
    begin
      int first, g;
      first = nsent;
      last_key = -1;
      g = int'(tnow);
      for (int b = 0; b < 300; b++) send(g, 1'b0);
      idle();
      for (int b = 0; b < 44; b++) begin seen[first + b] = 1'b1; nseen++; end  // oldest 44 lost
      check_gaps = 1'b1;
      repeat (LAT + 300 * 5 + 400) @(negedge clk);
      check(nseen == nsent, $sformatf("overwrite: newest 256 kept (seen %0d of %0d)", nseen, nsent));
      csr_read64(5'h08, 5'h0D, v);  check(v == 44, $sformatf("OVERWRITE count %0d", v));
      csr_read64(5'h07, 5'h0C, v);  check(v == 256, "POP count after overwrite");
      csr_read64(5'h11, 5'h12, v);  check(v > 0, "pop-command FIFO full observed");
      csr_read(CSR_FILL_LEVEL, r);  check(r == 0, "fill level 0");
    end

    // ---- phase 6: RUN_PREPARE flushes; stored hits vanish
    send(int'(tnow), 1'b0);
    idle();
    run_to(RUN_IDLE);
    run_to(RUN_PREPARE);
    seen[nsent - 1] = 1'b1; nseen++;
    last_key = -1;
    run_to(RUN_RUNNING);
    repeat (LAT + 100) @(negedge clk);
    check(nseen == nsent, "no output after flush");

    $display("latency checks %0d, same-key pairs %0d", latency_checks, same_key_pairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
