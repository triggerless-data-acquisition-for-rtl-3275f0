// tb_rbcam_system: end-to-end test of the four-instance Ring-CAM stack at its
// default parameters (4 x 1024 slots, 8-bit key, 16 cycles per key).
//
// Hits with unique ids are generated with a random skew and fed through the
// splitter at about 0.4 hit/cycle, well above what one pop engine serves
// (0.2), so the stack is needed. A scoreboard checks that the merged output
// holds no ghost or duplicate, keeps each hit's key, is in non-decreasing key
// order across all instances, and loses nothing. The sink applies random
// backpressure. Each mechanism of the design is made to happen and counted:
// routing to every instance, merge advance on an empty key, backpressure
// stalls, a burst, cache misses, late-hit filtering, pop-command backlog, ring
// overwrite and run-control flush; a mechanism that never occurs is a failure.
`timescale 1ns/1ps
module tb_rbcam_system;
  import rbcam_pkg::*;

  localparam int NS       = 4;
  localparam int LAT      = 600;
  localparam int MAX_SKEW = 400;
  localparam int MAXH     = 16384;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #4 clk = ~clk;

  logic        in_valid = 1'b0;
  hit_t        in_hit = '0;
  logic        run_valid = 1'b0;
  run_state_e  run_state = RUN_IDLE;
  logic [NS-1:0][4:0]  csr_address = '0;
  logic [NS-1:0]       csr_read = '0, csr_write = '0;
  logic [NS-1:0][31:0] csr_writedata = '0, csr_readdata;
  logic        out_valid;
  hit_t        out_hit;
  logic        out_ready = 1'b1;
  logic [NS-1:0][31:0] filllevel;

  rbcam_system dut (
    .clk, .rst_n,
    .hit_type1_valid(in_valid), .hit_type1_data(in_hit),
    .run_control_valid(run_valid), .run_control_data(run_state),
    .csr_address, .csr_read, .csr_write, .csr_writedata, .csr_readdata, .filllevel,
    .hit_type2_valid(out_valid), .hit_type2_data(out_hit), .hit_type2_ready(out_ready)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  int unsigned tnow = 0;
  bit counting = 1'b0;
  always @(posedge clk) if (counting) tnow <= tnow + 1;

  int exp_key [MAXH];
  bit sent [MAXH];
  bit seen [MAXH];
  int nsent = 0, nseen = 0;
  int last_key = -1;
  bit rand_ready = 1'b0;

  // mechanism counters
  int m_route [NS];
  int m_stall = 0, m_burst = 0, m_late = 0, m_overwrite = 0, m_cmdfull = 0, m_flush = 0;
  int m_miss = 0, m_advance_empty = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int id;
      id = int'(out_hit.side[15:0]);
      check(id < nsent && sent[id] && !seen[id], $sformatf("ghost or duplicate id %0d", id));
      if (id < nsent && sent[id] && !seen[id]) begin
        seen[id] = 1'b1;
        nseen++;
        check(int'(out_hit.ts) == (exp_key[id] & 255), $sformatf("key of id %0d", id));
        if (last_key >= 0)
          check(exp_key[id] >= last_key, $sformatf("misordered: key %0d after %0d", exp_key[id], last_key));
        last_key = exp_key[id];
      end
    end
    if (rst_n && out_valid && !out_ready) m_stall++;
    if (rst_n && in_valid) m_route[int'(in_hit.ts) % NS]++;
    // the merger stepped past a key while no hit for it was waiting
    if (rst_n && dut.u_merge.done_past && !dut.u_merge.head_due && dut.u_merge.empty[dut.u_merge.src])
      m_advance_empty++;
  end

  always @(negedge clk) out_ready <= rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic csr_wr(input int i, input logic [4:0] a, input logic [31:0] d);
    @(negedge clk);
    csr_address[i] = a; csr_writedata[i] = d; csr_write[i] = 1'b1;
    @(negedge clk);
    csr_write[i] = 1'b0;
  endtask
  task automatic csr_rd(input int i, input logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    csr_address[i] = a; csr_read[i] = 1'b1;
    @(negedge clk);
    csr_read[i] = 1'b0;
    d = csr_readdata[i];
  endtask

  task automatic run_to(input run_state_e s);
    @(negedge clk);
    run_valid = 1'b1; run_state = s;
    @(negedge clk);
    run_valid = 1'b0;
    counting = (s == RUN_RUNNING || s == RUN_TERMINATING);
    if (s == RUN_PREPARE) tnow = 0;
  endtask

  task automatic send(input int g);
    @(negedge clk);
    in_valid = 1'b1;
    in_hit.err  = 1'b0;
    in_hit.ts   = 8'((g >> 4) & 255);
    in_hit.side = 31'(nsent);
    exp_key[nsent] = g >> 4;
    sent[nsent] = 1'b1;
    seen[nsent] = 1'b0;
    nsent++;
  endtask
  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  logic [31:0] r;

  initial begin
    for (int i = 0; i < MAXH; i++) begin sent[i] = 0; seen[i] = 0; end
    for (int i = 0; i < NS; i++) m_route[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NS; i++) begin
      csr_wr(i, CSR_META, 32'd3);
      csr_rd(i, CSR_META, r); check(r == 32'(i), "instance id");
      csr_wr(i, CSR_EXPECTED_LATENCY, LAT);
    end

    // ---- phase 1: skewed stream at ~0.4 hit/cycle, bursts, backpressure
    run_to(RUN_PREPARE);
    m_flush++;
    run_to(RUN_RUNNING);
    rand_ready = 1'b1;
    for (int c = 0; c < 8000; c++) begin
      int g;
      if (c % 2000 == 1000) begin
        g = int'(tnow) - 100;
        for (int b = 0; b < 16; b++) send(g);
        m_burst++;
        c += 16;
      end else if ($urandom_range(0, 99) < 40) begin
        g = int'(tnow) - int'($urandom_range(0, MAX_SKEW));
        if (g < 0) g = 0;
        send(g);
      end else idle();
    end
    idle();
    // ---- a late hit is filtered in its instance
    @(negedge clk);
    in_valid = 1'b1; in_hit.err = 1'b0;
    in_hit.ts = 8'(((int'(tnow) - LAT - 300) >> 4) & 255); in_hit.side = 31'(MAXH - 1);
    idle();
    repeat (LAT + 600) @(negedge clk);
    rand_ready = 1'b0;
    check(nseen == nsent, $sformatf("phase 1 lost hits: sent %0d seen %0d", nsent, nseen));
    for (int i = 0; i < NS; i++) begin
      csr_rd(i, 5'h05, r); m_late += int'(r);
      csr_rd(i, 5'h09, r); m_miss += int'(r);
    end
    check(m_late == 1, "exactly one late hit filtered");


    // ---- phase 2: 300 hits on one key overflow a 256-slot partition
    begin
      int first, g, inst;
      first = nsent;
      g = int'(tnow);
      inst = (g >> 4) % NS;
      for (int b = 0; b < 300; b++) send(g);
      idle();
      for (int b = 0; b < 44; b++) begin seen[first + b] = 1'b1; nseen++; end
      repeat (LAT + 300 * 5 + 600) @(negedge clk);
      check(nseen == nsent, $sformatf("overwrite phase: seen %0d of %0d", nseen, nsent));
      csr_rd(inst, 5'h08, r); m_overwrite = int'(r); check(r == 44, "44 overwrites");
      csr_rd(inst, 5'h11, r); m_cmdfull = int'(r);
    end

    // ---- phase 3: TERMINATING drains, RUN_PREPARE flushes stored hits
    send(int'(tnow));
    idle();
    run_to(RUN_TERMINATING);
    repeat (LAT + 200) @(negedge clk);
    check(nseen == nsent, "terminating run drains");
    send(int'(tnow));
    idle();
    run_to(RUN_IDLE);
    run_to(RUN_PREPARE);
    m_flush++;
    seen[nsent - 1] = 1'b1; nseen++;
    last_key = -1;
    run_to(RUN_RUNNING);
    send(int'(tnow) + 5);
    idle();
    repeat (LAT + 200) @(negedge clk);
    check(nseen == nsent, "new run after flush delivers");

    // ---- every mechanism must have happened
    for (int i = 0; i < NS; i++) check(m_route[i] > 0, $sformatf("routing to instance %0d", i));
    check(m_stall > 0,         "output backpressure");
    check(m_burst > 0,         "burst");
    check(m_late > 0,          "late-hit filter");
    check(m_miss > 0,          "cache miss");
    check(m_advance_empty > 0, "merge advance over empty key");
    check(m_overwrite > 0,     "ring overwrite");
    check(m_cmdfull > 0,       "pop-command backlog");
    check(m_flush > 1,         "flush");
    $display("hits %0d, stalls %0d, misses %0d, empty advances %0d, cmd-full %0d, overwrites %0d",
             nsent, m_stall, m_miss, m_advance_empty, m_cmdfull, m_overwrite);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
