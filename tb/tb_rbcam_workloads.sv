// tb_rbcam_workloads: the burstiness workloads, run on the default-size
// designs with the default 2000-cycle read delay.
//
// Part 1 drives one Ring-CAM (ring_buffer_cam, 1024 slots) at 0.125
// hit/cycle. It sweeps the burstiness B = (sigma - mu) / (sigma + mu) of the
// inter-arrival gaps through -1 (periodic), 0 (Poisson), 0.5 and 0.84, with
// 8192 hits per point.
// Part 2 drives the four-instance stack (rbcam_system) at 0.5 hit/cycle,
// above what one pop engine serves (0.2), with B = 0.84 and 8192 hits.
//
// Gaps with a wanted coefficient of variation cv = (1 + B) / (1 - B) come
// from a balanced two-phase hyperexponential distribution, rounded up to
// whole cycles. The B and rate actually reached are measured and checked.
// Each hit is stamped with its arrival time minus a uniform skew of up to
// 1000 cycles and carries a unique id.
//
// Checks, per design: no ghost or repeated hit, the key it was sent with,
// keys non-decreasing across the whole run, no lost hit, and no overwrite or
// timestamp-error drop (from the counters). The largest fill level seen at
// each point is printed next to the 1024-slot depth.
`timescale 1ns/1ps
module tb_rbcam_workloads;
  import rbcam_pkg::*;

  localparam int NS       = 4;
  localparam int LAT      = 2000;
  localparam int MAX_SKEW = 1000;
  localparam int NHITS    = 8192;
  localparam int MAXH     = 5 * NHITS;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #4 clk = ~clk;

  logic        ring_valid = 1'b0, stack_valid = 1'b0;
  hit_t        in_hit = '0;
  logic        run_valid = 1'b0;
  run_state_e  run_state = RUN_IDLE;

  // single Ring-CAM
  logic [4:0]  r_addr = '0;
  logic        r_rd = 1'b0, r_wr = 1'b0;
  logic [31:0] r_wdata = '0, r_rdata;
  logic        r_out_valid;
  hit_t        r_out_hit;
  logic        r_done_seen;
  key_t        r_done_key;
  logic [31:0] r_fill;

  ring_buffer_cam u_ring (
    .clk, .rst_n,
    .avs_csr_address(r_addr), .avs_csr_read(r_rd), .avs_csr_write(r_wr),
    .avs_csr_writedata(r_wdata), .avs_csr_readdata(r_rdata),
    .asi_hit_type1_valid(ring_valid), .asi_hit_type1_data(in_hit),
    .aso_hit_type2_valid(r_out_valid), .aso_hit_type2_data(r_out_hit), .aso_hit_type2_ready(1'b1),
    .asi_run_control_valid(run_valid), .asi_run_control_data(run_state),
    .filllevel(r_fill), .done_seen(r_done_seen), .done_key(r_done_key)
  );

  // stack of four
  logic [NS-1:0][4:0]  s_addr = '0;
  logic [NS-1:0]       s_rd = '0, s_wr = '0;
  logic [NS-1:0][31:0] s_wdata = '0, s_rdata;
  logic        s_out_valid;
  hit_t        s_out_hit;
  logic [NS-1:0][31:0] s_fill;

  rbcam_system u_stack (
    .clk, .rst_n,
    .hit_type1_valid(stack_valid), .hit_type1_data(in_hit),
    .run_control_valid(run_valid), .run_control_data(run_state),
    .csr_address(s_addr), .csr_read(s_rd), .csr_write(s_wr), .csr_writedata(s_wdata),
    .csr_readdata(s_rdata), .filllevel(s_fill),
    .hit_type2_valid(s_out_valid), .hit_type2_data(s_out_hit), .hit_type2_ready(1'b1)
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
  bit sent    [MAXH];
  bit seen    [MAXH];
  bit to_ring [MAXH];
  int nsent = 0;
  int seen_ring = 0, seen_stack = 0, sent_ring = 0, sent_stack = 0;
  int last_ring = -1, last_stack = -1;

  task automatic score(input hit_t h, input bit ring, inout int last);
    int id;
    id = int'(h.side[15:0]);
    check(id < nsent && sent[id] && !seen[id] && to_ring[id] == ring,
          $sformatf("ghost, repeated or misrouted id %0d", id));
    if (id < nsent && sent[id] && !seen[id]) begin
      seen[id] = 1'b1;
      if (ring) seen_ring++; else seen_stack++;
      check(int'(h.ts) == (exp_key[id] & 255) && !h.err, $sformatf("key/err of id %0d", id));
      check(exp_key[id] >= last, $sformatf("misordered: key %0d after %0d", exp_key[id], last));
      check(int'(tnow) - LAT >= exp_key[id] * 16 + 15, $sformatf("early output id %0d", id));
      last = exp_key[id];
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && r_out_valid) score(r_out_hit, 1'b1, last_ring);
    if (rst_n && s_out_valid) score(s_out_hit, 1'b0, last_stack);
  end

  // largest fill level seen in the current point
  int max_fill = 0;
  always @(posedge clk) begin
    int f;
    f = int'(r_fill);
    for (int i = 0; i < NS; i++) if (int'(s_fill[i]) > f) f = int'(s_fill[i]);
    if (f > max_fill) max_fill = f;
  end

  task automatic run_to(input run_state_e s);
    @(negedge clk);
    run_valid = 1'b1; run_state = s;
    @(negedge clk);
    run_valid = 1'b0;
    counting = (s == RUN_RUNNING || s == RUN_TERMINATING);
    if (s == RUN_PREPARE) tnow = 0;
  endtask

  // uniform in (0, 1]
  function automatic real urand();
    return (real'($urandom_range(0, 32'h3FFF_FFFF)) + 1.0) / 1073741825.0;
  endfunction

  // one gap, in cycles (>= 1), with mean about `mean` and burstiness b
  function automatic int gap(input real mean, input real b);
    real cv, p, m, x;
    if (b <= -0.999) return int'(mean);
    cv = (1.0 + b) / (1.0 - b);
    m  = mean - 0.5;                       // rounding up adds about 0.5
    if (cv <= 1.0) begin
      x = -m * $ln(urand());
    end else begin
      p = 0.5 * (1.0 + $sqrt((cv * cv - 1.0) / (cv * cv + 1.0)));
      if (urand() <= p) x = -(m / (2.0 * p)) * $ln(urand());
      else              x = -(m / (2.0 * (1.0 - p))) * $ln(urand());
    end
    return 1 + int'($floor(x));
  endfunction

  // send NHITS hits to one design; measures the B and rate reached
  task automatic point(input bit ring, input real mean, input real b, input string name);
    real s1 = 0.0, s2 = 0.0, mu, sd, bm, rate;
    int t0;
    t0 = int'(tnow);
    max_fill = 0;
    for (int n = 0; n < NHITS; n++) begin
      int g, key_t0;
      g = gap(mean, b);
      s1 += real'(g);
      s2 += real'(g) * real'(g);
      repeat (g - 1) begin
        @(negedge clk);
        ring_valid = 1'b0; stack_valid = 1'b0;
      end
      @(negedge clk);
      key_t0 = int'(tnow) - int'($urandom_range(0, MAX_SKEW));
      if (key_t0 < 0) key_t0 = 0;
      in_hit.err  = 1'b0;
      in_hit.ts   = 8'((key_t0 >> 4) & 255);
      in_hit.side = 31'(nsent);
      exp_key[nsent] = key_t0 >> 4;
      to_ring[nsent] = ring;
      sent[nsent] = 1'b1;
      seen[nsent] = 1'b0;
      nsent++;
      if (ring) begin ring_valid = 1'b1; sent_ring++; end
      else begin stack_valid = 1'b1; sent_stack++; end
    end
    @(negedge clk);
    ring_valid = 1'b0; stack_valid = 1'b0;
    mu = s1 / NHITS;
    sd = $sqrt(s2 / NHITS - mu * mu);
    bm = (sd - mu) / (sd + mu);
    rate = real'(NHITS) / real'(int'(tnow) - t0);
    $display("%s: target B %0.2f reached B %0.3f, rate %0.3f hit/cycle, largest fill %0d of 1024",
             name, b, bm, rate, max_fill);
    check(bm > b - 0.12 && bm < b + 0.12, $sformatf("%s: burstiness %0.3f", name, bm));
    check(rate > 0.9 / mean && rate < 1.1 / mean, $sformatf("%s: rate %0.3f", name, rate));
    check(max_fill < 1024, $sformatf("%s: fill level reached the depth", name));
  endtask

  task automatic ring_csr_read(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk); r_addr = a; r_rd = 1'b1;
    @(negedge clk); r_rd = 1'b0; d = r_rdata;
  endtask
  task automatic stack_csr_read(input int i, input logic [4:0] a, output logic [31:0] d);
    @(negedge clk); s_addr[i] = a; s_rd[i] = 1'b1;
    @(negedge clk); s_rd[i] = 1'b0; d = s_rdata[i];
  endtask

  logic [31:0] r;

  initial begin
    for (int i = 0; i < MAXH; i++) begin sent[i] = 0; seen[i] = 0; to_ring[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_to(RUN_PREPARE);
    run_to(RUN_RUNNING);

    // Part 1: one Ring-CAM, 0.125 hit/cycle, burstiness sweep
    point(1'b1, 8.0, -1.0, "ring B=-1");
    point(1'b1, 8.0,  0.0, "ring B=0");
    point(1'b1, 8.0,  0.5, "ring B=0.5");
    point(1'b1, 8.0,  0.84, "ring B=0.84");
    // Part 2: stack of four, 0.5 hit/cycle, B = 0.84
    point(1'b0, 2.0,  0.84, "stack B=0.84");

    repeat (LAT + MAX_SKEW + 2000) @(negedge clk);
    check(seen_ring == sent_ring, $sformatf("ring lost hits: sent %0d seen %0d", sent_ring, seen_ring));
    check(seen_stack == sent_stack, $sformatf("stack lost hits: sent %0d seen %0d", sent_stack, seen_stack));
    ring_csr_read(CSR_CNT_LO_BASE + 5'(CNT_OVERWRITE), r); check(r == 0, "ring overwrites");
    ring_csr_read(CSR_CNT_LO_BASE + 5'(CNT_INERR), r);     check(r == 0, "ring timestamp errors");
    ring_csr_read(CSR_CNT_LO_BASE + 5'(CNT_POP), r);       check(r == 32'(sent_ring), "ring POP count");
    for (int i = 0; i < NS; i++) begin
      stack_csr_read(i, CSR_CNT_LO_BASE + 5'(CNT_OVERWRITE), r); check(r == 0, $sformatf("stack %0d overwrites", i));
      stack_csr_read(i, CSR_CNT_LO_BASE + 5'(CNT_INERR), r);     check(r == 0, $sformatf("stack %0d timestamp errors", i));
    end
    $display("ring: %0d of %0d hits out; stack: %0d of %0d hits out", seen_ring, sent_ring, seen_stack, sent_stack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
