// tb_rbcam_merge: the final scheduler of a four-instance stack, fed by four
// modelled instances. For every key k in turn, instance k mod 4 sends a random
// number of hits of key k (zero to five, with random gaps, holding a hit while
// in_ready is low) and then reports done_key = k one cycle later. The
// instances run concurrently, each ahead on its own keys. The merged output,
// under random backpressure, must hold every hit once, in non-decreasing key
// order. Also checks that the scheduler steps over keys with no hit.
`timescale 1ns/1ps
module tb_rbcam_merge;
  import rbcam_pkg::*;
  localparam int NS = 4, NKEYS = 600;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic run_valid = 1'b0;
  run_state_e run_state = RUN_IDLE;
  logic [NS-1:0] in_valid = '0, in_ready, done_seen = '0;
  hit_t [NS-1:0] in_hit = '0;
  key_t [NS-1:0] done_key = '0;
  logic out_valid, out_ready = 1'b1;
  hit_t out_hit;
  key_t cur_key;

  rbcam_merge #(.N_STACK(NS), .FIFO_DEPTH(8)) dut (
    .clk, .rst_n, .run_valid, .run_state, .in_valid, .in_hit, .in_ready,
    .done_seen, .done_key, .out_valid, .out_hit, .out_ready, .cur_key);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s t=%0t", what, $time); end
  endtask

  int nhits [NKEYS];
  int id_key [8192];
  bit seen [8192];
  int total = 0, nseen = 0, last = -1, empties = 0;

  always @(negedge clk) out_ready <= ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int id;
    id = int'(out_hit.side);
    check(id < total && !seen[id], "ghost or duplicate");
    if (id < total && !seen[id]) begin
      seen[id] = 1; nseen++;
      check(id_key[id] >= last, $sformatf("misordered key %0d after %0d", id_key[id], last));
      last = id_key[id];
    end
  end

  // instance i: keys i, i+4, ...
  task automatic instance_proc(input int i);
    for (int k = i; k < NKEYS; k += NS) begin
      int base;
      base = 0;
      for (int j = 0; j < k; j++) base += nhits[j];
      for (int h = 0; h < nhits[k]; h++) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        #1;
        in_valid[i] = 1'b1;
        in_hit[i].ts = key_t'(k);
        in_hit[i].side = 31'(base + h);
        in_hit[i].err = 1'b0;
        // in_ready only changes at clock edges: sample it before the edge
        begin
          bit accepted;
          accepted = in_ready[i];
          @(posedge clk);
          while (!accepted) begin
            @(negedge clk);
            accepted = in_ready[i];
            @(posedge clk);
          end
        end
        @(negedge clk);
        in_valid[i] = 1'b0;
      end
      @(negedge clk);
      @(negedge clk);
      done_seen[i] = 1'b1;
      done_key[i] = key_t'(k);
      repeat ($urandom_range(0, 12)) @(negedge clk);
    end
  endtask

  initial begin
    for (int k = 0; k < NKEYS; k++) begin
      nhits[k] = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 5);
      if (nhits[k] == 0) empties++;
      for (int h = 0; h < nhits[k]; h++) begin id_key[total] = k; seen[total] = 0; total++; end
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_valid = 1'b1; run_state = RUN_PREPARE;
    @(negedge clk); run_valid = 1'b0;
    fork
      instance_proc(0);
      instance_proc(1);
      instance_proc(2);
      instance_proc(3);
    join
    repeat (200) @(negedge clk);
    check(nseen == total, $sformatf("delivered %0d of %0d", nseen, total));
    check(empties > 0, "keys without hits exercised");
    check(int'(cur_key) == (NKEYS & 255), $sformatf("scheduler reached key %0d", cur_key));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
