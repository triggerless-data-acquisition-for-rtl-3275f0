// tb_rbcam_timebase: checks the read-pointer clock. After RUN_PREPARE (which
// must pulse flush) and RUNNING, with expected_latency = 100 cycles and 16
// cycles per key, the pop command for key k must come exactly when
// now - 100 = 16k + 15, keys in order without gaps. A full command FIFO must
// hold the command (one ev_cmd_full pulse per waiting cycle) and then release
// the waiting keys in order. go = 0 and IDLE stop the clock. A second
// instance with two interleave bits and index 1 must issue only keys 1, 5, 9...
// overrun must be set exactly while the read pointer trails the current key
// by 256 keys or more; a 4200-cycle FIFO stall makes that happen.
`timescale 1ns/1ps
module tb_rbcam_timebase;
  import rbcam_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic run_valid = 1'b0;
  run_state_e run_state = RUN_IDLE;
  logic go = 1'b1, soft_reset = 1'b0, cmd_full = 1'b0;
  logic [31:0] expected_latency = 32'd100;
  run_state_e state, state2;
  logic active, flush, cmd_valid, issued_any, ev_cmd_full, overrun;
  logic active2, flush2, cmd_valid2, issued_any2, ev_cmd_full2;
  logic [31:0] now, now2;
  key_t cmd_key, last_issued_key, cmd_key2, last_issued_key2;

  rbcam_timebase #(.FINE_BITS(4)) dut (
    .clk, .rst_n, .run_valid, .run_state, .go, .soft_reset, .expected_latency, .cmd_full,
    .state, .active, .flush, .now, .cmd_valid, .cmd_key, .issued_any, .last_issued_key, .overrun, .ev_cmd_full);
  rbcam_timebase #(.FINE_BITS(4), .STACK_BITS(2), .STACK_IDX(1)) dut2 (
    .clk, .rst_n, .run_valid, .run_state, .go, .soft_reset, .expected_latency, .cmd_full(1'b0),
    .state(state2), .active(active2), .flush(flush2), .now(now2), .cmd_valid(cmd_valid2), .cmd_key(cmd_key2),
    .issued_any(issued_any2), .last_issued_key(last_issued_key2), .overrun(), .ev_cmd_full(ev_cmd_full2));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s t=%0t", what, $time); end
  endtask

  int tb_now = 0;         // independent run clock
  bit counting = 0;
  int next_key = 0, next_key2 = 1, n_full = 0, n_cmd = 0;
  bit hold = 0;
  int backlog_until = -1;
  int n_overrun = 0;

  always @(posedge clk) if (rst_n) begin
    if (counting) begin
      // expected issue for the next key
      bit due;
      check(overrun == (issued_any && (tb_now / 16 - (next_key - 1)) >= 256),
            $sformatf("overrun at now %0d, next key %0d", tb_now, next_key));
      if (overrun) n_overrun++;
      due = (tb_now - 100) >= next_key * 16 + 15 && tb_now >= 100;
      check(cmd_valid == (due && !cmd_full), $sformatf("cmd_valid at now %0d (next key %0d)", tb_now, next_key));
      check(ev_cmd_full == (due && cmd_full), "ev_cmd_full");
      if (cmd_valid) begin
        check(int'(cmd_key) == (next_key & 255), $sformatf("cmd_key %0d expected %0d", cmd_key, next_key));
        check(now == 32'(tb_now), "now matches");
        next_key++;
        n_cmd++;
      end
      if (ev_cmd_full) n_full++;
      if (cmd_valid2) begin
        check(int'(cmd_key2) == (next_key2 & 255), "stacked key");
        next_key2 += 4;
      end
      tb_now++;
    end
  end

  task automatic run_to(input run_state_e s);
    @(negedge clk); run_valid = 1'b1; run_state = s;
    #1;
    if (s == RUN_PREPARE) check(flush == 1'b1, "flush on RUN_PREPARE");
    @(negedge clk); run_valid = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_to(RUN_PREPARE);
    check(now == 0 && !active, "prepared");
    @(negedge clk); run_valid = 1'b1; run_state = RUN_RUNNING;
    @(negedge clk); run_valid = 1'b0; counting = 1;
    repeat (600) @(negedge clk);
    cmd_full = 1'b1;                 // the command FIFO is full for 50 cycles
    repeat (50) @(negedge clk);
    cmd_full = 1'b0;
    repeat (400) @(negedge clk);
    check(n_full > 0, "command held while FIFO full");
    cmd_full = 1'b1;                 // a long stall: the read pointer falls a key range behind
    repeat (4200) @(negedge clk);
    cmd_full = 1'b0;
    repeat (200) @(negedge clk);
    check(n_overrun > 0 && !overrun, "overrun set during the stall and cleared after it");
    // go = 0 freezes the clock
    go = 1'b0; counting = 0;
    begin
      logic [31:0] n0;
      @(negedge clk); n0 = now;
      repeat (20) @(negedge clk);
      check(now == n0 && !active, "go=0 stops the clock");
    end
    check(n_cmd > 50, "commands issued");
    check(next_key2 > 10, "stacked instance issued its keys");
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
