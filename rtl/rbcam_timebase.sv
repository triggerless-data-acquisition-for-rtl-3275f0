// rbcam_timebase: run control and the read-pointer clock of the Ring-CAM.
//
// The run_control stream (valid + run state) moves the block between IDLE,
// RUN_PREPARE, RUNNING and TERMINATING. Entering RUN_PREPARE, or a CTRL
// soft_reset, produces a one-cycle `flush` that empties the whole resequencer
// and restarts the run clock `now` at zero. `now` counts cycles while RUNNING
// or TERMINATING; `active` (go AND one of those two states) enables pushes and
// pops.
//
// Readiness: a key tau covers the cycles [tau*2^FINE_BITS, (tau+1)*2^FINE_BITS).
// It is ready once its last cycle is at least expected_latency cycles old,
// i.e. when now - expected_latency >= tau*2^FINE_BITS + 2^FINE_BITS - 1. The
// issue pointer `iss` (a run-long key count) names the next key to hand to the
// pop engine; when that key is ready and the pop-command FIFO has room, a
// command is issued (cmd_valid pulse) and iss advances, so the read pointer
// trails the run clock by the configured skew window. If the FIFO is full the
// command waits (no key is ever skipped) and ev_cmd_full pulses for each cycle
// of waiting. With stacking, iss starts at STACK_IDX and steps by
// 2^STACK_BITS, so only keys whose interleave bits equal STACK_IDX are issued.
// last_issued_key / issued_any tell the push engine which keys are closed.
// `overrun` is set while the read pointer trails the current key by a full
// key range (2^TS_W keys or more): a new hit's key could then equal that of
// an unserved hit one lap older, so the push engine must refuse new hits
// until the pop engine has caught up. This guard is this design's own.
module rbcam_timebase
  import rbcam_pkg::*;
#(
  parameter int FINE_BITS  = 4,
  parameter int STACK_BITS = 0,
  parameter int STACK_IDX  = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run_valid,
  input  run_state_e  run_state,
  input  logic        go,
  input  logic        soft_reset,
  input  logic [31:0] expected_latency,
  input  logic        cmd_full,
  output run_state_e  state,
  output logic        active,
  output logic        flush,
  output logic [31:0] now,
  output logic        cmd_valid,
  output key_t        cmd_key,
  output logic        issued_any,
  output key_t        last_issued_key,
  output logic        overrun,
  output logic        ev_cmd_full
);
  logic [31:0] rt;      // read time = now - expected_latency
  logic        rt_ok;
  logic        running;

  assign running = (state == RUN_RUNNING) || (state == RUN_TERMINATING);
  assign active  = go && running;
  assign flush   = soft_reset || (run_valid && run_state == RUN_PREPARE && state != RUN_PREPARE);

  logic [31:0] iss;     // next key to issue, counted from run start
  logic        ready;

  always_comb begin
    rt          = now - expected_latency;
    rt_ok       = (now >= expected_latency);
    ready       = active && rt_ok && (rt >= (iss << FINE_BITS) + ((32'd1 << FINE_BITS) - 32'd1));
    cmd_key     = key_t'(iss);
    cmd_valid   = ready && !cmd_full;
    ev_cmd_full = ready && cmd_full;
    // keys from the last issued one up to the current one, full width
    overrun     = issued_any &&
                  ((now >> FINE_BITS) - (iss - (32'd1 << STACK_BITS)) >= (32'd1 << TS_W));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= RUN_IDLE;
      now             <= '0;
      issued_any      <= 1'b0;
      last_issued_key <= '0;
      iss             <= 32'(STACK_IDX);
    end else begin
      if (run_valid) state <= run_state;
      if (flush) begin
        now             <= '0;
        issued_any      <= 1'b0;
        last_issued_key <= '0;
        iss             <= 32'(STACK_IDX);
      end else begin
        if (active) now <= now + 1'b1;
        if (cmd_valid) begin
          issued_any      <= 1'b1;
          last_issued_key <= cmd_key;
          iss             <= iss + (32'd1 << STACK_BITS);
        end
      end
    end
  end
endmodule
