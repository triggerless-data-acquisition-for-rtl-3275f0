// rbcam_merge: the final scheduler of a Ring-CAM stack. Instance i of N_STACK
// handles only keys with key mod N_STACK == i, so the global key order is a
// round-robin over the instances. Each instance output lands in a FIFO here;
// the scheduler holds the current key `cur` and serves instance cur mod
// N_STACK: it forwards that FIFO's head while its key is cur (or older, for an
// error-tagged straggler), one hit per cycle with valid/ready backpressure on
// the output. It moves to cur+1 once that FIFO holds nothing for cur and the
// instance reports (done_seen/done_key, compared modulo 2^TS_W) that it has
// finished key cur or a later one. Because an instance registers done_key at
// least one cycle after its last hit for that key entered the FIFO, no hit can
// be left behind. A run_control RUN_PREPARE restarts at key 0. in_ready is the
// FIFO's not-full; an instance must hold its hit while in_ready is low.
module rbcam_merge
  import rbcam_pkg::*;
#(
  parameter int N_STACK    = 4,
  parameter int FIFO_DEPTH = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run_valid,
  input  run_state_e         run_state,
  input  logic [N_STACK-1:0] in_valid,
  input  hit_t [N_STACK-1:0] in_hit,
  output logic [N_STACK-1:0] in_ready,
  input  logic [N_STACK-1:0] done_seen,
  input  key_t [N_STACK-1:0] done_key,
  output logic               out_valid,
  output hit_t               out_hit,
  input  logic               out_ready,
  output key_t               cur_key
);
  localparam int SW = $clog2(N_STACK > 1 ? N_STACK : 2);

  logic flush;
  hit_t [N_STACK-1:0] head;
  logic [N_STACK-1:0] empty, full, rd;
  logic [SW-1:0] src;
  key_t diff_head, diff_done;
  logic head_due, done_past;

  assign flush = run_valid && run_state == RUN_PREPARE;

  for (genvar i = 0; i < N_STACK; i++) begin : g_fifo
    rbcam_fifo #(.WIDTH(HIT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .flush,
      .wr_en(in_valid[i]), .wr_data(in_hit[i]),
      .rd_en(rd[i]), .rd_data(head[i]),
      .empty(empty[i]), .full(full[i]), .count()
    );
    assign in_ready[i] = !full[i];
  end

  always_comb begin
    src       = SW'(int'(cur_key) % N_STACK);
    diff_head = head[src].ts - cur_key;
    diff_done = done_key[src] - cur_key;
    head_due  = !empty[src] && (diff_head == '0 || diff_head[TS_W-1]);
    done_past = done_seen[src] && !diff_done[TS_W-1];
    out_valid = head_due;
    out_hit   = head[src];
    rd        = '0;
    rd[src]   = head_due && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      cur_key <= '0;
    else if (flush)                  cur_key <= '0;
    else if (!head_due && done_past) cur_key <= cur_key + 1'b1;
  end
endmodule
