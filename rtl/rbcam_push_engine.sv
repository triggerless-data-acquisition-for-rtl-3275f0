// rbcam_push_engine: the write side of the Ring-CAM ("write by arrival").
//
// Hits from the hit_type1 stream (at most one per cycle) pass one input
// register and are written the next cycle; the write path never stalls. Its partition is the key field
// key[PART_LSB +: log2(N_PART)] (the interleaving bits); the hit goes into the
// next slot of that partition's ring, whose write pointer then advances. The
// key is written to the CAM and the whole hit word to the side RAM. If the
// slot still held an unread hit, that hit is lost and ev_overwrite pulses:
// the ring never stalls its input.
//
// Timestamp errors: a hit is in error when its err flag is set, or when it is
// late, meaning its key is not newer than the last key already handed to the
// pop engine. Keys wrap modulo 2^TS_W, so "newer" is decided against the
// current time: a key is on time when it lies in (last issued key, now_key],
// both counted modulo 2^TS_W. now_key is the key of the current cycle; no
// hit can carry a later one. This keeps the test right however far the pop
// engine lags, as long as the lag plus the read delay stays under 2^TS_W
// keys, which the ring needs anyway to tell keys apart; while it does not
// (`overrun` from the timebase) every new hit counts as late. With
// filter_inerr set such hits are dropped and counted (ev_inerr); with it
// clear they are stored with err set. Hits are only accepted while `active`.
// Event outputs are one-cycle pulses. The write pointers of all partitions
// are exported so the pop engine can emit equal keys oldest first.
module rbcam_push_engine
  import rbcam_pkg::*;
#(
  parameter int DEPTH      = 1024,
  parameter int N_PART     = 4,
  parameter int PART_LSB   = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic                     active,
  input  logic                     filter_inerr,
  // hit_type1 ingress
  input  logic                     in_valid,
  input  hit_t                     in_hit,
  // pop-side progress, for the late check
  input  logic                     issued_any,
  input  key_t                     last_issued_key,
  input  key_t                     now_key,
  input  logic                     overrun,
  // CAM / side-RAM write port
  output logic                     wr_en,
  output logic [$clog2(DEPTH)-1:0] wr_addr,
  output hit_t                     wr_hit,
  input  logic                     wr_slot_live,
  output logic [N_PART-1:0][$clog2(DEPTH/N_PART)-1:0] wptr,
  // events
  output logic                     ev_push,
  output logic                     ev_overwrite,
  output logic                     ev_inerr
);
  localparam int PB  = (N_PART > 1) ? $clog2(N_PART) : 1;

  hit_t head;
  logic head_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_valid <= 1'b0;
      head       <= '0;
    end else begin
      head_valid <= in_valid && active && !flush;
      head       <= in_hit;
    end
  end

  key_t ahead, span;
  logic late, inerr, take;
  logic [PB-1:0] part;

  always_comb begin
    ahead = head.ts - last_issued_key;
    span  = now_key - last_issued_key;
    late  = issued_any && (ahead == '0 || ahead > span || overrun);
    inerr = head.err || late;
    take  = head_valid;
    part  = (N_PART > 1) ? PB'(head.ts >> PART_LSB) : '0;

    wr_en   = take && !(inerr && filter_inerr);
    wr_addr = (N_PART > 1) ? {part, wptr[part]} : $clog2(DEPTH)'(wptr[0]);
    wr_hit  = head;
    wr_hit.err = inerr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr          <= '0;
      ev_push       <= 1'b0;
      ev_overwrite  <= 1'b0;
      ev_inerr      <= 1'b0;
    end else if (flush) begin
      wptr          <= '0;
      ev_push       <= 1'b0;
      ev_overwrite  <= 1'b0;
      ev_inerr      <= 1'b0;
    end else begin
      if (wr_en) wptr[part] <= wptr[part] + 1'b1;
      ev_push       <= wr_en;
      ev_overwrite  <= wr_en && wr_slot_live;
      ev_inerr      <= take && inerr && filter_inerr;
    end
  end
endmodule
