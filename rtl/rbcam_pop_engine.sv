// rbcam_pop_engine: the read side of the Ring-CAM ("read by timestamp").
//
// Ready keys arrive as pop commands from the timebase and wait in a small
// pop-command FIFO; cmd_full tells the timebase to hold further commands.
// For each command the engine emits every stored hit with that key, oldest
// first, and then moves on; a command that finds no hit at all is a cache
// miss (ev_miss). Each hit passes five steps, one cycle each, so the engine
// serves one hit per five cycles (25 Mhit/s at 125 MHz):
//   MATCH  register the CAM match bitmap of the key's partition
//   ENC    priority-encode it from the oldest slot (encoder slice)
//   RDA    present the slot address to the side RAM
//   RDD    register the side-RAM word
//   EMIT   drive the hit on hit_type2 for one cycle and free the slot
// after which it returns to MATCH for the next hit of the same key. When ENC
// finds nothing the command is finished in that same cycle: done_key and
// done_seen are updated (a stack merger uses them as progress) and the next
// command, if any, is taken at once, so a key costs 5 cycles per hit plus 2
// (its last MATCH and ENC); an empty key costs 2. With backpressure the
// engine instead waits in DONE until the last hit has left the output
// register, so progress never overtakes data. The five steps per hit follow
// the published service rate; the two-cycle key overhead is this design's.
//
// Races with the push engine: a slot written during MATCH is masked out of the
// registered bitmap (it is found again on the next MATCH if it matches); a slot
// overwritten between ENC and RDD is "clobbered" and not emitted, because the
// push engine already counted the old hit as overwritten.
//
// Egress: with BACKPRESSURE = 0 (the standalone IP behaviour) a hit is shown
// for one cycle; if out_ready is low it is lost and counted (ev_egress_drop).
// With BACKPRESSURE = 1 (used inside a stack, where the merger must not lose
// hits) the hit is held until out_ready and the engine waits in EMIT.
module rbcam_pop_engine
  import rbcam_pkg::*;
#(
  parameter int DEPTH     = 1024,
  parameter int N_PART    = 4,
  parameter int PART_LSB  = 0,
  parameter int CMD_DEPTH = 16,
  parameter bit BACKPRESSURE = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  // commands
  input  logic                     cmd_valid,
  input  key_t                     cmd_key,
  output logic                     cmd_full,
  // CAM lookup and clear
  output logic [$clog2(N_PART > 1 ? N_PART : 2)-1:0] lk_part,
  output key_t                     lk_key,
  input  logic [DEPTH/N_PART-1:0]  lk_match,
  output logic                     clr_en,
  output logic [$clog2(DEPTH)-1:0] clr_addr,
  input  logic [N_PART-1:0][$clog2(DEPTH/N_PART)-1:0] wptr,
  // observation of the push write port
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  // side RAM read
  output logic                     rd_en,
  output logic [$clog2(DEPTH)-1:0] rd_addr,
  input  hit_t                     rd_hit,
  // hit_type2 egress
  output logic                     out_valid,
  output hit_t                     out_hit,
  input  logic                     out_ready,
  // progress
  output logic                     done_seen,
  output key_t                     done_key,
  output logic                     busy,
  // events
  output logic                     ev_pop,
  output logic                     ev_miss,
  output logic                     ev_egress_drop
);
  localparam int PD  = DEPTH / N_PART;
  localparam int PAW = $clog2(PD);
  localparam int AW  = $clog2(DEPTH);
  localparam int PB  = $clog2(N_PART > 1 ? N_PART : 2);

  typedef enum logic [2:0] {S_IDLE, S_MATCH, S_ENC, S_RDA, S_RDD, S_EMIT, S_DONE} state_e;
  state_e st;

  key_t          key_q;
  logic [PB-1:0] part_q;
  logic          first_q;
  logic          clobber_q;
  logic [PD-1:0] bitmap_q;
  logic [AW-1:0] addr_q;
  hit_t          hit_q;

  // ---------------- command FIFO
  logic cmd_empty;
  key_t cmd_head;
  logic take_cmd;

  rbcam_fifo #(.WIDTH(TS_W), .DEPTH(CMD_DEPTH)) u_cmd_fifo (
    .clk, .rst_n, .flush,
    .wr_en(cmd_valid), .wr_data(cmd_key),
    .rd_en(take_cmd),  .rd_data(cmd_head),
    .empty(cmd_empty), .full(cmd_full), .count()
  );

  // ---------------- lookup / encode
  logic          enc_found;
  logic [PAW-1:0] enc_idx;
  logic [PD-1:0] wr_mask;
  logic [AW-1:0] enc_addr;

  assign lk_part = part_q;
  assign lk_key  = key_q;

  rbcam_prio_enc #(.N(PD)) u_enc (
    .req(bitmap_q), .base(wptr[(N_PART > 1) ? int'(part_q) : 0]),
    .found(enc_found), .idx(enc_idx)
  );

  always_comb begin
    wr_mask = '0;
    if (wr_en && (N_PART == 1 || wr_addr[AW-1 -: PB] == part_q))
      wr_mask[wr_addr[PAW-1:0]] = 1'b1;
    enc_addr = (N_PART > 1) ? AW'({part_q, enc_idx}) : AW'(enc_idx);
  end

  assign rd_en    = (st == S_RDA);
  assign rd_addr  = addr_q;
  assign clr_en   = (st == S_EMIT) && !clobber_q;
  assign clr_addr = addr_q;
  assign busy     = (st != S_IDLE) || !cmd_empty;

  // a key is finished when ENC finds no further hit (or, with backpressure,
  // in DONE once the last hit has left); the next command is taken in the
  // same cycle, so a key costs two cycles beyond its hits
  wire done_ok  = !BACKPRESSURE || !out_valid;
  wire finish   = done_ok && ((st == S_ENC && !enc_found) || st == S_DONE);
  assign take_cmd = !cmd_empty && (st == S_IDLE || finish);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st             <= S_IDLE;
      key_q          <= '0;
      part_q         <= '0;
      first_q        <= 1'b0;
      clobber_q      <= 1'b0;
      bitmap_q       <= '0;
      addr_q         <= '0;
      hit_q          <= '0;
      out_valid      <= 1'b0;
      out_hit        <= '0;
      done_seen      <= 1'b0;
      done_key       <= '0;
      ev_pop         <= 1'b0;
      ev_miss        <= 1'b0;
      ev_egress_drop <= 1'b0;
    end else if (flush) begin
      st             <= S_IDLE;
      out_valid      <= 1'b0;
      done_seen      <= 1'b0;
      ev_pop         <= 1'b0;
      ev_miss        <= 1'b0;
      ev_egress_drop <= 1'b0;
    end else begin
      if (!BACKPRESSURE || out_ready) out_valid <= 1'b0;
      ev_pop         <= 1'b0;
      ev_miss        <= 1'b0;
      ev_egress_drop <= !BACKPRESSURE && out_valid && !out_ready;
      if (finish) begin
        done_seen <= 1'b1;
        done_key  <= key_q;
      end
      unique case (st)
        S_IDLE: ;
        S_MATCH: begin
          bitmap_q <= lk_match & ~wr_mask;
          st       <= S_ENC;
        end
        S_ENC: begin
          if (enc_found) begin
            addr_q    <= enc_addr;
            clobber_q <= wr_en && (wr_addr == enc_addr);
            st        <= S_RDA;
          end else begin
            ev_miss <= first_q;
            st      <= done_ok ? S_IDLE : S_DONE;
          end
        end
        S_RDA: begin
          if (wr_en && wr_addr == addr_q) clobber_q <= 1'b1;
          st <= S_RDD;
        end
        S_RDD: begin
          if (wr_en && wr_addr == addr_q) clobber_q <= 1'b1;
          hit_q <= rd_hit;
          st    <= S_EMIT;
        end
        S_EMIT: if (!BACKPRESSURE || !out_valid || out_ready || clobber_q) begin
          if (!clobber_q) begin
            out_valid <= 1'b1;
            out_hit   <= hit_q;
            ev_pop    <= 1'b1;
          end
          first_q <= 1'b0;
          st      <= S_MATCH;
        end
        S_DONE: if (done_ok) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
      // a new command overrides the next state chosen above
      if (take_cmd) begin
        key_q   <= cmd_head;
        part_q  <= PB'(cmd_head >> PART_LSB);
        first_q <= 1'b1;
        st      <= S_MATCH;
      end
    end
  end
endmodule
