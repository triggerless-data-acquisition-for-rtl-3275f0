// ring_buffer_cam: the Ring-CAM timestamp resequencer.
//
// Hits arrive out of timestamp order, skewed by up to a bounded window, on
// the hit_type1 stream. They are written in arrival order into a ring of DEPTH
// slots (side RAM), while a CAM keeps, per slot, the hit's search key. Once a
// key is older than the configured skew window (EXPECTED_LATENCY cycles
// behind the run clock) the pop engine looks that key up in the CAM and emits
// every slot holding it, then the next key: the output on hit_type2 is sorted
// by key although storage is in arrival order. All keys share the whole ring,
// so a burst on one key can use any free slot; the ring is sized by the hit
// rate times the skew window. When the ring is full the oldest unread slot is
// overwritten and counted.
//
// Sizing (published configuration): 1024 slots, 8-bit key, 31-bit side data,
// four partitions of 256 slots, one per encoder slice, chosen by two key bits.
// The key covers 2^FINE_BITS cycles (16 by default: with the reset
// EXPECTED_LATENCY of 2000 cycles the read pointer trails by 125 keys, which
// leaves 131 of the 256 key values as headroom for the pop engine falling
// behind under bursts).
//
// Interfaces: csr (Avalon-MM, see rbcam_csr), hit_type1 (Avalon-ST sink, no
// backpressure: valid + hit with error flag), hit_type2 (Avalon-ST source:
// valid + hit; by default a beat driven while ready is low is lost and
// counted, with EGRESS_BACKPRESSURE = 1 it is held until ready),
// run_control (Avalon-ST sink carrying run_state_e), filllevel (live
// number of stored hits, stepped by push, pop and overwrite events and
// zeroed by a flush). done_seen/done_key
// report the last key the pop engine finished, for a stack merger.
// Latency: a hit leaves 5 cycles after its key's pop command reaches the
// front of the command FIFO (plus 5 per earlier hit of that key); the engine
// serves one hit per 5 cycles.
module ring_buffer_cam
  import rbcam_pkg::*;
#(
  parameter int          DEPTH       = 1024,
  parameter int          N_PART      = 4,
  parameter int          FINE_BITS   = 4,
  parameter int          STACK_BITS  = 0,
  parameter int          STACK_IDX   = 0,
  parameter int          CMD_FIFO_DEPTH     = 16,
  parameter bit          EGRESS_BACKPRESSURE = 1'b0,
  parameter logic [31:0] IP_UID      = IP_UID_DEFAULT,
  parameter logic [31:0] INSTANCE_ID = 32'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  // csr
  input  logic [4:0]  avs_csr_address,
  input  logic        avs_csr_read,
  input  logic        avs_csr_write,
  input  logic [31:0] avs_csr_writedata,
  output logic [31:0] avs_csr_readdata,
  // hit_type1 sink
  input  logic        asi_hit_type1_valid,
  input  hit_t        asi_hit_type1_data,
  // hit_type2 source
  output logic        aso_hit_type2_valid,
  output hit_t        aso_hit_type2_data,
  input  logic        aso_hit_type2_ready,
  // run_control sink
  input  logic        asi_run_control_valid,
  input  run_state_e  asi_run_control_data,
  // filllevel conduit: live push - pop - overwrite
  output logic [31:0] filllevel,
  // progress
  output logic        done_seen,
  output key_t        done_key
);
  localparam int AW  = $clog2(DEPTH);
  localparam int PAW = $clog2(DEPTH / N_PART);
  localparam int PB  = $clog2(N_PART > 1 ? N_PART : 2);

  // control
  logic        go, soft_reset, filter_inerr;
  logic [31:0] expected_latency;
  logic [31:0] run_now;
  logic [N_CNT-1:0] ev;

  // timebase
  logic       active, flush, cmd_valid, issued_any, overrun;
  key_t       cmd_key, last_issued_key;

  // push side
  logic          wr_en, wr_slot_live;
  logic [AW-1:0] wr_addr;
  hit_t          wr_hit;
  logic [N_PART-1:0][PAW-1:0] wptr;

  // pop side
  logic [PB-1:0] lk_part;
  key_t          lk_key;
  logic [DEPTH/N_PART-1:0] lk_match;
  logic          clr_en, rd_en, cmd_full;
  logic [AW-1:0] clr_addr, rd_addr;
  hit_t          rd_hit;

  rbcam_csr #(.IP_UID(IP_UID), .INSTANCE_ID(INSTANCE_ID)) u_csr (
    .clk, .rst_n,
    .avs_address(avs_csr_address), .avs_read(avs_csr_read), .avs_write(avs_csr_write),
    .avs_writedata(avs_csr_writedata), .avs_readdata(avs_csr_readdata),
    .go, .soft_reset, .filter_inerr, .counter_freeze(), .expected_latency, .fill_level(filllevel), .fill_clear(flush), .ev
  );

  rbcam_timebase #(.FINE_BITS(FINE_BITS), .STACK_BITS(STACK_BITS), .STACK_IDX(STACK_IDX)) u_timebase (
    .clk, .rst_n,
    .run_valid(asi_run_control_valid), .run_state(asi_run_control_data),
    .go, .soft_reset, .expected_latency, .cmd_full,
    .state(), .active, .flush, .now(run_now), .cmd_valid, .cmd_key, .issued_any, .last_issued_key, .overrun,
    .ev_cmd_full(ev[CNT_CMD_DROP])
  );

  // This ingress takes hit words directly (no frame deassembly stage), so the
  // write path cannot overflow and the deassembly-drop counter stays at zero.
  assign ev[CNT_DEASM_DROP] = 1'b0;

  rbcam_push_engine #(.DEPTH(DEPTH), .N_PART(N_PART), .PART_LSB(STACK_BITS)) u_push (
    .clk, .rst_n, .flush, .active, .filter_inerr,
    .in_valid(asi_hit_type1_valid), .in_hit(asi_hit_type1_data),
    .issued_any, .last_issued_key, .now_key(key_t'(run_now >> FINE_BITS)), .overrun,
    .wr_en, .wr_addr, .wr_hit, .wr_slot_live, .wptr,
    .ev_push(ev[CNT_PUSH]), .ev_overwrite(ev[CNT_OVERWRITE]),
    .ev_inerr(ev[CNT_INERR])
  );

  rbcam_cam #(.DEPTH(DEPTH), .N_PART(N_PART), .TS_W(TS_W)) u_cam (
    .clk, .rst_n, .flush,
    .wr_en, .wr_addr, .wr_key(wr_hit.ts), .wr_slot_live,
    .clr_en, .clr_addr,
    .lk_part, .lk_key, .lk_match
  );

  rbcam_side_ram #(.DEPTH(DEPTH), .W(HIT_W)) u_side_ram (
    .clk,
    .we(wr_en), .waddr(wr_addr), .wdata(wr_hit),
    .re(rd_en), .raddr(rd_addr), .rdata(rd_hit)
  );

  rbcam_pop_engine #(.DEPTH(DEPTH), .N_PART(N_PART), .PART_LSB(STACK_BITS),
                     .CMD_DEPTH(CMD_FIFO_DEPTH),
                     .BACKPRESSURE(EGRESS_BACKPRESSURE)) u_pop (
    .clk, .rst_n, .flush,
    .cmd_valid, .cmd_key, .cmd_full,
    .lk_part, .lk_key, .lk_match, .clr_en, .clr_addr, .wptr,
    .wr_en, .wr_addr,
    .rd_en, .rd_addr, .rd_hit,
    .out_valid(aso_hit_type2_valid), .out_hit(aso_hit_type2_data), .out_ready(aso_hit_type2_ready),
    .done_seen, .done_key, .busy(),
    .ev_pop(ev[CNT_POP]), .ev_miss(ev[CNT_CACHE_MISS]),
    .ev_egress_drop(ev[CNT_EGR_DROP])
  );
endmodule
