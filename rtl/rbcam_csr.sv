// rbcam_csr: control and status registers of the Ring-CAM, on an Avalon-MM
// slave with 32-bit words and a fixed read latency of one cycle (readdata is
// valid the cycle after `read`).
//
// Word map: 0x00 UID (RO, IP_UID), 0x01 META (write selects, read returns
// 0 VERSION / 1 DATE / 2 GIT / 3 INSTANCE_ID; VERSION = MAJOR[31:24]
// MINOR[23:16] PATCH[15:12] BUILD[11:0]), 0x02 CTRL (bit0 go, bit1
// soft_reset, bit4 filter_inerr, bit5 counter_freeze), 0x03 EXPECTED_LATENCY
// (cycles, reset 2000), 0x04 FILL_LEVEL (hits stored and not yet read:
// +1 per push, -1 per pop or overwrite, zeroed by fill_clear, which is the
// storage flush; also on the fill_level output), 0x05-0x09
// low and 0x0A-0x0E high words of the INERR, PUSH, POP, OVERWRITE and
// CACHE_MISS counters, then LO/HI pairs of the ingress-FIFO-full,
// pop-command-FIFO-full and egress-not-ready drop counters (0x0F-0x14).
//
// All eight counters are 64 bits and count one-cycle event pulses. Writing
// counter_freeze = 1 copies all of them into a snapshot in one cycle; while
// the bit stays set, counter reads return the snapshot so that software reads
// a consistent set, and counting continues underneath. soft_reset is a
// self-clearing bit: it reads back 0, pulses the `soft_reset` output for one
// cycle and zeroes the counters. The CTRL reset value and the self-clearing
// soft_reset are this implementation's choices.
module rbcam_csr
  import rbcam_pkg::*;
#(
  parameter logic [31:0] IP_UID      = IP_UID_DEFAULT,
  parameter logic [31:0] INSTANCE_ID = 32'd0,
  parameter logic [31:0] CTRL_RESET  = 32'h0000_0011,
  parameter logic [31:0] LATENCY_RESET = 32'd2000
) (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave
  input  logic [4:0]  avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  // control outputs
  output logic        go,
  output logic        soft_reset,
  output logic        filter_inerr,
  output logic        counter_freeze,
  output logic [31:0] expected_latency,
  output logic [31:0] fill_level,
  // storage was flushed: the fill level restarts at 0
  input  logic        fill_clear,
  // event pulses, indexed by cnt_e
  input  logic [N_CNT-1:0] ev
);
  logic [63:0] cnt  [N_CNT];
  logic [63:0] snap [N_CNT];
  logic [1:0]  meta_sel;
  logic [31:0] ctrl_q;

  assign go             = ctrl_q[CTRL_GO];
  assign filter_inerr   = ctrl_q[CTRL_FILTER_INERR];
  assign counter_freeze = ctrl_q[CTRL_COUNTER_FREEZE];

  wire ctrl_wr = avs_write && avs_address == CSR_CTRL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q           <= CTRL_RESET & ~(32'd1 << CTRL_SOFT_RESET);
      expected_latency <= LATENCY_RESET;
      meta_sel         <= '0;
      soft_reset       <= 1'b0;
      for (int i = 0; i < N_CNT; i++) begin
        cnt[i]  <= '0;
        snap[i] <= '0;
      end
    end else begin
      soft_reset <= 1'b0;
      for (int i = 0; i < N_CNT; i++) cnt[i] <= cnt[i] + 64'(ev[i]);
      if (avs_write) begin
        unique case (avs_address)
          CSR_META: meta_sel <= avs_writedata[1:0];
          CSR_CTRL: begin
            ctrl_q     <= avs_writedata & ~(32'd1 << CTRL_SOFT_RESET);
            soft_reset <= avs_writedata[CTRL_SOFT_RESET];
          end
          CSR_EXPECTED_LATENCY: expected_latency <= avs_writedata;
          default: ;
        endcase
      end
      if (ctrl_wr && avs_writedata[CTRL_COUNTER_FREEZE] && !ctrl_q[CTRL_COUNTER_FREEZE])
        for (int i = 0; i < N_CNT; i++) snap[i] <= cnt[i];
      if (soft_reset)
        for (int i = 0; i < N_CNT; i++) cnt[i] <= '0;
    end
  end

  // live fill level, also brought out as a conduit. An overwrite replaces a
  // stored hit, so it comes with a push and nets to zero.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fill_level <= '0;
    else if (fill_clear) fill_level <= '0;
    else fill_level <= fill_level + 32'(ev[CNT_PUSH]) - 32'(ev[CNT_POP]) - 32'(ev[CNT_OVERWRITE]);
  end

  // read mux: counter words 0x05..0x14 select counter `ci`, half `hi`
  logic [31:0] rdata;
  always_comb begin
    logic [63:0] c;
    int ci;
    logic hi;
    ci = 0;
    hi = 1'b0;
    if (avs_address >= 5'h05 && avs_address <= 5'h09) begin
      ci = int'(avs_address) - 5;
    end else if (avs_address >= 5'h0A && avs_address <= 5'h0E) begin
      ci = int'(avs_address) - 10;
      hi = 1'b1;
    end else if (avs_address >= 5'h0F && avs_address <= 5'h14) begin
      ci = 5 + (int'(avs_address) - 15) / 2;
      hi = avs_address[0] == 1'b0;
    end
    c = counter_freeze ? snap[ci] : cnt[ci];
    unique case (avs_address)
      CSR_UID:  rdata = IP_UID;
      CSR_META: unique case (meta_sel)
                  2'd0: rdata = VERSION_WORD;
                  2'd1: rdata = VERSION_DATE;
                  2'd2: rdata = VERSION_GIT;
                  default: rdata = INSTANCE_ID;
                endcase
      CSR_CTRL: rdata = ctrl_q;
      CSR_EXPECTED_LATENCY: rdata = expected_latency;
      CSR_FILL_LEVEL: rdata = fill_level;
      default: rdata = (avs_address <= 5'h14) ? (hi ? c[63:32] : c[31:0]) : '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) avs_readdata <= '0;
    else if (avs_read) avs_readdata <= rdata;
  end
endmodule
