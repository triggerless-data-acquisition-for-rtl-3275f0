// tb_rbcam_csr: register-level test of the CSR window. Checks reset values
// (UID "RBCM", EXPECTED_LATENCY 2000, CTRL go + filter_inerr), the META
// read multiplexer (VERSION packing, DATE, GIT, INSTANCE_ID), CTRL and
// EXPECTED_LATENCY read/write and their outputs, every counter's LO and HI
// word against random event pulses counted here, FILL_LEVEL (+push -pop
// -overwrite, zeroed by fill_clear), the freeze snapshot (reads hold while counting continues) and the
// self-clearing soft_reset that zeroes the counters.
`timescale 1ns/1ps
module tb_rbcam_csr;
  import rbcam_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic [4:0] addr = '0;
  logic rd = 1'b0, wr = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic go, soft_reset, filter_inerr, counter_freeze;
  logic [31:0] expected_latency, fill_level;
  logic [N_CNT-1:0] ev = '0;
  logic fill_clear = 1'b0;

  rbcam_csr #(.INSTANCE_ID(32'hA5)) dut (
    .clk, .rst_n, .avs_address(addr), .avs_read(rd), .avs_write(wr), .avs_writedata(wdata),
    .avs_readdata(rdata), .go, .soft_reset, .filter_inerr, .counter_freeze, .expected_latency, .fill_level, .fill_clear, .ev);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s t=%0t", what, $time); end
  endtask
  task automatic csr_wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1'b1;
    @(negedge clk); wr = 1'b0;
  endtask
  task automatic csr_rd(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; rd = 1'b1;
    @(negedge clk); rd = 1'b0; d = rdata;
  endtask

  longint cnt [N_CNT];
  int fill = 0;
  bit soft_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (fill_clear) fill = 0;
    else fill = fill + int'(ev[CNT_PUSH]) - int'(ev[CNT_POP]) - int'(ev[CNT_OVERWRITE]);
    for (int i = 0; i < N_CNT; i++) if (ev[i]) cnt[i]++;
    if (soft_reset) soft_seen = 1;
  end

  // word address of the LO/HI register of counter i
  function automatic logic [4:0] lo_addr(input int i);
    return (i < 5) ? 5'(5 + i) : 5'(15 + 2 * (i - 5));
  endfunction
  function automatic logic [4:0] hi_addr(input int i);
    return (i < 5) ? 5'(10 + i) : 5'(16 + 2 * (i - 5));
  endfunction

  logic [31:0] r, lo, hi;
  longint snapv [N_CNT];

  initial begin
    for (int i = 0; i < N_CNT; i++) cnt[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    csr_rd(CSR_UID, r);  check(r == 32'h5242434D, "UID");
    csr_rd(CSR_META, r); check(r == 32'h1A02_D204, "VERSION word 26.2.13.516");
    csr_wr(CSR_META, 1); csr_rd(CSR_META, r); check(r == VERSION_DATE, "DATE");
    csr_wr(CSR_META, 2); csr_rd(CSR_META, r); check(r == 32'h23CE513F, "GIT");
    csr_wr(CSR_META, 3); csr_rd(CSR_META, r); check(r == 32'hA5, "INSTANCE_ID");
    csr_rd(CSR_EXPECTED_LATENCY, r); check(r == 2000 && expected_latency == 2000, "latency reset");
    csr_rd(CSR_CTRL, r); check(r == 32'h11 && go && filter_inerr && !counter_freeze, "CTRL reset");
    csr_wr(CSR_EXPECTED_LATENCY, 1234); check(expected_latency == 1234, "latency write");
    csr_wr(CSR_CTRL, 32'h00); check(!go && !filter_inerr, "CTRL write");
    csr_wr(CSR_CTRL, 32'h11);

    // random events
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      ev = N_CNT'($urandom);
    end
    @(negedge clk); ev = '0;
    for (int i = 0; i < N_CNT; i++) begin
      csr_rd(lo_addr(i), lo); csr_rd(hi_addr(i), hi);
      check({hi, lo} == 64'(cnt[i]), $sformatf("counter %0d = %0d expected %0d", i, {hi, lo}, cnt[i]));
    end
    csr_rd(CSR_FILL_LEVEL, r);
    check(r == 32'(fill) && fill_level == r, "FILL_LEVEL");
    // flush: fill level restarts at 0, then counts again
    @(negedge clk); fill_clear = 1'b1; ev = N_CNT'($urandom);
    @(negedge clk); fill_clear = 1'b0; ev = '0;
    check(fill_level == 0 && fill == 0, "FILL_LEVEL cleared by flush");
    for (int t = 0; t < 50; t++) begin @(negedge clk); ev = N_CNT'($urandom); end
    @(negedge clk); ev = '0;
    csr_rd(CSR_FILL_LEVEL, r);
    check(r == 32'(fill) && fill_level == r, "FILL_LEVEL after flush");

    // freeze: snapshot holds while events continue
    csr_wr(CSR_CTRL, 32'h31);
    for (int i = 0; i < N_CNT; i++) snapv[i] = cnt[i];
    for (int t = 0; t < 100; t++) begin @(negedge clk); ev = N_CNT'($urandom); end
    @(negedge clk); ev = '0;
    for (int i = 0; i < N_CNT; i++) begin
      csr_rd(lo_addr(i), lo);
      check(lo == 32'(snapv[i]), $sformatf("frozen counter %0d", i));
    end
    csr_wr(CSR_CTRL, 32'h11);
    for (int i = 0; i < N_CNT; i++) begin
      csr_rd(lo_addr(i), lo);
      check(lo == 32'(cnt[i]), $sformatf("live counter %0d after unfreeze", i));
    end

    // soft reset: one pulse, bit reads back 0, counters cleared
    csr_wr(CSR_CTRL, 32'h13);
    @(negedge clk);
    check(soft_seen, "soft_reset pulse");
    csr_rd(CSR_CTRL, r); check(r == 32'h11, "soft_reset self-clears");
    for (int i = 0; i < N_CNT; i++) begin
      csr_rd(lo_addr(i), lo);
      check(lo == 0, $sformatf("counter %0d cleared", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
