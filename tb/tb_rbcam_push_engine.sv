// tb_rbcam_push_engine: drives random hits into the write path of a 1024-slot,
// four-partition ring and acts as its CAM (it answers wr_slot_live from its
// own record of written slots). Checks, one cycle after each input: the write
// goes to the next slot of the partition given by key[1:0]; the written word
// is the hit with the error tag; push, overwrite (slot still occupied after a
// full lap of the partition) and inerr pulses; late hits (key outside the
// window from the last issued key to the current key, or any key while the
// timebase reports an overrun) are dropped when filtering and tagged when not; nothing
// is written while inactive or after flush.
`timescale 1ns/1ps
module tb_rbcam_push_engine;
  import rbcam_pkg::*;
  localparam int DEPTH = 1024, NP = 4, PD = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic flush = 1'b0, active = 1'b1, filter_inerr = 1'b1;
  logic in_valid = 1'b0;
  hit_t in_hit = '0;
  logic issued_any = 1'b0;
  key_t last_issued_key = '0;
  key_t now_key = '0;
  logic overrun = 1'b0;
  logic wr_en, wr_slot_live;
  logic [9:0] wr_addr;
  hit_t wr_hit;
  logic [NP-1:0][7:0] wptr;
  logic ev_push, ev_overwrite, ev_inerr;

  bit occupied [DEPTH];
  assign wr_slot_live = occupied[wr_addr];

  rbcam_push_engine #(.DEPTH(DEPTH), .N_PART(NP), .PART_LSB(0)) dut (
    .clk, .rst_n, .flush, .active, .filter_inerr, .in_valid, .in_hit,
    .issued_any, .last_issued_key, .now_key, .overrun, .wr_en, .wr_addr, .wr_hit, .wr_slot_live, .wptr,
    .ev_push, .ev_overwrite, .ev_inerr);

  int checks = 0, failures = 0;
  int mwp [NP];
  int n_ovw = 0, n_late = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) occupied[i] = 0;
    for (int p = 0; p < NP; p++) mwp[p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      hit_t h;
      bit v, late, inerr, exp_wr;
      int p, a;
      logic [7:0] d;
      v = ($urandom_range(0, 3) != 0);
      h = hit_t'({$urandom, $urandom});
      h.err = ($urandom_range(0, 19) == 0);
      if (t == 1000) begin issued_any = 1'b1; last_issued_key = 8'd100; now_key = 8'd230; end
      if (t == 2000) filter_inerr = 1'b0;
      overrun = (t >= 1500 && t < 1600);
      if (t >= 2500 && t < 2600) active = 1'b0; else active = 1'b1;
      @(negedge clk);
      in_valid = v; in_hit = h;
      @(negedge clk);
      in_valid = 1'b0;
      // the hit is in the input register now; its write is visible this cycle
      d = h.ts - last_issued_key;
      late = issued_any && (d == 0 || d > 8'(now_key - last_issued_key) || overrun);
      inerr = h.err || late;
      exp_wr = v && active && !(inerr && filter_inerr);
      p = int'(h.ts[1:0]);
      a = p * PD + mwp[p];
      check(wr_en == exp_wr, $sformatf("wr_en %0d expected %0d", wr_en, exp_wr));
      if (exp_wr && wr_en) begin
        check(int'(wr_addr) == a, $sformatf("wr_addr %0d expected %0d", wr_addr, a));
        check(wr_hit.ts == h.ts && wr_hit.side == h.side && wr_hit.err == inerr, "written word");
      end
      @(posedge clk); #1;
      check(ev_push == exp_wr, "push pulse");
      check(ev_overwrite == (exp_wr && occupied[a]), "overwrite pulse");
      check(ev_inerr == (v && active && inerr && filter_inerr), "inerr pulse");
      if (exp_wr) begin
        if (occupied[a]) n_ovw++;
        occupied[a] = 1;
        mwp[p] = (mwp[p] + 1) % PD;
      end
      if (v && active && late) n_late++;
    end
    // flush resets the write pointers
    @(negedge clk); flush = 1'b1;
    @(negedge clk); flush = 1'b0;
    check(wptr == '0, "flush clears write pointers");
    check(n_ovw > 0 && n_late > 0, "overwrites and late hits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
