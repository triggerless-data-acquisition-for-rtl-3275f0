// tb_rbcam_prio_enc: checks the 256-entry encoder slice against a reference
// search (walk upward from base, wrap around) on random bitmaps of varying
// density, including empty and single-bit maps.
`timescale 1ns/1ps
module tb_rbcam_prio_enc;
  localparam int N = 256;
  logic [N-1:0] req;
  logic [7:0]   base;
  logic         found;
  logic [7:0]   idx;

  rbcam_prio_enc #(.N(N)) dut (.req, .base, .found, .idx);

  int checks = 0, failures = 0;

  function automatic int ref_search(input logic [N-1:0] r, input int b);
    for (int k = 0; k < N; k++) if (r[(b + k) % N]) return (b + k) % N;
    return -1;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int dens, e;
      dens = (t % 6 == 0) ? 0 : (t % 6 == 1) ? 1 : $urandom_range(1, 30);
      req = '0;
      if (t % 6 == 1) req[$urandom_range(0, N-1)] = 1'b1;
      else if (dens > 0) for (int i = 0; i < N; i++) req[i] = ($urandom_range(0, 99) < dens);
      base = 8'($urandom_range(0, N-1));
      #1;
      e = ref_search(req, int'(base));
      checks++;
      if (found != (e >= 0) || (e >= 0 && int'(idx) != e)) begin
        failures++;
        if (failures < 10) $display("FAIL base %0d expected %0d got found=%0d idx=%0d", base, e, found, idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
