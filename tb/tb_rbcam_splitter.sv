// tb_rbcam_splitter: random hits into a four-way splitter; exactly the output
// numbered key mod 4 must be valid, carrying the hit unchanged, and none when
// the input is idle; unselected outputs must carry all-zero data.
`timescale 1ns/1ps
module tb_rbcam_splitter;
  import rbcam_pkg::*;
  localparam int NS = 4;
  logic in_valid;
  hit_t in_hit;
  logic [NS-1:0] out_valid;
  hit_t [NS-1:0] out_hit;

  rbcam_splitter #(.N_STACK(NS)) dut (.in_valid, .in_hit, .out_valid, .out_hit);

  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [NS-1:0] e;
      in_valid = ($urandom_range(0, 3) != 0);
      in_hit   = hit_t'({$urandom, $urandom});
      #1;
      e = in_valid ? NS'(1) << (int'(in_hit.ts) % NS) : '0;
      checks++;
      if (out_valid != e) begin
        failures++;
        if (failures < 10) $display("FAIL key %0d valid %b expected %b", in_hit.ts, out_valid, e);
      end
      for (int i = 0; i < NS; i++) begin
        checks++;
        if (out_hit[i] != (e[i] ? in_hit : '0)) failures++;
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
