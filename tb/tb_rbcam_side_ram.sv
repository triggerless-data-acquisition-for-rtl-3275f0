// tb_rbcam_side_ram: writes every slot of the 1024 x 40 ring RAM, then reads
// random slots while writing others, checking the one-cycle registered read
// against a model array (a read of the slot written in the same cycle returns
// the old word).
`timescale 1ns/1ps
module tb_rbcam_side_ram;
  localparam int DEPTH = 1024, W = 40;
  logic clk = 1'b0;
  always #4 clk = ~clk;
  logic we = 1'b0, re = 1'b0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [DEPTH];

  rbcam_side_ram #(.DEPTH(DEPTH), .W(W)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 10'(i); wdata = {$urandom, $urandom} & {W{1'b1}};
      model[i] = wdata;
    end
    for (int t = 0; t < 4000; t++) begin
      logic [W-1:0] expv;
      @(negedge clk);
      re = 1'b1; raddr = 10'($urandom_range(0, DEPTH-1));
      we = ($urandom_range(0, 1) == 1);
      waddr = (t % 7 == 0) ? raddr : 10'($urandom_range(0, DEPTH-1));
      wdata = {$urandom, $urandom} & {W{1'b1}};
      expv = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      re = 1'b0; we = 1'b0;
      checks++;
      if (rdata != expv) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h expected %h", raddr, rdata, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
