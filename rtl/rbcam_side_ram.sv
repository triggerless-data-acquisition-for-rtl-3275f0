// rbcam_side_ram: the ring RAM of the Ring-CAM. Each of DEPTH slots holds one
// hit word (key, side data, error tag: 40 bits, so 1024 x 40 = 40960 bits at
// the published sizing). One write port, used by the push engine in arrival
// order, and one read port, used by the pop engine at the slot the CAM lookup
// found. The read is registered (address in one cycle, data the next), as a
// block RAM with its output register delivers it. Written as an array so that
// synthesis maps it to block RAM.
module rbcam_side_ram #(
  parameter int DEPTH = 1024,
  parameter int W     = 40
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
