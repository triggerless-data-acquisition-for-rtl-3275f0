// rbcam_fifo: synchronous first-word-fall-through FIFO used for the ingress
// (deassembly) FIFO, the pop-command FIFO and the per-stack merge FIFOs.
// Storage is a register array of DEPTH words (DEPTH a power of two). A write
// when full and a read when empty are ignored; the users count such events
// themselves, and assertions flag them in simulation. `flush` empties the FIFO
// in one cycle. rd_data shows the head word whenever `empty` is low.
module rbcam_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign count   = wp - rp;
  assign empty   = (wp == rp);
  assign full    = (count == (AW+1)'(DEPTH));
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else if (flush) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  a_no_underflow: assert property (@(posedge clk) !(rd_en && empty))
    else $error("rbcam_fifo: read while empty");
endmodule
