// rbcam_splitter: ingress router of a Ring-CAM stack. Each hit goes to the
// one output whose index equals the hit's interleave bits, key mod N_STACK
// (the low log2(N_STACK) key bits; two bits for four instances), so
// consecutive keys go to consecutive instances. That output gets valid and
// the hit; the others keep valid low and their data at zero, so unselected
// instances see no toggling. Combinational, no backpressure, like the
// instances' hit_type1 sinks. Routing by key follows the published stacking
// scheme; the integration it comes from names a broadcast splitter, and
// zeroing the unselected data is this design's choice.
module rbcam_splitter
  import rbcam_pkg::*;
#(
  parameter int N_STACK = 4
) (
  input  logic               in_valid,
  input  hit_t               in_hit,
  output logic [N_STACK-1:0] out_valid,
  output hit_t [N_STACK-1:0] out_hit
);
  always_comb begin
    for (int i = 0; i < N_STACK; i++) begin
      out_valid[i] = in_valid && (int'(in_hit.ts) % N_STACK == i);
      out_hit[i]   = out_valid[i] ? in_hit : '0;
    end
  end
endmodule
