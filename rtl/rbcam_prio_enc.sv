// rbcam_prio_enc: one encoder slice of the Ring-CAM. Given the match bitmap of
// one partition (N slots, 256 in the published sizing) and a rotation base,
// it returns the first set bit found walking upward from `base` and wrapping
// around. The pop engine passes the partition's write pointer as the base: the
// slot after the newest write is the oldest one, so hits that share a
// timestamp leave in arrival order. Purely combinational; `found` is low when
// the bitmap is empty. The rotation is this implementation's choice; the
// slice size is the published one.
module rbcam_prio_enc #(
  parameter int N = 256
) (
  input  logic [N-1:0]         req,
  input  logic [$clog2(N)-1:0] base,
  output logic                 found,
  output logic [$clog2(N)-1:0] idx
);
  localparam int IW = $clog2(N);

  logic [N-1:0] upper;  // requests at or above base
  logic         hit_up, hit_all;
  logic [IW-1:0] idx_up, idx_all;

  always_comb begin
    for (int i = 0; i < N; i++) upper[i] = req[i] && (IW'(i) >= base);
    hit_up  = 1'b0;
    idx_up  = '0;
    hit_all = 1'b0;
    idx_all = '0;
    for (int i = N-1; i >= 0; i--) begin
      if (upper[i]) begin hit_up  = 1'b1; idx_up  = IW'(i); end
      if (req[i])   begin hit_all = 1'b1; idx_all = IW'(i); end
    end
    found = hit_all;
    idx   = hit_up ? idx_up : idx_all;
  end
endmodule
