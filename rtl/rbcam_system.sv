// rbcam_system: a stack of N_STACK Ring-CAM resequencers behind one ingress
// and one egress, the integration of four ring_buffer_cam instances with a
// splitter in front and the frame assembly behind. Hits are routed by key mod
// N_STACK (rbcam_splitter) so each instance sorts a quarter of the keys at
// its own pop-engine rate; the merger (rbcam_merge) visits the keys in order
// and takes each from the instance that owns it, so throughput scales with the
// stack count while the output stays in key order. Instance i's pop engine
// issues only keys congruent to i; all instances share the run_control
// stream; each keeps its own CSR window (csr_* arrays, one slot per
// instance, INSTANCE_ID = i) and fill-level output. Inside the stack the
// instances' egress is backpressured by the merger's FIFOs, so the merger
// loses no hit while it waits for the instance that owns the current key. The ordered output (hit_type2_*) feeds the
// downstream frame assembly, which is outside this design.
module rbcam_system
  import rbcam_pkg::*;
#(
  parameter int N_STACK   = 4,
  parameter int DEPTH     = 1024,
  parameter int N_PART    = 4,
  parameter int FINE_BITS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // hit_type1 ingress
  input  logic        hit_type1_valid,
  input  hit_t        hit_type1_data,
  // run_control
  input  logic        run_control_valid,
  input  run_state_e  run_control_data,
  // per-instance CSR windows
  input  logic [N_STACK-1:0][4:0]  csr_address,
  input  logic [N_STACK-1:0]       csr_read,
  input  logic [N_STACK-1:0]       csr_write,
  input  logic [N_STACK-1:0][31:0] csr_writedata,
  output logic [N_STACK-1:0][31:0] csr_readdata,
  // per-instance fill level
  output logic [N_STACK-1:0][31:0] filllevel,
  // ordered hit_type2 egress to frame assembly
  output logic        hit_type2_valid,
  output hit_t        hit_type2_data,
  input  logic        hit_type2_ready
);
  localparam int SB = (N_STACK > 1) ? $clog2(N_STACK) : 0;

  logic [N_STACK-1:0] sp_valid, st_valid, st_ready, done_seen;
  hit_t [N_STACK-1:0] sp_hit, st_hit;
  key_t [N_STACK-1:0] done_key;

  rbcam_splitter #(.N_STACK(N_STACK)) u_splitter (
    .in_valid(hit_type1_valid), .in_hit(hit_type1_data),
    .out_valid(sp_valid), .out_hit(sp_hit)
  );

  for (genvar i = 0; i < N_STACK; i++) begin : g_stack
    ring_buffer_cam #(
      .DEPTH(DEPTH), .N_PART(N_PART), .FINE_BITS(FINE_BITS),
      .STACK_BITS(SB), .STACK_IDX(i), .INSTANCE_ID(32'(i)),
      .EGRESS_BACKPRESSURE(1'b1)
    ) u_rbcam (
      .clk, .rst_n,
      .avs_csr_address(csr_address[i]), .avs_csr_read(csr_read[i]),
      .avs_csr_write(csr_write[i]), .avs_csr_writedata(csr_writedata[i]),
      .avs_csr_readdata(csr_readdata[i]),
      .asi_hit_type1_valid(sp_valid[i]), .asi_hit_type1_data(sp_hit[i]),
      .aso_hit_type2_valid(st_valid[i]), .aso_hit_type2_data(st_hit[i]),
      .aso_hit_type2_ready(st_ready[i]),
      .asi_run_control_valid(run_control_valid), .asi_run_control_data(run_control_data),
      .filllevel(filllevel[i]), .done_seen(done_seen[i]), .done_key(done_key[i])
    );
  end

  rbcam_merge #(.N_STACK(N_STACK)) u_merge (
    .clk, .rst_n,
    .run_valid(run_control_valid), .run_state(run_control_data),
    .in_valid(st_valid), .in_hit(st_hit), .in_ready(st_ready),
    .done_seen, .done_key,
    .out_valid(hit_type2_valid), .out_hit(hit_type2_data), .out_ready(hit_type2_ready),
    .cur_key()
  );
endmodule
