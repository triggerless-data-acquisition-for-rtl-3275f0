// rbcam_cam: the content-addressable index of the Ring-CAM. For every ring
// slot it keeps the slot's search key (one byte per slot, 1024 x 8 = 8192 bits
// at the published sizing) and a valid bit. The ring is split into N_PART
// partitions of DEPTH/N_PART slots; a hit's partition is fixed by its key, so
// a lookup only has to compare the keys of one partition (256 at the published
// sizing) and returns that partition's match bitmap: valid AND key == lookup
// key. Lookup is combinational from the registered storage.
//
// Write port (push engine): sets valid and stores the key of slot wr_addr.
// Clear port (pop engine): clears valid of slot clr_addr after it was emitted.
// When both hit the same slot in one cycle the write wins (a new hit took the
// slot the pop engine has just emptied). `wr_slot_live` tells the push engine
// whether the slot it is about to write still holds an unread hit, which is an
// overwrite. `flush` clears every valid bit in one cycle.
module rbcam_cam #(
  parameter int DEPTH  = 1024,
  parameter int N_PART = 4,
  parameter int TS_W   = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      flush,
  // write (push)
  input  logic                      wr_en,
  input  logic [$clog2(DEPTH)-1:0]  wr_addr,
  input  logic [TS_W-1:0]           wr_key,
  output logic                      wr_slot_live,
  // clear (pop)
  input  logic                      clr_en,
  input  logic [$clog2(DEPTH)-1:0]  clr_addr,
  // lookup
  input  logic [$clog2(N_PART > 1 ? N_PART : 2)-1:0] lk_part,
  input  logic [TS_W-1:0]           lk_key,
  output logic [DEPTH/N_PART-1:0]   lk_match
);
  localparam int PD = DEPTH / N_PART;

  logic [TS_W-1:0] key_mem [DEPTH];
  logic [DEPTH-1:0] valid;

  assign wr_slot_live = valid[wr_addr] && !(clr_en && clr_addr == wr_addr);

  always_ff @(posedge clk) begin
    if (wr_en) key_mem[wr_addr] <= wr_key;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (flush) begin
      valid <= '0;
    end else begin
      if (clr_en) valid[clr_addr] <= 1'b0;
      if (wr_en)  valid[wr_addr]  <= 1'b1;
    end
  end

  always_comb begin
    for (int i = 0; i < PD; i++) begin
      logic [$clog2(DEPTH)-1:0] s;
      s = $clog2(DEPTH)'((N_PART > 1) ? int'(lk_part) * PD + i : i);
      lk_match[i] = valid[s] && (key_mem[s] == lk_key);
    end
  end

endmodule
