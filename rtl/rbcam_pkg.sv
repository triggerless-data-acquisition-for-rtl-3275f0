// rbcam_pkg: types and constants shared by the Ring-CAM timestamp resequencer.
//
// A hit is a timestamped detector word: an 8-bit search key (the coarse
// timestamp the resequencer sorts on), 31 bits of side data that travel with
// it, and an error flag carried on the Avalon-ST error channel. Packed, a hit
// is exactly one 40-bit side-RAM word, so 1024 slots take 40960 bits of RAM.
// The key and side-data widths follow the published sizing of the IP; the
// error bit as the 40th bit, the run-state encoding and the reset value of
// CTRL are choices of this implementation.
package rbcam_pkg;

  localparam int TS_W   = 8;   // search key width
  localparam int SIDE_W = 31;  // side data width
  localparam int HIT_W  = 1 + TS_W + SIDE_W;

  typedef logic [TS_W-1:0] key_t;

  typedef struct packed {
    logic             err;   // ingress timestamp-error tag
    key_t             ts;    // search key (coarse timestamp)
    logic [SIDE_W-1:0] side; // side data, not interpreted
  } hit_t;

  // Run states carried on the run_control stream.
  typedef enum logic [1:0] {
    RUN_IDLE        = 2'd0,
    RUN_PREPARE     = 2'd1,
    RUN_RUNNING     = 2'd2,
    RUN_TERMINATING = 2'd3
  } run_state_e;

  // CSR word addresses.
  localparam logic [4:0] CSR_UID              = 5'h00;
  localparam logic [4:0] CSR_META             = 5'h01;
  localparam logic [4:0] CSR_CTRL             = 5'h02;
  localparam logic [4:0] CSR_EXPECTED_LATENCY = 5'h03;
  localparam logic [4:0] CSR_FILL_LEVEL       = 5'h04;
  localparam logic [4:0] CSR_CNT_LO_BASE      = 5'h05; // INERR, PUSH, POP, OVERWRITE, CACHE_MISS
  localparam logic [4:0] CSR_CNT_HI_BASE      = 5'h0A;
  localparam logic [4:0] CSR_DEASM_DROP_LO    = 5'h0F;
  localparam logic [4:0] CSR_POP_CMD_DROP_LO  = 5'h11;
  localparam logic [4:0] CSR_EGRESS_DROP_LO   = 5'h13;

  // CTRL bits.
  localparam int CTRL_GO             = 0;
  localparam int CTRL_SOFT_RESET     = 1;
  localparam int CTRL_FILTER_INERR   = 4;
  localparam int CTRL_COUNTER_FREEZE = 5;

  // Diagnostic counter indices.
  typedef enum logic [2:0] {
    CNT_INERR      = 3'd0,
    CNT_PUSH       = 3'd1,
    CNT_POP        = 3'd2,
    CNT_OVERWRITE  = 3'd3,
    CNT_CACHE_MISS = 3'd4,
    CNT_DEASM_DROP = 3'd5,
    CNT_CMD_DROP   = 3'd6,
    CNT_EGR_DROP   = 3'd7
  } cnt_e;
  localparam int N_CNT = 8;

  // Identity defaults: release 26.2.13 build 516, git 23ce513f, UID "RBCM".
  localparam logic [31:0] IP_UID_DEFAULT  = 32'h5242_434D;
  localparam logic [7:0]  VERSION_MAJOR   = 8'd26;
  localparam logic [7:0]  VERSION_MINOR   = 8'd2;
  localparam logic [3:0]  VERSION_PATCH   = 4'd13;
  localparam logic [11:0] VERSION_BUILD   = 12'd516;
  localparam logic [31:0] VERSION_WORD    = {VERSION_MAJOR, VERSION_MINOR, VERSION_PATCH, VERSION_BUILD};
  localparam logic [31:0] VERSION_DATE    = 32'h2026_0516;
  localparam logic [31:0] VERSION_GIT     = 32'h23CE_513F;

endpackage
