// vs_pkg: types and constants shared by the view synthesis engine.
//
// Homography coefficients use the fixed-point formats of the engine's
// coefficient precision table: h00,h01,h10,h11 are signed 2.16, h02,h12 are
// signed 8.5 and h20,h21 are signed 1.27 (integer bits include the sign).
// h22 is normalised to 1 and not stored, so one matrix is 154 bits and a
// base/increment pair for the linear-interpolated approximation is 308 bits.
// The external bus is 64 bits wide; addresses on it are 8-byte word
// addresses. Bus requests carry a small master id so read data can be
// routed back; that id field is a choice of this implementation.
//
// From the document: the homography coefficient formats (Table 5-3), N=8
// segments, 64-bit bus. Own choice: the bus request/response structs and the
// master ids.
package vs_pkg;

  // ---------------- homography formats ----------------
  localparam int unsigned HA_W = 18;  // 2.16
  localparam int unsigned HA_F = 16;
  localparam int unsigned HB_W = 13;  // 8.5
  localparam int unsigned HB_F = 5;
  localparam int unsigned HC_W = 28;  // 1.27
  localparam int unsigned HC_F = 27;

  typedef struct packed {
    logic signed [HA_W-1:0] h00;
    logic signed [HA_W-1:0] h01;
    logic signed [HB_W-1:0] h02;
    logic signed [HA_W-1:0] h10;
    logic signed [HA_W-1:0] h11;
    logic signed [HB_W-1:0] h12;
    logic signed [HC_W-1:0] h20;
    logic signed [HC_W-1:0] h21;
  } homo_t;                              // 154 bits

  typedef struct packed {
    homo_t base;
    homo_t inc;
  } homo_pair_t;                         // 308 bits

  localparam int unsigned HOMO_BITS      = $bits(homo_t);
  localparam int unsigned HOMO_PAIR_BITS = $bits(homo_pair_t);

  // Linear-interpolated approximation: N = 8 segments of 32 depth levels.
  localparam int unsigned LIA_N     = 8;
  localparam int unsigned LIA_SEG_W = 5;  // log2(256/N)

  // Mapping relations held in the homography table.
  typedef enum logic [1:0] {
    REL_L2V = 2'd0,   // forward warping, left reference to virtual
    REL_R2V = 2'd1,   // forward warping, right reference to virtual
    REL_V2L = 2'd2,   // reverse warping, virtual to left reference
    REL_V2R = 2'd3    // reverse warping, virtual to right reference
  } rel_t;

  // ---------------- blending ----------------
  typedef enum logic [1:0] {
    BM_FINAL_HOLE = 2'd0,
    BM_R_ONLY     = 2'd1,
    BM_L_ONLY     = 2'd2,
    BM_WEIGHTED   = 2'd3
  } blend_mode_t;

  // ---------------- external bus ----------------
  localparam int unsigned BUS_DW  = 64;
  localparam int unsigned BUS_BE  = BUS_DW / 8;
  localparam int unsigned BUS_AW  = 29;   // 8-byte word address (32-bit byte space)
  localparam int unsigned BUS_IDW = 3;

  typedef struct packed {
    logic               we;
    logic [BUS_AW-1:0]  addr;
    logic [BUS_DW-1:0]  wdata;
    logic [BUS_BE-1:0]  wstrb;
    logic [BUS_IDW-1:0] id;
  } bus_req_t;

  typedef struct packed {
    logic [BUS_DW-1:0]  rdata;
    logic [BUS_IDW-1:0] id;
  } bus_rsp_t;

  // Master ids (group B of the arbiter, then group A).
  localparam logic [BUS_IDW-1:0] ID_DLV  = 3'd0;
  localparam logic [BUS_IDW-1:0] ID_DRV  = 3'd1;
  localparam logic [BUS_IDW-1:0] ID_YL   = 3'd2;
  localparam logic [BUS_IDW-1:0] ID_YR   = 3'd3;
  localparam logic [BUS_IDW-1:0] ID_INIT = 3'd4;

endpackage
