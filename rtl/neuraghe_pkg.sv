// neuraghe_pkg: types, sizes and small helpers shared by the NEURAGHE CSP RTL.
//
// Sizes follow the main configuration (one CSP with a 4x4 Sum-of-Products
// matrix, 16-bit data with a run-time 8-bit mode, 32 TCDM banks, 32 weight
// memory banks, 12 x_in / 4 y_in / 4 y_out engine ports). Memory depths,
// the kernel size and the bus formats are this design's own choices.
//
// Data format: a 32-bit TCDM word holds two 16-bit pixels (16-bit mode) or
// four 8-bit pixels (8-bit mode), lowest pixel in the lowest bits. Inside
// the engine every pixel travels as a sign-extended 16-bit lane, four lanes
// per word position; in 16-bit mode only lanes 0 and 1 are used.
package neuraghe_pkg;

  localparam int DATA_W      = 16;   // pixel / weight width in 16-bit mode
  localparam int WORD_W      = 32;   // TCDM word and engine port width
  localparam int LANES       = 4;    // pixels per word in 8-bit mode
  localparam int KSIZE       = 3;    // convolution window side
  localparam int IF_PER_COL  = 3;    // input features per SoP column (12 x_in / 4 columns)
  localparam int N_COLS      = 4;    // SoP matrix columns (input side)
  localparam int M_ROWS      = 4;    // SoP matrix rows (output side)
  localparam int ACC_W       = 40;   // sum-of-products accumulator width
  localparam int N_BANKS     = 32;   // TCDM banks
  localparam int BANK_DEPTH  = 2048; // 32-bit words per TCDM bank
  localparam int TCDM_AW     = 16;   // TCDM word address width (32 x 2048 words)
  localparam int N_WBANKS    = 32;   // weight memory banks
  localparam int WBANK_DEPTH = 512;  // 16-bit weights per weight memory bank
  localparam int WMEM_AW     = 14;   // flat weight index width (32 x 512)
  localparam int MAX_WPR     = 128;  // max words per image row held by a line buffer
  localparam int EXT_AW      = 32;   // PS-port (DDR) byte address width

  typedef logic signed [DATA_W-1:0] pix_t;
  typedef pix_t [LANES-1:0]         lanes_t;

  typedef enum logic {PREC16 = 1'b0, PREC8 = 1'b1} prec_e;

  typedef enum logic [1:0] {
    POOL_NONE = 2'd0,  // pooling stage bypassed
    POOL_MAX  = 2'd1,  // 2x2 maximum
    POOL_AVG  = 2'd2,  // 2x2 average (sum >>> 2)
    POOL_DOWN = 2'd3   // keep the top-left pixel of each 2x2 window
  } pool_mode_e;

  // Request/response of a word-addressed TCDM port (one-cycle read latency
  // after the grant).
  typedef struct packed {
    logic               req;
    logic               we;
    logic [TCDM_AW-1:0] addr;
    logic [WORD_W-1:0]  wdata;
  } tcdm_req_t;

  typedef struct packed {
    logic              gnt;
    logic              rvalid;
    logic [WORD_W-1:0] rdata;
  } tcdm_rsp_t;

  // Same handshake toward the PS port (byte address, 32-bit words).
  typedef struct packed {
    logic              req;
    logic              we;
    logic [EXT_AW-1:0] addr;
    logic [WORD_W-1:0] wdata;
  } ext_req_t;

  typedef struct packed {
    logic              gnt;
    logic              rvalid;
    logic [WORD_W-1:0] rdata;
  } ext_rsp_t;

  // One convolution engine job: up to 12 input maps -> up to 4 output maps
  // over a full frame. Addresses are TCDM word addresses.
  typedef struct packed {
    logic [TCDM_AW-1:0] x_base;     // first input map
    logic [TCDM_AW-1:0] x_stride;   // words between input maps
    logic [TCDM_AW-1:0] y_base;     // first partial-result map (y_in)
    logic [TCDM_AW-1:0] o_base;     // first output map (y_out)
    logic [TCDM_AW-1:0] o_stride;   // words between maps, for y_in and y_out
    logic [7:0]         wpr;        // words per input row (even)
    logic [9:0]         rows;       // input rows (even)
    logic [WMEM_AW-1:0] w_base;     // weight memory row of the job's weights
    logic [3:0]         n_if;       // active input maps, 1..12
    logic [2:0]         n_of;       // active output maps, 1..4
    prec_e              prec;
    logic [5:0]         shift;      // right shift of the sum of products
    logic               relu_en;
    pool_mode_e         pool;
    logic               use_yin;    // add y_in partial results instead of bias
    logic [M_ROWS*DATA_W-1:0] bias; // one bias per output map
  } ce_cfg_t;

  // Split a word into lanes (sign-extended).
  function automatic lanes_t unpack_word(logic [WORD_W-1:0] w, prec_e p);
    lanes_t l;
    if (p == PREC16) begin
      l[0] = w[15:0];
      l[1] = w[31:16];
      l[2] = '0;
      l[3] = '0;
    end else begin
      for (int i = 0; i < 4; i++) l[i] = {{8{w[8*i+7]}}, w[8*i +: 8]};
    end
    return l;
  endfunction

  // Join lanes into a word (low bits of each lane).
  function automatic logic [WORD_W-1:0] pack_word(lanes_t l, prec_e p);
    logic [WORD_W-1:0] w;
    if (p == PREC16) w = {l[1], l[0]};
    else             w = {l[3][7:0], l[2][7:0], l[1][7:0], l[0][7:0]};
    return w;
  endfunction

  // Number of pixels per word.
  function automatic int unsigned ppw(prec_e p);
    return (p == PREC16) ? 2 : 4;
  endfunction

  // Saturate a wide signed value to the pixel range of the precision.
  function automatic pix_t sat_pix(logic signed [ACC_W-1:0] v, prec_e p);
    logic signed [ACC_W-1:0] hi, lo;
    hi = (p == PREC16) ? ACC_W'(32767) : ACC_W'(127);
    lo = (p == PREC16) ? -ACC_W'(32768) : -ACC_W'(128);
    if (v > hi) return pix_t'(hi);
    if (v < lo) return pix_t'(lo);
    return pix_t'(v);
  endfunction

endpackage
