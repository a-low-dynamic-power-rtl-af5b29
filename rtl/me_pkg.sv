// me_pkg: constants and types shared by the DVFS motion-estimation processor.
//
// The numbers here follow the design's main configuration: 16x16 macro-blocks
// (M-Blks), a +/-10 pixel search range giving 21 x 21 = 441 candidate block
// matches (BM processes), CIF pictures of 22 x 18 = 396 M-Blks, an 8-bit
// pixel / 16-bit sum-of-absolute-differences datapath, and the lower bound
// K = 4 of the quantized break-off count n_q = 2^k.  The DVFS operating points
// (k = 8 .. 4) are the five rows of the frequency/voltage table in
// dvfs_table.sv.  Widths of counters and codes are this design's own choice.
package me_pkg;

  localparam int PIX_W    = 8;     // pixel width (Input A / Input B)
  localparam int D_W      = 16;    // width of the accumulated absolute difference d(n)
  localparam int MB       = 16;    // macro-block edge in pixels
  localparam int SR_P     = 10;    // search range p, in pixels
  localparam int N_CAND   = (2*SR_P+1)*(2*SR_P+1);  // 441 BM processes in a full search
  localparam int N_W      = 9;     // width of BM counts n, n_m, n_r, n_q, n_p (max 450)
  localparam int MV_W     = 5;     // signed displacement -10..+10
  localparam int K_W      = 4;     // width of the exponent k (4..8)
  localparam int K_MIN    = 4;     // K: n_q is never below 2^K
  localparam int K_MAX    = 8;     // 2^8 = 256 is the largest quantized n_q
  localparam int N_OP     = K_MAX - K_MIN + 1;      // five DVFS operating points
  localparam int MB_COLS  = 22;    // CIF: 352 / 16
  localparam int MB_ROWS  = 18;    // CIF: 288 / 16
  localparam int VD_W     = 11;    // supply voltage in mV
  localparam int FC_W     = 10;    // clock frequency in MHz

  typedef logic signed [MV_W-1:0] mv_t;

  typedef struct packed {
    mv_t x;
    mv_t y;
  } mvec_t;

  // One DVFS operating point (a row of the frequency/voltage table).
  typedef struct packed {
    logic [FC_W-1:0]  fc_mhz;   // optimum clock frequency
    logic [VD_W-1:0]  vd_mv;    // optimum supply voltage
    logic [N_W-1:0]   np;       // BM processes that fit in one M-Blk slot at fc
    logic [N_OP-1:0]  sw_n;     // DC/DC switch controls, active low, bit 0 = SW1
  } dvfs_point_t;

  // Result of the motion estimation of one macro-block.
  typedef struct packed {
    mvec_t           mv;        // displacement of the best match
    logic [D_W-1:0]  d_min;     // d(n_m), smallest absolute-difference accumulation
    logic [N_W-1:0]  n_m;       // BM index at which d_min was reached (1-based)
    logic [N_W-1:0]  n_s;       // BM processes evaluated before break-off
    logic [K_W-1:0]  k;         // quantized exponent used (n_q = 2^k)
  } me_result_t;

endpackage
