// gmc_pkg: types, constants and helper functions shared by the global
// motion compensation (GMC) engine.
//
// Coordinate format. Sprite points arrive in half-pel units. Every warped
// coordinate inside the engine is a signed fixed-point number in units of
// 2^-(ALPHA+1) pixel: the sprite point shifted left by ALPHA, so a half-pel
// value carries ALPHA extra fraction bits. With ALPHA = 10 (W' = H' = 1024,
// the value the MPEG-4 verification model uses for ASP@L5) one pixel is 2048
// units. The affine parameters m0, m1, m3, m4 are increments per pixel in
// the same units; m2, m5 are the translation in the same units.
//
// Local memory layout. The reference region of a block is loaded row by row
// into a circular buffer of eight rows, each up to LM_COLS (20) pixels wide,
// spread over four banks of LM_DEPTH (40) bytes. A pixel at region column c
// of buffer row r lives in bank {r[0], c[0]}, so any 2x2 neighbourhood hits
// each bank exactly once. Rows 0-3 of the buffer occupy the first half of
// the banks and rows 4-7 the second half: address = r[2]*20 + r[1]*10 + c/2.
//
// The 10-bit W'/H' exponent and the 4 x 40-byte, 8-row local memory follow
// the published architecture; the fixed-point format, widths and the exact
// bank address map are this design's own choices.
package gmc_pkg;

  localparam int ALPHA     = 10;           // log2 W' = log2 H'
  localparam int FRAC      = ALPHA + 1;    // fraction bits of a coordinate
  localparam int CW        = 32;           // coordinate / parameter width
  localparam int SPW       = 16;           // sprite point width (half-pel)
  localparam int IFRAC     = 4;            // interpolation accuracy: 1/16 pel
  localparam int LM_BANKS  = 4;
  localparam int LM_DEPTH  = 40;
  localparam int LM_COLS   = 20;           // widest region row
  localparam int LM_ROWS   = 8;            // rows held at once
  localparam int LM_AW     = 6;            // bank address width
  localparam int NMUL      = 3;            // shared multipliers
  localparam int MUL_AW    = 34;           // multiplier operand A width
  localparam int MUL_BW    = 24;           // multiplier operand B width

  typedef logic signed [MUL_AW-1:0]        mul_a_t;
  typedef logic signed [MUL_BW-1:0]        mul_b_t;
  typedef logic signed [MUL_AW+MUL_BW-1:0] mul_p_t;

  // Owner of the shared multipliers, set by the GMC controller.
  typedef enum logic [1:0] {MUL_PG = 2'd0, MUL_MS = 2'd1, MUL_WARP = 2'd2} mul_owner_e;

  typedef logic signed [CW-1:0]  coord_t;
  typedef logic signed [SPW-1:0] sprite_t;

  typedef enum logic [1:0] {COMP_Y = 2'd0, COMP_CB = 2'd1, COMP_CR = 2'd2} comp_e;

  // Global motion parameters of one frame.
  typedef struct packed {
    coord_t m0;   // d x' / d x
    coord_t m1;   // d x' / d y
    coord_t m2;   // x' at (0,0)
    coord_t m3;   // d y' / d x
    coord_t m4;   // d y' / d y
    coord_t m5;   // y' at (0,0)
  } gmc_params_t;

  // Result of macroblock setting for one block (Y, Cb or Cr).
  typedef struct packed {
    coord_t            x_start;     // warped x' of the top-left pixel
    coord_t            y_start;     // warped y' of the top-left pixel
    logic signed [15:0] x_lo;       // leftmost reference column (pixels)
    logic signed [15:0] y_lo;       // top reference row (pixels)
    logic [7:0]        ncols;       // region width in pixels
    logic [7:0]        nrows;       // region height in pixels
    coord_t            row_lo_off;  // min(0, (N-1)*m3): lowest y' in a row minus row start
    coord_t            row_hi_off;  // max(0, (N-1)*m3)
    logic              unsupported; // region does not fit the local memory
  } blk_set_t;

  // Integer part (floor) of a coordinate.
  function automatic logic signed [15:0] coord_int(coord_t c);
    coord_t t;
    t = c >>> FRAC;
    return t[15:0];
  endfunction

  // 1/16-pel fraction of a coordinate (truncated).
  function automatic logic [IFRAC-1:0] coord_frac(coord_t c);
    return c[FRAC-1 -: IFRAC];
  endfunction

  // Bank of a pixel at buffer row r (sequence number mod 8) and region column c.
  function automatic logic [1:0] lm_bank(logic [2:0] r, logic [4:0] c);
    return {r[0], c[0]};
  endfunction

  // Address of that pixel inside its bank.
  function automatic logic [LM_AW-1:0] lm_addr(logic [2:0] r, logic [4:0] c);
    return LM_AW'(r[2] ? 20 : 0) + LM_AW'(r[1] ? 10 : 0) + LM_AW'(c[4:1]);
  endfunction

endpackage
