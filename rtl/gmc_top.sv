// gmc_top: global motion compensation engine for MPEG-4 ASP.
//
// Builds the motion-compensated prediction of a macroblock under a global
// affine camera motion. Per frame the parameter generator turns the
// received sprite points into per-pixel increments; per macroblock the
// macroblock setting finds the warped corners and the reference region of
// the Y, Cb and Cr blocks, and the warping unit loads those regions from the
// off-chip frame memory into a four-bank local memory and interpolates
// every predicted pixel from its four reference neighbours. The controller
// sequences the three units and lends them the three shared multipliers
// (gmc_mult_bank) in turn.
//
// Interface: pulse frame_start with sprite points sp_x/sp_y (half-pel,
// points at the top-left, top-right and bottom-left frame corners) and
// num_pts (0 stationary, 1 translational, 2 isotropic, 3 affine); wait for
// frame_ready. Then pulse mb_start with (mbx, mby) for each macroblock and
// wait for mb_done. Reference bytes are read through ext_req/ext_addr/
// ext_gnt and ext_rvalid/ext_rdata; predicted pixels leave on out_valid/
// out_addr/out_data (frame memory address of the pixel, planes Y, Cb, Cr
// stored one after the other). mb_error marks a macroblock whose motion
// exceeds what the local memory supports; it is skipped. The status pulses
// warp_stall, load_wait and cascade expose the scheduling for measurement.
//
// The four-unit partition follows the published design; the port
// protocol is this design's own.
module gmc_top
  import gmc_pkg::*;
#(
  parameter int FRAME_W = 720,
  parameter int FRAME_H = 576,
  parameter int AW      = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_start,
  input  logic [1:0]    num_pts,
  input  sprite_t       sp_x [3],
  input  sprite_t       sp_y [3],
  input  logic          mb_start,
  input  logic [7:0]    mbx,
  input  logic [7:0]    mby,
  output logic          busy,
  output logic          frame_ready,
  output logic          mb_done,
  output logic          mb_error,
  output logic          ext_req,
  output logic [AW-1:0] ext_addr,
  input  logic          ext_gnt,
  input  logic          ext_rvalid,
  input  logic [7:0]    ext_rdata,
  output logic          out_valid,
  output logic [AW-1:0] out_addr,
  output logic [7:0]    out_data,
  output logic [1:0]    out_comp,
  output logic          warp_stall,
  output logic          load_wait,
  output logic          cascade
);

  gmc_params_t params;
  blk_set_t    set [3];
  logic        pg_start, pg_done, pg_busy;
  logic        ms_start, ms_done, ms_y_done, ms_busy;
  logic        wp_start, wp_done, wp_busy;
  logic [7:0]  mbx_q, mby_q;
  mul_owner_e  mul_owner;
  mul_a_t      pg_a, ms_a, wp_a [NMUL];
  mul_b_t      pg_b, ms_b, wp_b [NMUL];
  mul_p_t      mul_p [NMUL];
  logic        wp_mul_use;

  // Macroblock position held for the whole macroblock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mbx_q <= '0;
      mby_q <= '0;
    end else if (mb_start && !busy) begin
      mbx_q <= mbx;
      mby_q <= mby;
    end
  end

  // A chroma region is never larger than the luma one, so the Y block's
  // flag decides.
  a_chroma_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (ms_done && !set[0].unsupported) |-> !(set[1].unsupported || set[2].unsupported))
    else $error("chroma region too large while the luma region fits");

  gmc_controller u_ctrl (
    .clk, .rst_n, .frame_start, .mb_start, .pg_done, .ms_y_done, .ms_done,
    .ms_unsupported(set[0].unsupported), .wp_done, .pg_start, .ms_start, .wp_start,
    .busy, .frame_ready, .mb_done, .mb_error, .mul_owner
  );

  gmc_mult_bank u_mul (
    .owner(mul_owner), .pg_a, .pg_b, .ms_a, .ms_b, .wp_a, .wp_b, .p(mul_p)
  );

  // A unit computing must own the multipliers.
  a_mul_owner: assert property (@(posedge clk) disable iff (!rst_n)
    (pg_busy -> mul_owner == MUL_PG) && (ms_busy -> mul_owner == MUL_MS) &&
    (wp_mul_use -> mul_owner == MUL_WARP))
    else $error("shared multiplier used by a unit that does not own it");

  gmc_param_gen #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_pg (
    .clk, .rst_n, .start(pg_start), .num_pts, .sp_x, .sp_y,
    .params, .busy(pg_busy), .done(pg_done),
    .mul_a(pg_a), .mul_b(pg_b), .mul_p(mul_p[0])
  );

  gmc_mb_setting u_ms (
    .clk, .rst_n, .start(ms_start), .mbx(mbx_q), .mby(mby_q), .params,
    .set, .busy(ms_busy), .done(ms_done), .y_done(ms_y_done),
    .mul_a(ms_a), .mul_b(ms_b), .mul_p(mul_p[0])
  );

  gmc_warping #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .AW(AW)) u_wp (
    .clk, .rst_n, .start(wp_start), .mbx(mbx_q), .mby(mby_q), .params, .set,
    .busy(wp_busy), .done(wp_done),
    .ext_req, .ext_addr, .ext_gnt, .ext_rvalid, .ext_rdata,
    .out_valid, .out_addr, .out_data, .out_comp,
    .warp_stall, .load_wait, .cascade,
    .mul_a(wp_a), .mul_b(wp_b), .mul_p(mul_p), .mul_use(wp_mul_use)
  );

endmodule
