// gmc_mb_setting: macroblock setting.
//
// For one macroblock (mbx, mby) and each of its three blocks (16x16 Y, 8x8
// Cb, 8x8 Cr) it computes the warped reference position of the top-left
// pixel,
//   x' = T + m0*x + m1*y,  y' = T5 + m3*x + m4*y,
// where (x, y) is the block's top-left pixel in its own plane and the
// translation T is m2 for luma and m2/2 for chroma (chroma planes are half
// size in both directions, so the per-pixel increments stay the same).
// From that corner it derives the bounding box of all N x N warped pixels
// plus one pixel right and down for bilinear interpolation: the box edges
// come from the corner offsets (N-1)*m, chosen by the sign of each
// parameter, so the corner that decides a boundary is picked without
// computing all four corners. The (N-1)*m offsets use shift-and-subtract.
// It also gives the warping controller the spread of y' along one row,
// min/max(0, (N-1)*m3), and flags a block whose region does not fit the
// local memory (wider than LM_COLS, more than 6 rows touched by one
// current row, or m4 < 0, i.e. a vertically mirrored mapping).
//
// One multiplier is used for the four products of a block, one per cycle.
// It is outside (gmc_mult_bank), shared with the parameter generator and
// the interpolation filter: operands leave on mul_a/mul_b and the product
// returns on mul_p in the same cycle;
// a fifth cycle forms the boundaries. Latency: 15 cycles from start to done.
// The Y block comes first: 'y_done' pulses after 5 cycles, when set[0] is
// valid, so that loading its region can begin while Cb and Cr are still
// being set up. A chroma region is never larger than the luma one (same
// increments over 7 instead of 15 pixels), so set[0].unsupported already
// decides whether the macroblock is supported.
//
// Computing the corner and then the region boundaries by parameter signs
// follows the published architecture; the one-pixel interpolation margin,
// the chroma mapping, the unsupported rule and the schedule are this
// design's own.
module gmc_mb_setting
  import gmc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  mbx,
  input  logic [7:0]  mby,
  input  gmc_params_t params,
  output blk_set_t    set [3],
  output logic        busy,
  output logic        done,
  output logic        y_done,
  // shared multiplier 0
  output mul_a_t      mul_a,
  output mul_b_t      mul_b,
  input  mul_p_t      mul_p
);

  logic [1:0] blk;      // 0 Y, 1 Cb, 2 Cr
  logic [2:0] step;     // 0..3 products, 4 boundaries
  coord_t     xacc, yacc;

  // Block geometry.
  logic        chroma;
  logic [11:0] px, py;
  assign chroma = (blk != 2'd0);
  assign px     = chroma ? {1'b0, mbx, 3'b0} : {mbx, 4'b0};
  assign py     = chroma ? {1'b0, mby, 3'b0} : {mby, 4'b0};

  // Shared multiplier: operands selected by step.
  coord_t     prod;
  always_comb begin
    unique case (step[1:0])
      2'd0:    begin mul_a = MUL_AW'(params.m0); mul_b = MUL_BW'(px); end
      2'd1:    begin mul_a = MUL_AW'(params.m1); mul_b = MUL_BW'(py); end
      2'd2:    begin mul_a = MUL_AW'(params.m3); mul_b = MUL_BW'(px); end
      default: begin mul_a = MUL_AW'(params.m4); mul_b = MUL_BW'(py); end
    endcase
    prod = coord_t'(mul_p);
  end

  // (N-1)*m by shift and subtract.
  function automatic coord_t span(coord_t m, logic ch);
    return ch ? (m <<< 3) - m : (m <<< 4) - m;
  endfunction

  function automatic coord_t neg_part(coord_t v);
    return (v < 0) ? v : '0;
  endfunction

  function automatic coord_t pos_part(coord_t v);
    return (v > 0) ? v : '0;
  endfunction

  // Boundary computation for the block in flight.
  coord_t s0, s1, s3, s4;
  coord_t xl, xh, yl, yh;
  logic signed [15:0] bx_lo, bx_hi, by_lo, by_hi, rspan;
  blk_set_t cur;
  always_comb begin
    s0 = span(params.m0, chroma);
    s1 = span(params.m1, chroma);
    s3 = span(params.m3, chroma);
    s4 = span(params.m4, chroma);
    xl = xacc + neg_part(s0) + neg_part(s1);
    xh = xacc + pos_part(s0) + pos_part(s1);
    yl = yacc + neg_part(s3) + neg_part(s4);
    yh = yacc + pos_part(s3) + pos_part(s4);
    bx_lo = coord_int(xl);
    bx_hi = coord_int(xh) + 16'sd1;
    by_lo = coord_int(yl);
    by_hi = coord_int(yh) + 16'sd1;
    rspan = coord_int(pos_part(s3) - neg_part(s3)) + 16'sd2;
    cur.x_start     = xacc;
    cur.y_start     = yacc;
    cur.x_lo        = bx_lo;
    cur.y_lo        = by_lo;
    cur.ncols       = 8'(bx_hi - bx_lo + 16'sd1);
    cur.nrows       = 8'(by_hi - by_lo + 16'sd1);
    cur.row_lo_off  = neg_part(s3);
    cur.row_hi_off  = pos_part(s3);
    cur.unsupported = (bx_hi - bx_lo + 16'sd1 > 16'(LM_COLS)) ||
                      (by_hi - by_lo + 16'sd1 > 16'sd255) ||
                      (rspan > 16'sd6) || (params.m4 < 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      y_done <= 1'b0;
      blk  <= '0;
      step <= '0;
      xacc <= '0;
      yacc <= '0;
      for (int i = 0; i < 3; i++) set[i] <= '0;
    end else begin
      done   <= 1'b0;
      y_done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        blk  <= '0;
        step <= '0;
        xacc <= params.m2;
        yacc <= params.m5;
      end else if (busy) begin
        unique case (step)
          3'd0, 3'd1: begin xacc <= xacc + prod; step <= step + 3'd1; end
          3'd2, 3'd3: begin yacc <= yacc + prod; step <= step + 3'd1; end
          default: begin
            set[blk] <= cur;
            y_done   <= (blk == 2'd0);
            step     <= '0;
            // Chroma translation is half the luma one.
            xacc     <= params.m2 >>> 1;
            yacc     <= params.m5 >>> 1;
            if (blk == 2'd2) begin
              busy <= 1'b0;
              done <= 1'b1;
              blk  <= '0;
            end else begin
              blk <= blk + 2'd1;
            end
          end
        endcase
      end
    end
  end

endmodule
