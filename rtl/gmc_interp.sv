// gmc_interp: bilinear interpolation filter.
//
// Blends the four reference pixels around a warped position with 1/16-pel
// weights fx (horizontal) and fy (vertical):
//   p = ((16-fy)*((16-fx)*p00 + fx*p01) + fy*((16-fx)*p10 + fx*p11) + 128) >> 8
// p00 is the top-left neighbour, p01 its right, p10 its lower and p11 its
// lower-right neighbour. Rounding adds half (a rounding-control bit of 0).
// One pixel per cycle, two cycles of latency: the first stage forms the
// horizontal blends of both rows and registers them, the second blends
// them vertically and registers the pixel.
//
// The filter owns no multiplier. It borrows the three shared multipliers
// (gmc_mult_bank) during warping and rewrites the blend so that three
// products are enough:
//   top = 16*p00 + fx*(p01 - p00)        (multiplier 0)
//   bot = 16*p10 + fx*(p11 - p10)        (multiplier 1)
//   sum = 16*top + fy*(bot - top)        (multiplier 2)
// which is the same value as the formula above; the multiplications by 16
// are shifts. Multipliers 0 and 1 serve the first stage and multiplier 2
// the second. Operands leave on mul_a/mul_b and products return on mul_p
// in the same cycle.
//
// Bilinear filtering and the reuse of the parameter multipliers by the
// filter follow the published design; the 1/16-pel weights, rounding and
// the three-product form are this design's own choice.
module gmc_interp
  import gmc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [7:0]       p00,
  input  logic [7:0]       p01,
  input  logic [7:0]       p10,
  input  logic [7:0]       p11,
  input  logic [IFRAC-1:0] fx,
  input  logic [IFRAC-1:0] fy,
  output logic             out_valid,
  output logic [7:0]       out_pix,
  // shared multipliers 0..2
  output mul_a_t           mul_a [NMUL],
  output mul_b_t           mul_b [NMUL],
  input  mul_p_t           mul_p [NMUL]
);

  localparam int S = 1 << IFRAC;

  // top and bot lie in 0..16*255, sum before the shift in 0..256*255+128.
  logic signed [13:0] top, bot, top_q, bot_q;
  logic [IFRAC-1:0]   fy_q;
  logic               v_q;
  logic signed [18:0] sum;

  // Stage 1: horizontal blends.
  always_comb begin
    mul_a[0] = MUL_AW'($signed({1'b0, p01}) - $signed({1'b0, p00}));
    mul_b[0] = MUL_BW'({1'b0, fx});
    mul_a[1] = MUL_AW'($signed({1'b0, p11}) - $signed({1'b0, p10}));
    mul_b[1] = MUL_BW'({1'b0, fx});
    top = ($signed({6'b0, p00}) <<< IFRAC) + 14'(mul_p[0]);
    bot = ($signed({6'b0, p10}) <<< IFRAC) + 14'(mul_p[1]);
  end

  // Stage 2: vertical blend of the registered rows.
  always_comb begin
    mul_a[2] = MUL_AW'(bot_q - top_q);
    mul_b[2] = MUL_BW'({1'b0, fy_q});
    sum = (19'(top_q) <<< IFRAC) + 19'(mul_p[2]) + 19'(S * S / 2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      top_q     <= '0;
      bot_q     <= '0;
      fy_q      <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      v_q       <= in_valid;
      top_q     <= top;
      bot_q     <= bot;
      fy_q      <= fy;
      out_valid <= v_q;
      out_pix   <= sum[2*IFRAC +: 8];
    end
  end

endmodule
