// gmc_param_gen: global motion parameter generator.
//
// Runs once per frame. From up to three received sprite points (half-pel
// units) it derives the affine parameters used by the rest of the engine:
//   m0 = W'(x'1-x'0)/W   m1 = H'(x'2-x'0)/H   m2 = x'0
//   m3 = W'(y'1-y'0)/W   m4 = H'(y'2-y'0)/H   m5 = y'0
// Sprite point 0 belongs to the top-left frame corner (0,0), point 1 to the
// top-right corner (W,0) and point 2 to the bottom-left corner (0,H).
// The divisions by the constants W and H are done as a multiplication by a
// rounded reciprocal, 2^(ALPHA+RS)/W, followed by a rounding right shift of
// RS bits. One multiplier is used for all four products, one per cycle, as a
// single processing element is enough for a once-per-frame job. The
// multiplier itself is outside (gmc_mult_bank), shared with macroblock
// setting and the interpolation filter: this unit drives its operands on
// mul_a/mul_b and reads the product on mul_p in the same cycle.
// num_pts selects the model: 0 stationary, 1 translational, 2 isotropic
// (m1 = -m3, m4 = m0, which needs W' = H'), 3 affine. The perspective model
// is not supported, as in the architecture this follows.
//
// Interface: pulse start with the sprite points and num_pts valid; params
// holds the result from the cycle done pulses until the next start. Latency
// is 5 cycles from start to done for every model.
//
// The formulas and the multiply-by-reciprocal idea follow the published
// architecture (with m1/m3 scaled by H and W as the corner geometry
// requires); the reciprocal precision, single-multiplier schedule and
// handshake are this design's own.
module gmc_param_gen
  import gmc_pkg::*;
#(
  parameter int FRAME_W = 720,
  parameter int FRAME_H = 576,
  parameter int RS      = 16      // reciprocal precision, bits
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  num_pts,
  input  sprite_t     sp_x [3],
  input  sprite_t     sp_y [3],
  output gmc_params_t params,
  output logic        busy,
  output logic        done,
  // shared multiplier 0
  output mul_a_t      mul_a,
  output mul_b_t      mul_b,
  input  mul_p_t      mul_p
);

  localparam longint RECIP_W = ((64'sd1 <<< (ALPHA + RS)) + 64'(FRAME_W / 2)) / 64'(FRAME_W);
  localparam longint RECIP_H = ((64'sd1 <<< (ALPHA + RS)) + 64'(FRAME_H / 2)) / 64'(FRAME_H);
  localparam coord_t ONE     = coord_t'(1) <<< FRAC;

  logic [2:0]  step;       // 0..3: product being formed, 4: finish
  logic [1:0]  model;
  sprite_t     dx1, dy1, dx2, dy2;

  // Shared multiplier: operands selected by step.
  mul_p_t prod;
  coord_t prod_r;

  always_comb begin
    unique case (step[1:0])
      2'd0: begin mul_a = MUL_AW'(dx1); mul_b = MUL_BW'(RECIP_W); end
      2'd1: begin mul_a = MUL_AW'(dy1); mul_b = MUL_BW'(RECIP_W); end
      2'd2: begin mul_a = MUL_AW'(dx2); mul_b = MUL_BW'(RECIP_H); end
      default: begin mul_a = MUL_AW'(dy2); mul_b = MUL_BW'(RECIP_H); end
    endcase
    prod   = mul_p + (mul_p_t'(1) <<< (RS - 1));
    prod_r = coord_t'(prod >>> RS);
  end

  // The reciprocals must fit the multiplier's B operand.
  if (RECIP_H >= (64'sd1 <<< (MUL_BW - 1))) begin : g_size_check
    $error("frame too small for the multiplier operand width");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      step   <= '0;
      model  <= '0;
      params <= '0;
      dx1 <= '0; dy1 <= '0; dx2 <= '0; dy2 <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        step  <= '0;
        model <= num_pts;
        dx1   <= sp_x[1] - sp_x[0];
        dy1   <= sp_y[1] - sp_y[0];
        dx2   <= sp_x[2] - sp_x[0];
        dy2   <= sp_y[2] - sp_y[0];
        // Translation part: zero for the stationary model.
        params.m2 <= (num_pts == 2'd0) ? '0 : coord_t'(sp_x[0]) <<< ALPHA;
        params.m5 <= (num_pts == 2'd0) ? '0 : coord_t'(sp_y[0]) <<< ALPHA;
      end else if (busy) begin
        step <= step + 3'd1;
        if (step < 3'd4) begin
          unique case (step[1:0])
            2'd0: params.m0 <= (model >= 2'd2) ? prod_r : ONE;
            2'd1: params.m3 <= (model >= 2'd2) ? prod_r : '0;
            2'd2: params.m1 <= (model == 2'd3) ? prod_r :
                               (model == 2'd2) ? -params.m3 : '0;
            default: params.m4 <= (model == 2'd3) ? prod_r :
                                  (model == 2'd2) ? params.m0 : ONE;
          endcase
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
