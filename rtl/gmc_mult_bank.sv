// gmc_mult_bank: multipliers shared by the whole engine.
//
// The engine has three signed multipliers and lends them to one unit at a
// time, as the controller's state decides. During parameter generation the
// parameter generator uses multiplier 0 (delta times reciprocal of the
// frame size); during macroblock setting the setting unit uses multiplier
// 0 (parameter times block position); during warping the interpolation
// filter uses all three. Multipliers that the current owner does not use
// get zero operands, so they do not toggle.
//
// Interface: 'owner' selects the operand source; p[i] = a[i] * b[i] of the
// selected source, combinational (the users register the results).
// Operands are MUL_AW x MUL_BW bits, wide enough for a 32-bit parameter
// times a 12-bit position and for a 16-bit delta times a 17-bit
// reciprocal.
//
// Sharing the parameter multipliers with macroblock setting and the
// interpolation filter follows the published architecture; the count of
// three, the widths and the zeroing of idle multipliers are this design's
// own.
module gmc_mult_bank
  import gmc_pkg::*;
(
  input  mul_owner_e owner,
  input  mul_a_t     pg_a,
  input  mul_b_t     pg_b,
  input  mul_a_t     ms_a,
  input  mul_b_t     ms_b,
  input  mul_a_t     wp_a [NMUL],
  input  mul_b_t     wp_b [NMUL],
  output mul_p_t     p    [NMUL]
);

  mul_a_t a [NMUL];
  mul_b_t b [NMUL];

  always_comb begin
    for (int i = 0; i < NMUL; i++) begin
      a[i] = '0;
      b[i] = '0;
    end
    unique case (owner)
      MUL_PG: begin a[0] = pg_a; b[0] = pg_b; end
      MUL_MS: begin a[0] = ms_a; b[0] = ms_b; end
      default: begin
        for (int i = 0; i < NMUL; i++) begin
          a[i] = wp_a[i];
          b[i] = wp_b[i];
        end
      end
    endcase
    for (int i = 0; i < NMUL; i++) p[i] = mul_p_t'(a[i]) * mul_p_t'(b[i]);
  end

endmodule
