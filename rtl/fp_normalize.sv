// Normalisation stage of the multiplier: Control, Shifter and Incrementer.
//
// The product of two mantissas 1.f lies in [1, 4), so the 48-bit product
// has its leading one at bit 47 or bit 46. Control looks at bit 47. If it is
// set, the Shifter takes bits 46..24 as the 23 fraction bits and the
// Incrementer adds one to the exponent; otherwise the fraction is bits
// 45..23 and the exponent passes unchanged. The bits below the fraction are
// dropped: there is no rounding stage, the result is truncated. Purely
// combinational.
//
// The three parts and the absence of rounding follow the design. The design
// shows only an incrementer, so a product that noise has pushed below 1.0
// (bits 47 and 46 both 0) is not shifted left; its fraction is taken from
// bits 45..23 as in the unshifted case.
module fp_normalize
  import fpm_pkg::*;
(
  input  logic [PROD_W-1:0]       prod,
  input  logic signed [EXP_W+1:0] exp_in,
  output logic [FRAC_W-1:0]       frac,
  output logic signed [EXP_W+1:0] exp_out,
  output logic                    shifted   // product was in [2, 4)
);

  always_comb begin
    // Control
    shifted = prod[PROD_W-1];
    // Shifter
    frac    = shifted ? prod[PROD_W-2 -: FRAC_W] : prod[PROD_W-3 -: FRAC_W];
    // Incrementer
    exp_out = exp_in + $signed({{(EXP_W+1){1'b0}}, shifted});
  end

endmodule
