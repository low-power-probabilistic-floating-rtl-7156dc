// Exponent adder of the single-precision multiplier.
//
// Adds the two 8-bit biased exponents and removes one bias of 127, giving
// the biased exponent of the product before normalisation. The result is
// kept 10 bits wide and signed, so that exponent overflow (>= 255) and
// underflow (<= 0) remain visible to the result logic instead of wrapping.
// Purely combinational.
//
// That the exponents are added by an 8-bit adder follows the design; the
// bias removal inside this block and the wider signed result are choices of
// this implementation.
module exp_adder
  import fpm_pkg::*;
(
  input  logic [EXP_W-1:0]        ea,
  input  logic [EXP_W-1:0]        eb,
  output logic signed [EXP_W+1:0] esum   // ea + eb - 127
);

  always_comb begin
    esum = $signed({2'b00, ea}) + $signed({2'b00, eb}) - $signed((EXP_W+2)'(BIAS));
  end

endmodule
