// Low-power probabilistic single-precision floating-point multiplier.
//
// Multiplies two IEEE 754 single-precision numbers. Only the mantissa
// product is allowed to be inexact, because it carries the least significant
// information and uses most of the energy. The sign is the XOR of the
// operand signs. The exponents go through exp_adder, and the 24-bit
// mantissas, with their hidden ones, through the probabilistic array
// multiplier. fp_normalize then places the leading one. There is no
// rounding unit: the fraction is truncated.
//
// The energy saving comes from the voltage profile `col_vdd`, one supply
// level for each of the 46 full adder columns of the mantissa array. A
// column can be switched off (truncated) or run at 0.8 to 1.2 V. Columns
// below nominal make errors; fa_noise_source models them, with the error
// probabilities of each level given in `perr`. fpm_pkg::profile_level()
// gives the three example profiles. With every column at 1.2 V and
// perr = 0, the result is the exact product truncated to 24 bits.
//
// Timing: one operation per clock. a and b are sampled with in_valid, and
// result appears on the next clock edge with out_valid. Each accepted
// operation advances the noise generators, so every multiplication gets new
// noise. rst_n is an asynchronous active-low reset; it reloads the noise
// seeds and clears out_valid.
//
// Special operands are this implementation's own choice; the design does
// not say how to treat them. A zero or subnormal operand gives a signed
// zero (flush to zero). Inf gives a signed Inf, NaN or Inf*0 gives the quiet
// NaN 0x7FC00000, exponent overflow gives a signed Inf and exponent
// underflow gives a signed zero. The output register and the one-cycle
// latency are also choices of this implementation.
module fpmul_prob
  import fpm_pkg::*;
#(
  parameter int unsigned SEED = 32'h1234_5678   // noise generator seed
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [31:0]            a,
  input  logic [31:0]            b,
  input  vdd_profile_t           col_vdd,   // entry c-1: supply level of column c
  input  perr_t [NUM_LEVELS-1:0] perr,      // FA error probability per level, 2^-16 units
  output logic                   out_valid,
  output logic [31:0]            result
);

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // ---- operand fields
  logic              sa, sb;
  logic [EXP_W-1:0]  ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  assign {sa, ea, fa} = a;
  assign {sb, eb, fb} = b;

  // ---- sign: XOR
  logic sign;
  assign sign = sa ^ sb;

  // ---- exponent: 8-bit adder
  logic signed [EXP_W+1:0] esum;
  exp_adder u_exp (.ea(ea), .eb(eb), .esum(esum));

  // ---- mantissa: probabilistic 24-bit array multiplier
  logic [NUM_FA-1:0] noise_s, noise_c;
  logic [PROD_W-1:0] prod;

  fa_noise_source #(.SEED(SEED)) u_noise (
    .clk    (clk),
    .rst_n  (rst_n),
    .step   (in_valid),
    .col_vdd(col_vdd),
    .perr   (perr),
    .noise_s(noise_s),
    .noise_c(noise_c)
  );

  prob_array_mult u_mant (
    .x      ({1'b1, fa}),
    .y      ({1'b1, fb}),
    .col_vdd(col_vdd),
    .noise_s(noise_s),
    .noise_c(noise_c),
    .p      (prod)
  );

  // ---- normalise: control, shifter, incrementer (no rounding)
  logic [FRAC_W-1:0]       frac;
  logic signed [EXP_W+1:0] enorm;
  logic                    shifted;
  fp_normalize u_norm (
    .prod   (prod),
    .exp_in (esum),
    .frac   (frac),
    .exp_out(enorm),
    .shifted(shifted)
  );

  // ---- special operands and exponent range
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [31:0] res_d;

  always_comb begin
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf  = (ea == '1) && (fa == '0);
    b_inf  = (eb == '1) && (fb == '0);
    a_nan  = (ea == '1) && (fa != '0);
    b_nan  = (eb == '1) && (fb != '0);

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      res_d = QNAN;
    else if (a_inf || b_inf)
      res_d = {sign, 8'hFF, 23'd0};
    else if (a_zero || b_zero)
      res_d = {sign, 31'd0};
    else if (enorm >= 255)
      res_d = {sign, 8'hFF, 23'd0};
    else if (enorm <= 0)
      res_d = {sign, 31'd0};
    else
      res_d = {sign, enorm[EXP_W-1:0], frac};
  end

  // ---- output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) result <= res_d;
    end
  end

  // shifted is reported by the normaliser for observation in simulation
  logic unused_shifted;
  assign unused_shifted = shifted;

endmodule
