// Probabilistic 1-bit full adder: the cell the mantissa array is built from.
//
// An ordinary full adder (sum = a ^ b ^ cin, cout = majority of a, b, cin)
// with two additions. First, each output has its own noise input: when it is
// 1 the output is inverted. This is how a noisy gate at a lowered supply is
// represented at the logic level, as an output that is occasionally wrong;
// the noise inputs come from fa_noise_source. Second, a sleep input models a
// column that has been truncated (switched to 0 V): both outputs are then 0,
// whatever the noise. Purely combinational.
//
// The cell, its two noise points and truncation follow the design; that a
// noise event inverts the output and that a sleeping cell reads as 0 are
// choices of this implementation.
module prob_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic sleep,     // column truncated: outputs forced to 0
  input  logic noise_s,   // invert the sum
  input  logic noise_c,   // invert the carry
  output logic sum,
  output logic cout
);

  logic sum_ideal, cout_ideal;

  always_comb begin
    sum_ideal  = a ^ b ^ cin;
    cout_ideal = (a & b) | (a & cin) | (b & cin);
    sum        = ~sleep & (sum_ideal  ^ noise_s);
    cout       = ~sleep & (cout_ideal ^ noise_c);
  end

endmodule
