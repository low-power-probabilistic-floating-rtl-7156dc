// Noise source for the probabilistic array multiplier.
//
// Thermal noise at a lowered supply makes a full adder output wrong now and
// then, more often the lower the supply; at the nominal 1.2 V it is taken to
// be error free. This block turns that into logic: for each of the 552 full
// adders it produces two noise events per operation, one for the sum and one
// for the carry, each 1 with the error probability of the supply level of
// that adder's column. The probabilities are inputs (`perr`, one per level,
// in units of 2^-16), so that figures measured for a given process can be
// loaded without changing the RTL; the entry for VDD_OFF is ignored, since a
// truncated column produces no output to corrupt.
//
// Each full adder has its own 32-bit xorshift generator (shifts 13, 17, 5).
// Its low half decides the sum event, its high half the carry event: an
// event happens when that 16-bit value is below perr[level]. Generators are
// loaded with distinct non-zero seeds, derived from SEED and the adder's
// index, while rst_n is low, and all advance by one step on a clock edge with
// `step` high, so every operation sees fresh noise. The noise outputs are
// combinational from the current state and from col_vdd / perr.
//
// Gaussian noise at the adder outputs is what the design models; the
// pseudo-random generators, the probability encoding and the seeding are
// this implementation's own way of producing it in digital logic.
module fa_noise_source
  import fpm_pkg::*;
#(
  parameter int unsigned SEED = 32'h1234_5678
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          step,      // advance all generators
  input  vdd_profile_t                  col_vdd,   // entry c-1: level of column c
  input  perr_t [NUM_LEVELS-1:0]        perr,      // error probability per level, 2^-16 units
  output logic  [NUM_FA-1:0]            noise_s,
  output logic  [NUM_FA-1:0]            noise_c
);

  // Distinct, never-zero start value for generator k.
  function automatic logic [31:0] seed_of(int unsigned k);
    logic [31:0] z;
    z = SEED + (k + 1) * 32'h9E37_79B9;
    z = (z ^ (z >> 16)) * 32'h85EB_CA6B;
    z = (z ^ (z >> 13)) * 32'hC2B2_AE35;
    z = z ^ (z >> 16);
    return (z == 32'd0) ? 32'h0000_0001 : z;
  endfunction

  function automatic logic [31:0] xorshift32(logic [31:0] v);
    logic [31:0] t;
    t = v ^ (v << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  for (genvar r = 0; r < FA_ROWS; r++) begin : g_row
    for (genvar j = 0; j < MANT_W; j++) begin : g_cell
      localparam int unsigned K = r * MANT_W + j;
      logic [31:0] state;
      vdd_level_e  lvl;
      perr_t       thr;

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)    state <= seed_of(K);
        else if (step) state <= xorshift32(state);
      end

      always_comb begin
        lvl        = col_vdd[r + j];
        thr        = (lvl == VDD_OFF) ? '0 : perr[lvl];
        noise_s[K] = (state[15:0]  < thr);
        noise_c[K] = (state[31:16] < thr);
      end
    end
  end

endmodule
