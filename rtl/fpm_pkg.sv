// Shared types and constants of the probabilistic single-precision multiplier.
//
// The mantissa multiplier is a 24x24 array of full adders arranged in 46
// columns. Each column is run from one of six supply levels: switched off
// (truncated, 0 V) or 0.8, 0.9, 1.0, 1.1 or 1.2 V. A "voltage profile" is the
// list of levels of the 46 columns, least significant column first. The three
// example profiles below (truncation only, biased voltage scaling, and the
// combination of both) are the ones the design is built around; the
// combination is the recommended operating point. The probability that a full
// adder output is wrong at each level is a run-time input of the design,
// because it depends on the process and its noise, not on the logic.
package fpm_pkg;

  // Operand format: IEEE 754 single precision.
  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned MANT_W = FRAC_W + 1;     // with the hidden one
  localparam int unsigned PROD_W = 2 * MANT_W;     // 48-bit mantissa product
  localparam int unsigned BIAS   = 127;

  // Array multiplier geometry: MANT_W-1 rows of MANT_W full adders.
  localparam int unsigned FA_ROWS = MANT_W - 1;                 // 23
  localparam int unsigned FA_COLS = FA_ROWS + MANT_W - 1;       // 46 columns
  localparam int unsigned NUM_FA  = FA_ROWS * MANT_W;           // 552 full adders

  // Supply level of one full adder column.
  typedef enum logic [2:0] {
    VDD_OFF = 3'd0,   // truncated / asleep: outputs held at 0
    VDD_0V8 = 3'd1,
    VDD_0V9 = 3'd2,
    VDD_1V0 = 3'd3,
    VDD_1V1 = 3'd4,
    VDD_1V2 = 3'd5    // nominal supply
  } vdd_level_e;

  localparam int unsigned NUM_LEVELS = 6;

  // Probability of a wrong full adder output, in units of 2^-16.
  localparam int unsigned PERR_W = 16;
  typedef logic [PERR_W-1:0] perr_t;

  // Voltage profile: entry c is column c+1 (column 1 is the least significant).
  typedef vdd_level_e [FA_COLS-1:0] vdd_profile_t;

  // Level of column `col` (1-based) for the three example profiles.
  // Truncation:          columns 1-23 off, 24-46 at 1.2 V.
  // BIVOS:               1-20 0.8 V, 21-29 0.9 V, 30-33 1.0 V, 34-35 1.1 V, 36-46 1.2 V.
  // BIVOS + truncation:  1-22 off, 23-24 0.8 V, 25-29 0.9 V, 30-33 1.0 V,
  //                      34-35 1.1 V, 36-46 1.2 V.
  typedef enum logic [1:0] {
    PROF_NOMINAL    = 2'd0,
    PROF_TRUNCATION = 2'd1,
    PROF_BIVOS      = 2'd2,
    PROF_BIVOS_TRUNC = 2'd3
  } profile_e;

  function automatic vdd_level_e profile_level(profile_e p, int unsigned col);
    unique case (p)
      PROF_TRUNCATION:  return (col <= 23) ? VDD_OFF : VDD_1V2;
      PROF_BIVOS:       return (col <= 20) ? VDD_0V8 :
                               (col <= 29) ? VDD_0V9 :
                               (col <= 33) ? VDD_1V0 :
                               (col <= 35) ? VDD_1V1 : VDD_1V2;
      PROF_BIVOS_TRUNC: return (col <= 22) ? VDD_OFF :
                               (col <= 24) ? VDD_0V8 :
                               (col <= 29) ? VDD_0V9 :
                               (col <= 33) ? VDD_1V0 :
                               (col <= 35) ? VDD_1V1 : VDD_1V2;
      default:          return VDD_1V2;
    endcase
  endfunction

  // Column (1-based) of the full adder in row r (1..23, adding Y[r+1]) and
  // position j (1..24, adding X[j]): its sum has weight 2^(r+j-1).
  function automatic int unsigned fa_column(int unsigned r, int unsigned j);
    return r + j - 1;
  endfunction

endpackage
