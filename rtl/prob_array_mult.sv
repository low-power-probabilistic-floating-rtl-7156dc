// Probabilistic 24x24-bit array multiplier for the mantissas.
//
// A ripple-carry array multiplier: 23 rows of 24 prob_fa cells. Row r
// (r = 1..23) adds the partial product X*Y[r+1] to the running sum from the
// row above; inside a row the carry ripples from the least significant cell
// to the most significant one, and the last carry of a row enters the most
// significant cell of the next row. The first row adds X[j+1]*Y[1] and
// X[j]*Y[2]. Each row hands its least significant sum bit down as a product
// bit; the last row delivers bits Z24..Z47 and its final carry is Z48.
// Z1 = X1*Y1 is a single AND gate outside the array. (Indices in this comment
// are 1-based as in the usual drawing; the ports are 0-based.)
//
// The cell of row r at position j lies in column c = r + j - 1, c = 1..46:
// all cells of a column produce bits of the same weight 2^c. Every column has
// one supply level from the voltage profile `col_vdd`. A column at VDD_OFF is
// truncated: its cells sleep and output 0, so its sums and the carries it
// would pass to the next column are lost. A column at a lowered level keeps
// working, and its errors arrive through the per-cell noise inputs, which
// the noise source drives with a probability chosen per level.
//
// Interface: noise_s[k] / noise_c[k] invert the sum / carry of the cell with
// k = (r-1)*24 + (j-1). Purely combinational; the critical path is the ripple
// through the last rows (about 24 + 2*23 cells).
//
// The array structure, the column numbering and the per-column supply
// follow the design; how noise and sleep act on a cell is defined in prob_fa.
module prob_array_mult
  import fpm_pkg::*;
(
  input  logic [MANT_W-1:0] x,
  input  logic [MANT_W-1:0] y,
  input  vdd_profile_t      col_vdd,   // entry c-1 is the level of column c
  input  logic [NUM_FA-1:0] noise_s,
  input  logic [NUM_FA-1:0] noise_c,
  output logic [PROD_W-1:0] p
);

  // 0-based inside: row r = 0..FA_ROWS-1 adds y[r+1], position j = 0..MANT_W-1
  // adds x[j]; the cell's sum has weight 2^(r+j+1), i.e. column r+j+1.
  for (genvar r = 0; r < FA_ROWS; r++) begin : g_row
    for (genvar j = 0; j < MANT_W; j++) begin : g_cell
      localparam int unsigned K = r * MANT_W + j;
      logic a_in, b_in, c_in, sleep;
      logic sum, cout;

      // running sum from above (or first partial product for the first row)
      if (r == 0) begin : g_a_first
        if (j < MANT_W - 1) begin : g_pp
          assign a_in = x[j+1] & y[0];
        end else begin : g_zero
          assign a_in = 1'b0;
        end
      end else begin : g_a_next
        if (j < MANT_W - 1) begin : g_sum
          assign a_in = g_row[r-1].g_cell[j+1].sum;
        end else begin : g_carry
          assign a_in = g_row[r-1].g_cell[j].cout;
        end
      end

      assign b_in = x[j] & y[r+1];

      if (j == 0) begin : g_cin0
        assign c_in = 1'b0;
      end else begin : g_cin
        assign c_in = g_row[r].g_cell[j-1].cout;
      end

      assign sleep = (col_vdd[r+j] == VDD_OFF);

      prob_fa u_fa (
        .a      (a_in),
        .b      (b_in),
        .cin    (c_in),
        .sleep  (sleep),
        .noise_s(noise_s[K]),
        .noise_c(noise_c[K]),
        .sum    (sum),
        .cout   (cout)
      );
    end

    // least significant sum of every row is a finished product bit
    assign p[r+1] = g_row[r].g_cell[0].sum;
  end

  assign p[0] = x[0] & y[0];

  for (genvar j = 1; j < MANT_W; j++) begin : g_top_bits
    assign p[FA_ROWS + j] = g_row[FA_ROWS-1].g_cell[j].sum;
  end

  assign p[PROD_W-1] = g_row[FA_ROWS-1].g_cell[MANT_W-1].cout;

endmodule
