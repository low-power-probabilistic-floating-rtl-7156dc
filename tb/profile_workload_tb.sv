// Voltage-profile workload for fpmul_prob: error rate per product bit and
// full adder switching activity for the nominal, truncation, BIVOS and
// BIVOS + truncation profiles.
//
// For every profile the design multiplies the same set of random normal
// operands (same seed). The testbench compares the 48-bit mantissa product
// inside the multiplier with the exact product, bit by bit, and counts the
// sum and carry toggles of every full adder from one operation to the next.
// From the toggles it gives a first-order energy estimate: per column,
// toggles times (V / 1.2 V)^2, relative to the nominal profile. Energy per
// toggle is taken to scale with V^2, and truncated columns count as zero;
// real figures need energy per toggle from circuit simulation of the cell.
// The error probabilities per level are example values, not measured ones.
//
// Checks: at the nominal profile no product bit is ever wrong. Truncated
// columns never toggle. The estimated energy ranks nominal > BIVOS >
// BIVOS + truncation, and nominal > truncation. The mean relative error of
// the results stays below 1e-3 for every profile.
module profile_workload_tb;
  import fpm_pkg::*;

  localparam int OPS = 3000;

  logic                   clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [31:0]            a = '0, b = '0;
  vdd_profile_t           col_vdd;
  perr_t [NUM_LEVELS-1:0] perr;
  logic                   out_valid;
  logic [31:0]            result;

  int checks = 0, failures = 0;

  fpmul_prob dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- toggle monitors, one per full adder
  logic   counting = 1'b0;
  longint col_toggles [FA_COLS];

  for (genvar r = 0; r < FA_ROWS; r++) begin : g_mon_row
    for (genvar j = 0; j < MANT_W; j++) begin : g_mon_cell
      logic   ps = 1'b0, pc = 1'b0;
      longint n = 0;
      always @(posedge clk) begin
        if (counting) begin
          n += longint'(dut.u_mant.g_row[r].g_cell[j].sum  != ps)
             + longint'(dut.u_mant.g_row[r].g_cell[j].cout != pc);
        end
        ps <= dut.u_mant.g_row[r].g_cell[j].sum;
        pc <= dut.u_mant.g_row[r].g_cell[j].cout;
      end
    end
  end

  // copy the per-cell counts into per-column totals (generate indices are
  // constants, so this is done by a generated always block per cell)
  logic collect = 1'b0;
  for (genvar r = 0; r < FA_ROWS; r++) begin : g_col_row
    for (genvar j = 0; j < MANT_W; j++) begin : g_col_cell
      always @(posedge collect) col_toggles[r + j] += g_mon_row[r].g_mon_cell[j].n;
      always @(negedge collect) g_mon_row[r].g_mon_cell[j].n = 0;
    end
  end

  // ---------------- per-bit error monitor on the mantissa product
  longint bit_err [48];
  real    rel_err_sum;
  int     rel_err_n;

  always @(posedge clk) begin
    if (counting && in_valid) begin
      logic [47:0] exact;
      exact = 48'({1'b1, a[22:0]}) * 48'({1'b1, b[22:0]});
      for (int k = 0; k < 48; k++) bit_err[k] += longint'(dut.u_mant.p[k] != exact[k]);
    end
  end

  function automatic real to_real(logic [31:0] v);
    return $bitstoreal({v[31], 11'(int'(v[30:23]) - 127 + 1023), v[22:0], 29'd0});
  endfunction

  // relative error of each result against the exact real product
  logic [31:0] qa, qb;
  logic        qv = 1'b0;
  always @(posedge clk) begin
    if (counting && out_valid && qv) begin
      real e, g;
      e = to_real(qa) * to_real(qb);
      g = to_real(result);
      rel_err_sum += (g > e ? g - e : e - g) / (e > 0 ? e : -e);
      rel_err_n++;
    end
    qv <= in_valid;
    qa <= a;
    qb <= b;
  end

  // ---------------- one profile run
  task automatic run_profile(profile_e pr, output real energy, output real mean_rel);
    longint total_bits;
    for (int c = 0; c < FA_COLS; c++) begin
      col_vdd[c]     = profile_level(pr, c + 1);
      col_toggles[c] = 0;
    end
    for (int k = 0; k < 48; k++) bit_err[k] = 0;
    rel_err_sum = 0.0;
    rel_err_n   = 0;
    void'($urandom(1234));   // same operands for every profile
    @(posedge clk);
    counting <= 1'b1;
    for (int n = 0; n < OPS; n++) begin
      in_valid <= 1'b1;
      a <= {1'($urandom), 8'($urandom_range(100, 150)), 23'($urandom)};
      b <= {1'($urandom), 8'($urandom_range(100, 150)), 23'($urandom)};
      @(posedge clk);
    end
    in_valid <= 1'b0;
    @(posedge clk);
    @(posedge clk);
    counting <= 1'b0;
    @(posedge clk);
    collect = 1'b1;
    #1;
    collect = 1'b0;
    #1;
    energy = 0.0;
    total_bits = 0;
    for (int c = 0; c < FA_COLS; c++) begin
      real v;
      unique case (col_vdd[c])
        VDD_OFF: v = 0.0;
        VDD_0V8: v = 0.8;
        VDD_0V9: v = 0.9;
        VDD_1V0: v = 1.0;
        VDD_1V1: v = 1.1;
        default: v = 1.2;
      endcase
      energy += real'(col_toggles[c]) * (v / 1.2) * (v / 1.2);
      if (col_vdd[c] == VDD_OFF)
        check(col_toggles[c] == 0, $sformatf("truncated column %0d toggles", c + 1));
    end
    for (int k = 0; k < 48; k++) total_bits += bit_err[k];
    mean_rel = rel_err_sum / real'(rel_err_n);
    $write("%-16s bit error rate Z1..Z48 (%%):", pr.name());
    for (int k = 0; k < 48; k += 4) $write(" %5.2f", 100.0 * real'(bit_err[k]) / real'(OPS));
    $display("  (every 4th bit)");
    $display("%-16s wrong product bits %0d, mean relative error %e", pr.name(), total_bits, mean_rel);
    if (pr == PROF_NOMINAL) check(total_bits == 0, "nominal profile gave product bit errors");
    check(mean_rel < 1.0e-3, $sformatf("%s: mean relative error too large", pr.name()));
  endtask

  real e_nom, e_tr, e_bv, e_bt, r_nom, r_tr, r_bv, r_bt;

  initial begin
    perr[VDD_OFF] = 16'd0;
    perr[VDD_0V8] = 16'd6554;   // example values: 10 %
    perr[VDD_0V9] = 16'd1311;   // 2 %
    perr[VDD_1V0] = 16'd328;    // 0.5 %
    perr[VDD_1V1] = 16'd66;     // 0.1 %
    perr[VDD_1V2] = 16'd0;      // error free at nominal supply
    for (int c = 0; c < FA_COLS; c++) col_toggles[c] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    run_profile(PROF_NOMINAL,     e_nom, r_nom);
    run_profile(PROF_TRUNCATION,  e_tr,  r_tr);
    run_profile(PROF_BIVOS,       e_bv,  r_bv);
    run_profile(PROF_BIVOS_TRUNC, e_bt,  r_bt);

    $display("estimated array energy relative to nominal: truncation %5.1f%%, BIVOS %5.1f%%, BIVOS+truncation %5.1f%%",
             100.0 * e_tr / e_nom, 100.0 * e_bv / e_nom, 100.0 * e_bt / e_nom);
    check(e_nom > e_bv && e_bv > e_bt, "energy ranking nominal > BIVOS > BIVOS+truncation");
    check(e_nom > e_tr, "energy ranking nominal > truncation");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
