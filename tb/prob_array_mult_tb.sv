// Self-checking testbench for prob_array_mult.
//
// Reference values are computed from the partial products, not from the
// array. Four groups of checks:
//  1. every column at 1.2 V, no noise: p must equal x * y;
//  2. the lowest T columns truncated (T = 1..46), the rest at 1.2 V: p must
//     equal X1*Y1 plus the sum of all partial products of weight above T,
//     because a truncated column passes neither sums nor carries on;
//     noise on the truncated cells must change nothing;
//  3. the three example profiles with no noise: BIVOS alone is exact,
//     the two with truncation match the reference of group 2;
//  4. a single noise event on one cell's sum (carry) must move p by exactly
//     +-2^c (+-2^(c+1)), c being that cell's column, since everything
//     after the cell adds exactly.
module prob_array_mult_tb;
  import fpm_pkg::*;

  logic [23:0]       x, y;
  vdd_profile_t      col_vdd;
  logic [NUM_FA-1:0] noise_s, noise_c;
  logic [47:0]       p;
  int checks = 0, failures = 0;

  prob_array_mult dut (.*);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sum of the partial products x[j]*y[i] with weight i+j = 0 or > t
  function automatic logic [47:0] trunc_ref(logic [23:0] xv, logic [23:0] yv, int t);
    logic [47:0] acc = 48'(xv[0] & yv[0]);
    for (int i = 0; i < 24; i++)
      for (int j = 0; j < 24; j++)
        if (i + j > t && xv[j] && yv[i]) acc += 48'd1 << (i + j);
    return acc;
  endfunction

  function automatic logic [23:0] rand_op();
    int unsigned kind;
    kind = $urandom_range(0, 3);
    unique case (kind)
      0:       return 24'hFFFFFF;
      1:       return {1'b1, 23'($urandom)};
      default: return 24'($urandom);
    endcase
  endfunction

  task automatic expect_p(logic [47:0] e, string what);
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 20) $display("FAIL %s x=%h y=%h p=%h exp=%h", what, x, y, p, e);
    end
  endtask

  initial begin
    // ---- 1. nominal, exact
    for (int c = 0; c < FA_COLS; c++) col_vdd[c] = VDD_1V2;
    noise_s = '0;
    noise_c = '0;
    x = 24'hFFFFFF; y = 24'hFFFFFF; #1; expect_p(48'hFFFFFE000001, "max");
    x = 24'h0;      y = 24'hABCDEF; #1; expect_p(48'h0, "zero");
    for (int n = 0; n < 3000; n++) begin
      x = rand_op(); y = rand_op(); #1;
      expect_p(48'(x) * 48'(y), "exact");
    end

    // ---- 2. truncation of the lowest t columns
    for (int t = 1; t <= FA_COLS; t++) begin
      for (int c = 0; c < FA_COLS; c++) col_vdd[c] = (c < t) ? VDD_OFF : VDD_1V2;
      for (int n = 0; n < 60; n++) begin
        x = rand_op(); y = rand_op();
        // random noise only on cells of truncated columns
        for (int r = 0; r < FA_ROWS; r++)
          for (int j = 0; j < MANT_W; j++) begin
            noise_s[r*MANT_W+j] = (r + j < t) ? 1'($urandom) : 1'b0;
            noise_c[r*MANT_W+j] = (r + j < t) ? 1'($urandom) : 1'b0;
          end
        #1;
        expect_p(trunc_ref(x, y, t), "trunc");
      end
    end
    noise_s = '0;
    noise_c = '0;

    // ---- 3. example profiles, noise-free
    for (int pr = 1; pr <= 3; pr++) begin
      int t;
      for (int c = 0; c < FA_COLS; c++) col_vdd[c] = profile_level(profile_e'(pr), c + 1);
      t = (pr == 1) ? 23 : (pr == 2) ? 0 : 22;
      for (int n = 0; n < 500; n++) begin
        x = rand_op(); y = rand_op(); #1;
        expect_p(trunc_ref(x, y, t), "profile");
      end
    end

    // ---- 4. single noise events
    for (int c = 0; c < FA_COLS; c++) col_vdd[c] = VDD_1V2;
    for (int n = 0; n < 3000; n++) begin
      int          r, j, w;
      logic        on_carry;
      logic [47:0] exact, d;
      r = $urandom_range(0, FA_ROWS - 1);
      j = $urandom_range(0, MANT_W - 1);
      on_carry = 1'($urandom);
      w = r + j + 1 + int'(on_carry);
      x = rand_op(); y = rand_op();
      exact = 48'(x) * 48'(y);
      noise_s = '0; noise_c = '0;
      if (on_carry) noise_c[r*MANT_W+j] = 1'b1;
      else          noise_s[r*MANT_W+j] = 1'b1;
      #1;
      d = p - exact;
      checks++;
      if (d !== (48'd1 << w) && d !== -(48'd1 << w)) begin
        failures++;
        if (failures < 20)
          $display("FAIL noise r=%0d j=%0d carry=%b x=%h y=%h p=%h exact=%h", r, j, on_carry, x, y, p, exact);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
