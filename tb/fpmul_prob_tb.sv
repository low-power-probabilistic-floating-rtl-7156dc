// End-to-end testbench for fpmul_prob, at its default parameters.
//
// Reference: the operands are widened to double precision, multiplied in
// real arithmetic (exact, since two 24-bit mantissas give 48 bits), and the
// product is cut back to single precision by truncating the fraction, with
// flush to zero below the normal range and Inf above it.
//
// Phases:
//  A. every column at 1.2 V, no noise: results must equal the reference
//     exactly, for random operands, operands that give products in [1,2)
//     and in [2,4), overflow, underflow, zeros, subnormals, Inf and NaN.
//     The valid input toggles randomly; each result must come exactly one
//     cycle after its operands.
//  B. the truncation profile: the result may only be smaller in magnitude
//     than the exact one, by at most 48 units in the last place, since the
//     lost partial products of the low 23 columns weigh less than 2^28.6.
//  C. the BIVOS + truncation profile with noise at the lowered levels:
//     sign and exponent range must stay right and the relative error must
//     stay below 2^-8, as only columns up to 35 can make errors.
//  D. BIVOS with all error probabilities 0 must be exact again.
// Each mechanism (normalising shift, no shift, overflow, underflow, zero,
// Inf, NaN, truncation loss, noise error) is counted; one that never
// happens counts as a failure.
module fpmul_prob_tb;
  import fpm_pkg::*;

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
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model
  function automatic real to_real(logic [31:0] v);
    logic [63:0] d;
    d = {v[31], 11'(int'(v[30:23]) - 127 + 1023), v[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] x, logic [31:0] y);
    logic        s;
    logic [63:0] d;
    int          e;
    logic        xz, yz, xi, yi, xn, yn;
    s  = x[31] ^ y[31];
    xz = (x[30:23] == 8'h00); yz = (y[30:23] == 8'h00);
    xi = (x[30:23] == 8'hFF) && (x[22:0] == 0);
    yi = (y[30:23] == 8'hFF) && (y[22:0] == 0);
    xn = (x[30:23] == 8'hFF) && (x[22:0] != 0);
    yn = (y[30:23] == 8'hFF) && (y[22:0] != 0);
    if (xn || yn || (xi && yz) || (yi && xz)) return 32'h7FC0_0000;
    if (xi || yi) return {s, 8'hFF, 23'd0};
    if (xz || yz) return {s, 31'd0};
    d = $realtobits(to_real(x) * to_real(y));
    e = int'(d[62:52]) - 1023 + 127;
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), d[51:29]};
  endfunction

  // ---------------- mechanism counters
  int n_shift, n_noshift, n_ovf, n_unf, n_zero, n_inf, n_nan, n_trunc_loss, n_noise_err;

  function automatic void classify(logic [31:0] x, logic [31:0] y);
    logic [47:0] mp;
    int          e;
    if (x[30:23] == 8'hFF || y[30:23] == 8'hFF) begin
      if (x[22:0] != 0 && x[30:23] == 8'hFF || y[22:0] != 0 && y[30:23] == 8'hFF) n_nan++;
      else n_inf++;
      return;
    end
    if (x[30:23] == 0 || y[30:23] == 0) begin n_zero++; return; end
    mp = 48'({1'b1, x[22:0]}) * 48'({1'b1, y[22:0]});
    e  = int'(x[30:23]) + int'(y[30:23]) - 127 + int'(mp[47]);
    if (mp[47]) n_shift++; else n_noshift++;
    if (e >= 255) n_ovf++;
    if (e <= 0)   n_unf++;
  endfunction

  // ---------------- stimulus helpers
  function automatic logic [31:0] rand_normal(int emin, int emax);
    return {1'($urandom), 8'($urandom_range(emin, emax)), 23'($urandom)};
  endfunction

  function automatic logic [31:0] rand_operand();
    int unsigned kind;
    kind = $urandom_range(0, 19);
    unique case (kind)
      0:       return {1'($urandom), 8'h00, ($urandom_range(0, 1) == 0) ? 23'd0 : 23'($urandom)};
      1:       return {1'($urandom), 8'hFF, 23'd0};
      2:       return {1'($urandom), 8'hFF, 23'($urandom) | 23'd1};
      3:       return rand_normal(200, 254);     // tends to overflow
      4:       return rand_normal(1, 50);        // tends to underflow
      5:       return {1'($urandom), 8'($urandom_range(100, 150)), 23'd0};  // small mantissa
      6:       return {1'($urandom), 8'($urandom_range(100, 150)), 23'h7FFFFF};
      default: return rand_normal(64, 190);
    endcase
  endfunction

  task automatic set_profile(profile_e pr);
    for (int c = 0; c < FA_COLS; c++) col_vdd[c] = profile_level(pr, c + 1);
  endtask

  // drive n operations with random gaps; every accepted pair goes to a queue,
  // and each out_valid must come exactly one cycle after its in_valid
  typedef struct { logic [31:0] x, y; } op_t;
  op_t pending[$];

  typedef enum { CHK_EXACT, CHK_TRUNC, CHK_NOISY } mode_e;
  mode_e mode;

  task automatic run_ops(int n);
    int sent = 0;
    while (sent < n) begin
      logic go;
      go = ($urandom_range(0, 3) != 0);
      in_valid <= go;
      if (go) begin
        a <= rand_operand();
        b <= rand_operand();
        sent++;
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (2) @(posedge clk);
  endtask

  // capture at the input and compare at the output
  logic        prev_valid = 1'b0;
  op_t         prev_op;
  always @(posedge clk) begin
    if (rst_n) begin
      // the result for the operation accepted at the previous edge
      if (out_valid !== prev_valid) begin
        checks++;
        failures++;
        $display("FAIL latency: out_valid=%b expected %b", out_valid, prev_valid);
      end else if (out_valid) begin
        check_result(prev_op.x, prev_op.y, result);
      end
      prev_valid <= in_valid;
      prev_op    <= '{a, b};
      if (in_valid) classify(a, b);
    end
  end

  function automatic longint mag(logic [31:0] v);
    return longint'(v[30:0]);
  endfunction

  function automatic void check_result(logic [31:0] x, logic [31:0] y, logic [31:0] r);
    logic [31:0] e;
    e = ref_mul(x, y);
    checks++;
    unique case (mode)
      CHK_EXACT: begin
        if (r !== e) begin
          failures++;
          if (failures < 20) $display("FAIL exact %h * %h = %h, expected %h", x, y, r, e);
        end
      end
      CHK_TRUNC: begin
        // same sign, magnitude not above the exact one, within 48 ulp
        logic ok;
        if (e[30:23] == 8'hFF || e[30:0] == 0 || r[30:23] == 0) ok = (r === e) || (e[30:23] != 8'hFF && r[30:0] == 0 && mag(e) < longint'(32'h0100_0000));
        else ok = (r[31] == e[31]) && mag(r) <= mag(e) && mag(e) - mag(r) <= 48;
        if (r != e) n_trunc_loss++;
        if (!ok) begin
          failures++;
          if (failures < 20) $display("FAIL trunc %h * %h = %h, exact %h", x, y, r, e);
        end
      end
      default: begin
        logic ok;
        if (e[30:23] == 8'hFF || e[30:23] <= 8'd1 || e[30:23] >= 8'd254) ok = 1'b1;  // range edges: no bound
        else begin
          real re, rr;
          re = to_real(e);
          rr = to_real(r);
          ok = (r[31] == e[31]) && r[30:23] != 8'hFF && r[30:23] != 0
               && ((rr - re) / re < 1.0 / 256.0) && ((re - rr) / re < 1.0 / 256.0);
        end
        if (r != e && mag(e) - mag(r) > 48 || mag(r) > mag(e)) n_noise_err++;
        if (!ok) begin
          failures++;
          if (failures < 20) $display("FAIL noisy %h * %h = %h, exact %h", x, y, r, e);
        end
      end
    endcase
  endfunction

  initial begin
    n_shift = 0; n_noshift = 0; n_ovf = 0; n_unf = 0; n_zero = 0;
    n_inf = 0; n_nan = 0; n_trunc_loss = 0; n_noise_err = 0;
    perr = '0;
    set_profile(PROF_NOMINAL);
    mode = CHK_EXACT;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // A: exact
    run_ops(4000);

    // B: truncation, no noise source active
    mode = CHK_TRUNC;
    set_profile(PROF_TRUNCATION);
    run_ops(4000);

    // C: BIVOS + truncation with noise at the lowered levels
    mode = CHK_NOISY;
    set_profile(PROF_BIVOS_TRUNC);
    perr[VDD_0V8] = 16'd6554;   // 10 %
    perr[VDD_0V9] = 16'd1311;   // 2 %
    perr[VDD_1V0] = 16'd328;    // 0.5 %
    perr[VDD_1V1] = 16'd66;     // 0.1 %
    perr[VDD_1V2] = 16'd0;
    run_ops(4000);

    // D: BIVOS with error-free levels is exact
    mode = CHK_EXACT;
    perr = '0;
    set_profile(PROF_BIVOS);
    run_ops(2000);

    $display("mechanisms: shift=%0d noshift=%0d overflow=%0d underflow=%0d zero=%0d inf=%0d nan=%0d trunc_loss=%0d noise_err=%0d",
             n_shift, n_noshift, n_ovf, n_unf, n_zero, n_inf, n_nan, n_trunc_loss, n_noise_err);
    checks++;
    if (n_shift == 0 || n_noshift == 0 || n_ovf == 0 || n_unf == 0 || n_zero == 0 ||
        n_inf == 0 || n_nan == 0 || n_trunc_loss == 0 || n_noise_err == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
