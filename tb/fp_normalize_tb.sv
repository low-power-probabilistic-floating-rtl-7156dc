// Self-checking testbench for fp_normalize.
//
// Builds products of known value 1.f * 2^k (k = 0 or 1) with random bits
// below them, and checks that the fraction equals the known f, that the
// exponent is incremented exactly when k = 1, and the shift flag. Also
// checks the products 1.0 and 3.99.. at the edges.
module fp_normalize_tb;
  import fpm_pkg::*;
  logic [47:0]       prod;
  logic signed [9:0] exp_in, exp_out;
  logic [22:0]       frac;
  logic              shifted;
  int checks = 0, failures = 0;

  fp_normalize dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [22:0] f, logic k, logic signed [9:0] e);
    checks++;
    if (frac !== f || exp_out !== e + 10'(k) || shifted !== k) begin
      failures++;
      $display("FAIL prod=%h frac=%h/%h exp=%0d/%0d sh=%b/%b",
               prod, frac, f, exp_out, e + 10'(k), shifted, k);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [22:0] f;
      logic        k;
      logic [23:0] low;
      f      = 23'($urandom);
      k      = 1'($urandom);
      low    = 24'($urandom);
      exp_in = 10'($signed(10'($urandom_range(0, 400))) - 10'sd130);
      // value 1.f placed so that its leading one is at bit 46 + k
      if (k) prod = {1'b1, f, low};
      else   prod = {1'b0, 1'b1, f, low[23:1]};
      #1;
      check(f, k, exp_in);
    end
    exp_in = 10'sd5;
    prod = 48'h4000_0000_0000; #1; check(23'd0, 1'b0, exp_in);
    prod = 48'hFFFF_FFFF_FFFF; #1; check(23'h7FFFFF, 1'b1, exp_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
