// Self-checking testbench for prob_fa.
//
// Applies all 64 combinations of a, b, cin, sleep and the two noise inputs
// and compares sum and carry with the arithmetic sum a + b + cin, inverted
// where a noise input is set and forced to 0 while asleep.
module prob_fa_tb;
  logic a, b, cin, sleep, noise_s, noise_c, sum, cout;
  int checks = 0, failures = 0;

  prob_fa dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic [1:0] total;
      logic       exp_s, exp_c;
      {a, b, cin, sleep, noise_s, noise_c} = 6'(v);
      #1;
      total = 2'(a) + 2'(b) + 2'(cin);
      exp_s = sleep ? 1'b0 : total[0] ^ noise_s;
      exp_c = sleep ? 1'b0 : total[1] ^ noise_c;
      checks++;
      if (sum !== exp_s || cout !== exp_c) begin
        failures++;
        $display("FAIL in=%06b sum=%b/%b cout=%b/%b", v[5:0], sum, exp_s, cout, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
