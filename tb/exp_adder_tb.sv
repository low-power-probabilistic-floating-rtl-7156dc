// Self-checking testbench for exp_adder: every pair of 8-bit exponents,
// compared with ea + eb - 127 computed in integer arithmetic.
module exp_adder_tb;
  import fpm_pkg::*;
  logic [7:0] ea, eb;
  logic signed [9:0] esum;
  int checks = 0, failures = 0;

  exp_adder dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int k = 0; k < 256; k++) begin
        ea = 8'(i);
        eb = 8'(k);
        #1;
        checks++;
        if (int'(esum) != i + k - 127) begin
          failures++;
          if (failures < 10) $display("FAIL ea=%0d eb=%0d got %0d", i, k, esum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
