// Self-checking testbench for fa_noise_source.
//
// Columns are given the six supply levels in turn, and each level a
// different error probability. Over many steps the observed rate of noise
// events per level must match the programmed probability; VDD_OFF and a
// zero probability must never give an event. The test also checks that
// outputs hold while `step` is low, that a reset replays the same noise,
// and that different adders do not see identical noise.
module fa_noise_source_tb;
  import fpm_pkg::*;

  localparam int STEPS = 400;

  logic                   clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  vdd_profile_t           col_vdd;
  perr_t [NUM_LEVELS-1:0] perr;
  logic [NUM_FA-1:0]      noise_s, noise_c;
  int checks = 0, failures = 0;

  fa_noise_source dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
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

  function automatic int level_of_cell(int k);
    return int'(col_vdd[(k / MANT_W) + (k % MANT_W)]);
  endfunction

  longint events [NUM_LEVELS];
  longint samples[NUM_LEVELS];
  logic [NUM_FA-1:0] first_s [3];
  logic [NUM_FA-1:0] first_c [3];

  initial begin
    for (int c = 0; c < FA_COLS; c++) col_vdd[c] = vdd_level_e'(c % NUM_LEVELS);
    perr[VDD_OFF] = 16'hFFFF;   // must be ignored
    perr[VDD_0V8] = 16'h4000;   // 1/4
    perr[VDD_0V9] = 16'h1000;   // 1/16
    perr[VDD_1V0] = 16'h0400;   // 1/64
    perr[VDD_1V1] = 16'h0100;   // 1/256
    perr[VDD_1V2] = 16'h0000;   // error free
    for (int l = 0; l < NUM_LEVELS; l++) begin events[l] = 0; samples[l] = 0; end

    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // step held low: outputs must not change
    begin
      logic [NUM_FA-1:0] hold_s;
      hold_s = noise_s;
      repeat (3) @(posedge clk);
      check(noise_s == hold_s, "outputs change without step");
    end

    // gather statistics; remember the first three outputs
    for (int n = 0; n < STEPS; n++) begin
      if (n < 3) begin first_s[n] = noise_s; first_c[n] = noise_c; end
      for (int k = 0; k < NUM_FA; k++) begin
        int l;
        l = level_of_cell(k);
        samples[l] += 2;
        events[l]  += longint'(noise_s[k]) + longint'(noise_c[k]);
      end
      step <= 1'b1;
      @(posedge clk);
      step <= 1'b0;
      #1;
    end

    for (int l = 0; l < NUM_LEVELS; l++) begin
      real want, got;
      want = (l == 0) ? 0.0 : real'(perr[l]) / 65536.0;
      got  = real'(events[l]) / real'(samples[l]);
      $display("level %0d: %0d events in %0d samples, rate %f, expected %f",
               l, events[l], samples[l], got, want);
      if (want == 0.0) check(events[l] == 0, "events at zero probability");
      else check(got > want * 0.9 - 0.002 && got < want * 1.1 + 0.002, "event rate off");
    end

    // reset replays the same sequence
    rst_n <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 3; n++) begin
      #1;
      check(noise_s == first_s[n] && noise_c == first_c[n], "sequence differs after reset");
      step <= 1'b1;
      @(posedge clk);
      step <= 1'b0;
    end

    // all levels at 0.8 V: neighbouring adders must not be copies
    for (int c = 0; c < FA_COLS; c++) col_vdd[c] = VDD_0V8;
    #1;
    begin
      int same;
      same = 0;
      for (int k = 1; k < NUM_FA; k++) same += int'(noise_s[k] == noise_s[k-1]);
      check(same < NUM_FA * 3 / 4, "neighbouring adders see the same noise");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
