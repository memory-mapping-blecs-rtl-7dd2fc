// tb_hvlf_modulator: with an 8-cycle base period and a frequency division of
// 3, checks the sample spacing (24 cycles), the period (256 samples) and each
// DAC code against bias + 256 * mult * sin(2*pi*k/256) computed with real
// arithmetic, within the sine approximation's tolerance; then saturation at
// both ends of the DAC range and the return to the bias when disabled.
module tb_hvlf_modulator;
  localparam int unsigned PRESC = 8;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [15:0] bias = 16'd30000, freq_div = 16'd3, dac_code;
  logic [7:0]  mult = 8'd40, phase;
  logic        sample;
  int checks = 0, failures = 0;
  int cyc = 0, last_sample = -1, n_samples = 0, n_sat = 0;

  hvlf_modulator #(.CLK_HZ(PRESC), .BASE_HZ(1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  function automatic int expected(int k, int b, int m);
    real v = b + 256.0 * m * $sin(2.0 * 3.14159265358979 * k / 256.0);
    if (v < 0) return 0;
    if (v > 65535) return 65535;
    return int'(v);
  endfunction

  // at every sample: code against the reference, spacing of samples
  always @(posedge clk) begin
    #1;
    if (rst_n && enable && sample) begin
      int e, tol, diff;
      e    = expected(int'(phase), int'(bias), int'(mult));
      tol  = int'(0.002 * 256 * mult) + 2;
      diff = int'(dac_code) - e;
      n_samples++;
      if (diff < 0) diff = -diff;
      check(diff <= tol, $sformatf("phase %0d code %0d expected %0d", phase, dac_code, e));
      if (dac_code == 16'hFFFF || dac_code == 16'h0000) n_sat++;
      if (last_sample >= 0)
        check(cyc - last_sample == int'(PRESC * freq_div), $sformatf("sample spacing %0d", cyc - last_sample));
      last_sample = cyc;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk); #1;
    check(dac_code == bias, "bias held while disabled");
    @(negedge clk); enable = 1;
    // one full period: 256 samples, back to phase 0
    @(posedge sample); t0 = cyc;
    repeat (256) @(posedge sample);
    check(cyc - t0 == 256 * int'(PRESC * freq_div), "period of 256 samples");
    // saturation at the top and the bottom
    @(negedge clk); enable = 0; bias = 16'd60000; mult = 8'd255; freq_div = 16'd1;
    last_sample = -1;
    @(negedge clk); enable = 1;
    repeat (300) @(posedge sample);
    @(negedge clk); enable = 0; bias = 16'd1000;
    last_sample = -1;
    @(negedge clk); enable = 1;
    repeat (300) @(posedge sample);
    check(n_sat > 100, "saturation reached");
    @(negedge clk); enable = 0;
    @(posedge clk); @(posedge clk); #1;
    check(dac_code == 16'd1000 && phase == 0, "disabled: bias and phase 0");
    check(n_samples > 800, "samples seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
