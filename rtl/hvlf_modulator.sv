// hvlf_modulator: sine modulation of the high-voltage DAC for the HVLF test.
//
// While `enable` is high, a 256-sample sine wave is added to the bias code and
// sent to the HV DAC, so that every ionisation chamber sees a small
// low-frequency modulation of its bias voltage. Settings come from the
// default HVLF control words:
//   bias      (16 bit)  DAC code of the bias voltage, V = 10/2^16 * code * 300
//   mult      (8 bit)   digital multiplier, peak amplitude 11.72 V * mult
//   freq_div  (16 bit)  frequency division, F = 10 MHz / 2048 / freq_div
// The 11.72 V step is 3000 V / 256, i.e. 256 DAC codes, so the DAC code is
// bias + 256 * mult * sin(2*pi*k/256), saturated to 0..65535. A prescaler
// turns the system clock into the 1.25 MHz base rate (10 MHz / 8); a second
// divider by freq_div (0 is taken as 1) gives the sample rate, and 256
// samples make one period, which yields the formula above. `phase` steps on
// each sample; `dac_code` follows it one clock later, and `sample` pulses in
// the first cycle of each new code. With `enable` low the phase returns to 0
// and the DAC holds the bias. The sine values are computed at elaboration with the
// Bhaskara approximation sin = 4u / (20480 - u), u = p * (128 - p), for a
// half-period index p of 0..128 (error below 0.2 % of full scale). The
// formulas and field widths follow the board's register map; the generator
// structure, the base rate and the sine approximation are this design's.
module hvlf_modulator #(
  parameter int unsigned CLK_HZ  = 40_000_000,
  parameter int unsigned BASE_HZ = 1_250_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [15:0] bias,
  input  logic [7:0]  mult,
  input  logic [15:0] freq_div,
  output logic [15:0] dac_code,
  output logic        sample,
  output logic [7:0]  phase
);

  localparam int unsigned PRESC = (CLK_HZ / BASE_HZ > 0) ? CLK_HZ / BASE_HZ : 1;
  localparam int unsigned PW    = (PRESC > 1) ? $clog2(PRESC) : 1;

  // sine of sample k of 256 for k = 0..127 (first half period), scaled to 32767
  function automatic logic [15:0] half_sine(input int unsigned p);
    int unsigned u = p * (128 - p);
    return 16'((4 * u * 32767 + (20480 - u) / 2) / (20480 - u));
  endfunction

  logic [15:0] sine_rom [128];
  always_comb for (int unsigned i = 0; i < 128; i++) sine_rom[i] = half_sine(i);

  // ---------------------------------------------------------------- sample timing
  logic [PW-1:0] presc;
  logic [15:0]   div_cnt;
  logic          base_tick, sample_tick;
  logic [15:0]   div_last;

  assign base_tick   = (32'(presc) == PRESC - 1);
  assign div_last    = (freq_div == 16'd0) ? 16'd0 : freq_div - 16'd1;
  assign sample_tick = enable && base_tick && (div_cnt >= div_last);

  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      presc   <= '0;
      div_cnt <= '0;
      phase   <= '0;
    end else begin
      presc <= base_tick ? '0 : presc + PW'(1);
      if (base_tick) div_cnt <= sample_tick ? 16'd0 : div_cnt + 16'd1;
      if (sample_tick) phase <= phase + 8'd1;
    end
  end

  // ---------------------------------------------------------------- output code
  logic [15:0] s_mag;                 // |sin| * 32767 for the current phase
  logic [16:0] delta;                 // 256 * mult * |sin|
  logic signed [18:0] code_next;      // bias +/- delta, before saturation

  assign s_mag = sine_rom[phase[6:0]];
  assign delta = 17'((32'(s_mag) * 32'(mult) + 32'd64) >> 7);

  always_comb begin
    if (!phase[7]) code_next = 19'(bias) + 19'(delta);
    else           code_next = 19'(bias) - 19'(delta);
  end

  logic sample_d;

  // dac_code follows `phase` one cycle later; `sample` marks its first cycle
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dac_code <= '0;
      sample_d <= 1'b0;
      sample   <= 1'b0;
    end else begin
      sample_d <= sample_tick;
      sample   <= sample_d;
      if (!enable)                     dac_code <= bias;
      else if (code_next < 0)          dac_code <= 16'd0;
      else if (code_next > 19'sd65535) dac_code <= 16'hFFFF;
      else                             dac_code <= 16'(code_next);
    end
  end

endmodule
