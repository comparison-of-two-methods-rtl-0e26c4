// tb_multiplierless_iir_top: end-to-end test of the eight example filters at
// their default configuration.
//
// A sine of amplitude 16000 is applied at each of six frequencies (0.05,
// 0.1, 0.21, 0.29, 0.35 and 0.45 of the sample rate). After 800 samples of
// settling, the amplitude of every filter output at the tone frequency is
// measured by correlating 1000 samples with a sine and a cosine, and the
// gain in dB is compared with the gain of the same quantised transfer
// function evaluated analytically (table EXP below, computed from the
// integer coefficients in example_coef_pkg). Every seventh cycle carries no
// sample, and out_valid must follow in_valid by exactly one clock.
// Beyond matching the expected responses, the test counts what the filters
// are meant to show: tones in a passband pass within 0.3 dB, tones in a
// stopband are attenuated by at least the specified amount, and the
// ninth-order halfband filter with 8-bit allpass constants falls short of
// the 46 dB specification near the stopband edge while the 12-bit one meets it.
module tb_multiplierless_iir_top;
  import iir_pkg::*;
  import example_coef_pkg::*;

  localparam int NT = 6;
  localparam real FT [NT] = '{0.05, 0.1, 0.21, 0.29, 0.35, 0.45};
  // expected gain (dB) per filter (1a 1b 1c 2a 2b 3a 3b 3c) and tone
  localparam real EXP [N_FILT][NT] = '{
    '{ 0.107,  0.031, -31.080, -41.390, -37.884, -30.455},
    '{-0.040, -0.032, -39.180, -39.748, -32.019, -38.132},
    '{-0.003, -0.001, -37.910, -39.382, -31.891, -38.042},
    '{ 0.041,  0.036,   0.013, -35.728, -43.437, -31.694},
    '{-0.003, -0.005,  -0.001, -35.941, -44.709, -31.870},
    '{-0.034, -0.032,  -0.011, -58.954, -58.875, -57.053},
    '{ 0.000,  0.000,   0.000, -43.411, -47.207, -65.711},
    '{ 0.000,  0.000,   0.000, -60.141, -60.067, -56.897}};
  // passband edge, stopband edge and required attenuation of each filter
  localparam real FP [N_FILT] = '{0.135, 0.135, 0.135, 0.22, 0.22, 0.22, 0.22, 0.22};
  localparam real FA [N_FILT] = '{0.2, 0.2, 0.2, 0.28, 0.28, 0.28, 0.28, 0.28};
  localparam real AA [N_FILT] = '{30.0, 30.0, 30.0, 28.0, 28.0, 46.0, 46.0, 46.0};
  localparam real AMP = 16000.0;
  localparam real PI  = 3.14159265358979;
  localparam int  N_SETTLE = 800;
  localparam int  N_MEAS   = 1000;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0] x = '0;
  logic [N_FILT-1:0] out_valid;
  logic signed [IW-1:0] y [N_FILT];
  int checks = 0, failures = 0;
  int n_pass = 0, n_stop = 0, n_gap = 0, n_short8 = 0, n_meet12 = 0;

  always #5 clk = ~clk;

  multiplierless_iir_top u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid), .y(y));

  initial begin
    repeat (NT * (N_SETTLE + N_MEAS) * 2 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    real cs [N_FILT], sn [N_FILT], g, ph, e;
    int  cyc, k;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    for (int t = 0; t < NT; t++) begin
      for (int i = 0; i < N_FILT; i++) begin cs[i] = 0.0; sn[i] = 0.0; end
      k = 0;
      while (k < N_SETTLE + N_MEAS) begin
        cyc++;
        in_valid = (cyc % 7 != 0);
        if (!in_valid) n_gap++;
        ph = 2.0 * PI * FT[t] * real'(k);
        if (in_valid) x = IN_W'($rtoi(AMP * $sin(ph) + ((AMP * $sin(ph) >= 0.0) ? 0.5 : -0.5)));
        @(negedge clk);
        checks++;
        if (out_valid != {N_FILT{in_valid}}) begin
          failures++;
          $display("FAIL out_valid %b after in_valid %b", out_valid, in_valid);
        end
        if (in_valid) begin
          if (k >= N_SETTLE)
            for (int i = 0; i < N_FILT; i++) begin
              sn[i] += real'(y[i]) * $sin(ph);
              cs[i] += real'(y[i]) * $cos(ph);
            end
          k++;
        end
      end
      for (int i = 0; i < N_FILT; i++) begin
        g = 2.0 / real'(N_MEAS) * $sqrt(sn[i] * sn[i] + cs[i] * cs[i]) / AMP;
        g = 20.0 * $log10(g + 1.0e-12);
        e = EXP[i][t];
        $display("filter %0d tone %.2f: gain %8.3f dB (expected %8.3f)", i, FT[t], g, e);
        check(((g - e) <= 0.1 && (e - g) <= 0.1) ||
              (e < -40.0 && (g - e) <= 1.0 && (e - g) <= 1.0),
              $sformatf("filter %0d tone %.2f gain %.3f dB expected %.3f", i, FT[t], g, e));
        if (FT[t] < FP[i]) begin
          check(g <= 0.3 && g >= -0.3, $sformatf("filter %0d passband gain %.3f", i, g));
          n_pass++;
        end
        if (FT[t] >= FA[i] && !(i == 6 && FT[t] < 0.3)) begin
          check(g <= -AA[i], $sformatf("filter %0d stopband gain %.3f dB, needs %.1f", i, g, -AA[i]));
          n_stop++;
        end
        if (i == 6 && FT[t] > FA[i] && FT[t] < 0.3 && g > -AA[i]) n_short8++;
        if (i == 7 && FT[t] > FA[i] && FT[t] < 0.3 && g <= -AA[i]) n_meet12++;
      end
    end
    $display("passband tones passed: %0d, stopband tones rejected: %0d, idle cycles: %0d", n_pass, n_stop, n_gap);
    $display("9th-order halfband 8-bit short of 46 dB: %0d, 12-bit meets it: %0d", n_short8, n_meet12);
    checks += 4;
    if (n_pass == 0)   failures++;
    if (n_stop == 0)   failures++;
    if (n_gap == 0)    failures++;
    if (n_short8 == 0 || n_meet12 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
