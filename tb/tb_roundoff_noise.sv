// tb_roundoff_noise: measures the product round-off noise at the output of
// each of the eight example filters, the fourth figure of merit on which the
// two realisation methods are compared.
//
// White random samples (uniform, amplitude 16384) drive all filters. Each
// output is subtracted from a double-precision model of the same quantised
// transfer function (cascade: direct-form sections; parallel: allpass
// sections); the variance of the difference, with its mean removed, divided
// by q^2/12 (q = one output LSB) is the normalised round-off noise variance.
// The test checks that every filter tracks its model (noise variance below
// NOISE_MAX) and that for each example the two-allpass realisation is
// quieter than the cascade one (1c < 1b, 2b < 2a, 3b < 3a).
module tb_roundoff_noise;
  import iir_pkg::*;
  import example_coef_pkg::*;

  localparam int  N_SAMP    = 20000;
  localparam int  N_SKIP    = 200;
  localparam real NOISE_MAX = 100.0;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0] x = '0;
  logic [N_FILT-1:0] out_valid;
  logic signed [IW-1:0] y [N_FILT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  multiplierless_iir_top u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid), .y(y));

  // cascade models: filter index 0,1,3,5; up to 5 sections, w history
  real cw [N_FILT][5][2];
  // parallel models: filter index 2,4,6,7; sections 0..3, 4 = first order
  real px1 [N_FILT][5], px2 [N_FILT][5], py1 [N_FILT][5], py2 [N_FILT][5];

  function automatic real casc(int f, real xin);
    int  ns, o;
    real b0, b1, b2, a1, a2, s, w, yv;
    ns = (f == 0) ? EX1A_N : (f == 1) ? EX1B_N : (f == 3) ? EX2A_N : EX3A_N;
    s = xin;
    for (int i = 0; i < ns; i++) begin
      case (f)
        0: begin o = EX1A_ORD[i]; b0 = EX1A_B[3*i]; b1 = EX1A_B[3*i+1]; b2 = EX1A_B[3*i+2];
                 a1 = EX1A_A[2*i]; a2 = EX1A_A[2*i+1]; end
        1: begin o = EX1B_ORD[i]; b0 = EX1B_B[3*i]; b1 = EX1B_B[3*i+1]; b2 = EX1B_B[3*i+2];
                 a1 = EX1B_A[2*i]; a2 = EX1B_A[2*i+1]; end
        3: begin o = EX2A_ORD[i]; b0 = EX2A_B[3*i]; b1 = EX2A_B[3*i+1]; b2 = EX2A_B[3*i+2];
                 a1 = EX2A_A[2*i]; a2 = EX2A_A[2*i+1]; end
        default: begin o = EX3A_ORD[i]; b0 = EX3A_B[3*i]; b1 = EX3A_B[3*i+1]; b2 = EX3A_B[3*i+2];
                 a1 = EX3A_A[2*i]; a2 = EX3A_A[2*i+1]; end
      endcase
      if (o == 1) begin b2 = 0.0; a2 = 0.0; end
      w  = s - (a1 * cw[f][i][0] + a2 * cw[f][i][1]) / 256.0;
      yv = (b0 * w + b1 * cw[f][i][0] + b2 * cw[f][i][1]) / 256.0;
      cw[f][i][1] = cw[f][i][0];
      cw[f][i][0] = w;
      s = yv;
    end
    return s;
  endfunction

  function automatic real sec(int f, int i, real al, real be, real xin);
    real g, yv;
    if (i == 4) yv = -al * xin + px1[f][i] + al * py1[f][i];
    else begin
      g  = -al * (1.0 + be);
      yv = be * xin + g * px1[f][i] + px2[f][i] - g * py1[f][i] - be * py2[f][i];
    end
    px2[f][i] = px1[f][i]; px1[f][i] = xin;
    py2[f][i] = py1[f][i]; py1[f][i] = yv;
    return yv;
  endfunction

  function automatic real par(int f, real xin);
    int  ns;
    real sc, a1, b0, b1, al, be;
    ns = (f == 2) ? EX1C_N : (f == 4) ? EX2B_N : EX3_N;
    sc = (f == 7) ? 4096.0 : 256.0;
    a1 = (f == 2) ? real'(EX1C_ALPHA1) / sc : 0.0;
    b0 = sec(f, 4, a1, 0.0, xin);
    b1 = xin;
    for (int i = 0; i < ns; i++) begin
      case (f)
        2:       begin al = EX1C_ALPHA[i]; be = EX1C_BETA[i]; end
        4:       begin al = EX2B_ALPHA[i]; be = EX2B_BETA[i]; end
        6:       begin al = EX3_ALPHA[i];  be = EX3B_BETA[i]; end
        default: begin al = EX3_ALPHA[i];  be = EX3C_BETA[i]; end
      endcase
      al = al / sc;
      be = be / sc;
      if (i % 2 == 0) b1 = sec(f, i, al, be, b1);
      else            b0 = sec(f, i, al, be, b0);
    end
    return (b0 + b1) / 2.0;
  endfunction

  initial begin
    repeat (N_SAMP + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    real e [N_FILT], s1 [N_FILT], s2 [N_FILT], nv [N_FILT], d;
    string names [N_FILT] = '{"1a", "1b", "1c", "2a", "2b", "3a", "3b", "3c"};
    foreach (cw[f, i, k]) cw[f][i][k] = 0.0;
    foreach (px1[f, i]) begin px1[f][i] = 0.0; px2[f][i] = 0.0; py1[f][i] = 0.0; py2[f][i] = 0.0; end
    for (int f = 0; f < N_FILT; f++) begin s1[f] = 0.0; s2[f] = 0.0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    in_valid = 1'b1;
    for (int n = 0; n < N_SAMP; n++) begin
      x = IN_W'($signed($urandom) >>> 17);
      for (int f = 0; f < N_FILT; f++)
        e[f] = (f == 0 || f == 1 || f == 3 || f == 5) ? casc(f, real'(x)) : par(f, real'(x));
      @(negedge clk);
      if (n >= N_SKIP)
        for (int f = 0; f < N_FILT; f++) begin
          d = real'(y[f]) - e[f];
          s1[f] += d;
          s2[f] += d * d;
        end
    end
    for (int f = 0; f < N_FILT; f++) begin
      s1[f] = s1[f] / real'(N_SAMP - N_SKIP);
      nv[f] = (s2[f] / real'(N_SAMP - N_SKIP) - s1[f] * s1[f]) * 12.0;
      $display("example %s: normalised round-off noise variance %8.2f, mean error %6.2f LSB",
               names[f], nv[f], s1[f]);
      check(nv[f] < NOISE_MAX, $sformatf("example %s noise variance %f", names[f], nv[f]));
    end
    check(nv[2] < nv[1], "1c quieter than 1b");
    check(nv[4] < nv[3], "2b quieter than 2a");
    check(nv[6] < nv[5], "3b quieter than 3a");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
