// tb_parallel_allpass_filter: runs the default fifth-order EMQF filter
// (example 1c, 8-bit constants) and the ninth-order halfband filter with
// 12-bit constants (example 3c) on random samples with random gaps and
// compares them with a real-valued model: each allpass section in direct
// form, y = beta x + g x1 + x2 - g y1 - beta y2 with g = -alpha (1 + beta),
// the first-order section y = -a x + x1 + a y1, and the output half the sum
// of the two branches. The fixed-point output must stay within TOL LSB of the
// model; out_valid must follow in_valid by one clock.
module tb_parallel_allpass_filter;
  import iir_pkg::*;

  localparam int  NS [2] = '{2, 4};
  localparam int  FF [2] = '{8, 12};
  localparam int  A1 [2] = '{70, 0};
  localparam int  AL [2][4] = '{'{130, 130, 0, 0}, '{0, 0, 0, 0}};
  localparam int  BE [2][4] = '{'{88, 201, 0, 0}, '{447, 1481, 2595, 3594}};
  localparam int  HALPHA [4] = '{0, 0, 0, 0};
  localparam int  HBETA  [4] = '{447, 1481, 2595, 3594};
  localparam real TOL = 8.0;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0] x = '0;
  logic signed [IW-1:0] y [2];
  logic v [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  parallel_allpass_filter u_c (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
                               .out_valid(v[0]), .y(y[0]));
  parallel_allpass_filter #(.N_SEC(4), .F(12), .ALPHA1(0), .ALPHA(HALPHA),
                            .BETA(HBETA)) u_h (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(v[1]), .y(y[1]));

  // real-valued model state; section index 4 is the first-order section
  real sx1 [2][5], sx2 [2][5], sy1 [2][5], sy2 [2][5];

  function automatic real sec(int f, int i, real xin);
    real al, be, g, yv, sc;
    sc = real'(1 << FF[f]);
    if (i == 4) begin
      al = real'(A1[f]) / sc;
      yv = -al * xin + sx1[f][i] + al * sy1[f][i];
    end else begin
      al = real'(AL[f][i]) / sc;
      be = real'(BE[f][i]) / sc;
      g  = -al * (1.0 + be);
      yv = be * xin + g * sx1[f][i] + sx2[f][i] - g * sy1[f][i] - be * sy2[f][i];
    end
    sx2[f][i] = sx1[f][i]; sx1[f][i] = xin;
    sy2[f][i] = sy1[f][i]; sy1[f][i] = yv;
    return yv;
  endfunction

  function automatic real model(int f, real xin);
    real b0, b1;
    b0 = sec(f, 4, xin);
    b1 = xin;
    for (int i = 0; i < NS[f]; i++) begin
      if (i % 2 == 0) b1 = sec(f, i, b1);
      else            b0 = sec(f, i, b0);
    end
    return (b0 + b1) / 2.0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    real e [2], maxerr;
    foreach (sx1[f, i]) begin sx1[f][i] = 0.0; sx2[f][i] = 0.0; sy1[f][i] = 0.0; sy2[f][i] = 0.0; end
    e[0] = 0.0; e[1] = 0.0; maxerr = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      in_valid = (n < 200) ? 1'b1 : ($urandom_range(0, 3) != 0);
      x = (n < 200) ? ((n == 0) ? 16'sd20000 : 16'sd0) : IN_W'($urandom);
      if (in_valid) for (int f = 0; f < 2; f++) e[f] = model(f, real'(x));
      @(negedge clk);
      for (int f = 0; f < 2; f++) begin
        check(v[f] == in_valid, $sformatf("filter %0d n=%0d out_valid %0b", f, n, v[f]));
        if ((real'(y[f]) - e[f]) > maxerr) maxerr = real'(y[f]) - e[f];
        if ((e[f] - real'(y[f])) > maxerr) maxerr = e[f] - real'(y[f]);
        check((real'(y[f]) - e[f]) <= TOL && (e[f] - real'(y[f])) <= TOL,
              $sformatf("filter %0d n=%0d got %0d model %f", f, n, y[f], e[f]));
      end
    end
    $display("largest deviation from the real-valued model: %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
