// tb_allpass2: second-order EMQF allpass section against a real-valued
// model of its transfer function in direct form,
//   y = beta x + g x1 + x2 - g y1 - beta y2,  g = -alpha (1 + beta),
// on random samples with random gaps; the fixed-point output must stay
// within TOL LSB of the model. An impulse test checks the allpass property
// (output energy equals input energy within 0.5 %). A halfband section
// (alpha = 0) is checked the same way.
module tb_allpass2;
  import iir_pkg::*;

  localparam int  NT = 2;
  localparam int  AL [NT] = '{130, 0};
  localparam int  BE [NT] = '{201, 200};
  localparam real TOL = 12.0;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [IW-1:0] x = '0;
  logic signed [IW-1:0] y [NT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NT; i++) begin : g_dut
    allpass2 #(.F(8), .ALPHA(AL[i]), .BETA(BE[i])) u_dut (
      .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y[i]));
  end

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
    real al, be, g, m [NT], x1, x2, y1 [NT], y2 [NT], energy [NT], maxerr;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    x1 = 0.0; x2 = 0.0; maxerr = 0.0;
    for (int i = 0; i < NT; i++) begin y1[i] = 0.0; y2[i] = 0.0; end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      x  = IW'($signed($urandom) >>> 17);
      #1;
      for (int i = 0; i < NT; i++) begin
        al = real'(AL[i]) / 256.0;
        be = real'(BE[i]) / 256.0;
        g  = -al * (1.0 + be);
        m[i] = be * real'(x) + g * x1 + x2 - g * y1[i] - be * y2[i];
        if ((real'(y[i]) - m[i]) > maxerr) maxerr = real'(y[i]) - m[i];
        if ((m[i] - real'(y[i])) > maxerr) maxerr = m[i] - real'(y[i]);
        check((real'(y[i]) - m[i]) <= TOL && (m[i] - real'(y[i])) <= TOL,
              $sformatf("sec %0d n=%0d got %0d model %f", i, n, y[i], m[i]));
      end
      if (en) begin
        x2 = x1; x1 = real'(x);
        for (int i = 0; i < NT; i++) begin y2[i] = y1[i]; y1[i] = m[i]; end
      end
    end
    $display("largest deviation from the real-valued model: %f LSB", maxerr);
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    for (int i = 0; i < NT; i++) energy[i] = 0.0;
    for (int n = 0; n < 400; n++) begin
      x = (n == 0) ? IW'(1 << 20) : '0;
      #1;
      for (int i = 0; i < NT; i++) energy[i] += real'(y[i]) * real'(y[i]);
      @(negedge clk);
    end
    for (int i = 0; i < NT; i++) begin
      energy[i] = energy[i] / (real'(1 << 20) * real'(1 << 20));
      check(energy[i] > 0.995 && energy[i] < 1.005, $sformatf("sec %0d impulse energy %f", i, energy[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
