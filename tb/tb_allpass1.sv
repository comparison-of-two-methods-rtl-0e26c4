// tb_allpass1: first-order allpass section against a real-valued model
// y = a (y1 - x) + x1, a = ALPHA/256, on random samples with random gaps;
// the fixed-point output must stay within TOL LSB of the model. A second
// test feeds an impulse and checks the allpass property: the output energy
// equals the input energy (within 0.5 %). A section with ALPHA = 0 must be
// an exact one-sample delay.
module tb_allpass1;
  import iir_pkg::*;

  localparam int  ALPHA = 70;
  localparam real TOL   = 4.0;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [IW-1:0] x = '0, y, yd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  allpass1 #(.F(8), .ALPHA(ALPHA)) u_dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y));
  allpass1 #(.F(8), .ALPHA(0))     u_del (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(yd));

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
    real a, mx1, my1, m, energy;
    longint xprev;
    a = real'(ALPHA) / 256.0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // random samples
    mx1 = 0.0; my1 = 0.0; xprev = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      x  = IW'($signed($urandom) >>> 17);
      #1;
      m = a * (my1 - real'(x)) + mx1;
      check((real'(y) - m) <= TOL && (m - real'(y)) <= TOL, $sformatf("n=%0d got %0d model %f", n, y, m));
      check(longint'(yd) == xprev, $sformatf("delay n=%0d got %0d exp %0d", n, yd, xprev));
      if (en) begin
        mx1 = real'(x); my1 = m; xprev = longint'(x);
      end
    end
    // impulse: energy conservation
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    energy = 0.0;
    for (int n = 0; n < 200; n++) begin
      x = (n == 0) ? IW'(1 << 20) : '0;
      #1;
      energy += real'(y) * real'(y);
      @(negedge clk);
    end
    energy = energy / (real'(1 << 20) * real'(1 << 20));
    check(energy > 0.995 && energy < 1.005, $sformatf("impulse energy %f", energy));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
