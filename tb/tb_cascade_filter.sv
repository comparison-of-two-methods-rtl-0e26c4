// tb_cascade_filter: runs two cascades - the default fourth-order classical
// elliptic (two second-order sections) and a fifth-order one with a
// first-order section in front - and compares them, sample by sample, with
// a bit-exact direct-form model of each section:
//   w[n] = x[n] + fl(-a1 w[n-1]) + fl(-a2 w[n-2])
//   y[n] = fl(b0 w[n]) + fl(b1 w[n-1]) + fl(b2 w[n-2]),  fl(v) = floor(v/256)
// Samples arrive with random gaps. It also checks the one-cycle latency:
// out_valid follows in_valid by exactly one clock and y only changes then.
module tb_cascade_filter;
  import iir_pkg::*;
  import example_coef_pkg::*;

  localparam int NA = 2;
  localparam int OA [NA]   = '{2, 2};
  localparam int BA [NA*3] = '{67, -48, 67,  64, 48, 64};
  localparam int AA [NA*2] = '{-261, 92,  -286, 206};
  localparam int NB = 3;
  localparam int OB [NB]   = '{1, 2, 2};
  localparam int BB [NB*3] = '{93, 93, 0,  117, -64, 117,  99, 27, 99};
  localparam int AB [NB*2] = '{-70, 0,  -174, 88,  -231, 201};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0] x = '0;
  logic signed [IW-1:0] ya, yb;
  logic va, vb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cascade_filter u_a (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(va), .y(ya));
  cascade_filter #(.N_SEC(NB), .F(8), .ORD(OB), .B(BB), .A(AB),
                   .NF(EX1B_NF), .NG(EX1B_NG), .G(EX1B_G), .O(EX1B_O)) u_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(vb), .y(yb));

  // bit-exact model state: w history per section, two filters, up to 3 sections
  longint wh [2][3][2];

  function automatic longint fl(longint c, longint v);
    return (c * v) >>> 8;
  endfunction

  // one step of a modelled cascade; commit = update the state
  function automatic longint model(int f, int ns, longint xin, bit commit);
    longint s, w, yv;
    s = xin;
    for (int i = 0; i < ns; i++) begin
      int b0, b1, b2, a1, a2, o;
      if (f == 0) begin
        o = OA[i]; b0 = BA[3*i]; b1 = BA[3*i+1]; b2 = BA[3*i+2]; a1 = AA[2*i]; a2 = AA[2*i+1];
      end else begin
        o = OB[i]; b0 = BB[3*i]; b1 = BB[3*i+1]; b2 = BB[3*i+2]; a1 = AB[2*i]; a2 = AB[2*i+1];
      end
      if (o == 1) begin b2 = 0; a2 = 0; end
      w  = s + fl(-a1, wh[f][i][0]) + fl(-a2, wh[f][i][1]);
      yv = fl(b0, w) + fl(b1, wh[f][i][0]) + fl(b2, wh[f][i][1]);
      if (commit) begin
        wh[f][i][1] = wh[f][i][0];
        wh[f][i][0] = w;
      end
      s = yv;
    end
    return s;
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
    longint ea, eb;
    foreach (wh[f, i, k]) wh[f][i][k] = 0;
    ea = 0; eb = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      in_valid = (n < 200) ? 1'b1 : ($urandom_range(0, 3) != 0);
      x = (n < 200) ? ((n == 0) ? 16'sd20000 : 16'sd0) : IN_W'($urandom);
      if (in_valid) begin
        ea = model(0, NA, longint'(x), 1'b1);
        eb = model(1, NB, longint'(x), 1'b1);
      end
      @(negedge clk);
      check(va == in_valid && vb == in_valid, $sformatf("n=%0d out_valid %0b/%0b exp %0b", n, va, vb, in_valid));
      check(longint'(ya) == ea, $sformatf("filter a n=%0d got %0d exp %0d", n, ya, ea));
      check(longint'(yb) == eb, $sformatf("filter b n=%0d got %0d exp %0d", n, yb, eb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
