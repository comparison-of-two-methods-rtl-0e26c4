// tb_tdf1_section: compares a second-order and a first-order TDF-I section
// sample by sample with a direct-form model that keeps the history of the
// recursive node w:
//   w[n] = x[n] + fl(-A1 w[n-1]) + fl(-A2 w[n-2])
//   y[n] = fl(B0 w[n]) + fl(B1 w[n-1]) + fl(B2 w[n-2]),  fl(v) = floor(v/256)
// which is bit-identical to the transposed form. Random samples arrive with
// random gaps (en low), which must leave the state untouched.
module tb_tdf1_section;
  import iir_pkg::*;
  import example_coef_pkg::*;

  localparam int B0 = 67, B1 = -48, B2 = 67, A1 = -261, A2 = 92;
  localparam int C0 = 93, C1 = 93, D1 = -70;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [IW-1:0] x = '0, y2, y1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tdf1_section #(.ORDER(2), .F(8), .B0(B0), .B1(B1), .B2(B2), .A1(A1), .A2(A2)) u_dut2 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y2));
  tdf1_section #(.ORDER(1), .F(8), .B0(C0), .B1(C1), .B2(0), .A1(D1), .A2(0),
                 .NF(EX1B_NF[0]), .NG(EX1B_NG), .G(EX1B_G), .G_OFF(0),
                 .NO(EX1B_N * 15), .O(EX1B_O), .O_OFF(0)) u_dut1 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y1));

  function automatic longint fl(longint c, longint v);
    return (c * v) >>> 8;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint w0, wa, wb, v0, va, e2, e1;
    wa = 0; wb = 0; va = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      x  = (n < 50) ? ((n == 0) ? IW'(10000) : '0) : IW'($signed($urandom) >>> 17);
      #1;
      w0 = longint'(x) + fl(-A1, wa) + fl(-A2, wb);
      e2 = fl(B0, w0) + fl(B1, wa) + fl(B2, wb);
      v0 = longint'(x) + fl(-D1, va);
      e1 = fl(C0, v0) + fl(C1, va);
      checks += 2;
      if (longint'(y2) != e2) begin
        failures++;
        if (failures < 10) $display("order2 n=%0d got %0d exp %0d", n, y2, e2);
      end
      if (longint'(y1) != e1) begin
        failures++;
        if (failures < 10) $display("order1 n=%0d got %0d exp %0d", n, y1, e1);
      end
      if (en) begin
        wb = wa; wa = w0; va = v0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
