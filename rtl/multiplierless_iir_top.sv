// multiplierless_iir_top: the eight multiplierless elliptic lowpass filters
// of the comparison, side by side on one input stream.
//
// The same input sample x feeds every filter, so their outputs can be
// compared directly. Outputs, index = example:
//   0: 1a classical elliptic, order 4, cascade of TDF-I sections
//   1: 1b EMQF order 5, cascade           2: 1c EMQF order 5, parallel allpass
//   3: 2a halfband order 5, cascade       4: 2b halfband order 5, parallel allpass
//   5: 3a halfband order 9, cascade       6: 3b halfband order 9, parallel, 8 bit
//   7: 3c halfband order 9, parallel allpass, 12-bit coefficients
// All filters take one sample per clock cycle when in_valid is high and
// present their result one cycle later with out_valid[i]. Every coefficient
// is realised with shifts and adders only. Coefficients: example_coef_pkg.
module multiplierless_iir_top
  import iir_pkg::*;
  import example_coef_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x,
  output logic [N_FILT-1:0]      out_valid,
  output logic signed [IW-1:0]   y [N_FILT]
);

  cascade_filter #(.N_SEC(EX1A_N), .F(8), .ORD(EX1A_ORD), .B(EX1A_B), .A(EX1A_A),
                 .NF(EX1A_NF), .NG(EX1A_NG), .G(EX1A_G), .O(EX1A_O)) u_ex1a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid[0]), .y(y[0])
  );

  cascade_filter #(.N_SEC(EX1B_N), .F(8), .ORD(EX1B_ORD), .B(EX1B_B), .A(EX1B_A),
                 .NF(EX1B_NF), .NG(EX1B_NG), .G(EX1B_G), .O(EX1B_O)) u_ex1b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid[1]), .y(y[1])
  );

  parallel_allpass_filter #(.N_SEC(EX1C_N), .F(8), .ALPHA1(EX1C_ALPHA1),
                            .ALPHA(EX1C_ALPHA), .BETA(EX1C_BETA)) u_ex1c (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid[2]), .y(y[2])
  );

  cascade_filter #(.N_SEC(EX2A_N), .F(8), .ORD(EX2A_ORD), .B(EX2A_B), .A(EX2A_A),
                 .NF(EX2A_NF), .NG(EX2A_NG), .G(EX2A_G), .O(EX2A_O)) u_ex2a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid[3]), .y(y[3])
  );

  parallel_allpass_filter #(.N_SEC(EX2B_N), .F(8), .ALPHA1(0),
                            .ALPHA(EX2B_ALPHA), .BETA(EX2B_BETA)) u_ex2b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid[4]), .y(y[4])
  );

  cascade_filter #(.N_SEC(EX3A_N), .F(8), .ORD(EX3A_ORD), .B(EX3A_B), .A(EX3A_A),
                 .NF(EX3A_NF), .NG(EX3A_NG), .G(EX3A_G), .O(EX3A_O)) u_ex3a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid[5]), .y(y[5])
  );

  parallel_allpass_filter #(.N_SEC(EX3_N), .F(8), .ALPHA1(0),
                            .ALPHA(EX3_ALPHA), .BETA(EX3B_BETA)) u_ex3b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid[6]), .y(y[6])
  );

  parallel_allpass_filter #(.N_SEC(EX3_N), .F(12), .ALPHA1(0),
                            .ALPHA(EX3_ALPHA), .BETA(EX3C_BETA)) u_ex3c (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid[7]), .y(y[7])
  );

endmodule
