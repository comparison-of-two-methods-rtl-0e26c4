// parallel_allpass_filter: odd-order EMQF lowpass realised as the parallel
// connection of two allpass branches, H(z) = (A0(z) + A1(z)) / 2.
//
// Branch A0 holds the first-order section (coefficient ALPHA1) followed by
// the second-order sections 1, 3, 5, ...; branch A1 holds sections 0, 2, 4,
// ... . Sections are numbered by increasing pole angle, so the poles
// alternate between the branches. Each second-order section uses the common
// EMQF constant ALPHA[i] and its own BETA[i] (see allpass2). An order-n
// filter thus needs n constants: (n+1)/2 alphas, all set by the 3 dB
// frequency, and (n-1)/2 betas. For a halfband filter every alpha is 0, the
// first-order section reduces to one delay and only the (n-1)/2 betas cost
// adders. Coefficients are integers, value / 2**F.
//
// Interface and timing: on a clock edge with in_valid high both branches
// take x; y = floor((A0 + A1) / 2) appears one clock later with out_valid
// (latency 1, one sample per cycle). Synchronous active-low reset.
// The defaults are the fifth-order EMQF lowpass with passband edge 0.135,
// stopband edge 0.2 and 8-bit coefficients. The structure follows the
// design; the coefficient values come from designing the EMQF filter to that
// specification and rounding to F fractional bits, and the widths are this
// design's choices.
module parallel_allpass_filter
  import iir_pkg::*;
#(
  parameter int N_SEC            = 2,
  parameter int F                = 8,
  parameter int ALPHA1           = 70,
  parameter int ALPHA [N_SEC]    = '{130, 130},
  parameter int BETA [N_SEC]     = '{88, 201}
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x,
  output logic                   out_valid,
  output logic signed [IW-1:0]   y
);

  localparam int N1 = (N_SEC + 1) / 2;  // sections 0, 2, 4, ... in branch A1
  localparam int N0 = N_SEC / 2;        // sections 1, 3, ... in branch A0

  logic signed [IW-1:0] xi;
  logic signed [IW-1:0] n0 [N0+2];
  logic signed [IW-1:0] n1 [N1+1];
  logic signed [IW:0]   sum;

  assign xi    = IW'(x);
  assign n0[0] = xi;
  assign n1[0] = xi;

  allpass1 #(.F(F), .ALPHA(ALPHA1)) u_ap1 (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .x(n0[0]), .y(n0[1])
  );

  for (genvar i = 0; i < N0; i++) begin : g_br0
    allpass2 #(.F(F), .ALPHA(ALPHA[2*i+1]), .BETA(BETA[2*i+1])) u_ap (
      .clk(clk), .rst_n(rst_n), .en(in_valid), .x(n0[i+1]), .y(n0[i+2])
    );
  end

  for (genvar i = 0; i < N1; i++) begin : g_br1
    allpass2 #(.F(F), .ALPHA(ALPHA[2*i]), .BETA(BETA[2*i])) u_ap (
      .clk(clk), .rst_n(rst_n), .en(in_valid), .x(n1[i]), .y(n1[i+1])
    );
  end

  assign sum = (IW+1)'(n0[N0+1]) + (IW+1)'(n1[N1]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= IW'(sum >>> 1);
    end
  end

endmodule
