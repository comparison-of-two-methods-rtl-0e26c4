// cascade_filter: IIR filter realised as a cascade of first- and
// second-order sections in transposed direct form I, each section's five
// (or three) coefficients implemented by one multiplier block of shifts and
// adders.
//
// Section i has numerator B[3i], B[3i+1], B[3i+2] and denominator 2**F,
// A[2i], A[2i+1] (integers, value / 2**F); ORD[i] is 1 or 2. NF, G and O
// describe the adder graph of each section's multiplier block (see
// mult_block); elaboration fails if a graph does not produce its section's
// coefficients. The overall gain is spread
// over the sections so that each has unity gain at DC. The input sample is
// sign-extended to the internal width IW; the output is the internal word of
// the last section, also IW bits wide, in the same scale as the input.
//
// Interface and timing: one sample per clock at most. On a clock edge with
// in_valid high the sections take x and the result appears on y with
// out_valid high one clock later (latency 1, registered output, throughput
// one sample per cycle). Synchronous active-low reset.
// The defaults are the fourth-order classical elliptic lowpass (passband
// edge 0.135, stopband edge 0.2, 0.2 dB ripple, 30 dB attenuation) with
// 8-bit coefficients. The coefficient values were obtained by designing the
// filter to that specification and rounding; the section ordering, the
// gain distribution and the word widths are this design's choices.
module cascade_filter
  import iir_pkg::*;
#(
  parameter int N_SEC          = 2,
  parameter int F              = 8,
  parameter int ORD [N_SEC]    = '{2, 2},
  parameter int B [N_SEC*3]    = '{67, -48, 67,  64, 48, 64},
  parameter int A [N_SEC*2]    = '{-261, 92,  -286, 206},
  // multiplier-block adder graphs, one after the other: section i has NF[i]
  // adders (six entries each in G) and five outputs (three entries each in O)
  parameter int NF [N_SEC]     = '{5, 4},
  parameter int NG             = 54,
  parameter int G [NG]         = '{0, 0, 1, 0, 1, 1,   0, 0, -1, 1, 3, 1,   0, 6, 1, 1, 0, 1,
                                   0, 0, 1, 0, 2, 1,   0, 8, 1, 4, 0, 1,
                                   0, 0, 1, 0, 1, 1,   0, 0, -1, 1, 5, 1,   0, 3, 1, 2, 0, 1,
                                   1, 4, 1, 2, 0, 1},
  parameter int O [N_SEC*15]   = '{3, 0, 1,  1, 4, -1,  3, 0, 1,  5, 0, 1,  2, 2, -1,
                                   0, 6, 1,  1, 4, 1,  0, 6, 1,  4, 1, 1,  3, 1, -1}
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x,
  output logic                   out_valid,
  output logic signed [IW-1:0]   y
);

  // start of section i's adders in G
  function automatic int g_off(int i);
    int o;
    o = 0;
    for (int j = 0; j < i; j++) o += 6 * NF[j];
    return o;
  endfunction

  logic signed [IW-1:0] node [N_SEC+1];

  assign node[0] = IW'(x);

  for (genvar i = 0; i < N_SEC; i++) begin : g_sec
    tdf1_section #(
      .ORDER(ORD[i]), .F(F),
      .B0(B[3*i]), .B1(B[3*i+1]), .B2(B[3*i+2]),
      .A1(A[2*i]), .A2(A[2*i+1]),
      .NF(NF[i]), .NG(NG), .G(G), .G_OFF(g_off(i)), .NO(N_SEC*15), .O(O), .O_OFF(15*i)
    ) u_sec (
      .clk(clk), .rst_n(rst_n), .en(in_valid),
      .x(node[i]), .y(node[i+1])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= node[N_SEC];
    end
  end

endmodule
