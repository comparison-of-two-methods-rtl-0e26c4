// tdf1_section: first- or second-order IIR section in transposed direct
// form I, with all of its coefficients realised by one multiplier block.
//
// Transfer function (coefficients are integers scaled by 2**F):
//   H(z) = (B0 + B1 z^-1 + B2 z^-2) / (2**F + A1 z^-1 + A2 z^-2)
// Transposing direct form I puts the recursive part first. Its output node w
// feeds all five products {B0, B1, B2, -A1, -A2} * w, so the five constants
// share one input and form one multiplier block:
//   w   = x + sa1            sa1' = (-A1*w) + sa2      sa2' = (-A2*w)
//   y   = (B0*w) + sb1       sb1' = (B1*w)  + sb2      sb2' = (B2*w)
// Every product is floor(c*w / 2**F). ORDER = 1 drops the z^-2 terms
// (two delays instead of four); their constants must then be 0. The block's
// adder graph (NF adders, tables G and O from offsets G_OFF and O_OFF) is
// passed in; mult_block checks at elaboration that it yields exactly the five
// constants above. Cost: NF adders in the block plus four (first order: two)
// structural adders.
//
// Timing: x -> y is combinational; the four state registers advance on a
// clock edge with en high (one input sample). Synchronous active-low reset
// clears the state. The structure and the shared multiplier block follow the
// design; the reset and the enable are this design's choices.
module tdf1_section
  import iir_pkg::*;
#(
  parameter int ORDER = 2,
  parameter int F     = 8,
  parameter int B0    = 67,
  parameter int B1    = -48,
  parameter int B2    = 67,
  parameter int A1    = -261,
  parameter int A2    = 92,
  // adder graph of the multiplier block (see mult_block)
  parameter int NF     = 5,
  parameter int NG     = 30,
  parameter int G [NG] = '{0, 0, 1, 0, 1, 1,   0, 0, -1, 1, 3, 1,   0, 6, 1, 1, 0, 1,
                           0, 0, 1, 0, 2, 1,   0, 8, 1, 4, 0, 1},
  parameter int G_OFF  = 0,
  parameter int NO     = 15,
  parameter int O [NO] = '{3, 0, 1,  1, 4, -1,  3, 0, 1,  5, 0, 1,  2, 2, -1},
  parameter int O_OFF  = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [IW-1:0] x,
  output logic signed [IW-1:0] y
);

  localparam int CB2 = (ORDER == 2) ? B2 : 0;
  localparam int CA2 = (ORDER == 2) ? A2 : 0;
  localparam int C [5] = '{B0, B1, CB2, -A1, -CA2};

  logic signed [IW-1:0] w;
  logic signed [IW-1:0] p [5];
  logic signed [IW-1:0] sa1, sa2, sb1, sb2;

  assign w = x + sa1;
  assign y = p[0] + sb1;

  mult_block #(
    .N(5), .F(F), .C(C),
    .NF(NF), .NG(NG), .G(G), .G_OFF(G_OFF), .NO(NO), .O(O), .O_OFF(O_OFF)
  ) u_mb (.x(w), .y(p));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sa1 <= '0;
      sa2 <= '0;
      sb1 <= '0;
      sb2 <= '0;
    end else if (en) begin
      if (ORDER == 2) begin
        sa1 <= p[3] + sa2;
        sa2 <= p[4];
        sb1 <= p[1] + sb2;
        sb2 <= p[2];
      end else begin
        sa1 <= p[3];
        sa2 <= '0;
        sb1 <= p[1];
        sb2 <= '0;
      end
    end
  end

endmodule
