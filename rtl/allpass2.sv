// allpass2: second-order allpass section of an EMQF (elliptic minimal
// Q-factor) filter, built from the two constants alpha and beta.
//
//   A(z) = (beta + g z^-1 + z^-2) / (1 + g z^-1 + beta z^-2),
//   g = -alpha * (1 + beta),  alpha = ALPHA / 2**F,  beta = BETA / 2**F
// In an EMQF filter alpha is the same for every second-order section and is
// fixed by the 3 dB frequency; beta sets the pole radius. For a halfband
// filter alpha is 0 and the section becomes (beta + z^-2)/(1 + beta z^-2).
// Datapath (x1, x2, y1, y2 are delayed inputs and outputs):
//   t = x1 - y1
//   p = floor(alpha * t)
//   q = floor(beta * (x - y2 - p))
//   y = q + x2 - p
// Expanding gives exactly the transfer function above, with two constant
// multipliers (shift-and-add), five adders and four delays.
//
// Timing: x -> y combinational, state advances on clk when en is high;
// synchronous active-low reset. The alpha/beta parametrisation follows the
// design; this datapath arrangement is this design's choice.
module allpass2
  import iir_pkg::*;
#(
  parameter int F     = 8,
  parameter int ALPHA = 130,
  parameter int BETA  = 88
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [IW-1:0] x,
  output logic signed [IW-1:0] y
);

  logic signed [IW-1:0] x1, x2, y1, y2;
  logic signed [IW-1:0] t, p, u, q;

  assign t = x1 - y1;
  csd_const_mult #(.C(ALPHA), .F(F), .IW_X(IW), .OW(IW)) u_alpha (.x(t), .y(p));
  assign u = x - y2 - p;
  csd_const_mult #(.C(BETA), .F(F), .IW_X(IW), .OW(IW)) u_beta (.x(u), .y(q));
  assign y = q + x2 - p;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1 <= '0;
      x2 <= '0;
      y1 <= '0;
      y2 <= '0;
    end else if (en) begin
      x1 <= x;
      x2 <= x1;
      y1 <= y;
      y2 <= y1;
    end
  end

endmodule
