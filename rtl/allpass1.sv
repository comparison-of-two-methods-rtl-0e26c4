// allpass1: first-order allpass section with one coefficient.
//
//   A(z) = (-a + z^-1) / (1 - a z^-1),   a = ALPHA / 2**F
// computed as y = floor(ALPHA * (y1 - x) / 2**F) + x1, where x1 and y1 are
// the previous input and output: one constant multiplier (shifts and adds),
// two adders and two delays. With ALPHA = 0 the section is a pure delay,
// which is what the halfband filters use.
//
// Timing: x -> y combinational, state advances on clk when en is high;
// synchronous active-low reset. The transfer function follows the design;
// this particular one-multiplier structure is this design's choice.
module allpass1
  import iir_pkg::*;
#(
  parameter int F     = 8,
  parameter int ALPHA = 70
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [IW-1:0] x,
  output logic signed [IW-1:0] y
);

  logic signed [IW-1:0] x1, y1, d, p;

  assign d = y1 - x;
  csd_const_mult #(.C(ALPHA), .F(F), .IW_X(IW), .OW(IW)) u_a (.x(d), .y(p));
  assign y = p + x1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1 <= '0;
      y1 <= '0;
    end else if (en) begin
      x1 <= x;
      y1 <= y;
    end
  end

endmodule
