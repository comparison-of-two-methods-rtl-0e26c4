// csd_const_mult: multiplication of a signed word by a fixed coefficient
// C / 2**F without a multiplier.
//
// The constant C is recoded into canonic signed digits at elaboration time;
// each non-zero digit d_k adds or subtracts the input shifted left by k. The
// exact sum x*C is then shifted right arithmetically by F, so the output is
// floor(x * C / 2**F). A zero coefficient produces no adder at all and a
// power of two is a plain shift. Purely combinational.
//
// Ports: x (IW-bit signed) in, y (OW-bit signed) out.
// Realising constants with shifts and adders only is the technique the
// design is built on; CSD recoding of each constant is this design's choice
// for the individual shift-and-add networks.
module csd_const_mult
  import iir_pkg::*;
#(
  parameter int C  = 77,
  parameter int F  = 8,
  parameter int IW_X = 28,
  parameter int OW = 28
) (
  input  logic signed [IW_X-1:0] x,
  output logic signed [OW-1:0]   y
);

  localparam int AW = IW_X + CSD_MAX + 1;

  logic signed [AW-1:0] xe;
  logic signed [AW-1:0] acc;

  assign xe = AW'(x);

  always_comb begin
    acc = '0;
    for (int k = 0; k < CSD_MAX; k++) begin
      if (csd_digit(C, k) == 1)       acc = acc + (xe <<< k);
      else if (csd_digit(C, k) == -1) acc = acc - (xe <<< k);
    end
    y = OW'(acc >>> F);
  end

endmodule
