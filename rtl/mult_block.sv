// mult_block: a multiplier block - a group of N constant multipliers that
// share one input word - built as a single adder graph in which the output
// of one adder is reused by as many constants as possible.
//
// Graph description (all integers, flat arrays so that a whole filter's
// graphs can be passed down from one parameter):
//   node 0 is the input x (fundamental 1);
//   adder k = 1..NF, six entries at G[G_OFF + 6(k-1)]:
//     {ia, la, sa, ib, lb, sb}:  node[k] = sa*(node[ia] << la) + sb*(node[ib] << lb)
//   output i, three entries at O[O_OFF + 3i]:
//     {io, lo, so}:  y[i] = floor(so * (node[io] << lo) / 2**F), so = 0 gives 0
// Every node is an odd multiple of x ("fundamental"); an output only shifts
// and possibly negates one. The block therefore costs exactly NF adders.
// The graphs used here come from a greedy reduced-adder-graph search: first
// every constant reachable with one adder from the fundamentals already
// built is added, otherwise the intermediate fundamental that brings the
// most remaining constants within one adder. At elaboration the block
// recomputes each output constant from the graph and stops with an error if
// it differs from C[i], so a graph cannot silently disagree with the
// coefficients. Combinational.
//
// Ports: x in (IW-bit signed), y[N] out (IW-bit signed each).
// Sharing adders between the constants of a block follows the design; the
// graph encoding and the search heuristic are this design's choices.
module mult_block
  import iir_pkg::*;
#(
  parameter int N      = 5,
  parameter int F      = 8,
  parameter int C [N]  = '{67, -48, 67, 261, -92},
  parameter int NF     = 5,
  parameter int NG     = 30,
  parameter int G [NG] = '{0, 0, 1, 0, 1, 1,   0, 0, -1, 1, 3, 1,   0, 6, 1, 1, 0, 1,
                           0, 0, 1, 0, 2, 1,   0, 8, 1, 4, 0, 1},
  parameter int G_OFF  = 0,
  parameter int NO     = 15,
  parameter int O [NO] = '{3, 0, 1,  1, 4, -1,  3, 0, 1,  5, 0, 1,  2, 2, -1},
  parameter int O_OFF  = 0
) (
  input  logic signed [IW-1:0] x,
  output logic signed [IW-1:0] y [N]
);

  // fundamentals stay below 2**GW; GW guard bits keep every node exact
  localparam int GW = 13;
  localparam int NW = IW + GW;

  // value of fundamental k, worked out from the graph
  function automatic longint fund(int k);
    longint f [NF+1];
    f[0] = 1;
    for (int j = 1; j <= k; j++)
      f[j] = longint'(G[G_OFF+6*(j-1)+2]) * (f[G[G_OFF+6*(j-1)]] <<< G[G_OFF+6*(j-1)+1]) +
             longint'(G[G_OFF+6*(j-1)+5]) * (f[G[G_OFF+6*(j-1)+3]] <<< G[G_OFF+6*(j-1)+4]);
    return f[k];
  endfunction

  logic signed [NW-1:0] node [NF+1];

  assign node[0] = NW'(x);

  for (genvar k = 1; k <= NF; k++) begin : g_add
    localparam int IA = G[G_OFF+6*(k-1)];
    localparam int LA = G[G_OFF+6*(k-1)+1];
    localparam int SA = G[G_OFF+6*(k-1)+2];
    localparam int IB = G[G_OFF+6*(k-1)+3];
    localparam int LB = G[G_OFF+6*(k-1)+4];
    localparam int SB = G[G_OFF+6*(k-1)+5];
    logic signed [NW-1:0] ta, tb;
    assign ta = node[IA] <<< LA;
    assign tb = node[IB] <<< LB;
    if (SA > 0 && SB > 0)      begin : g_pp assign node[k] = ta + tb; end
    else if (SA > 0)           begin : g_pm assign node[k] = ta - tb; end
    else                       begin : g_mp assign node[k] = tb - ta; end
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    localparam int IO = O[O_OFF+3*i];
    localparam int LO = O[O_OFF+3*i+1];
    localparam int SO = O[O_OFF+3*i+2];
    if (longint'(SO) * (fund(IO) <<< LO) != longint'(C[i])) begin : g_bad
      $error("mult_block: graph output %0d does not equal constant %0d", i, C[i]);
    end
    if (SO > 0) begin : g_pos
      logic signed [NW-1:0] t;
      assign t    = node[IO] <<< LO;
      assign y[i] = IW'(t >>> F);
    end else if (SO < 0) begin : g_neg
      logic signed [NW-1:0] t;
      assign t    = -(node[IO] <<< LO);
      assign y[i] = IW'(t >>> F);
    end else begin : g_zero
      assign y[i] = '0;
    end
  end

endmodule
