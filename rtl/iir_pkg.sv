// iir_pkg: word widths shared by the multiplierless IIR filter blocks, and the
// canonic-signed-digit (CSD) recoding used to turn a constant coefficient into
// a handful of shifted additions and subtractions.
//
// Every coefficient is an integer C standing for C / 2**F, where F is the
// coefficient word length (8 bits in most examples, 12 in one). A product
// with a coefficient is built as sum_k d_k * (x << k) with CSD digits
// d_k in {-1, 0, +1}, followed by an arithmetic shift right by F (so the
// product is rounded towards minus infinity). CSD has no two adjacent non-zero
// digits, which gives the fewest adders for a lone constant.
package iir_pkg;

  // Input sample width and internal datapath width. The internal width keeps
  // IW - IN_W guard bits above the input word so that no internal node of the
  // example filters overflows.
  parameter int IN_W = 16;
  parameter int IW   = 28;

  // Highest CSD digit position examined; covers |C| < 2**(CSD_MAX-1).
  parameter int CSD_MAX = 18;

  // CSD digit of constant c at bit position pos: -1, 0 or +1.
  function automatic int csd_digit(int c, int pos);
    int r;
    int d;
    r = c;
    d = 0;
    for (int k = 0; k <= pos; k++) begin
      if ((r & 1) != 0) d = ((r & 3) == 1) ? 1 : -1;
      else              d = 0;
      r = (r - d) >>> 1;
    end
    return d;
  endfunction

  // Number of non-zero CSD digits of c: the adder count of the constant is
  // this number minus one.
  function automatic int csd_weight(int c);
    int n;
    n = 0;
    for (int k = 0; k < CSD_MAX; k++) if (csd_digit(c, k) != 0) n++;
    return n;
  endfunction

endpackage
