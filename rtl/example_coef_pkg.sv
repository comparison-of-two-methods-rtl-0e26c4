// example_coef_pkg: coefficient sets of the eight example filters compared
// in this design, as integers scaled by 2**F (F = coefficient word length).
//
//   Example 1: lowpass, passband edge 0.135, stopband edge 0.2 (frequencies
//              relative to the sample rate), 0.2 dB ripple, 30 dB attenuation
//     1a  classical elliptic, order 4, cascade with multiplier blocks
//     1b  EMQF, order 5, cascade with multiplier blocks
//     1c  EMQF, order 5, two allpass branches in parallel
//   Example 2: halfband, stopband edge 0.28, 28 dB attenuation, order 5
//     2a  cascade with multiplier blocks        2b  two allpass branches
//   Example 3: halfband, stopband edge 0.28, 46 dB attenuation, order 9
//     3a  cascade with multiplier blocks
//     3b  two allpass branches, 8-bit coefficients
//     3c  two allpass branches, 12-bit coefficients
//
// How the numbers were obtained: the EMQF filters are elliptic filters whose
// passband and stopband ripple satisfy (10^(Ap/10)-1)(10^(Aa/10)-1) = 1, with
// the order above and the attenuation raised until the stopband edge falls
// on the specified frequency. Their poles, sorted by angle, give the allpass
// constants: a conjugate pair with denominator 1 + d1 z^-1 + d2 z^-2 gives
// beta = d2 and alpha = -d1 / (1 + beta); the real pole p gives ALPHA1 = p.
// For the cascades each section pairs a pole pair with its nearest zero pair
// and is scaled to unity DC gain. Every constant is round(value * 2**F).
// Realised responses (from the quantised values): worst stopband attenuation
// 1a 29.9 dB, 1b 31.8 dB, 1c 31.7 dB, 2a 29.1 dB, 2b 28.9 dB, 3a 56.5 dB,
// 3b 42.9 dB, 3c 56.1 dB.
package example_coef_pkg;

  parameter int N_FILT = 8;

  // 1a: classical elliptic, two second-order sections
  parameter int EX1A_N = 2;
  parameter int EX1A_ORD [EX1A_N]    = '{2, 2};
  parameter int EX1A_B [EX1A_N*3] = '{67, -48, 67,  64, 48, 64};
  parameter int EX1A_A [EX1A_N*2] = '{-261, 92,  -286, 206};

  // 1b: EMQF order 5 as a cascade
  parameter int EX1B_N = 3;
  parameter int EX1B_ORD [EX1B_N]    = '{1, 2, 2};
  parameter int EX1B_B [EX1B_N*3] = '{93, 93, 0,  117, -64, 117,  99, 27, 99};
  parameter int EX1B_A [EX1B_N*2] = '{-70, 0,  -174, 88,  -231, 201};

  // 1c: EMQF order 5, parallel allpass
  parameter int EX1C_N = 2;
  parameter int EX1C_ALPHA1 = 70;
  parameter int EX1C_ALPHA [EX1C_N] = '{130, 130};
  parameter int EX1C_BETA  [EX1C_N] = '{88, 201};

  // 2a: halfband EMQF order 5 as a cascade
  parameter int EX2A_N = 3;
  parameter int EX2A_ORD [EX2A_N]    = '{1, 2, 2};
  parameter int EX2A_B [EX2A_N*3] = '{128, 128, 0,  137, 61, 137,  147, 163, 147};
  parameter int EX2A_A [EX2A_N*2] = '{0, 0,  0, 78,  0, 200};

  // 2b: halfband EMQF order 5, parallel allpass
  parameter int EX2B_N = 2;
  parameter int EX2B_ALPHA [EX2B_N] = '{0, 0};
  parameter int EX2B_BETA  [EX2B_N] = '{78, 200};

  // 3a: halfband EMQF order 9 as a cascade
  parameter int EX3A_N = 5;
  parameter int EX3A_ORD [EX3A_N]    = '{1, 2, 2, 2, 2};
  parameter int EX3A_B [EX3A_N*3] = '{128, 128, 0,  118, 47, 118,  135, 78, 135,  140, 139, 140,  133, 215, 133};
  parameter int EX3A_A [EX3A_N*2] = '{0, 0,  0, 28,  0, 93,  0, 162,  0, 225};

  // 3b / 3c: halfband EMQF order 9, parallel allpass, 8 and 12-bit betas
  parameter int EX3_N = 4;
  parameter int EX3_ALPHA [EX3_N] = '{0, 0, 0, 0};
  parameter int EX3B_BETA [EX3_N] = '{28, 93, 162, 225};
  parameter int EX3C_BETA [EX3_N] = '{447, 1481, 2595, 3594};

  // Multiplier-block adder graphs of the cascades (format: see mult_block).
  // Section i owns NF[i] adders of G, in order, and entries 15i..15i+14 of O.
  parameter int EX1A_NF [EX1A_N] = '{5, 4};
  parameter int EX1A_NG = 54;
  parameter int EX1A_G [EX1A_NG] = '{
      0, 0, 1, 0, 1, 1, 0, 0, -1, 1, 3, 1,
      0, 6, 1, 1, 0, 1, 0, 0, 1, 0, 2, 1,
      0, 8, 1, 4, 0, 1, 0, 0, 1, 0, 1, 1,
      0, 0, -1, 1, 5, 1, 0, 3, 1, 2, 0, 1,
      1, 4, 1, 2, 0, 1};
  parameter int EX1A_O [EX1A_N*15] = '{
      3, 0, 1, 1, 4, -1, 3, 0, 1, 5, 0, 1, 2, 2, -1,
      0, 6, 1, 1, 4, 1, 0, 6, 1, 4, 1, 1, 3, 1, -1};
  parameter int EX1B_NF [EX1B_N] = '{3, 4, 5};
  parameter int EX1B_NG = 72;
  parameter int EX1B_G [EX1B_NG] = '{
      0, 0, 1, 0, 1, 1, 0, 5, 1, 1, 0, 1,
      0, 7, 1, 2, 0, -1, 0, 0, 1, 0, 1, 1,
      0, 0, -1, 1, 2, 1, 0, 0, -1, 2, 3, 1,
      0, 7, 1, 2, 0, -1, 0, 0, 1, 0, 1, 1,
      1, 0, 1, 1, 3, 1, 1, 0, 1, 1, 5, 1,
      1, 0, 1, 3, 1, 1, 2, 4, 1, 4, 0, -1};
  parameter int EX1B_O [EX1B_N*15] = '{
      3, 0, 1, 3, 0, 1, 0, 0, 0, 2, 1, 1, 0, 0, 0,
      4, 0, 1, 0, 6, -1, 4, 0, 1, 3, 1, 1, 2, 3, -1,
      3, 0, 1, 2, 0, 1, 3, 0, 1, 5, 0, 1, 4, 0, -1};
  parameter int EX2A_NF [EX2A_N] = '{0, 5, 5};
  parameter int EX2A_NG = 60;
  parameter int EX2A_G [EX2A_NG] = '{
      0, 0, -1, 0, 5, 1, 0, 3, 1, 1, 0, 1,
      0, 0, -1, 1, 1, 1, 0, 0, 1, 0, 3, 1,
      0, 7, 1, 4, 0, 1, 0, 0, 1, 0, 1, 1,
      0, 0, 1, 1, 3, 1, 1, 2, 1, 2, 0, 1,
      0, 0, -1, 3, 2, 1, 0, 4, 1, 4, 0, 1};
  parameter int EX2A_O [EX2A_N*15] = '{
      0, 7, 1, 0, 7, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0,
      5, 0, 1, 3, 0, 1, 5, 0, 1, 0, 0, 0, 2, 1, -1,
      4, 0, 1, 5, 0, 1, 4, 0, 1, 0, 0, 0, 2, 3, -1};
  parameter int EX3A_NF [EX3A_N] = '{0, 4, 5, 4, 5};
  parameter int EX3A_NG = 108;
  parameter int EX3A_G [EX3A_NG] = '{
      0, 0, -1, 0, 3, 1, 0, 0, 1, 0, 1, 1,
      0, 0, -1, 2, 4, 1, 1, 3, 1, 2, 0, 1,
      0, 0, -1, 0, 3, 1, 0, 5, 1, 1, 0, 1,
      0, 7, 1, 1, 0, 1, 0, 0, 1, 0, 1, 1,
      4, 0, -1, 4, 5, 1, 0, 0, 1, 0, 2, 1,
      1, 0, -1, 1, 3, 1, 0, 0, 1, 1, 4, 1,
      0, 0, -1, 2, 2, 1, 0, 0, 1, 0, 2, 1,
      0, 7, 1, 1, 0, 1, 0, 0, 1, 1, 3, 1,
      0, 8, 1, 3, 0, -1, 1, 1, 1, 4, 0, 1};
  parameter int EX3A_O [EX3A_N*15] = '{
      0, 7, 1, 0, 7, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0,
      4, 1, 1, 3, 0, 1, 4, 1, 1, 0, 0, 0, 1, 2, -1,
      3, 0, 1, 2, 1, 1, 3, 0, 1, 0, 0, 0, 5, 0, -1,
      2, 2, 1, 4, 0, 1, 2, 2, 1, 0, 0, 0, 3, 1, -1,
      2, 0, 1, 4, 0, 1, 2, 0, 1, 0, 0, 0, 5, 0, -1};

endpackage
