// tbt_pkg: types, code constants and arithmetic helpers shared by the
// encoder and the iterative decoder of the tail-biting trellis code T''.
//
// The code is built from a rate 2/4, 4-state convolutional code C, a
// 4-level delay processor with delays (9,5,2,0)*lambda symbols and a binary
// signal mapper with labelling K1. The generator matrix, the labelling, the
// delay multipliers and the weighting matrix Xi1 are the values of the
// reference example. Bit j-1 of every 4-bit vector carries level j (v_j,
// s_j, z_j); bit i-1 of a 2-bit message symbol carries u_i.
//
// Soft values use this design's own fixed-point convention:
//   * an LLR is ln(P(bit=1)/P(bit=0)); an integer q of an LLR signal stands
//     for q/4 (two fractional bits);
//   * a path metric (sum of half LLRs, as in the Log-MAP branch metric
//     1/2 * sum (2b-1) L(b)) is kept as the integer sum of +/-q, so one unit
//     of a metric stands for 1/8;
//   * the max* correction ln(1+exp(-|d|)) is tabulated in metric units:
//     corr(d) = round(8*ln(1+exp(-d/8))).
package tbt_pkg;

  localparam int R     = 2;   // message bits per symbol (rate r/m = 2/4)
  localparam int M     = 4;   // code bits / labelling bits per symbol
  localparam int NU    = 2;   // memory of C (4 states)
  localparam int NSTATE = 1 << NU;

  localparam int CH_W  = 6;   // channel LLR width (signed)
  localparam int LLR_W = 8;   // a priori / extrinsic LLR width (signed)
  localparam int MET_W = 14;  // metric width (signed)

  typedef logic signed [CH_W-1:0]  ch_llr_t;
  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [MET_W-1:0] met_t;

  // Generator matrix G_c^1 of C, entry [i][j] is a polynomial in D:
  // bit 0 = coefficient of D^0, bit 1 = coefficient of D^1.
  //   G = ( 3 0 1 3 ; 0 3 3 2 )
  typedef logic [1:0] gpoly_t;
  localparam gpoly_t GEN [R][M] = '{'{2'd3, 2'd0, 2'd1, 2'd3},
                                    '{2'd0, 2'd3, 2'd3, 2'd2}};

  // Labelling K1: z = s * K1 over GF(2); row j is the image of s_j alone.
  localparam logic [M-1:0] K1 [M] = '{4'b0001, 4'b0011, 4'b0111, 4'b1111};

  // Delay of level j in units of lambda: tau = (9,5,2,0)*lambda.
  localparam int TAU_MULT [M] = '{9, 5, 2, 0};

  // Weighting matrix Xi1 in Q6 (entry/64); [i][j] weights the a priori
  // value of s_i in the a posteriori value of s_j.
  localparam logic [6:0] XI1 [M][M] = '{'{7'd64, 7'd53, 7'd53, 7'd53},
                                        '{7'd49, 7'd64, 7'd53, 7'd49},
                                        '{7'd49, 7'd32, 7'd64, 7'd45},
                                        '{7'd49, 7'd32, 7'd21, 7'd64}};

  // Code bits of C for encoder state st (st[i] = u_{i+1}(t-1)) and input u.
  function automatic logic [M-1:0] conv_out(input logic [R-1:0] st,
                                            input logic [R-1:0] u);
    logic [M-1:0] v;
    for (int j = 0; j < M; j++) begin
      v[j] = 1'b0;
      for (int i = 0; i < R; i++)
        v[j] ^= (GEN[i][j][0] & u[i]) ^ (GEN[i][j][1] & st[i]);
    end
    return v;
  endfunction

  // Signal mapper: z = s * K1 over GF(2).
  function automatic logic [M-1:0] map_k1(input logic [M-1:0] s);
    logic [M-1:0] z;
    z = '0;
    for (int j = 0; j < M; j++)
      if (s[j]) z ^= K1[j];
    return z;
  endfunction

  // max* correction term in metric units, round(8*ln(1+exp(-d/8))).
  function automatic met_t max_corr(input met_t d);
    if      (d == 0)  return met_t'(6);
    else if (d <= 2)  return met_t'(5);
    else if (d <= 4)  return met_t'(4);
    else if (d <= 8)  return met_t'(3);
    else if (d <= 12) return met_t'(2);
    else if (d <= 21) return met_t'(1);
    else              return met_t'(0);
  endfunction

  // max*(a,b) = ln(e^a + e^b) = max(a,b) + ln(1 + e^-|a-b|).
  function automatic met_t max_star(input met_t a, input met_t b);
    met_t d;
    d = (a > b) ? a - b : b - a;
    return ((a > b) ? a : b) + max_corr(d);
  endfunction

  // Saturate a metric-width value to the LLR width.
  function automatic llr_t sat_llr(input met_t x);
    if (x > met_t'(2**(LLR_W-1) - 1))   return llr_t'(2**(LLR_W-1) - 1);
    if (x < met_t'(-(2**(LLR_W-1)) + 1)) return llr_t'(-(2**(LLR_W-1)) + 1);
    return llr_t'(x);
  endfunction

endpackage
