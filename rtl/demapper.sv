// demapper: soft demapper for the labelling bits s1..s4 of one symbol.
//
// For each labelling bit s_j it forms the a posteriori LLR
//   L(s_j) = max*_{x: x_j=1} mu_j(x) - max*_{x: x_j=0} mu_j(x),
//   mu_j(x) = 1/2 sum_k (2 z_k(x)-1) Lch(z_k)
//           + 1/2 sum_i zeta_ij (2 x_i-1) La(s_i),      z(x) = x*K1,
// over the 16 labellings x, and the extrinsic value Le(s_j) = L(s_j) -
// La(s_j). The first term is the usual -||y - w(x)||^2/N0 up to a constant,
// written with the channel LLRs Lch = 4y/N0 of the antipodal bits of z.
// The weights zeta_ij (matrix Xi1, in Q6) damp the a priori values of the
// other levels, which are not independent because no interleaver is used.
// The formula, Xi1 and the table-based max* follow the reference method;
// the fixed-point formats (tbt_pkg) and rounding of zeta*La are this
// design's own.
//
// Interface/timing: combinational. ch: channel LLRs of z1..z4; la: a priori
// LLRs of s1..s4 (zero when none are available); lapp: a posteriori LLRs;
// le: extrinsic LLRs, saturated to LLR_W bits.
module demapper
  import tbt_pkg::*;
(
  input  ch_llr_t ch   [M],
  input  llr_t    la   [M],
  output llr_t    lapp [M],
  output llr_t    le   [M]
);

  localparam int NX = 1 << M;

  // labelling with bit j equal to b and the other bits taken from k
  function automatic logic [M-1:0] insert_bit(input int j, input int k,
                                              input logic b);
    logic [M-1:0] x;
    int p;
    p = 0;
    for (int q = 0; q < M; q++) begin
      if (q == j) x[q] = b;
      else begin
        x[q] = k[p];
        p++;
      end
    end
    return x;
  endfunction

  met_t chm [NX];      // channel part of the metric, per labelling
  met_t wla [M][M];    // zeta_ij * La(s_i), rounded, [i][j]
  met_t mu1 [M][NX/2];
  met_t mu0 [M][NX/2];
  met_t mx1 [M];
  met_t mx0 [M];

  always_comb begin
    for (int x = 0; x < NX; x++) begin
      logic [M-1:0] z;
      z = map_k1(M'(x));
      chm[x] = '0;
      for (int k = 0; k < M; k++)
        chm[x] += z[k] ? met_t'(ch[k]) : -met_t'(ch[k]);
    end
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        wla[i][j] = (met_t'(la[i]) * met_t'(XI1[i][j]) + met_t'(32)) >>> 6;
    for (int j = 0; j < M; j++) begin
      for (int k = 0; k < NX/2; k++) begin
        logic [M-1:0] x1, x0;
        met_t a1, a0;
        x1 = insert_bit(j, k, 1'b1);
        x0 = insert_bit(j, k, 1'b0);
        a1 = chm[x1];
        a0 = chm[x0];
        for (int i = 0; i < M; i++) begin
          a1 += x1[i] ? wla[i][j] : -wla[i][j];
          a0 += x0[i] ? wla[i][j] : -wla[i][j];
        end
        mu1[j][k] = a1;
        mu0[j][k] = a0;
      end
    end
  end

  for (genvar j = 0; j < M; j++) begin : g_bit
    max_star_tree #(.N(NX/2)) u_t1 (.a(mu1[j]), .y(mx1[j]));
    max_star_tree #(.N(NX/2)) u_t0 (.a(mu0[j]), .y(mx0[j]));
    met_t diff;
    // metric units are 1/8, LLR units 1/4
    assign diff    = (mx1[j] - mx0[j]) >>> 1;
    assign lapp[j] = sat_llr(diff);
    assign le[j]   = sat_llr(diff - met_t'(la[j]));
  end

endmodule
