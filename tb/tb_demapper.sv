// tb_demapper: compares the demapper with a floating-point evaluation of
//   L(s_j) = ln sum_{x_j=1} e^mu_j(x) - ln sum_{x_j=0} e^mu_j(x),
//   mu_j(x) = 1/2 sum_k (2z_k(x)-1) Lch_k + 1/2 sum_i zeta_ij (2x_i-1) La_i,
// with z(x) = x*K1 and the weights Xi1 in their decimal form (1.00, 0.83,
// 0.77, 0.50, 0.71, 0.33). LLRs are in 1/4 units; the tolerance is 4 units
// (one nat). The extrinsic output must equal L - La exactly unless
// saturated. Cases without a priori values (first iteration) are included.
module tb_demapper;
  import tbt_pkg::*;

  ch_llr_t ch [M];
  llr_t    la [M], lapp [M], le [M];

  demapper dut (.ch, .la, .lapp, .le);

  int checks = 0, failures = 0;

  real XI [M][M] = '{'{1.00, 0.83, 0.83, 0.83},
                     '{0.77, 1.00, 0.83, 0.77},
                     '{0.77, 0.50, 1.00, 0.71},
                     '{0.77, 0.50, 0.33, 1.00}};

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ref_llr(input int j);
    real s1, s0;
    s1 = 0.0; s0 = 0.0;
    for (int x = 0; x < 16; x++) begin
      logic [3:0] xb, z;
      real mu;
      xb = 4'(x);
      z = {xb[3], xb[3]^xb[2], xb[3]^xb[2]^xb[1], ^xb};
      mu = 0.0;
      for (int k = 0; k < M; k++) mu += 0.5 * (z[k] ? 1.0 : -1.0) * real'(ch[k]) / 4.0;
      for (int i = 0; i < M; i++) mu += 0.5 * XI[i][j] * (xb[i] ? 1.0 : -1.0) * real'(la[i]) / 4.0;
      if (xb[j]) s1 += $exp(mu); else s0 += $exp(mu);
    end
    return 4.0 * ($ln(s1) - $ln(s0));
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < M; k++) begin
        ch[k] = ch_llr_t'(int'($urandom % 63) - 31);
        la[k] = (n % 4 == 0) ? llr_t'(0) : llr_t'(int'($urandom % 121) - 60);
      end
      #1;
      for (int j = 0; j < M; j++) begin
        real r;
        r = ref_llr(j);
        checks++;
        if (r > 126.0 ? lapp[j] < 120 : r < -126.0 ? lapp[j] > -120 :
            (real'(lapp[j]) > r + 4.0 || real'(lapp[j]) < r - 4.0)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d j=%0d lapp=%0d ref=%0.2f", n, j, lapp[j], r);
        end
        checks++;
        if (int'(lapp[j]) - int'(la[j]) <= 127 && int'(lapp[j]) - int'(la[j]) >= -127 &&
            lapp[j] > -127 && lapp[j] < 127 && int'(le[j]) != int'(lapp[j]) - int'(la[j])) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d j=%0d le=%0d lapp=%0d la=%0d", n, j, le[j], lapp[j], la[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
