// wl_harness: runs one size of the tail-biting code (LAMBDA, L) through
// the top level for BER measurement. Frames of random messages are
// encoded, every channel symbol is compared with a reference encoder, the
// code bits cross an AWGN or a Rayleigh fading channel and the decisions
// are counted. Each point reports the decoded BER next to the BER of
// uncoded antipodal signalling at the same Eb/N0.
//
// Channel models (choices of this bench): AWGN with sigma^2 = 1/(2*Rc*Eb/N0),
// Rc = 1/2; Rayleigh with an independent unit-power amplitude per code bit
// and ideal knowledge of it at the receiver. LLRs 2*a*y/sigma^2 are
// quantised to 1/4 units in 6 bits.
module wl_harness
  import tbt_pkg::*;
#(
  parameter int LAMBDA = 8,
  parameter int L      = 16,
  parameter int FRAMES = 20
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N = L * LAMBDA;
  localparam int NPT = 5;
  localparam real EBN0 [NPT] = '{2.0, 2.5, 3.0, 4.0, 5.0};
  localparam bit  RAYL [NPT] = '{1'b0, 1'b0, 1'b0, 1'b1, 1'b1};

  logic         clk = 1'b0, rst_n = 1'b1;
  logic         msg_valid = 1'b0, ch_valid = 1'b0;
  logic [R-1:0] msg = '0;
  logic         msg_ready, z_valid, z_last, ch_ready, u_valid, u_last, iter_done;
  logic [M-1:0] z;
  ch_llr_t      ch [M];
  logic [R-1:0] u_hat;

  tbt_codec_top #(.LAMBDA(LAMBDA), .L(L)) dut (
    .clk, .rst_n, .msg_valid, .msg, .msg_ready, .z_valid, .z, .z_last,
    .ch_valid, .ch, .ch_ready, .u_valid, .u_hat, .u_last, .iter_done);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset

  function automatic real gauss();
    real a, b;
    a = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    b = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    return $sqrt(-2.0 * $ln(a)) * $cos(6.283185307179586 * b);
  endfunction

  function automatic int tau(input int j);
    return (j == 0) ? 9*LAMBDA : (j == 1) ? 5*LAMBDA : (j == 2) ? 2*LAMBDA : 0;
  endfunction

  // uncoded antipodal BER: Q(sqrt(2g)) for AWGN, (1 - sqrt(g/(1+g)))/2 for Rayleigh
  function automatic real uncoded(input real g, input bit rayl);
    real x, t, q;
    if (rayl) return 0.5 * (1.0 - $sqrt(g / (1.0 + g)));
    x = $sqrt(2.0 * g);
    // Q(x) by the Abramowitz-Stegun 26.2.17 approximation
    t = 1.0 / (1.0 + 0.2316419 * x);
    q = 0.3989422804 * $exp(-x * x / 2.0) *
        t * (0.319381530 + t * (-0.356563782 + t * (1.781477937 +
        t * (-1.821255978 + t * 1.330274429))));
    return q;
  endfunction

  logic [R-1:0] u [N];
  logic [M-1:0] vr [N], zr [N];
  ch_llr_t      chq [N][M];

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    for (int j = 0; j < M; j++) ch[j] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int p = 0; p < NPT; p++) begin
      int errs, bits;
      real sigma, ber, unc;
      errs = 0; bits = 0;
      sigma = $sqrt(1.0 / (10.0 ** (EBN0[p] / 10.0)));
      for (int f = 0; f < FRAMES; f++) begin
        int k;
        for (int t = 0; t < N; t++) u[t] = R'($urandom);
        for (int t = 0; t < N; t++) begin
          logic [R-1:0] q;
          q = u[(t + N - 1) % N];
          vr[t] = {u[t][0]^q[0]^q[1], u[t][0]^u[t][1]^q[1], u[t][1]^q[1], u[t][0]^q[0]};
        end
        for (int t = 0; t < N; t++) begin
          logic [M-1:0] s;
          for (int j = 0; j < M; j++) s[j] = vr[(t - tau(j) + N) % N][j];
          zr[t] = {s[3], s[3]^s[2], s[3]^s[2]^s[1], ^s};
        end
        for (int t = 0; t < N; t++) begin
          @(negedge clk);
          msg_valid = 1'b1; msg = u[t];
          @(posedge clk);
        end
        @(negedge clk) msg_valid = 1'b0;
        k = 0;
        while (k < N) begin
          @(posedge clk);
          if (z_valid) begin
            checks++;
            if (z != zr[k]) failures++;
            k++;
          end
        end
        for (int t = 0; t < N; t++)
          for (int j = 0; j < M; j++) begin
            real a, y, l;
            a = RAYL[p] ? $sqrt((gauss() ** 2 + gauss() ** 2) / 2.0) : 1.0;
            y = a * (zr[t][j] ? 1.0 : -1.0) + sigma * gauss();
            l = 4.0 * 2.0 * a * y / (sigma * sigma);
            if (l > 31.0) l = 31.0;
            if (l < -31.0) l = -31.0;
            chq[t][j] = ch_llr_t'($rtoi(l < 0.0 ? l - 0.5 : l + 0.5));
          end
        for (int t = 0; t < N; t++) begin
          @(negedge clk);
          ch_valid = 1'b1; ch = chq[t];
          @(posedge clk);
        end
        @(negedge clk) ch_valid = 1'b0;
        k = 0;
        while (k < N) begin
          @(posedge clk);
          if (u_valid) begin
            for (int i = 0; i < R; i++) if (u_hat[i] != u[k][i]) errs++;
            bits += R;
            k++;
          end
        end
      end
      ber = real'(errs) / real'(bits);
      unc = uncoded(10.0 ** (EBN0[p] / 10.0), RAYL[p]);
      $display("lambda=%0d L=%0d (%0d code bits) %s Eb/N0 %0.1f dB: BER %0.2e (%0d/%0d), uncoded %0.2e",
               LAMBDA, L, 4*N, RAYL[p] ? "Rayleigh" : "AWGN    ", EBN0[p], ber, errs, bits, unc);
      checks++;
      if (!(ber < unc)) failures++;
    end
    done = 1'b1;
  end
endmodule
