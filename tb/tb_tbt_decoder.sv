// tb_tbt_decoder: the iterative decoder on its own at the default size
// (128 symbols, 6 iterations), next to a one-iteration copy fed with the
// same channel values.
//
// Code words come from a reference encoder written here (tail-biting start,
// cyclic delays 72/40/16/0, z = s*K1); the channel is antipodal AWGN with
// LLRs quantised to 1/4 units. Checks: noiseless and 6 dB frames decode
// with no error; over the 2-3 dB frames the six-iteration decoder makes
// fewer errors than the one-iteration decoder (the a priori feedback through
// the delay processor is doing work); the latency from the last channel
// symbol to the first decision is ITER*(3N+2*WARM+2)+1 cycles; iter_done
// pulses ITER times per frame.
module tb_tbt_decoder;
  import tbt_pkg::*;

  localparam int N = 128, ITER = 6, WARM = 8;
  localparam int TAU [M] = '{72, 40, 16, 0};

  logic         clk = 1'b0, rst_n = 1'b1, ch_valid = 1'b0;
  ch_llr_t      ch [M];
  logic         ch_ready, u_valid, u_last, iter_done;
  logic [R-1:0] u_hat;
  logic         ch_ready1, u_valid1, u_last1, iter_done1;
  logic [R-1:0] u_hat1;

  tbt_decoder dut (.clk, .rst_n, .ch_valid, .ch, .ch_ready, .u_valid,
                   .u_hat, .u_last, .iter_done);
  tbt_decoder #(.ITER(1)) dut1 (.clk, .rst_n, .ch_valid, .ch, .ch_ready(ch_ready1),
                   .u_valid(u_valid1), .u_hat(u_hat1), .u_last(u_last1),
                   .iter_done(iter_done1));

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  int checks = 0, failures = 0, n_iter = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (iter_done) n_iter <= n_iter + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  function automatic real gauss();
    real a, b;
    a = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    b = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    return $sqrt(-2.0 * $ln(a)) * $cos(6.283185307179586 * b);
  endfunction

  logic [R-1:0] u [N], d6 [N], d1 [N];
  logic [M-1:0] vr [N], zr [N];
  int e6_tot = 0, e1_tot = 0;

  task automatic frame(input int f, input real ebn0, input bit noiseless,
                       input bit must_be_clean, input bit count_it);
    real sigma;
    longint t_last, t_first;
    int k, k1, e6, e1;
    for (int t = 0; t < N; t++) u[t] = R'($urandom);
    for (int t = 0; t < N; t++) begin
      logic [R-1:0] p;
      p = u[(t + N - 1) % N];
      vr[t] = {u[t][0]^p[0]^p[1], u[t][0]^u[t][1]^p[1], u[t][1]^p[1], u[t][0]^p[0]};
    end
    for (int t = 0; t < N; t++) begin
      logic [M-1:0] s;
      for (int j = 0; j < M; j++) s[j] = vr[(t - TAU[j] + N) % N][j];
      zr[t] = {s[3], s[3]^s[2], s[3]^s[2]^s[1], ^s};
    end
    sigma = $sqrt(1.0 / (10.0 ** (ebn0 / 10.0)));
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      ch_valid = 1'b1;
      for (int j = 0; j < M; j++) begin
        real y, l;
        y = (zr[t][j] ? 1.0 : -1.0) + (noiseless ? 0.0 : sigma * gauss());
        l = noiseless ? 4.0 * 6.0 * y : 4.0 * 2.0 * y / (sigma * sigma);
        if (l > 31.0) l = 31.0;
        if (l < -31.0) l = -31.0;
        ch[j] = ch_llr_t'($rtoi(l < 0.0 ? l - 0.5 : l + 0.5));
      end
      @(posedge clk);
      check(ch_ready && ch_ready1, "ch_ready");
      if (t == N - 1) t_last = cyc;
    end
    @(negedge clk) ch_valid = 1'b0;
    k = 0; k1 = 0;
    while (k < N) begin
      @(posedge clk);
      if (u_valid1) begin d1[k1] = u_hat1; k1++; end
      if (u_valid) begin
        if (k == 0) t_first = cyc;
        d6[k] = u_hat;
        check(u_last == (k == N - 1), "u_last");
        k++;
      end
    end
    check(k1 == N, "one-iteration decoder finished first");
    check(int'(t_first - t_last) == ITER * (4*N + WARM + 2) + 1,
          $sformatf("latency %0d", t_first - t_last));
    e6 = 0; e1 = 0;
    for (int t = 0; t < N; t++)
      for (int i = 0; i < R; i++) begin
        if (d6[t][i] != u[t][i]) e6++;
        if (d1[t][i] != u[t][i]) e1++;
      end
    $display("frame %0d Eb/N0 %0.1f dB: errors after 6 iterations %0d, after 1 iteration %0d", f, ebn0, e6, e1);
    if (must_be_clean) check(e6 == 0, $sformatf("frame %0d decoded with %0d errors", f, e6));
    if (count_it) begin e6_tot += e6; e1_tot += e1; end
  endtask

  initial begin
    for (int j = 0; j < M; j++) ch[j] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    frame(0, 0.0, 1'b1, 1'b1, 1'b0);
    frame(1, 6.0, 1'b0, 1'b1, 1'b0);
    for (int f = 2; f < 10; f++) frame(f, (f % 2) ? 2.0 : 2.5, 1'b0, 1'b0, 1'b1);
    $display("2-2.5 dB totals: %0d errors after 6 iterations, %0d after 1", e6_tot, e1_tot);
    check(e6_tot < e1_tot, "iterations reduce errors");
    check(n_iter == 10 * ITER, $sformatf("iterations counted %0d", n_iter));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
