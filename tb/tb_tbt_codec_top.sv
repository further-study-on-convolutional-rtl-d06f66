// tb_tbt_codec_top: end-to-end test of the tail-biting code at its default
// size (L=16, LAMBDA=8: 128 symbols, 256 message bits, 512 code bits, 6
// iterations).
//
// For each frame a random message goes through the encoder; every channel
// symbol is checked against a reference encoder written here from the code
// equations (v1=u1+u1', v2=u2+u2', v3=u1+u2+u2', v4=u1+u1'+u2', cyclic
// delays 72/40/16/0, z = s*K1). The code bits are then sent over an
// antipodal AWGN channel (Box-Muller noise from $urandom), turned into
// quantised LLRs (1/4 units, 6 bits) and decoded. A noiseless frame and
// frames at Eb/N0 = 6 dB must decode without error; frames at 3 dB and
// 2 dB are counted, and must end with fewer errors than the raw channel
// decisions. Encoder and decoder latencies are checked in cycles.
// Mechanisms counted: tail-biting start from a non-zero state, level
// delays that wrap around the frame end, decoder iterations, and frames
// whose channel errors the decoder removed.
module tb_tbt_codec_top;
  import tbt_pkg::*;

  localparam int LAMBDA = 8;
  localparam int L      = 16;
  localparam int ITER   = 6;
  localparam int N      = L * LAMBDA;
  localparam int WARM   = LAMBDA;
  localparam int NFRAME = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         msg_valid = 1'b0;
  logic [R-1:0] msg = '0;
  logic         msg_ready, z_valid, z_last;
  logic [M-1:0] z;
  logic         ch_valid = 1'b0;
  ch_llr_t      ch [M];
  logic         ch_ready, u_valid, u_last, iter_done;
  logic [R-1:0] u_hat;

  tbt_codec_top dut (
    .clk, .rst_n, .msg_valid, .msg, .msg_ready, .z_valid, .z, .z_last,
    .ch_valid, .ch, .ch_ready, .u_valid, .u_hat, .u_last, .iter_done
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_tailbite = 0, n_wrap = 0, n_iter = 0, n_corrected = 0;
  always @(posedge clk) if (iter_done) n_iter <= n_iter + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [R-1:0] u_ref [N];
  logic [M-1:0] v_ref [N];
  logic [M-1:0] z_ref [N];
  logic [M-1:0] z_got [N];
  logic [R-1:0] d_got [N];

  function automatic int tau(input int j);
    return (j == 0) ? 9*LAMBDA : (j == 1) ? 5*LAMBDA : (j == 2) ? 2*LAMBDA : 0;
  endfunction

  task automatic ref_encode();
    for (int t = 0; t < N; t++) begin
      logic u1, u2, p1, p2;
      u1 = u_ref[t][0]; u2 = u_ref[t][1];
      p1 = u_ref[(t+N-1)%N][0]; p2 = u_ref[(t+N-1)%N][1];
      v_ref[t] = {u1^p1^p2, u1^u2^p2, u2^p2, u1^p1};
    end
    for (int t = 0; t < N; t++) begin
      logic [M-1:0] s;
      for (int j = 0; j < M; j++) s[j] = v_ref[(t - tau(j) + N) % N][j];
      // z1 = s1+s2+s3+s4, z2 = s2+s3+s4, z3 = s3+s4, z4 = s4
      z_ref[t] = {s[3], s[3]^s[2], s[3]^s[2]^s[1], s[3]^s[2]^s[1]^s[0]};
    end
  endtask

  function automatic real gauss();
    real a, b;
    a = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    b = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    return $sqrt(-2.0 * $ln(a)) * $cos(6.283185307179586 * b);
  endfunction

  task automatic run_frame(input int f, input real ebn0_db, input bit noiseless,
                           input int max_dec_err);
    longint t_last_msg, t_first_z, t_last_ch, t_first_u;
    int raw_err, dec_err, k;
    real sigma, y, llr;
    ch_llr_t chq [N][M];

    for (int t = 0; t < N; t++) u_ref[t] = R'($urandom);
    if (f == 0) u_ref[N-1] = 2'b11;   // force a non-zero tail-biting start
    ref_encode();
    if (u_ref[N-1] != '0) n_tailbite++;
    for (int t = 0; t < N; t++)
      for (int j = 0; j < M; j++)
        if (t < tau(j)) n_wrap++;

    // encoder
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      msg_valid = 1'b1;
      msg = u_ref[t];
      @(posedge clk);
      check(msg_ready, "msg_ready while loading");
      if (t == N-1) t_last_msg = cyc;
    end
    @(negedge clk);
    msg_valid = 1'b0;
    k = 0;
    while (k < N) begin
      @(posedge clk);
      if (z_valid) begin
        if (k == 0) t_first_z = cyc;
        z_got[k] = z;
        check(z_last == (k == N-1), "z_last");
        k++;
      end
    end
    check(int'(t_first_z - t_last_msg) == N + 1,
          $sformatf("encoder latency %0d", t_first_z - t_last_msg));
    for (int t = 0; t < N; t++)
      check(z_got[t] == z_ref[t], $sformatf("frame %0d z(%0d) %b exp %b", f, t, z_got[t], z_ref[t]));

    // channel: rate 1/2, Es/N0 = Eb/N0 / 2 per antipodal bit
    sigma = $sqrt(1.0 / (2.0 * 0.5 * (10.0 ** (ebn0_db / 10.0))));
    raw_err = 0;
    for (int t = 0; t < N; t++)
      for (int j = 0; j < M; j++) begin
        y = z_ref[t][j] ? 1.0 : -1.0;
        if (!noiseless) y += sigma * gauss();
        llr = noiseless ? (z_ref[t][j] ? 6.0 : -6.0) : 2.0 * y / (sigma * sigma);
        llr = llr * 4.0;
        if (llr > 31.0) llr = 31.0;
        if (llr < -31.0) llr = -31.0;
        chq[t][j] = ch_llr_t'($rtoi(llr < 0.0 ? llr - 0.5 : llr + 0.5));
        if ((y > 0.0) != z_ref[t][j]) raw_err++;
      end

    // decoder
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      ch_valid = 1'b1;
      ch = chq[t];
      @(posedge clk);
      check(ch_ready, "ch_ready while loading");
      if (t == N-1) t_last_ch = cyc;
    end
    @(negedge clk);
    ch_valid = 1'b0;
    k = 0;
    while (k < N) begin
      @(posedge clk);
      if (u_valid) begin
        if (k == 0) t_first_u = cyc;
        d_got[k] = u_hat;
        check(u_last == (k == N-1), "u_last");
        k++;
      end
    end
    check(int'(t_first_u - t_last_ch) == ITER * (4*N + WARM + 2) + 1,
          $sformatf("decoder latency %0d", t_first_u - t_last_ch));
    dec_err = 0;
    for (int t = 0; t < N; t++)
      for (int i = 0; i < R; i++)
        if (d_got[t][i] != u_ref[t][i]) dec_err++;
    $display("frame %0d Eb/N0 %0.1f dB%s: channel bit errors %0d/%0d, decoded bit errors %0d/%0d",
             f, ebn0_db, noiseless ? " (noiseless)" : "", raw_err, N*M, dec_err, N*R);
    check(dec_err <= max_dec_err, $sformatf("frame %0d: %0d decoded errors", f, dec_err));
    if (raw_err > 0) check(dec_err * 4 < raw_err, "decoder reduces errors");
    if (raw_err > 0 && dec_err == 0) n_corrected++;
  endtask

  initial begin
    for (int j = 0; j < M; j++) ch[j] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run_frame(0, 0.0, 1'b1, 0);
    run_frame(1, 6.0, 1'b0, 0);
    run_frame(2, 6.0, 1'b0, 0);
    run_frame(3, 5.0, 1'b0, 0);
    run_frame(4, 4.0, 1'b0, 2);
    run_frame(5, 3.0, 1'b0, 16);
    run_frame(6, 3.0, 1'b0, 16);
    run_frame(7, 2.0, 1'b0, 40);
    check(n_iter == ITER * NFRAME, $sformatf("iterations %0d", n_iter));
    $display("mechanisms: tail-biting non-zero starts %0d, wrapped level delays %0d, iterations %0d, frames with all channel errors corrected %0d",
             n_tailbite, n_wrap, n_iter, n_corrected);
    check(n_tailbite > 0, "tail-biting start from non-zero state exercised");
    check(n_wrap > 0, "delay wrap-around exercised");
    check(n_iter > 0, "iterations exercised");
    check(n_corrected > 0, "error correction exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
