// tb_log_bcjr_tb: checks the sliding-window circular-trellis Log-BCJR
// decoder of C at the default frame size (128 steps, windows of 8, 8
// training steps).
//
// The testbench holds the intrinsic LLR memory and answers rd_addr
// combinationally. Frames are random codewords of C (tail-biting: the
// encoder starts in the state of the last symbol) sent over an AWGN
// channel. The reference is a floating-point Log-MAP decoder written here,
// which runs each recursion two full turns round the circle before the
// frame, so it has no boundary effect. Checks:
//   * noiseless frame: all decisions correct, extrinsic signs = code bits;
//   * noisy frames: decisions agree with the reference wherever its a
//     posteriori LLR exceeds one nat, and the extrinsic values are within
//     1.5 nats of it (saturated values only by sign);
//   * a pass takes WARM + 3N cycles, the first window's results start
//     after WARM + LAMBDA + WARM cycles, and results arrive for every step.
module tb_log_bcjr_tb;
  import tbt_pkg::*;

  localparam int N = 128;
  localparam int WARM = 8;
  localparam int LAMBDA = 8;

  logic         clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic         busy, done, wr_en;
  logic [6:0]   rd_addr, wr_addr;
  llr_t         lin [M], ext [M];
  logic [R-1:0] u_hat;

  log_bcjr_tb dut (.clk, .rst_n, .start, .busy, .done, .rd_addr, .lin,
                   .wr_en, .wr_addr, .ext, .u_hat);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  llr_t         lmem [N][M];
  llr_t         got_ext [N][M];
  logic [R-1:0] got_u [N];
  logic [R-1:0] u [N];
  logic [M-1:0] v [N];
  int           seen;

  always_comb lin = lmem[rd_addr];

  always @(posedge clk) if (wr_en) begin
    got_ext[wr_addr] <= ext;
    got_u[wr_addr]   <= u_hat;
    seen <= seen + 1;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  // code bits of C from state p (previous symbol) and input x
  function automatic logic [M-1:0] cbits(input logic [1:0] p, input logic [1:0] x);
    return {x[0]^p[0]^p[1], x[0]^x[1]^p[1], x[1]^p[1], x[0]^p[0]};
  endfunction

  function automatic real lse(input real a, input real b);
    real m;
    m = (a > b) ? a : b;
    return m + $ln(1.0 + $exp(-((a > b) ? a - b : b - a)));
  endfunction

  real ra [N+1][4], rb [N+1][4];
  real r_ext [N][M], r_app [N][R];

  task automatic reference();
    real g [4][4], an [4], a [4], b [4];
    for (int s = 0; s < 4; s++) begin a[s] = 0.0; b[s] = 0.0; end
    for (int lap = 0; lap < 3; lap++)
      for (int t = 0; t < N; t++) begin
        if (lap == 2) for (int s = 0; s < 4; s++) ra[t][s] = a[s];
        for (int x = 0; x < 4; x++) begin
          an[x] = -1.0e30;
          for (int s = 0; s < 4; s++) begin
            logic [M-1:0] c;
            real gm;
            c = cbits(2'(s), 2'(x));
            gm = 0.0;
            for (int j = 0; j < M; j++) gm += 0.5 * (c[j] ? 1.0 : -1.0) * real'(lmem[t][j]) / 4.0;
            an[x] = lse(an[x], a[s] + gm);
          end
        end
        for (int s = 0; s < 4; s++) a[s] = an[s] - an[0];
      end
    for (int lap = 0; lap < 3; lap++)
      for (int t = N - 1; t >= 0; t--) begin
        if (lap == 2) for (int s = 0; s < 4; s++) rb[t+1][s] = b[s];
        for (int s = 0; s < 4; s++) begin
          an[s] = -1.0e30;
          for (int x = 0; x < 4; x++) begin
            logic [M-1:0] c;
            real gm;
            c = cbits(2'(s), 2'(x));
            gm = 0.0;
            for (int j = 0; j < M; j++) gm += 0.5 * (c[j] ? 1.0 : -1.0) * real'(lmem[t][j]) / 4.0;
            an[s] = lse(an[s], b[x] + gm);
          end
        end
        for (int s = 0; s < 4; s++) b[s] = an[s] - an[0];
      end
    for (int t = 0; t < N; t++) begin
      real n1 [M], n0 [M], u1 [R], u0 [R];
      for (int j = 0; j < M; j++) begin n1[j] = -1.0e30; n0[j] = -1.0e30; end
      for (int i = 0; i < R; i++) begin u1[i] = -1.0e30; u0[i] = -1.0e30; end
      for (int s = 0; s < 4; s++)
        for (int x = 0; x < 4; x++) begin
          logic [M-1:0] c;
          logic [1:0] xb;
          real lam;
          xb = 2'(x);
          c = cbits(2'(s), xb);
          lam = ra[t][s] + rb[t+1][x];
          for (int j = 0; j < M; j++) lam += 0.5 * (c[j] ? 1.0 : -1.0) * real'(lmem[t][j]) / 4.0;
          for (int j = 0; j < M; j++)
            if (c[j]) n1[j] = lse(n1[j], lam); else n0[j] = lse(n0[j], lam);
          for (int i = 0; i < R; i++)
            if (xb[i]) u1[i] = lse(u1[i], lam); else u0[i] = lse(u0[i], lam);
        end
      for (int j = 0; j < M; j++) r_ext[t][j] = 4.0 * (n1[j] - n0[j]) - real'(lmem[t][j]);
      for (int i = 0; i < R; i++) r_app[t][i] = u1[i] - u0[i];
    end
  endtask

  function automatic real gauss();
    real a, b;
    a = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    b = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    return $sqrt(-2.0 * $ln(a)) * $cos(6.283185307179586 * b);
  endfunction

  initial begin
    int n_far, n_strong;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int f = 0; f < 6; f++) begin
      real sigma;
      int cycles, first_wr;
      sigma = (f == 0) ? 0.0 : 0.8 + 0.05 * f;
      for (int t = 0; t < N; t++) u[t] = 2'($urandom);
      for (int t = 0; t < N; t++) v[t] = cbits(u[(t + N - 1) % N], u[t]);
      for (int t = 0; t < N; t++)
        for (int j = 0; j < M; j++) begin
          real y, l;
          y = (v[t][j] ? 1.0 : -1.0) + sigma * gauss();
          l = (f == 0) ? 4.0 * 5.0 * y : 4.0 * 2.0 * y / (sigma * sigma);
          if (l > 127.0) l = 127.0;
          if (l < -127.0) l = -127.0;
          lmem[t][j] = llr_t'($rtoi(l < 0.0 ? l - 0.5 : l + 0.5));
        end
      reference();
      seen = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cycles = 1;
      first_wr = -1;
      while (!done) begin
        @(negedge clk);
        cycles++;
        if (wr_en && first_wr < 0) first_wr = cycles;
      end
      // first window: forward warm-up, forward pass, backward training
      check(first_wr == 1 + WARM + LAMBDA + WARM, $sformatf("first result after %0d cycles", first_wr));
      check(cycles == WARM + 3 * N + 1, $sformatf("pass length %0d", cycles));
      check(seen == N, $sformatf("results written %0d", seen));
      n_far = 0; n_strong = 0;
      for (int t = 0; t < N; t++) begin
        if (f == 0) begin
          check(got_u[t] == u[t], $sformatf("noiseless u(%0d)", t));
          for (int j = 0; j < M; j++)
            check((got_ext[t][j] > 0) == v[t][j], $sformatf("noiseless ext sign t=%0d j=%0d", t, j));
        end
        for (int i = 0; i < R; i++)
          if (r_app[t][i] > 1.0 || r_app[t][i] < -1.0) begin
            n_strong++;
            check(got_u[t][i] == (r_app[t][i] > 0.0),
                  $sformatf("frame %0d u%0d(%0d) ref app %0.2f", f, i + 1, t, r_app[t][i]));
          end
        for (int j = 0; j < M; j++) begin
          real r;
          r = r_ext[t][j];
          if (r > 126.0 || r < -126.0) check((got_ext[t][j] > 0) == (r > 0.0), "saturated ext sign");
          else if (real'(got_ext[t][j]) > r + 6.0 || real'(got_ext[t][j]) < r - 6.0) begin
            n_far++;
            check(1'b0, $sformatf("frame %0d ext t=%0d j=%0d got %0d ref %0.1f", f, t, j, got_ext[t][j], r));
          end else checks++;
        end
      end
      $display("frame %0d: %0d decisions compared, %0d extrinsic values off", f, n_strong, n_far);
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
