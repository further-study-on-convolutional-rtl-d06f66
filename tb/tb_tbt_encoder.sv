// tb_tbt_encoder: encodes random frames at the default size (128 symbols)
// and compares every channel symbol with a reference encoder written from
// the code equations: tail-biting start from the last message symbol,
// cyclic delays 72/40/16/0, z = s*K1. Frames include an all-ones last
// symbol (non-zero start state). The encoder latency (N+1 cycles from the
// last message symbol to the first z) and z_last are checked as well.
// Finally every message whose non-zero symbols lie within three adjacent
// positions (63 patterns, placed so that some wrap round the frame end) is
// encoded and the Hamming weight of the whole channel word measured: as
// the code is linear this is a distance, and it must never be below 13,
// the minimum distance stated for this code, and must reach 13.
module tb_tbt_encoder;
  import tbt_pkg::*;

  localparam int N = 128;
  localparam int TAU [M] = '{72, 40, 16, 0};

  logic         clk = 1'b0, rst_n = 1'b1;
  logic         msg_valid = 1'b0;
  logic [R-1:0] msg = '0;
  logic         msg_ready, z_valid, z_last;
  logic [M-1:0] z;

  tbt_encoder dut (.clk, .rst_n, .msg_valid, .msg, .msg_ready, .z_valid, .z, .z_last);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  logic [R-1:0] u [N];
  logic [M-1:0] vr [N], zr [N];

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int f = 0; f < 4; f++) begin
      longint t_last, t_first;
      int k;
      for (int t = 0; t < N; t++) u[t] = R'($urandom);
      if (f == 1) u[N-1] = 2'b11;
      if (f == 2) u[N-1] = 2'b01;
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
      // idle gaps between message symbols must be tolerated
      for (int t = 0; t < N; t++) begin
        @(negedge clk);
        msg_valid = ($urandom % 5) != 0;
        msg = u[t];
        if (!msg_valid) begin
          @(negedge clk);
          msg_valid = 1'b1;
        end
        @(posedge clk);
        check(msg_ready, "msg_ready");
        if (t == N - 1) t_last = cyc;
      end
      @(negedge clk) msg_valid = 1'b0;
      k = 0;
      while (k < N) begin
        @(posedge clk);
        if (z_valid) begin
          if (k == 0) t_first = cyc;
          check(z == zr[k], $sformatf("frame %0d z(%0d)=%b exp %b", f, k, z, zr[k]));
          check(z_last == (k == N - 1), "z_last");
          k++;
        end
      end
      check(int'(t_first - t_last) == N + 1, $sformatf("latency %0d", t_first - t_last));
    end
    // minimum distance over short-support messages
    begin
      int wmin, n13;
      wmin = 1000; n13 = 0;
      for (int pat = 1; pat < 64; pat++) begin
        int pos, w, k;
        pos = (pat % 3 == 0) ? N - 2 : int'($urandom % N);
        for (int t = 0; t < N; t++) u[t] = '0;
        for (int i = 0; i < 3; i++) u[(pos + i) % N] = R'(pat >> (2*i));
        for (int t = 0; t < N; t++) begin
          @(negedge clk);
          msg_valid = 1'b1;
          msg = u[t];
          @(posedge clk);
        end
        @(negedge clk) msg_valid = 1'b0;
        k = 0; w = 0;
        while (k < N) begin
          @(posedge clk);
          if (z_valid) begin
            w += $countones(z);
            k++;
          end
        end
        if (w < wmin) wmin = w;
        if (w == 13) n13++;
        check(w >= 13, $sformatf("pattern %0d at %0d has weight %0d", pat, pos, w));
      end
      $display("minimum channel-word weight over short messages: %0d (%0d patterns at 13)", wmin, n13);
      check(wmin == 13, "minimum distance 13 reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
