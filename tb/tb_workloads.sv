// tb_workloads: the two code sizes evaluated for this code, Example 1(a)
// (LAMBDA=8, L=16: 512 code bits, the default) and Example 1(b)
// (LAMBDA=16, L=16: 1024 code bits), run side by side through the top
// level over AWGN (2, 2.5, 3 dB) and Rayleigh fading (4, 5 dB). Each
// point must decode below the uncoded BER, and every encoded symbol is
// checked against a reference encoder.
module tb_workloads;
  logic done_a, done_b;
  int   chk_a, chk_b, fail_a, fail_b;

  wl_harness #(.LAMBDA(8),  .L(16), .FRAMES(200)) ex1a (.done(done_a), .checks(chk_a), .failures(fail_a));
  wl_harness #(.LAMBDA(16), .L(16), .FRAMES(100)) ex1b (.done(done_b), .checks(chk_b), .failures(fail_b));

  initial begin
    #50ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b, fail_a + fail_b + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done_a && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b, fail_a + fail_b);
    $finish;
  end
endmodule
