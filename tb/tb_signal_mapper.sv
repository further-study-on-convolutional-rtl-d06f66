// tb_signal_mapper: exhaustive check of the K1 labelling. For all 16
// labellings z must be (s1+s2+s3+s4, s2+s3+s4, s3+s4, s4); flipping only
// s_j must change exactly j bits of z (level distances 1,2,3,4), and the
// mapping must be one-to-one.
module tb_signal_mapper;
  import tbt_pkg::*;

  logic [M-1:0] s, z;
  signal_mapper dut (.s, .z);

  int checks = 0, failures = 0;
  logic [M-1:0] img [16];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      logic [M-1:0] e;
      s = M'(x);
      #1;
      e = {s[3], s[3]^s[2], s[3]^s[2]^s[1], ^s};
      img[x] = z;
      checks++;
      if (z !== e) begin
        failures++;
        $display("FAIL s=%b z=%b exp=%b", s, z, e);
      end
    end
    for (int x = 0; x < 16; x++)
      for (int j = 0; j < M; j++) begin
        checks++;
        if ($countones(img[x] ^ img[x ^ (1 << j)]) != j + 1) begin
          failures++;
          $display("FAIL distance of level %0d at s=%b", j + 1, x[3:0]);
        end
      end
    for (int x = 0; x < 16; x++)
      for (int y = x + 1; y < 16; y++) begin
        checks++;
        if (img[x] == img[y]) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
