// tb_max_star_tree: compares the 8-input max* tree with 8*ln(sum exp(a/8))
// computed in floating point, for random metrics of small and large
// spread, for equal inputs (where the correction is largest) and with
// inputs masked by a large negative value. The tolerance of 3 units covers
// the rounding of the table at the three tree levels.
module tb_max_star_tree;
  import tbt_pkg::*;

  localparam int N = 8;
  met_t a [N];
  met_t y;

  max_star_tree #(.N(N)) dut (.a, .y);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_it(input string what);
    real s, r;
    #1;
    s = 0.0;
    for (int k = 0; k < N; k++) s += $exp(real'(a[k]) / 8.0);
    r = 8.0 * $ln(s);
    checks++;
    if (real'(y) > r + 3.0 || real'(y) < r - 3.0) begin
      failures++;
      if (failures < 10) $display("FAIL %s: y=%0d ref=%0.2f", what, y, r);
    end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      int spread;
      spread = (n % 3 == 0) ? 8 : (n % 3 == 1) ? 40 : 400;
      for (int k = 0; k < N; k++) a[k] = met_t'(int'($urandom % (2*spread+1)) - spread);
      try_it("random");
    end
    for (int v = -200; v <= 200; v += 25) begin
      for (int k = 0; k < N; k++) a[k] = met_t'(v);
      try_it("equal");
      for (int k = 1; k < N; k++) a[k] = met_t'(-4096);
      try_it("masked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
