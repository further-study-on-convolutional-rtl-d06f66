// tb_conv_encoder_c: checks the rate 2/4 encoder of C against the code
// equations written out by hand from G_c^1 = (3 0 1 3 ; 0 3 3 2):
//   v1 = u1+u1', v2 = u2+u2', v3 = u1+u2+u2', v4 = u1+u1'+u2'
// (u' = previous symbol), over random input streams, with state loads
// (tail-biting start) in between and the state checked every cycle.
module tb_conv_encoder_c;
  import tbt_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b1;
  logic         load = 1'b0, en = 1'b0;
  logic [R-1:0] init_u = '0, u = '0;
  logic [M-1:0] v;
  logic [R-1:0] state;

  conv_encoder_c dut (.clk, .rst_n, .load, .init_u, .en, .u, .v, .state);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // falling edge applies the asynchronous reset
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [R-1:0] prev;
    logic [M-1:0] exp_v;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    prev = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      load   = ($urandom % 50) == 0;
      en     = ($urandom % 4) != 0;
      init_u = R'($urandom);
      u      = R'($urandom);
      #1;
      exp_v = {u[0]^prev[0]^prev[1], u[0]^u[1]^prev[1], u[1]^prev[1], u[0]^prev[0]};
      checks++;
      if (v !== exp_v || state !== prev) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d u=%b prev=%b v=%b exp=%b", n, u, prev, v, exp_v);
      end
      if (load) prev = init_u;
      else if (en) prev = u;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
