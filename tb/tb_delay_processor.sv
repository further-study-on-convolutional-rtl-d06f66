// tb_delay_processor: writes random code words for a whole frame (default
// size, N = 128, delays 72/40/16/0) and reads every symbol back, checking
// s_j(t) = v_j((t - tau_j) mod N) with the delays written out here. Two
// frames are used so stale contents cannot pass.
module tb_delay_processor;
  import tbt_pkg::*;

  localparam int N = 128;
  localparam int TAU [M] = '{72, 40, 16, 0};

  logic         clk = 1'b0;
  logic         wr_en = 1'b0;
  logic [6:0]   wr_addr = '0, rd_addr = '0;
  logic [M-1:0] v = '0, s;

  delay_processor dut (.clk, .wr_en, .wr_addr, .v, .rd_addr, .s);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, wraps = 0;
  logic [M-1:0] vref [N];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int t = 0; t < N; t++) begin
        @(negedge clk);
        vref[t] = M'($urandom);
        wr_en = 1'b1; wr_addr = 7'(t); v = vref[t];
      end
      @(negedge clk) wr_en = 1'b0;
      for (int t = 0; t < N; t++) begin
        rd_addr = 7'(t);
        #1;
        for (int j = 0; j < M; j++) begin
          int src;
          src = t - TAU[j];
          if (src < 0) begin
            src += N;
            wraps++;
          end
          checks++;
          if (s[j] !== vref[src][j]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d level %0d", t, j + 1);
          end
        end
      end
    end
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
