// delay_processor: multilevel delay processor of the tail-biting code T''.
//
// Level j of the code word of C is delayed by tau_j = TAU_MULT[j]*LAMBDA
// symbols, cyclically within a frame of N = L*LAMBDA symbols:
//   s_j(t) = v_j((t - tau_j) mod N),   i.e.  v_j(t) = s_j((t + tau_j) mod N).
// The cyclic delay is what keeps the code tail-biting: the delay cells end
// a frame holding what they started it with. The delays (9,5,2,0)*lambda
// are those of the reference example; the frame store realising them is
// this design's choice.
//
// It is built as one N x 1 memory per level. The code word is written one
// symbol per cycle (wr_en, wr_addr = t, v); the labelling of any symbol t is
// read combinationally at rd_addr = t, each level at its own rotated address.
module delay_processor
  import tbt_pkg::*;
#(
  parameter int LAMBDA = 8,
  parameter int L      = 16,
  localparam int N     = L * LAMBDA,
  localparam int AW    = $clog2(N)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [M-1:0]  v,
  input  logic [AW-1:0] rd_addr,
  output logic [M-1:0]  s
);

  logic mem [M][N];

  // (t - tau) mod N for a level delay tau < N
  function automatic logic [AW-1:0] rot(input logic [AW-1:0] t, input int tau);
    int a;
    a = int'(t) - tau;
    if (a < 0) a += N;
    return AW'(a);
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int j = 0; j < M; j++) mem[j][wr_addr] <= v[j];
  end

  always_comb begin
    for (int j = 0; j < M; j++)
      s[j] = mem[j][rot(rd_addr, TAU_MULT[j] * LAMBDA)];
  end

endmodule
