// tbt_decoder: iterative suboptimal decoder of the tail-biting code T''.
//
// Two soft-in/soft-out units exchange extrinsic LLRs: the demapper, which
// works on one channel symbol z(t) (labelling s(t)) at a time, and the
// Log-BCJR decoder of C, which works on the code bits v(t) of C over the
// circular trellis. Between them sits the delay processor in address form:
// labelling bit s_j(t) is code bit v_j((t - tau_j) mod N), so each level's
// LLR memory is simply read and written at a rotated address, and no
// interleaver is used. One iteration is
//   DEMAP  for t = 0..N-1: La(s_j(t)) = Lext_C(v_j(t-tau_j)) (zero in the
//          first iteration); Le(s_j(t)) is stored as Lin(v_j(t-tau_j));
//   BCJR   one sliding-window Log-BCJR pass over Lin (windows of LAMBDA
//          symbols), which stores Lext_C and the message
//          decisions.
// After ITER iterations (6 by default, the count used in the reference
// evaluation) the decisions are sent out. The iteration structure follows
// the reference method; the block-serial schedule (demapper pass, then
// decoder pass, over the whole frame) is this design's own.
//
// Interface/timing: LOAD takes the N channel symbols, one per cycle with
// ch_valid while ch_ready (ch = LLRs of z1..z4, positive means 1). Each
// iteration takes 4*N + WARM + 2 cycles. Then u_valid is high for N
// cycles carrying u_hat(0..N-1), with u_last on the final one; iter_done
// pulses at the end of every iteration.
module tbt_decoder
  import tbt_pkg::*;
#(
  parameter int LAMBDA = 8,
  parameter int L      = 16,
  parameter int ITER   = 6,
  parameter int WARM   = LAMBDA,
  localparam int N     = L * LAMBDA,
  localparam int AW    = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ch_valid,
  input  ch_llr_t      ch [M],
  output logic         ch_ready,
  output logic         u_valid,
  output logic [R-1:0] u_hat,
  output logic         u_last,
  output logic         iter_done
);

  typedef enum logic [2:0] {S_LOAD, S_DEMAP, S_BSTART, S_BWAIT, S_OUT} state_e;
  state_e        st;
  logic [AW-1:0] t;
  logic [$clog2(ITER+1)-1:0] it;

  ch_llr_t      ch_mem  [N][M];
  llr_t         lin_mem [M][N];
  llr_t         ext_mem [M][N];
  logic [R-1:0] u_mem   [N];

  // (t - tau_j) mod N
  function automatic logic [AW-1:0] rot(input logic [AW-1:0] a, input int tau);
    int x;
    x = int'(a) - tau;
    if (x < 0) x += N;
    return AW'(x);
  endfunction

  // demapper side
  logic [AW-1:0] dm_addr [M];
  llr_t          dm_la   [M];
  llr_t          dm_le   [M];

  always_comb begin
    for (int j = 0; j < M; j++) begin
      dm_addr[j] = rot(t, TAU_MULT[j] * LAMBDA);
      dm_la[j]   = (it == '0) ? llr_t'(0) : ext_mem[j][dm_addr[j]];
    end
  end

  demapper u_demap (.ch(ch_mem[t]), .la(dm_la), .lapp(), .le(dm_le));

  // decoder of C side
  logic          bc_start, bc_busy, bc_done, bc_wr;
  logic [AW-1:0] bc_rd, bc_wa;
  llr_t          bc_lin [M];
  llr_t          bc_ext [M];
  logic [R-1:0]  bc_u;

  always_comb
    for (int j = 0; j < M; j++) bc_lin[j] = lin_mem[j][bc_rd];

  log_bcjr_tb #(.LAMBDA(LAMBDA), .L(L), .WARM(WARM)) u_bcjr (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (bc_start),
    .busy    (bc_busy),
    .done    (bc_done),
    .rd_addr (bc_rd),
    .lin     (bc_lin),
    .wr_en   (bc_wr),
    .wr_addr (bc_wa),
    .ext     (bc_ext),
    .u_hat   (bc_u)
  );

  assign bc_start = (st == S_BSTART);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_LOAD;
      t         <= '0;
      it        <= '0;
      iter_done <= 1'b0;
    end else begin
      iter_done <= 1'b0;
      unique case (st)
        S_LOAD: if (ch_valid) begin
          t <= t + 1'b1;
          if (t == AW'(N - 1)) begin
            st <= S_DEMAP;
            it <= '0;
            t  <= '0;
          end
        end
        S_DEMAP: begin
          t <= t + 1'b1;
          if (t == AW'(N - 1)) begin
            st <= S_BSTART;
            t  <= '0;
          end
        end
        S_BSTART: st <= S_BWAIT;
        S_BWAIT: if (bc_done) begin
          iter_done <= 1'b1;
          t         <= '0;
          if (int'(it) == ITER - 1) st <= S_OUT;
          else begin
            it <= it + 1'b1;
            st <= S_DEMAP;
          end
        end
        S_OUT: begin
          t <= t + 1'b1;
          if (t == AW'(N - 1)) begin
            st <= S_LOAD;
            t  <= '0;
          end
        end
        default: st <= S_LOAD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == S_LOAD && ch_valid) ch_mem[t] <= ch;
    if (st == S_DEMAP)
      for (int j = 0; j < M; j++) lin_mem[j][dm_addr[j]] <= dm_le[j];
    if (bc_wr) begin
      for (int j = 0; j < M; j++) ext_mem[j][bc_wa] <= bc_ext[j];
      u_mem[bc_wa] <= bc_u;
    end
  end

  assign ch_ready = (st == S_LOAD);
  assign u_valid  = (st == S_OUT);
  assign u_hat    = u_mem[t];
  assign u_last   = (st == S_OUT) && (t == AW'(N - 1));

  // the decoder of C is only started when idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 bc_start |-> !bc_busy);

endmodule
