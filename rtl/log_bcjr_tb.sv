// log_bcjr_tb: sliding-window Log-BCJR (Log-MAP) decoder of code C on its
// tail-biting (circular) trellis.
//
// The trellis of C has 4 states (the previous message symbol) and is fully
// connected: from every state each of the 4 input symbols u leads to state
// u, with code bits v = conv_out(state, u). The branch metric of step t is
//   gamma_t(s,u) = 1/2 sum_j (2 v_j - 1) Lin(v_j(t)),
// where Lin are the intrinsic LLRs of the code bits (the demapper's
// extrinsic values). The recursions use max*; for every step
//   Lext(v_j) = max*_{v_j=1}(alpha+gamma+beta) - max*_{v_j=0}(...) - Lin(v_j)
// and each message bit is decided from the sign of its a posteriori LLR.
//
// The frame is processed in windows of LAMBDA symbols. The forward
// recursion runs continuously round the circle; it is first trained over
// the WARM symbols that precede symbol 0 on the circle (the frame end),
// from equal metrics. For each window: the forward recursion crosses it
// and stores its alphas (LAMBDA entries); a backward recursion is trained
// over the WARM symbols after the window (wrapping to the frame start for
// the last window) from equal metrics; the backward recursion then crosses
// the window and the results are written. So the results of a window are
// ready 3*LAMBDA cycles after it is entered and only one window of alphas
// is kept. Metrics are renormalised every step by subtracting the metric of
// state 0. The sliding-window Log-BCJR on the circular trellis with a
// window of LAMBDA symbols follows the reference method; the serial
// three-phase schedule per window, the training length WARM and all word
// widths are this design's own.
//
// Interface/timing: a start pulse begins one pass over the frame held by
// the parent. The module reads Lin through rd_addr/lin (lin must follow
// rd_addr combinationally) and writes results through wr_en/wr_addr/ext/
// u_hat, window by window (increasing windows, decreasing t inside one).
// One trellis step per cycle: a pass takes WARM + 3*N cycles, then done
// pulses for one cycle.
module log_bcjr_tb
  import tbt_pkg::*;
#(
  parameter int LAMBDA = 8,
  parameter int L      = 16,
  parameter int WARM   = LAMBDA,
  localparam int N     = L * LAMBDA,
  localparam int AW    = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] rd_addr,
  input  llr_t          lin [M],
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output llr_t          ext [M],
  output logic [R-1:0]  u_hat
);

  localparam int NB  = NSTATE * NSTATE;     // branches per step
  localparam met_t NEG = met_t'(-(2**(MET_W-2)));

  localparam int CW  = $clog2((WARM > LAMBDA ? WARM : LAMBDA) + 1);

  typedef enum logic [2:0] {S_IDLE, S_FWARM, S_FWD, S_BTRAIN, S_BWD} state_e;
  state_e        st;
  logic [AW-1:0] t;       // trellis step addressed in this cycle
  logic [CW-1:0] c;       // position inside the current phase
  logic [AW-1:0] wbase;   // first symbol of the current window
  logic          last_w;  // current window is the last of the frame

  met_t alpha_q [NSTATE];
  met_t beta_q  [NSTATE];
  met_t alpha_win [LAMBDA][NSTATE];   // alphas of the current window

  // (a + b) mod N for a, b < N
  function automatic logic [AW-1:0] add_mod(input int a, input int b);
    int x;
    x = a + b;
    if (x >= N) x -= N;
    return AW'(x);
  endfunction

  met_t gamma   [NSTATE][NSTATE];  // [state][input]
  met_t a_in    [NSTATE][NSTATE];  // forward candidates [next][prev]
  met_t b_in    [NSTATE][NSTATE];  // backward candidates [state][next]
  met_t a_new   [NSTATE];
  met_t b_new   [NSTATE];
  met_t lam     [NB];              // alpha + gamma + beta, branch s*4+u
  met_t v_in1   [M][NB];
  met_t v_in0   [M][NB];
  met_t u_in1   [R][NB];
  met_t u_in0   [R][NB];
  met_t v_mx1 [M], v_mx0 [M], u_mx1 [R], u_mx0 [R];
  met_t alpha_t [NSTATE];

  // step of the current phase
  always_comb begin
    unique case (st)
      S_FWARM:  t = add_mod(N - WARM, int'(c));
      S_FWD:    t = add_mod(int'(wbase), int'(c));
      S_BTRAIN: t = add_mod(int'(wbase), LAMBDA + WARM - 1 - int'(c));
      S_BWD:    t = add_mod(int'(wbase), LAMBDA - 1 - int'(c));
      default:  t = '0;
    endcase
  end

  assign last_w  = (int'(wbase) == N - LAMBDA);
  assign rd_addr = t;

  // branch metrics
  always_comb begin
    for (int s = 0; s < NSTATE; s++)
      for (int u = 0; u < NSTATE; u++) begin
        logic [M-1:0] v;
        v = conv_out(R'(s), R'(u));
        gamma[s][u] = '0;
        for (int j = 0; j < M; j++)
          gamma[s][u] += v[j] ? met_t'(lin[j]) : -met_t'(lin[j]);
      end
  end

  // recursion candidates
  always_comb begin
    for (int s = 0; s < NSTATE; s++)
      for (int u = 0; u < NSTATE; u++) begin
        a_in[u][s] = alpha_q[s] + gamma[s][u];
        b_in[s][u] = beta_q[u]  + gamma[s][u];
      end
  end

  for (genvar k = 0; k < NSTATE; k++) begin : g_rec
    max_star_tree #(.N(NSTATE)) u_a (.a(a_in[k]), .y(a_new[k]));
    max_star_tree #(.N(NSTATE)) u_b (.a(b_in[k]), .y(b_new[k]));
  end

  // a posteriori branch metrics of step t (alpha_t from memory, beta_{t+1})
  always_comb begin
    alpha_t = alpha_win[LAMBDA - 1 - int'(c)];
    for (int s = 0; s < NSTATE; s++)
      for (int u = 0; u < NSTATE; u++)
        lam[s*NSTATE+u] = alpha_t[s] + gamma[s][u] + beta_q[u];
    for (int b = 0; b < NB; b++) begin
      logic [M-1:0] v;
      logic [R-1:0] ub;
      ub = R'(b % NSTATE);
      v  = conv_out(R'(b / NSTATE), ub);
      for (int j = 0; j < M; j++) begin
        v_in1[j][b] = v[j] ? lam[b] : NEG;
        v_in0[j][b] = v[j] ? NEG : lam[b];
      end
      for (int i = 0; i < R; i++) begin
        u_in1[i][b] = ub[i] ? lam[b] : NEG;
        u_in0[i][b] = ub[i] ? NEG : lam[b];
      end
    end
  end

  for (genvar j = 0; j < M; j++) begin : g_vout
    max_star_tree #(.N(NB)) u_1 (.a(v_in1[j]), .y(v_mx1[j]));
    max_star_tree #(.N(NB)) u_0 (.a(v_in0[j]), .y(v_mx0[j]));
    met_t d;
    assign d      = (v_mx1[j] - v_mx0[j]) >>> 1;
    assign ext[j] = sat_llr(d - met_t'(lin[j]));
  end

  for (genvar i = 0; i < R; i++) begin : g_uout
    max_star_tree #(.N(NB)) u_1 (.a(u_in1[i]), .y(u_mx1[i]));
    max_star_tree #(.N(NB)) u_0 (.a(u_in0[i]), .y(u_mx0[i]));
    assign u_hat[i] = (u_mx1[i] > u_mx0[i]);
  end

  assign wr_en   = (st == S_BWD);
  assign wr_addr = t;
  assign busy    = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      c     <= '0;
      wbase <= '0;
      done  <= 1'b0;
      for (int k = 0; k < NSTATE; k++) begin
        alpha_q[k] <= '0;
        beta_q[k]  <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st    <= (WARM > 0) ? S_FWARM : S_FWD;
          c     <= '0;
          wbase <= '0;
          for (int k = 0; k < NSTATE; k++) alpha_q[k] <= '0;
        end
        S_FWARM: begin
          for (int k = 0; k < NSTATE; k++) alpha_q[k] <= a_new[k] - a_new[0];
          c <= c + 1'b1;
          if (int'(c) == WARM - 1) begin
            st <= S_FWD;
            c  <= '0;
          end
        end
        S_FWD: begin
          for (int k = 0; k < NSTATE; k++) alpha_q[k] <= a_new[k] - a_new[0];
          c <= c + 1'b1;
          if (int'(c) == LAMBDA - 1) begin
            st <= (WARM > 0) ? S_BTRAIN : S_BWD;
            c  <= '0;
            for (int k = 0; k < NSTATE; k++) beta_q[k] <= '0;
          end
        end
        S_BTRAIN: begin
          for (int k = 0; k < NSTATE; k++) beta_q[k] <= b_new[k] - b_new[0];
          c <= c + 1'b1;
          if (int'(c) == WARM - 1) begin
            st <= S_BWD;
            c  <= '0;
          end
        end
        S_BWD: begin
          for (int k = 0; k < NSTATE; k++) beta_q[k] <= b_new[k] - b_new[0];
          c <= c + 1'b1;
          if (int'(c) == LAMBDA - 1) begin
            c <= '0;
            if (last_w) begin
              st   <= S_IDLE;
              done <= 1'b1;
            end else begin
              st    <= S_FWD;
              wbase <= add_mod(int'(wbase), LAMBDA);
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == S_FWD) alpha_win[int'(c)] <= alpha_q;
  end

  // the window and its training must fit in the frame
  initial assert (LAMBDA + WARM <= N && N % LAMBDA == 0)
    else $error("log_bcjr_tb: frame must hold a window and its training");

endmodule
