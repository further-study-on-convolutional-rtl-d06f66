// tbt_encoder: encoder of the tail-biting trellis code T''.
//
// A frame is N = L*LAMBDA message symbols of R = 2 bits. The encoder of C
// is started in the state given by the last message symbol of the frame
// (tail-biting start: it then ends in the same state), the whole frame is
// encoded, the code bits go through the cyclic multilevel delay processor
// and each labelling s(t) is mapped to the channel symbol z(t) = s(t)*K1.
// No zero tail is appended, so N message symbols give N channel symbols
// (4N code bits; 512 for L=16, LAMBDA=8).
//
// The three phases run one after another, which is this design's choice:
//   LOAD  msg_ready=1; one symbol per cycle with msg_valid (N cycles).
//   ENC   N cycles; symbol t is encoded and written into the delay store.
//   OUT   N cycles; z_valid=1 and z = z(t), t = 0..N-1, z_last on t = N-1.
// The first z follows the last message symbol by N+1 cycles.
module tbt_encoder
  import tbt_pkg::*;
#(
  parameter int LAMBDA = 8,
  parameter int L      = 16,
  localparam int N     = L * LAMBDA,
  localparam int AW    = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         msg_valid,
  input  logic [R-1:0] msg,
  output logic         msg_ready,
  output logic         z_valid,
  output logic [M-1:0] z,
  output logic         z_last
);

  typedef enum logic [1:0] {S_LOAD, S_ENC, S_OUT} state_e;
  state_e        st;
  logic [AW-1:0] cnt;
  logic [R-1:0]  msg_buf [N];

  logic          enc_load, enc_en;
  logic [M-1:0]  v, s;
  logic [R-1:0]  enc_state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= S_LOAD;
      cnt <= '0;
    end else begin
      unique case (st)
        S_LOAD: if (msg_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) begin
            st  <= S_ENC;
            cnt <= '0;
          end
        end
        S_ENC: begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) begin
            st  <= S_OUT;
            cnt <= '0;
          end
        end
        S_OUT: begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) begin
            st  <= S_LOAD;
            cnt <= '0;
          end
        end
        default: st <= S_LOAD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == S_LOAD && msg_valid) msg_buf[cnt] <= msg;
  end

  // Tail-biting start: the last message symbol is the initial state.
  assign enc_load  = (st == S_LOAD) && msg_valid && (cnt == AW'(N - 1));
  assign enc_en    = (st == S_ENC);
  assign msg_ready = (st == S_LOAD);

  conv_encoder_c u_enc (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (enc_load),
    .init_u (msg),
    .en     (enc_en),
    .u      (msg_buf[cnt]),
    .v      (v),
    .state  (enc_state)
  );

  delay_processor #(.LAMBDA(LAMBDA), .L(L)) u_dp (
    .clk     (clk),
    .wr_en   (enc_en),
    .wr_addr (cnt),
    .v       (v),
    .rd_addr (cnt),
    .s       (s)
  );

  signal_mapper u_map (.s(s), .z(z));

  assign z_valid = (st == S_OUT);
  assign z_last  = (st == S_OUT) && (cnt == AW'(N - 1));

  // Tail-biting property: after the last symbol the encoder is back in the
  // state it was started in (the last message symbol).
  property p_tailbite;
    @(posedge clk) disable iff (!rst_n)
      (st == S_ENC && cnt == AW'(N - 1)) |=> (enc_state == msg_buf[N-1]);
  endproperty
  a_tailbite: assert property (p_tailbite);

endmodule
