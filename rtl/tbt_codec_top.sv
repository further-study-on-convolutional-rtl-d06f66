// tbt_codec_top: encoder and iterative decoder of the tail-biting trellis
// code T'' (rate 2/4 code C, 4-level delay processor, K1 signal mapper).
//
// The two halves stand side by side with their own ports: the channel
// (antipodal modulation, noise and LLR computation) lies outside, between
// z of the encoder and ch of the decoder. Defaults give a frame of
// L*LAMBDA = 128 symbols: 256 message bits, 512 code bits, decoded with 6
// iterations.
//
// Encoder: msg/msg_valid/msg_ready in, z/z_valid/z_last out (see
// tbt_encoder). Decoder: ch/ch_valid/ch_ready in, u_hat/u_valid/u_last and
// iter_done out (see tbt_decoder).
module tbt_codec_top
  import tbt_pkg::*;
#(
  parameter int LAMBDA = 8,
  parameter int L      = 16,
  parameter int ITER   = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  // encoder
  input  logic         msg_valid,
  input  logic [R-1:0] msg,
  output logic         msg_ready,
  output logic         z_valid,
  output logic [M-1:0] z,
  output logic         z_last,
  // decoder
  input  logic         ch_valid,
  input  ch_llr_t      ch [M],
  output logic         ch_ready,
  output logic         u_valid,
  output logic [R-1:0] u_hat,
  output logic         u_last,
  output logic         iter_done
);

  tbt_encoder #(.LAMBDA(LAMBDA), .L(L)) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .msg_valid (msg_valid),
    .msg       (msg),
    .msg_ready (msg_ready),
    .z_valid   (z_valid),
    .z         (z),
    .z_last    (z_last)
  );

  tbt_decoder #(.LAMBDA(LAMBDA), .L(L), .ITER(ITER)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .ch_valid  (ch_valid),
    .ch        (ch),
    .ch_ready  (ch_ready),
    .u_valid   (u_valid),
    .u_hat     (u_hat),
    .u_last    (u_last),
    .iter_done (iter_done)
  );

endmodule
