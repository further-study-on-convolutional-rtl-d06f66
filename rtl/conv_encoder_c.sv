// conv_encoder_c: encoder of the rate 2/4, 4-state convolutional code C.
//
// Each message symbol u(t) = (u1,u2) gives four code bits v(t) through the
// generator matrix G_c^1 = (3 0 1 3 ; 0 3 3 2), whose entries are read as
// polynomials in D with bit 0 the coefficient of D^0 (so 3 = 1+D, 2 = D):
//   v1 = u1 + u1(t-1)          v3 = u1 + u2 + u2(t-1)
//   v2 = u2 + u2(t-1)          v4 = u1 + u1(t-1) + u2(t-1)
// The state is the previous symbol (one delay cell per input, nu = 2).
// For tail-biting encoding the state can be loaded with any symbol (the
// last symbol of the frame), so the encoder ends in the state it started.
//
// Interface/timing: v is combinational from the current state and u; on a
// cycle with en the state takes u; load (priority over en) writes init_u.
// Reset clears the state (zero-tail start), a choice of this design.
module conv_encoder_c
  import tbt_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [R-1:0] init_u,
  input  logic         en,
  input  logic [R-1:0] u,
  output logic [M-1:0] v,
  output logic [R-1:0] state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= '0;
    else if (load) state <= init_u;
    else if (en)   state <= u;
  end

  always_comb v = conv_out(state, u);

endmodule
