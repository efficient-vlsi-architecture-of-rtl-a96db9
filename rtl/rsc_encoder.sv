// rsc_encoder - LTE constituent encoder (recursive systematic convolutional
// code, feedback g0 = 1 + D^2 + D^3, parity g1 = 1 + D + D^3).
//
// The three-bit shift register starts in the all-zero state (clear, or
// reset). Each cycle with en = 1 it takes bit u and moves one trellis step.
// The outputs sys (the sent systematic bit) and par (the parity bit) are
// combinational from the current state and u, valid in the same cycle as u.
// With term = 1 the input switch is in termination position (position B of
// the LTE encoder drawing): the input is the register feedback, so three
// such steps return the register to zero and the three (sys, par) pairs are
// the tail bits. The trellis step itself is the trellis_gen block.
// Reset is asynchronous and active high; clear is synchronous.
module rsc_encoder
  import turbo_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic clear,
  input  logic en,
  input  logic term,
  input  logic u,
  output logic sys,
  output logic par,
  output state_t state
);
  state_t next_state;

  trellis_gen u_step (
    .state(state), .u(u), .term(term),
    .next_state(next_state), .parity(par), .sys(sys)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        state <= '0;
    else if (clear) state <= '0;
    else if (en)    state <= next_state;
  end
endmodule
