// trellis_gen - one step of the constituent code trellis.
//
// Given the encoder state and an input bit it returns the next state, the
// parity bit and the systematic bit that is sent. The generator polynomials
// are parameters, defaulting to the LTE code (feedback 1 + D^2 + D^3, parity
// 1 + D + D^3). With term = 1 the input switch is in its termination
// position: the encoder input is the feedback value itself, so the register
// is fed with 0 and the sent systematic bit is that feedback value.
//
// The constituent encoder uses one instance for its single register; the
// MAP decoder uses 16 instances (every state, both inputs) to build the
// next-state and parity tables of its trellis. Purely combinational.
module trellis_gen
  import turbo_pkg::*;
#(
  parameter logic [3:0] FB_POLY  = G0_POLY,
  parameter logic [3:0] PAR_POLY = G1_POLY
) (
  input  state_t state,
  input  logic   u,
  input  logic   term,
  output state_t next_state,
  output logic   parity,
  output logic   sys
);
  logic [3:1] r;      // r[i] = input delayed by i cycles
  logic       fb;     // feedback taps of the register
  logic       a;      // value entering the first register

  always_comb begin
    r = {state[0], state[1], state[2]};
    fb = 1'b0;
    for (int i = 1; i <= 3; i++) fb ^= FB_POLY[i] & r[i];
    sys = term ? fb : u;
    a   = sys ^ fb;
    parity = PAR_POLY[0] & a;
    for (int i = 1; i <= 3; i++) parity ^= PAR_POLY[i] & r[i];
    next_state = {a, r[1], r[2]};
  end
endmodule
