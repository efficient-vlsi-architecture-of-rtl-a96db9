// acs - add-compare-select.
//
// Adds a branch metric to each of two candidate state metrics, subtracts the
// two sums and uses the sign of the difference as the select line of a
// multiplexer that passes the larger sum (max-log-MAP). sel = 1 means the
// second candidate won. Purely combinational; widths are chosen in
// turbo_pkg so that the sums of normalised metrics cannot overflow.
module acs
  import turbo_pkg::*;
(
  input  sm_t  m0,
  input  bm_t  b0,
  input  sm_t  m1,
  input  bm_t  b1,
  output sm_t  m_out,
  output logic sel
);
  sm_t s0, s1;
  logic signed [SM_W:0] diff;   // one bit wider: the sign never wraps
  always_comb begin
    s0    = m0 + sm_t'(b0);
    s1    = m1 + sm_t'(b1);
    diff  = (SM_W + 1)'(s0) - (SM_W + 1)'(s1);
    sel   = diff[SM_W];
    m_out = sel ? s1 : s0;
  end
endmodule
