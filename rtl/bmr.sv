// bmr - branch metric calculation and routing.
//
// For one trellis step it forms the log-domain metric of each of the four
// (systematic u, parity p) label combinations:
//     bm[{u,p}] = u * (Ls + La) + p * Lp
// where Ls is the channel LLR of the systematic bit, La the a-priori LLR
// (extrinsic information from the other MAP decoder) and Lp the channel LLR
// of the parity bit, all positive for '1'. This differs from the symmetric
// form (+-(Ls+La) +- Lp)/2 only by a constant per step, which cancels in the
// max-log-MAP recursions and in the decision. The state metric units route
// bm[{u, parity(s,u)}] to each trellis branch. Purely combinational.
module bmr
  import turbo_pkg::*;
(
  input  llr_t    ls,
  input  llr_t    lp,
  input  ext_t    la,
  output bm_vec_t bm
);
  bm_t su, pp;
  always_comb begin
    su = bm_t'(ls) + bm_t'(la);
    pp = bm_t'(lp);
    bm[0] = '0;
    bm[1] = pp;
    bm[2] = su;
    bm[3] = su + pp;
  end
endmodule
