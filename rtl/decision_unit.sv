// decision_unit - a-posteriori LLR, hard decision and extrinsic output.
//
// For trellis step k it adds, for every branch (s,u), the forward metric
// alpha_k(s), the branch metric bm[{u,par(s,u)}] and the backward metric
// beta_k+1(next(s,u)). The largest total over the u = 1 branches minus the
// largest over the u = 0 branches is the max-log a-posteriori LLR of bit k
// (positive = '1'); its sign is the decoded bit. Subtracting the systematic
// channel LLR and the a-priori input gives the extrinsic information passed
// to the other MAP decoder, saturated to 8 bits. Purely combinational.
module decision_unit
  import turbo_pkg::*;
(
  input  sm_vec_t   alpha,
  input  sm_vec_t   beta_next,
  input  bm_vec_t   bm,
  input  next_tab_t nxt,
  input  par_tab_t  par,
  input  llr_t      ls,
  input  ext_t      la,
  output app_t      llr,
  output ext_t      ext,
  output logic      hard
);
  app_t best [2];
  app_t t;

  always_comb begin
    best[0] = '0;
    best[1] = '0;
    for (int u = 0; u < 2; u++) begin
      for (int s = 0; s < NS; s++) begin
        t = app_t'(alpha[s]) + app_t'(bm[{u[0], par[s][u]}]) + app_t'(beta_next[nxt[s][u]]);
        if (s == 0 || t > best[u]) best[u] = t;
      end
    end
    llr  = best[1] - best[0];
    hard = (llr > 0);
    ext  = sat_ext(llr - app_t'(ls) - app_t'(la));
  end
endmodule
