// tb_decision_unit - a-posteriori LLR, hard decision and saturated
// extrinsic value for random metrics, against a direct max-log evaluation.
module tb_decision_unit;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  sm_vec_t alpha, beta_next;
  bm_vec_t bm;
  next_tab_t nxt;
  par_tab_t par;
  llr_t ls;
  ext_t la, ext;
  app_t llr;
  logic hard;
  int checks = 0, failures = 0, n_sat = 0;
  int unsigned seed = 32'h3141;

  decision_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++)
      for (int u = 0; u < 2; u++) begin
        nxt[s][u] = ref_next(3'(s), u[0]);
        par[s][u] = ref_par(3'(s), u[0]);
      end
    for (int n = 0; n < 3000; n++) begin
      int a [8], b [8], vls, vlp, vla, best [2], e_llr, e_ext;
      int range = (n % 3 == 0) ? 800 : 60;
      for (int s = 0; s < 8; s++) begin
        a[s] = int'(xs32(seed) % (2 * range + 1)) - range;
        b[s] = int'(xs32(seed) % (2 * range + 1)) - range;
        alpha[s] = sm_t'(a[s]); beta_next[s] = sm_t'(b[s]);
      end
      vls = int'(xs32(seed) % 15) - 7;
      vlp = int'(xs32(seed) % 15) - 7;
      vla = int'(xs32(seed) % 255) - 127;
      ls = llr_t'(vls); la = ext_t'(vla);
      bm[0] = '0; bm[1] = bm_t'(vlp); bm[2] = bm_t'(vls + vla); bm[3] = bm_t'(vls + vla + vlp);
      #1;
      best[0] = -1000000; best[1] = -1000000;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          int t;
          t = a[s] + u * (vls + vla) + int'(ref_par(3'(s), u[0])) * vlp + b[ref_next(3'(s), u[0])];
          if (t > best[u]) best[u] = t;
        end
      e_llr = best[1] - best[0];
      e_ext = e_llr - vls - vla;
      if (e_ext > 127) begin e_ext = 127; n_sat++; end
      if (e_ext < -127) begin e_ext = -127; n_sat++; end
      checks++;
      if (int'(llr) != e_llr || hard != (e_llr > 0) || int'(ext) != e_ext) begin
        failures++;
        $display("FAIL n=%0d llr=%0d exp %0d ext=%0d exp %0d hard=%0d", n, llr, e_llr, ext, e_ext, hard);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
