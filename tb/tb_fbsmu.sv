// tb_fbsmu - forward and backward state metric units over random branch
// metric sequences, against a reference recursion in plain integers (no
// renormalisation). The units renormalise against state 0, so the checked
// quantity is each state's metric minus that of state 0.
module tb_fbsmu;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, init = 0, step = 0;
  sm_vec_t init_sm, sm_f, sm_b;
  bm_vec_t bm;
  next_tab_t nxt;
  par_tab_t par;
  int checks = 0, failures = 0;
  int unsigned seed = 32'hABCD;

  always #5 clk = ~clk;

  fbsmu #(.DIR(SMU_FWD)) dut_f (.clk, .rst, .init, .init_sm, .step, .bm, .nxt, .par, .sm(sm_f));
  fbsmu #(.DIR(SMU_BWD)) dut_b (.clk, .rst, .init, .init_sm, .step, .bm, .nxt, .par, .sm(sm_b));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ra [8], rb [8], na [8], nb [8];
    for (int s = 0; s < 8; s++)
      for (int u = 0; u < 2; u++) begin
        nxt[s][u] = ref_next(3'(s), u[0]);
        par[s][u] = ref_par(3'(s), u[0]);
      end
    for (int s = 0; s < 8; s++) init_sm[s] = (s == 0) ? '0 : SM_NEG;
    for (int up = 0; up < 4; up++) bm[up] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int blk = 0; blk < 20; blk++) begin
      @(negedge clk);
      init = 1;
      @(negedge clk);
      init = 0;
      for (int s = 0; s < 8; s++) begin ra[s] = (s == 0) ? 0 : -1024; rb[s] = ra[s]; end
      for (int k = 0; k < 60; k++) begin
        int ls, lp, la;
        ls = int'(xs32(seed) % 15) - 7;
        lp = int'(xs32(seed) % 15) - 7;
        la = int'(xs32(seed) % 255) - 127;
        bm[0] = '0; bm[1] = bm_t'(lp); bm[2] = bm_t'(ls + la); bm[3] = bm_t'(ls + la + lp);
        step = (xs32(seed) % 6) != 0;
        if (step) begin
          for (int s = 0; s < 8; s++) begin na[s] = -1000000; nb[s] = -1000000; end
          for (int s = 0; s < 8; s++)
            for (int u = 0; u < 2; u++) begin
              int g, t;
              g = u * (ls + la) + int'(ref_par(3'(s), u[0])) * lp;
              t = ra[s] + g;
              if (t > na[ref_next(3'(s), u[0])]) na[ref_next(3'(s), u[0])] = t;
              t = rb[ref_next(3'(s), u[0])] + g;
              if (t > nb[s]) nb[s] = t;
            end
          ra = na; rb = nb;
        end
        @(negedge clk);
        step = 0;
        for (int s = 0; s < 8; s++) begin
          checks += 2;
          if (int'(sm_f[s]) - int'(sm_f[0]) != ra[s] - ra[0]) begin
            failures++;
            $display("FAIL fwd blk %0d step %0d state %0d: %0d exp %0d", blk, k, s,
                     int'(sm_f[s]) - int'(sm_f[0]), ra[s] - ra[0]);
          end
          if (int'(sm_b[s]) - int'(sm_b[0]) != rb[s] - rb[0]) begin
            failures++;
            $display("FAIL bwd blk %0d step %0d state %0d: %0d exp %0d", blk, k, s,
                     int'(sm_b[s]) - int'(sm_b[0]), rb[s] - rb[0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
