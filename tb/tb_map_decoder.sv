// tb_map_decoder - one max-log-MAP decoder over random blocks of channel
// and a-priori LLRs (K from 40 to 64 plus 3 termination steps), against a
// reference max-log-MAP in plain integers with true minus-infinity start
// metrics. Every output (a-posteriori LLR, extrinsic value, hard decision,
// index) must match exactly. With continuous input the block must take
// 3K+8 cycles from start to done; one block is fed with gaps in in_valid.
module tb_map_decoder;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  localparam int KMAX = 64;
  localparam int KW   = $clog2(KMAX + 4);
  localparam int NEG  = -1000000;

  logic clk = 0, rst = 1, srst = 0, start = 0, in_valid = 0;
  logic [KW-1:0] blk_len = '0, out_idx;
  llr_t in_ls = '0, in_lp = '0;
  ext_t in_la = '0, out_ext;
  app_t out_llr;
  logic busy, out_valid, out_hard, done;
  int checks = 0, failures = 0;
  int unsigned seed = 32'h600D;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  map_decoder #(.KMAX(KMAX)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ls [KMAX + 3], lp [KMAX + 3], la [KMAX + 3];
  int e_llr [KMAX];
  int n_out;
  int got_errs;

  always @(posedge clk) begin
    if (out_valid && !rst) begin
      int e_ext;
      e_ext = e_llr[out_idx] - ls[out_idx] - la[out_idx];
      if (e_ext > 127) e_ext = 127;
      if (e_ext < -127) e_ext = -127;
      checks++;
      if (int'(out_idx) != n_out || int'(out_llr) != e_llr[out_idx] ||
          int'(out_ext) != e_ext || out_hard != (e_llr[out_idx] > 0)) begin
        failures++;
        $display("FAIL idx %0d (exp %0d): llr %0d exp %0d, ext %0d exp %0d", out_idx, n_out,
                 out_llr, e_llr[out_idx], out_ext, e_ext);
      end
      n_out <= n_out + 1;
    end
  end

  task automatic reference(int k);
    int al [KMAX + 4][8], be [KMAX + 4][8];
    for (int s = 0; s < 8; s++) begin
      al[0][s] = (s == 0) ? 0 : NEG;
      be[k + 3][s] = (s == 0) ? 0 : NEG;
    end
    for (int t = 0; t < k + 3; t++) begin
      for (int s = 0; s < 8; s++) al[t + 1][s] = NEG;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          int g, v;
          bit [2:0] ns;
          ns = ref_next(3'(s), u[0]);
          g = u * (ls[t] + la[t]) + int'(ref_par(3'(s), u[0])) * lp[t];
          v = al[t][s] + g;
          if (al[t][s] > NEG / 2 && v > al[t + 1][ns]) al[t + 1][ns] = v;
        end
    end
    for (int t = k + 2; t >= 0; t--) begin
      for (int s = 0; s < 8; s++) begin
        be[t][s] = NEG;
        for (int u = 0; u < 2; u++) begin
          int g, v;
          bit [2:0] ns;
          ns = ref_next(3'(s), u[0]);
          g = u * (ls[t] + la[t]) + int'(ref_par(3'(s), u[0])) * lp[t];
          v = be[t + 1][ns] + g;
          if (be[t + 1][ns] > NEG / 2 && v > be[t][s]) be[t][s] = v;
        end
      end
    end
    for (int t = 0; t < k; t++) begin
      int best [2];
      best[0] = NEG * 4; best[1] = NEG * 4;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          int v;
          bit [2:0] ns;
          ns = ref_next(3'(s), u[0]);
          if (al[t][s] <= NEG / 2 || be[t + 1][ns] <= NEG / 2) continue;
          v = al[t][s] + u * (ls[t] + la[t]) + int'(ref_par(3'(s), u[0])) * lp[t] + be[t + 1][ns];
          if (v > best[u]) best[u] = v;
        end
      e_llr[t] = best[1] - best[0];
    end
  endtask

  task automatic run(int k, bit gaps, int la_range);
    longint t0;
    for (int t = 0; t < k + 3; t++) begin
      ls[t] = int'(xs32(seed) % 15) - 7;
      lp[t] = int'(xs32(seed) % 15) - 7;
      la[t] = (t < k) ? int'(xs32(seed) % (2 * la_range + 1)) - la_range : 0;
    end
    reference(k);
    n_out = 0;
    @(negedge clk);
    blk_len = KW'(k); start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    for (int t = 0; t < k + 3; t++) begin
      while (gaps && (xs32(seed) % 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_ls = llr_t'(ls[t]); in_lp = llr_t'(lp[t]); in_la = ext_t'(la[t]);
      @(negedge clk);
    end
    in_valid = 0;
    while (!done) @(negedge clk);
    t0 = cycle - t0;
    @(negedge clk);              // the last output is counted on this edge
    checks += 2;
    if (n_out != k) begin failures++; $display("FAIL K=%0d: %0d outputs", k, n_out); end
    if (!gaps && t0 != longint'(3 * k + 8)) begin
      failures++;
      $display("FAIL K=%0d: start to done %0d cycles, expected %0d", k, t0, 3 * k + 8);
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    run(40, 0, 20);
    run(64, 0, 127);
    run(48, 1, 60);
    run(40, 0, 0);
    for (int i = 0; i < 6; i++) run(40 + 8 * (i % 4), i[0], 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
