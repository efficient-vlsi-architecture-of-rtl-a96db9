// tb_turbo_encoder - LTE turbo encoder against a reference encoder written
// from the constituent code equations and pi(i) = (f1*i + f2*i^2) mod K.
// Checks every output step (x, z, z', tail x, z, x', z'), the tail and frame
// end flags, that the output is valid 2 cycles after the clock edge that
// takes the last input bit (3 edges: start, encode, output register) and
// lasts K+3 cycles without gaps, that no bit is accepted while encoding,
// and a block longer than KMAX (cut at KMAX bits).
module tb_turbo_encoder;
  import tb_ref_pkg::*;
  localparam int KMAX = 64;
  localparam int KW   = $clog2(KMAX + 4);

  logic clock = 0, reset = 1, srst = 0, bit_in = 0, valid_in = 0, frm_end_i = 0;
  logic [KW-1:0] f1 = '0, f2 = '0;
  logic in_ready, valid_out, x_out, z_out, z2_out, x2_out, tail_out, frm_end_o;
  int checks = 0, failures = 0, n_cut = 0;
  int unsigned seed = 32'hE1C0DE;
  longint cycle = 0;

  always #5 clock = ~clock;
  always @(posedge clock) cycle <= cycle + 1;

  turbo_encoder #(.KMAX(KMAX)) dut (.*);

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit info [KMAX];
  bit rx [KMAX + 3], rz [KMAX + 3], rz2 [KMAX + 3], rx2 [KMAX + 3];

  task automatic ref_encode(int k, int a, int b);
    bit [2:0] s1, s2;
    s1 = 0; s2 = 0;
    for (int i = 0; i < k; i++) begin
      bit c2;
      c2 = info[ref_pi(i, k, a, b)];
      rx[i] = info[i]; rz[i] = ref_par(s1, info[i]); rz2[i] = ref_par(s2, c2); rx2[i] = 0;
      s1 = ref_next(s1, info[i]); s2 = ref_next(s2, c2);
    end
    for (int t = k; t < k + 3; t++) begin
      rx[t] = ref_term_bit(s1); rz[t] = ref_par(s1, rx[t]); s1 = ref_next(s1, rx[t]);
      rx2[t] = ref_term_bit(s2); rz2[t] = ref_par(s2, rx2[t]); s2 = ref_next(s2, rx2[t]);
    end
  endtask

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // output monitor
  bit ox [KMAX + 3], oz [KMAX + 3], oz2 [KMAX + 3], ox2 [KMAX + 3], otl [KMAX + 3], ofe [KMAX + 3];
  int on = 0, frames = 0, gaps = 0, busy_acc = 0;
  longint first_cycle = -1;
  always @(posedge clock) begin
    if (reset) ;
    else if (valid_out) begin
      if (on == 0) first_cycle <= cycle;
      ox[on] <= x_out; oz[on] <= z_out; oz2[on] <= z2_out; ox2[on] <= x2_out;
      otl[on] <= tail_out; ofe[on] <= frm_end_o;
      on <= frm_end_o ? 0 : on + 1;
      if (frm_end_o) frames <= frames + 1;
      if (in_ready && !frm_end_o) busy_acc <= busy_acc + 1;
    end else if (on != 0) gaps <= gaps + 1;
  end

  task automatic run(int k, int a, int b, int send = 0);
    longint t_end;
    int errs, f0;
    if (send == 0) send = k;
    for (int i = 0; i < KMAX; i++) info[i] = xs32(seed)[0];
    ref_encode(k, a, b);
    f1 = KW'(a); f2 = KW'(b);
    f0 = frames; gaps = 0; busy_acc = 0;
    for (int i = 0; i < send; i++) begin
      @(negedge clock);
      while (xs32(seed) % 4 == 0) begin valid_in = 0; @(negedge clock); end
      bit_in = info[i % KMAX]; valid_in = 1; frm_end_i = (i == send - 1);
      if (i == k - 1) t_end = cycle;
    end
    @(negedge clock);
    valid_in = 0; frm_end_i = 0;
    if (send > k) n_cut++;
    while (frames == f0) @(negedge clock);
    errs = 0;
    for (int n = 0; n < k + 3; n++)
      if (ox[n] != rx[n] || oz[n] != rz[n] || oz2[n] != rz2[n] || otl[n] != (n >= k) ||
          (n >= k && ox2[n] != rx2[n]) || ofe[n] != (n == k + 2)) errs++;
    chk(errs == 0, $sformatf("K=%0d: %0d output steps differ", k, errs));
    chk(first_cycle - t_end == 3, $sformatf("first output sampled %0d edges after the last bit", first_cycle - t_end));
    chk(gaps == 0, "gap in the output");
    chk(busy_acc == 0, "bits accepted while encoding");
    @(negedge clock);
    chk(!valid_out && in_ready, "idle after the block");
  endtask

  initial begin
    repeat (2) @(negedge clock);
    reset = 0;
    run(40, 3, 10);
    run(48, 7, 12);
    run(56, 19, 42);
    run(64, 7, 16);
    run(40, 3, 10);
    run(KMAX, 7, 16, KMAX + 5);   // too long: cut at KMAX, the extra bits are refused
    chk(n_cut == 1, "cut block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
