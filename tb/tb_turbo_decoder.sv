// tb_turbo_decoder - the iterative decoder on its own (KMAX = 64, 3
// iterations). Codewords come from a reference encoder in this testbench;
// the channel model maps bits to the 3-bit soft values 0 / 7 and replaces a
// percentage of the symbols by random soft values. Checks: all decoded bits
// and the frame end marker, the latency from the last symbol to the first
// decoded bit (N_ITER*(6K+18)+2 cycles), that no symbol is accepted while
// decoding, the number of half iterations, and that a held-off output
// (ready_out low) fills the FIFO without losing bits.
module tb_turbo_decoder;
  import turbo_pkg::*;
  import tb_ref_pkg::*;
  localparam int KMAX   = 64;
  localparam int N_ITER = 3;
  localparam int KW     = $clog2(KMAX + 4);

  logic mclk = 0, rst = 1, srst = 0, valid_in = 0, frm_end_i = 0, ready_out = 1;
  soft_t sym_x = '0, sym_z1 = '0, sym_z2 = '0, sym_x2 = '0;
  logic [KW-1:0] f1 = '0, f2 = '0;
  logic in_ready, bit_out, frm_end_o, valid_out, fifo_error, busy;
  int checks = 0, failures = 0;
  int unsigned seed = 32'hDEC0DE;
  longint cycle = 0;
  bit hold = 0;

  always #5 mclk = ~mclk;
  always @(posedge mclk) cycle <= cycle + 1;

  turbo_decoder #(.KMAX(KMAX), .N_ITER(N_ITER)) dut (.*);

  initial begin
    repeat (200000) @(posedge mclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

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

  function automatic soft_t chan(bit b, int pct, ref int herr);
    soft_t s;
    s = b ? 3'd7 : 3'd0;
    if (int'(xs32(seed) % 100) < pct) s = soft_t'(xs32(seed) % 8);
    if (s[2] != b) herr++;
    return s;
  endfunction

  // output monitor
  bit dout [KMAX];
  int on = 0, frames = 0, last_n = 0, half = 0, full_cycles = 0, rx_busy = 0;
  longint first_cycle = -1;
  always @(posedge mclk) begin
    if (valid_out && ready_out && !rst) begin
      if (on == 0) first_cycle <= cycle;
      dout[on] <= bit_out;
      on <= frm_end_o ? 0 : on + 1;
      if (frm_end_o) begin frames <= frames + 1; last_n <= on + 1; end
    end
    if (dut.u_map2.done) half <= half + 2;
    if (dut.u_out_fifo.full) full_cycles <= full_cycles + 1;
    if (busy && in_ready) rx_busy <= rx_busy + 1;
  end
  always @(negedge mclk) ready_out <= !hold;

  task automatic run(int k, int a, int b, int pct, bit hold_out);
    int herr = 0, errs = 0, f0 = frames, h0;
    longint t_end;
    for (int i = 0; i < k; i++) info[i] = xs32(seed)[0];
    ref_encode(k, a, b);
    f1 = KW'(a); f2 = KW'(b);
    for (int i = 0; i < k + 3; i++) begin
      int dummy = 0;
      @(negedge mclk);
      while (!in_ready) @(negedge mclk);
      sym_x = chan(rx[i], pct, herr);
      sym_z1 = chan(rz[i], pct, dummy);
      sym_z2 = chan(rz2[i], pct, dummy);
      sym_x2 = chan(rx2[i], (i < k) ? 0 : pct, dummy);
      valid_in = 1; frm_end_i = (i == k + 2);
      t_end = cycle;
    end
    h0 = half;
    @(negedge mclk);
    valid_in = 0; frm_end_i = 0;
    hold = hold_out;
    if (hold_out) begin
      while (!dut.u_out_fifo.full) @(negedge mclk);
      repeat (20) @(negedge mclk);
      hold = 0;
    end
    while (frames == f0) @(negedge mclk);
    for (int i = 0; i < k; i++) if (dout[i] != info[i]) errs++;
    chk(errs == 0, $sformatf("K=%0d noise %0d%%: %0d bit errors (%0d channel errors)", k, pct, errs, herr));
    chk(last_n == k, $sformatf("K=%0d: %0d bits in the block", k, last_n));
    chk(half - h0 == 2 * N_ITER, "half iterations");
    if (!hold_out)
      chk(first_cycle - t_end == longint'(N_ITER * (6 * k + 18) + 2),
          $sformatf("K=%0d latency %0d", k, first_cycle - t_end));
    $display("block K=%0d noise=%0d%% channel errors=%0d decoded errors=%0d", k, pct, herr, errs);
  endtask

  initial begin
    repeat (2) @(negedge mclk);
    rst = 0;
    run(40, 3, 10, 0, 0);
    run(64, 7, 16, 10, 0);
    run(48, 7, 12, 10, 1);
    run(56, 19, 42, 10, 0);
    chk(full_cycles > 0, "FIFO never full");
    chk(rx_busy == 0, "symbols accepted while decoding");
    chk(!fifo_error, "FIFO error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
