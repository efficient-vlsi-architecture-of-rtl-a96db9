// tb_turbo_codec_top - end-to-end test of the LTE turbo coding chain at the
// default parameters (KMAX = 6144, 6 iterations).
//
// For each block the testbench draws random information bits, encodes them
// with turbo_encoder and compares every transmitted bit (x, z, z' and the 12
// tail bits) with its own reference encoder, which uses the textbook
// equations of the constituent code and the interleaver formula
// pi(i) = (f1*i + f2*i^2) mod K directly. The reference codeword is then
// sent through a channel model (3-bit soft symbols, a given percentage of
// symbols replaced by random soft values) into turbo_decoder, and the
// decoded bits are compared with the information bits. ready_out is toggled
// at random so the output FIFO fills and the decoder stalls.
//
// Mechanisms counted (each must occur): noisy blocks whose channel errors
// were all corrected, trellis termination, output FIFO full/stall, change of
// block size between blocks, synchronous reset during decoding, and the
// number of half iterations per block (checked = 2 * N_ITER). The decoder
// latency from the last input symbol to the first decoded bit is checked
// against N_ITER*(6K+18)+2 cycles.
module tb_turbo_codec_top;
  import turbo_pkg::*;

  localparam int KMAX   = 6144;
  localparam int N_ITER = 6;
  localparam int KW     = $clog2(KMAX + 4);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset, srst;
  logic enc_bit_in, enc_valid_in, enc_frm_end_i;
  logic [KW-1:0] enc_f1, enc_f2, dec_f1, dec_f2;
  logic enc_in_ready, enc_valid_out, enc_x, enc_z, enc_z2, enc_x2, enc_tail, enc_frm_end_o;
  logic dec_valid_in, dec_frm_end_i;
  soft_t dec_sym_x, dec_sym_z1, dec_sym_z2, dec_sym_x2;
  logic dec_in_ready, dec_bit_out, dec_frm_end_o, dec_valid_out, dec_ready_out;
  logic dec_fifo_error, dec_busy;

  turbo_codec_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- helpers
  int unsigned rng = 32'h1234_5678;
  function automatic int unsigned rnd();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference block and codeword
  bit info  [KMAX];
  bit rx    [KMAX + 3];
  bit rz    [KMAX + 3];
  bit rz2   [KMAX + 3];
  bit rx2   [KMAX + 3];
  int pi_tab[KMAX];

  task automatic ref_encode(int k, int f1, int f2);
    bit r1, r2, r3, q1, q2, q3, a, u;
    bit seen [KMAX];
    int bad = 0;
    for (int i = 0; i < k; i++) seen[i] = 0;
    for (int i = 0; i < k; i++) begin
      pi_tab[i] = int'((longint'(f1) * i + longint'(f2) * i * i) % k);
      if (seen[pi_tab[i]]) bad++;
      seen[pi_tab[i]] = 1;
    end
    check(bad == 0, $sformatf("interleaver for K=%0d is not a permutation", k));
    {r1, r2, r3} = 3'b000;
    {q1, q2, q3} = 3'b000;
    for (int i = 0; i < k; i++) begin
      u = info[i];
      a = u ^ r2 ^ r3;
      rx[i] = u; rz[i] = a ^ r1 ^ r3;
      {r1, r2, r3} = {a, r1, r2};
      u = info[pi_tab[i]];
      a = u ^ q2 ^ q3;
      rz2[i] = a ^ q1 ^ q3; rx2[i] = 0;
      {q1, q2, q3} = {a, q1, q2};
    end
    for (int t = k; t < k + 3; t++) begin
      rx[t]  = r2 ^ r3; rz[t]  = r1 ^ r3; {r1, r2, r3} = {1'b0, r1, r2};
      rx2[t] = q2 ^ q3; rz2[t] = q1 ^ q3; {q1, q2, q3} = {1'b0, q1, q2};
    end
  endtask

  // ----------------------------------------------------- encoder monitor
  bit ex [KMAX + 3], ez [KMAX + 3], ez2 [KMAX + 3], ex2 [KMAX + 3], etl [KMAX + 3];
  int enc_n = 0;
  int enc_frames_done = 0;
  always @(posedge clk) begin
    if (enc_valid_out && !reset) begin
      ex[enc_n] <= enc_x; ez[enc_n] <= enc_z; ez2[enc_n] <= enc_z2;
      ex2[enc_n] <= enc_x2; etl[enc_n] <= enc_tail;
      enc_n <= enc_frm_end_o ? 0 : enc_n + 1;
      if (enc_frm_end_o) enc_frames_done <= enc_frames_done + 1;
    end
  end

  // ----------------------------------------------------- decoder monitor
  bit dout [KMAX];
  int dec_n = 0;
  int dec_frames_done = 0;
  int dec_last_idx = 0;
  longint first_out_cycle = -1;
  int fifo_full_cycles = 0, half_iters = 0;
  bit rand_ready = 0;
  always @(posedge clk) begin
    if (reset) ;
    else begin
    if (dec_valid_out && first_out_cycle < 0) first_out_cycle <= cycle;
    if (dec_valid_out && dec_ready_out) begin
      dout[dec_n] <= dec_bit_out;
      dec_n <= dec_frm_end_o ? 0 : dec_n + 1;
      if (dec_frm_end_o) begin
        dec_last_idx <= dec_n;
        dec_frames_done <= dec_frames_done + 1;
      end
    end
    if (dut.u_decoder.u_out_fifo.full) fifo_full_cycles <= fifo_full_cycles + 1;
    if (dut.u_decoder.u_map2.done) half_iters <= half_iters + 2;
    end
  end
  always @(negedge clk) dec_ready_out <= rand_ready ? ((rnd() % 8) == 0) : 1'b1;

  // ---------------------------------------------------------- counters
  int n_corrected = 0, n_terminated = 0, n_size_switch = 0, n_srst = 0;
  int last_k = 0;

  task automatic encode(int k, int f1, int f2);
    int start_frames = enc_frames_done;
    enc_f1 = KW'(f1); enc_f2 = KW'(f2);
    for (int i = 0; i < k; i++) begin
      @(negedge clk);
      while (!enc_in_ready) @(negedge clk);
      enc_bit_in = info[i]; enc_valid_in = 1; enc_frm_end_i = (i == k - 1);
    end
    @(negedge clk);
    enc_valid_in = 0; enc_frm_end_i = 0;
    while (enc_frames_done == start_frames) @(negedge clk);
  endtask

  // noise: percentage of soft symbols replaced by a random value
  function automatic soft_t chan(bit b, int noise_pct, ref int herr);
    soft_t s;
    s = b ? 3'd7 : 3'd0;
    if (int'(rnd() % 100) < noise_pct) s = soft_t'(rnd() % 8);
    if (s[2] != b) herr++;
    return s;
  endfunction

  task automatic decode(int k, int f1, int f2, int noise_pct, bit srst_mid,
                        output int herr_sys, output longint lat);
    int herr = 0, hsys = 0;
    int start_frames = dec_frames_done;
    int hi0;
    longint t_end;
    dec_f1 = KW'(f1); dec_f2 = KW'(f2);
    for (int i = 0; i < k + 3; i++) begin
      int n_before;
      @(negedge clk);
      while (!dec_in_ready) @(negedge clk);
      n_before = herr;
      dec_sym_x  = chan(rx[i], noise_pct, herr);
      if (i < k) hsys += herr - n_before;
      dec_sym_z1 = chan(rz[i], noise_pct, herr);
      dec_sym_z2 = chan(rz2[i], noise_pct, herr);
      dec_sym_x2 = chan(rx2[i], (i < k) ? 0 : noise_pct, herr);
      dec_valid_in = 1; dec_frm_end_i = (i == k + 2);
    end
    @(negedge clk);
    t_end = cycle - 1;
    dec_valid_in = 0; dec_frm_end_i = 0;
    hi0 = half_iters;
    first_out_cycle = -1;
    herr_sys = hsys;
    if (srst_mid) begin
      repeat (k) @(negedge clk);
      srst = 1;
      @(negedge clk);
      srst = 0;
      n_srst++;
      check(!dec_busy && dec_in_ready && !dec_valid_out, "decoder idle after srst");
      lat = 0;
      return;
    end
    while (dec_frames_done == start_frames) @(negedge clk);
    lat = first_out_cycle - t_end;
    check(half_iters - hi0 == 2 * N_ITER, $sformatf("half iterations %0d", half_iters - hi0));
  endtask

  task automatic run_block(int k, int f1, int f2, int noise_pct, bit srst_mid = 0);
    int herr, errs;
    longint lat;
    for (int i = 0; i < k; i++) info[i] = rnd()[0];
    ref_encode(k, f1, f2);
    encode(k, f1, f2);
    errs = 0;
    for (int i = 0; i < k + 3; i++) begin
      if (ex[i] != rx[i] || ez[i] != rz[i] || ez2[i] != rz2[i] ||
          etl[i] != (i >= k) || (i >= k && ex2[i] != rx2[i])) errs++;
    end
    check(errs == 0, $sformatf("K=%0d: %0d encoder output steps differ", k, errs));
    if (errs == 0) n_terminated++;
    if (last_k != 0 && last_k != k) n_size_switch++;
    last_k = k;
    decode(k, f1, f2, noise_pct, srst_mid, herr, lat);
    if (srst_mid) return;
    errs = 0;
    for (int i = 0; i < k; i++) if (dout[i] != info[i]) errs++;
    check(dec_last_idx == k - 1, $sformatf("K=%0d: %0d bits out", k, dec_last_idx + 1));
    check(errs == 0, $sformatf("K=%0d noise %0d%%: %0d decoded bit errors (%0d systematic channel errors)",
                               k, noise_pct, errs, herr));
    if (herr > 0 && errs == 0) n_corrected++;
    check(lat == longint'(N_ITER * (6 * k + 18) + 2),
          $sformatf("K=%0d latency %0d", k, lat));
    $display("block K=%0d noise=%0d%% systematic channel errors=%0d decoded errors=%0d latency=%0d",
             k, noise_pct, herr, errs, lat);
  endtask

  initial begin
    reset = 1; srst = 0;
    enc_bit_in = 0; enc_valid_in = 0; enc_frm_end_i = 0; enc_f1 = '0; enc_f2 = '0;
    dec_valid_in = 0; dec_frm_end_i = 0; dec_f1 = '0; dec_f2 = '0;
    dec_sym_x = '0; dec_sym_z1 = '0; dec_sym_z2 = '0; dec_sym_x2 = '0;
    repeat (3) @(negedge clk);
    reset = 0;
    // LTE block sizes with their QPP coefficients (3GPP TS 36.212 table)
    run_block(40, 3, 10, 0);
    run_block(40, 3, 10, 12);
    rand_ready = 1;
    run_block(48, 7, 12, 12);
    run_block(40, 3, 10, 12, 1);     // synchronous reset while decoding
    rand_ready = 0;
    run_block(1024, 31, 64, 20);
    run_block(6144, 263, 480, 20);
    check(n_corrected > 0,   "no block with channel errors was corrected");
    check(n_terminated > 0,  "no terminated block");
    check(fifo_full_cycles > 0, "output FIFO never full");
    check(n_size_switch > 0, "block size never changed");
    check(n_srst > 0,        "synchronous reset never applied");
    check(!dec_fifo_error,   "FIFO error flag set");
    $display("corrected=%0d terminated=%0d fifo_full_cycles=%0d size_switches=%0d srst=%0d",
             n_corrected, n_terminated, fifo_full_cycles, n_size_switch, n_srst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
