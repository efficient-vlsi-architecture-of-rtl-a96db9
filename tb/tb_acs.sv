// tb_acs - add-compare-select against max(m0+b0, m1+b1) for random signed
// inputs inside the ranges the decoder uses, including ties.
module tb_acs;
  import turbo_pkg::*;
  sm_t m0, m1, m_out;
  bm_t b0, b1;
  logic sel;
  int checks = 0, failures = 0;
  int unsigned seed = 32'h99;

  acs dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int a, b, c, d, s0, s1;
      a = int'(tb_ref_pkg::xs32(seed) % 3001) - 1500;
      c = int'(tb_ref_pkg::xs32(seed) % 3001) - 1500;
      b = int'(tb_ref_pkg::xs32(seed) % 283) - 141;
      d = int'(tb_ref_pkg::xs32(seed) % 283) - 141;
      if (n % 10 == 0) begin c = a; d = b; end
      m0 = sm_t'(a); b0 = bm_t'(b); m1 = sm_t'(c); b1 = bm_t'(d);
      #1;
      s0 = a + b; s1 = c + d;
      checks++;
      if (int'(m_out) != ((s1 > s0) ? s1 : s0) || sel != (s1 > s0)) begin
        failures++;
        $display("FAIL %0d+%0d vs %0d+%0d: out=%0d sel=%0d", a, b, c, d, m_out, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
