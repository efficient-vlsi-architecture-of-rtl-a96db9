// tb_bmr - the four branch metrics for random and extreme LLR inputs.
module tb_bmr;
  import turbo_pkg::*;
  llr_t ls, lp;
  ext_t la;
  bm_vec_t bm;
  int checks = 0, failures = 0;
  int unsigned seed = 32'h77;

  bmr dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int a, b, c;
      a = int'(tb_ref_pkg::xs32(seed) % 15) - 7;
      b = int'(tb_ref_pkg::xs32(seed) % 15) - 7;
      c = int'(tb_ref_pkg::xs32(seed) % 255) - 127;
      if (n < 4) begin a = (n & 1) ? 7 : -7; b = a; c = (n & 2) ? 127 : -127; end
      ls = llr_t'(a); lp = llr_t'(b); la = ext_t'(c);
      #1;
      for (int up = 0; up < 4; up++) begin
        int exp_v;
        exp_v = ((up >> 1) & 1) * (a + c) + (up & 1) * b;
        checks++;
        if (int'(bm[up]) != exp_v) begin
          failures++;
          $display("FAIL ls=%0d lp=%0d la=%0d bm[%0d]=%0d exp %0d", a, b, c, up, bm[up], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
