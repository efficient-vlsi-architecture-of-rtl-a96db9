// tb_trellis_gen - exhaustive check of one trellis step: all 8 states, both
// input bits, normal and termination mode, against the reference equations.
module tb_trellis_gen;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  state_t state, next_state;
  logic   u, term, parity, sys;
  int     checks = 0, failures = 0;

  trellis_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2; t++)
      for (int s = 0; s < 8; s++)
        for (int b = 0; b < 2; b++) begin
          bit ub;
          state = state_t'(s); u = b[0]; term = t[0];
          #1;
          ub = t[0] ? ref_term_bit(3'(s)) : b[0];
          checks++;
          if (next_state != ref_next(3'(s), ub) || parity != ref_par(3'(s), ub) || sys != ub) begin
            failures++;
            $display("FAIL s=%0d u=%0d term=%0d: next=%0d par=%0d sys=%0d", s, b, t,
                     next_state, parity, sys);
          end
          if (t == 1) begin
            checks++;
            if (next_state[2] != 1'b0) begin
              failures++;
              $display("FAIL termination does not feed 0, s=%0d", s);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
