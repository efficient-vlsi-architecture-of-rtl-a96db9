// tb_rsc_encoder - random bit stream through the constituent encoder,
// compared cycle by cycle with the reference, then three termination steps
// that must return the encoder to state 0; repeated over several blocks,
// with clear between them.
module tb_rsc_encoder;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, clear = 0, en = 0, term = 0, u = 0;
  logic sys, par;
  state_t state;
  int checks = 0, failures = 0;
  int unsigned seed = 32'hC0FFEE;

  always #5 clk = ~clk;
  rsc_encoder dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [2:0] rs;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int blk = 0; blk < 8; blk++) begin
      @(negedge clk); clear = 1; en = 0; @(negedge clk); clear = 0;
      rs = 0;
      for (int i = 0; i < 50 + blk; i++) begin
        u = xs32(seed)[0]; en = (xs32(seed) % 4) != 0; term = 0;
        #1;
        checks++;
        if (sys != u || par != ref_par(rs, u) || state != rs) begin
          failures++;
          $display("FAIL blk %0d step %0d: sys=%0d par=%0d state=%0d exp state %0d", blk, i, sys, par, state, rs);
        end
        if (en) rs = ref_next(rs, u);
        @(negedge clk);
      end
      for (int t = 0; t < 3; t++) begin
        bit ub;
        en = 1; term = 1; u = xs32(seed)[0];
        ub = ref_term_bit(rs);
        #1;
        checks++;
        if (sys != ub || par != ref_par(rs, ub)) begin
          failures++;
          $display("FAIL tail %0d: sys=%0d par=%0d", t, sys, par);
        end
        rs = ref_next(rs, ub);
        @(negedge clk);
      end
      en = 0; term = 0;
      checks++;
      if (state != 0) begin
        failures++;
        $display("FAIL not terminated: state=%0d", state);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
