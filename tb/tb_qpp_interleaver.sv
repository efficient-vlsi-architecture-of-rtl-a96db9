// tb_qpp_interleaver - address sequence of the QPP interleaver for several
// LTE block sizes against pi(i) = (f1*i + f2*i^2) mod K evaluated directly,
// with gaps in advance; also checks that the sequence is a permutation.
module tb_qpp_interleaver;
  import tb_ref_pkg::*;
  localparam int KMAX = 6144;
  localparam int KW   = $clog2(KMAX + 4);

  logic clk = 0, rst = 1, start = 0, advance = 0;
  logic [KW-1:0] blk_len, f1, f2, addr;
  int checks = 0, failures = 0;
  int unsigned seed = 32'h51;

  always #5 clk = ~clk;
  qpp_interleaver #(.KMAX(KMAX)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int k, int a, int b);
    bit seen [KMAX];
    int errs = 0, dup = 0;
    for (int i = 0; i < k; i++) seen[i] = 0;
    @(negedge clk);
    blk_len = KW'(k); f1 = KW'(a); f2 = KW'(b); start = 1; advance = 0;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < k; i++) begin
      if (int'(addr) != ref_pi(i, k, a, b)) errs++;
      if (seen[addr]) dup++;
      seen[addr] = 1;
      advance = 1;
      @(negedge clk);
      while ((xs32(seed) % 5) == 0) begin
        advance = 0;
        @(negedge clk);
      end
    end
    advance = 0;
    checks += 2;
    if (errs != 0) begin failures++; $display("FAIL K=%0d: %0d wrong addresses", k, errs); end
    if (dup != 0)  begin failures++; $display("FAIL K=%0d: %0d repeated addresses", k, dup); end
  endtask

  initial begin
    blk_len = '0; f1 = '0; f2 = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // LTE block sizes with their (f1, f2)
    run(40, 3, 10);
    run(48, 7, 12);
    run(56, 19, 42);
    run(64, 7, 16);
    run(1024, 31, 64);
    run(6144, 263, 480);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
