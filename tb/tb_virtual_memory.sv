// tb_virtual_memory - random writes and reads against a model array,
// including a read of an address in the cycle it is written (old data).
module tb_virtual_memory;
  localparam int WIDTH = 12, DEPTH = 100, AW = 7;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  bit   valid [DEPTH];
  int checks = 0, failures = 0;
  int unsigned seed = 32'h4242;

  always #5 clk = ~clk;
  virtual_memory #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) valid[i] = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we    = tb_ref_pkg::xs32(seed)[0];
      waddr = AW'(tb_ref_pkg::xs32(seed) % DEPTH);
      wdata = WIDTH'(tb_ref_pkg::xs32(seed));
      raddr = (n % 7 == 0) ? waddr : AW'(tb_ref_pkg::xs32(seed) % DEPTH);
      #1;
      if (valid[raddr]) begin
        checks++;
        if (rdata != model[raddr]) begin
          failures++;
          $display("FAIL addr %0d: %h exp %h", raddr, rdata, model[raddr]);
        end
      end
      @(posedge clk);
      if (we) begin model[waddr] = wdata; valid[waddr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
