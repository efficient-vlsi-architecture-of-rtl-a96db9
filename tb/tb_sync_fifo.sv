// tb_sync_fifo - random pushes and pops against a queue model: data order,
// full and empty flags, ignored push when full, sticky error flag, srst.
module tb_sync_fifo;
  localparam int WIDTH = 8, DEPTH = 16;
  logic clk = 0, rst = 1, srst = 0, wr_en = 0, rd_en = 0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic full, empty, error;
  logic [WIDTH-1:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_err = 0;
  int unsigned seed = 32'h1F1F0;

  always #5 clk = ~clk;
  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    bit exp_err = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 6000; n++) begin
      int phase = (n / 500) % 2;   // alternate push-heavy and pop-heavy
      @(negedge clk);
      wr_en = (tb_ref_pkg::xs32(seed) % 4) < (phase ? 1 : 3);
      rd_en = (tb_ref_pkg::xs32(seed) % 4) < (phase ? 3 : 1);
      if (n > 5000) rd_en = rd_en && !empty;   // no misuse at the end
      if (n < 5000 && !exp_err) wr_en = wr_en && !(full && n < 2000);
      wdata = WIDTH'(tb_ref_pkg::xs32(seed));
      #1;
      chk(full == (q.size() == DEPTH), "full flag");
      chk(empty == (q.size() == 0), "empty flag");
      if (q.size() > 0) chk(rdata == q[0], $sformatf("head %h exp %h", rdata, q[0]));
      if (full) n_full++;
      if ((wr_en && full) || (rd_en && empty)) exp_err = 1;
      begin
        bit do_wr, do_rd;
        do_wr = wr_en && q.size() < DEPTH;
        do_rd = rd_en && q.size() > 0;
        @(posedge clk);
        if (do_rd) void'(q.pop_front());
        if (do_wr) q.push_back(wdata);
      end
      #1;
      chk(error == exp_err, "error flag");
      if (error) n_err++;
    end
    @(negedge clk);
    srst = 1; wr_en = 0; rd_en = 0;
    @(negedge clk);
    srst = 0;
    chk(empty && !full && !error, "srst empties the FIFO");
    chk(n_full > 0, "FIFO never full");
    chk(n_err > 0, "error never raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
