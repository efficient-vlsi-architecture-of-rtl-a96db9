// sync_fifo - synchronous first-in first-out buffer for the decoded bits.
//
// wr_en pushes wdata when the FIFO is not full; rd_en pops when it is not
// empty. The head entry is always visible on rdata (first-word fall-through),
// so a consumer sees valid data whenever empty = 0. A push into a full FIFO
// or a pop from an empty one is ignored and raises the sticky error flag
// until reset (the error outputs of the decoder drawing).
// Reset: asynchronous rst or synchronous srst, both active high.
module sync_fifo #(
  parameter int WIDTH = 1,
  parameter int DEPTH = 16,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             srst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty,
  output logic             error
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;
  logic             do_wr, do_rd;

  assign full  = (count == (AW + 1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rdata = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wptr <= '0; rptr <= '0; count <= '0; error <= 1'b0;
    end else if (srst) begin
      wptr <= '0; rptr <= '0; count <= '0; error <= 1'b0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW + 1)'(do_wr) - (AW + 1)'(do_rd);
      if ((wr_en && full) || (rd_en && empty)) error <= 1'b1;
    end
  end
endmodule
