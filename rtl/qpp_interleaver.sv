// qpp_interleaver - address generator of the LTE turbo code internal
// interleaver, a quadratic permutation polynomial
//     pi(i) = (f1*i + f2*i^2) mod K.
//
// No multiplier is used: with g(i) = pi(i+1) - pi(i) = f1 + f2*(2i+1),
// pi(i+1) = (pi(i) + g(i)) mod K and g(i+1) = (g(i) + 2*f2) mod K, so every
// step is two additions with a conditional subtraction of K. The operands
// must satisfy f1 < K and f2 < K (true for the LTE coefficient table).
//
// start (one cycle) loads pi(0) = 0 and samples K, f1 and f2; addr then shows
// pi(0). Each cycle with advance = 1 moves addr to the next index, so addr
// always holds pi(i) for the i-th address since start. The same block
// serves as interleaver (read addresses) and de-interleaver (write
// addresses) in the turbo decoder. Reset: asynchronous, active high.
module qpp_interleaver #(
  parameter int KMAX = 6144,
  parameter int KW   = $clog2(KMAX + 4)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          advance,
  input  logic [KW-1:0] blk_len,
  input  logic [KW-1:0] f1,
  input  logic [KW-1:0] f2,
  output logic [KW-1:0] addr
);
  logic [KW-1:0] k_q, g_q, d_q;

  // (a + b) mod m for a, b < m
  function automatic logic [KW-1:0] addmod(logic [KW-1:0] a, logic [KW-1:0] b,
                                           logic [KW-1:0] m);
    logic [KW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, m}) s = s - {1'b0, m};
    return s[KW-1:0];
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      k_q  <= '0;
      g_q  <= '0;
      d_q  <= '0;
      addr <= '0;
    end else if (start) begin
      k_q  <= blk_len;
      g_q  <= addmod(f1, f2, blk_len);
      d_q  <= addmod(f2, f2, blk_len);
      addr <= '0;
    end else if (advance) begin
      addr <= addmod(addr, g_q, k_q);
      g_q  <= addmod(g_q, d_q, k_q);
    end
  end
endmodule
