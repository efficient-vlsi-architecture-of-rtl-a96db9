// turbo_decoder - iterative LTE turbo decoder with two max-log-MAP decoders.
//
// A received block arrives as K+3 quadruples of 3-bit soft symbols
// (sym_x, sym_z1, sym_z2, sym_x2), one per cycle with valid_in, the last one
// marked by frm_end_i: K data steps carry systematic x_k and the parities
// z_k, z'_k (sym_x2 ignored); the last 3 carry the tail bits of encoder 1
// (x, z) and encoder 2 (x', z'). K follows from the frame length; the QPP
// interleaver coefficients f1, f2 are sampled with the first symbol.
//
// Decoding runs n_iter = N_ITER full iterations of two half iterations:
//   half 1: MAP decoder 1 gets x_k, z_k and the de-interleaved extrinsic
//           Le21[k] (zero in the first iteration); its extrinsic output
//           is stored as Le12[k].
//   half 2: MAP decoder 2 gets x_pi(k), z'_k and the interleaved extrinsic
//           Le12[pi(k)], read through one QPP address generator (the
//           interleaver); its extrinsic output is written back to
//           Le21[pi(k)] through a second generator (the de-interleaver).
// In the last half iteration the hard decisions of decoder 2 are written to
// bit position pi(k); the decoded block then leaves bit by bit through the
// output FIFO (bit_out with valid_out, accepted with ready_out; the last bit
// carries frm_end_o). The decoder stalls while the FIFO is full, so no bit
// is lost; fifo_error flags a FIFO misuse and stays set until reset.
//
// Timing: each half iteration takes 3K+9 cycles, the output K cycles (with
// ready_out high), so a block takes about (K+3) + N_ITER*(6K+18) + K cycles.
// No new block is accepted (in_ready low) until the previous one has left.
// A block must have 1 <= K <= KMAX data steps (LTE uses 40..6144), and the
// QPP coefficients must be the ones of its K (f1, f2 < K).
// Reset: asynchronous rst or synchronous srst, both active high.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int KMAX   = 6144,
  parameter int N_ITER = 6,
  parameter int KW     = $clog2(KMAX + 4)
) (
  input  logic          mclk,
  input  logic          rst,
  input  logic          srst,
  input  logic          valid_in,
  input  logic          frm_end_i,
  input  soft_t         sym_x,
  input  soft_t         sym_z1,
  input  soft_t         sym_z2,
  input  soft_t         sym_x2,
  input  logic [KW-1:0] f1,
  input  logic [KW-1:0] f2,
  output logic          in_ready,
  output logic          bit_out,
  output logic          frm_end_o,
  output logic          valid_out,
  input  logic          ready_out,
  output logic          fifo_error,
  output logic          busy
);
  localparam int IAW = $clog2(KMAX + 3);
  localparam int BAW = $clog2(KMAX);
  localparam int IW  = $clog2(N_ITER + 1);

  typedef enum logic [2:0] {
    S_RX, S_H1_START, S_H1, S_H2_START, S_H2, S_OUT
  } st_e;
  st_e st;

  logic [KW-1:0] k_len, rx_n, fk, oidx;
  logic [KW-1:0] f1_q, f2_q;
  logic [IW-1:0] iter;
  llr_t          x2_tail [3];

  // ------------------------------------------------ interleaver generators
  logic          h2_start, feed2, pi_in_adv, pi_out_adv;
  logic [KW-1:0] pi_in, pi_out;

  qpp_interleaver #(.KMAX(KMAX)) u_interleaver (
    .clk(mclk), .rst(rst), .start(h2_start), .advance(pi_in_adv),
    .blk_len(k_len), .f1(f1_q), .f2(f2_q), .addr(pi_in)
  );
  qpp_interleaver #(.KMAX(KMAX)) u_deinterleaver (
    .clk(mclk), .rst(rst), .start(h2_start), .advance(pi_out_adv),
    .blk_len(k_len), .f1(f1_q), .f2(f2_q), .addr(pi_out)
  );

  // ------------------------------------------------------- block buffers
  logic rx_we;
  assign rx_we    = (st == S_RX) && valid_in;
  assign in_ready = (st == S_RX);

  logic          in_tail;        // feed index points into the tail
  logic [KW-1:0] sys_raddr;
  llr_t          sys_rd, par1_rd, par2_rd;

  assign in_tail   = (fk >= k_len);
  assign sys_raddr = (st == S_H2 && !in_tail) ? pi_in : fk;

  virtual_memory #(.WIDTH(LLR_W), .DEPTH(KMAX + 3)) u_sys_mem (
    .clk(mclk), .we(rx_we), .waddr(IAW'(rx_n)), .wdata(soft_to_llr(sym_x)),
    .raddr(IAW'(sys_raddr)), .rdata(sys_rd)
  );
  virtual_memory #(.WIDTH(LLR_W), .DEPTH(KMAX + 3)) u_par1_mem (
    .clk(mclk), .we(rx_we), .waddr(IAW'(rx_n)), .wdata(soft_to_llr(sym_z1)),
    .raddr(IAW'(fk)), .rdata(par1_rd)
  );
  virtual_memory #(.WIDTH(LLR_W), .DEPTH(KMAX + 3)) u_par2_mem (
    .clk(mclk), .we(rx_we), .waddr(IAW'(rx_n)), .wdata(soft_to_llr(sym_z2)),
    .raddr(IAW'(fk)), .rdata(par2_rd)
  );

  // ------------------------------------------------------ MAP decoders
  logic          m1_start, m1_in_valid, m1_out_valid, m1_hard, m1_done, m1_busy;
  logic          m2_start, m2_in_valid, m2_out_valid, m2_hard, m2_done, m2_busy;
  logic [KW-1:0] m1_out_idx, m2_out_idx;
  app_t          m1_llr, m2_llr;
  ext_t          m1_ext, m2_ext, m1_la, m2_la, le21_rd, le12_rd;
  llr_t          m2_ls;

  assign m1_start    = (st == S_H1_START);
  assign m2_start    = (st == S_H2_START);
  assign h2_start    = m2_start;
  assign m1_in_valid = (st == S_H1) && (fk <= k_len + KW'(2));
  assign m2_in_valid = (st == S_H2) && (fk <= k_len + KW'(2));
  assign feed2       = m2_in_valid;
  assign pi_in_adv   = feed2;
  assign pi_out_adv  = m2_out_valid;

  assign m1_la = (iter == '0 || in_tail) ? '0 : le21_rd;
  assign m2_la = in_tail ? '0 : le12_rd;
  assign m2_ls = in_tail ? x2_tail[2'(fk - k_len)] : sys_rd;

  map_decoder #(.KMAX(KMAX)) u_map1 (
    .clk(mclk), .rst(rst), .srst(srst), .start(m1_start), .blk_len(k_len),
    .in_valid(m1_in_valid), .in_ls(sys_rd), .in_lp(par1_rd), .in_la(m1_la),
    .busy(m1_busy), .out_valid(m1_out_valid), .out_idx(m1_out_idx),
    .out_llr(m1_llr), .out_ext(m1_ext), .out_hard(m1_hard), .done(m1_done)
  );
  map_decoder #(.KMAX(KMAX)) u_map2 (
    .clk(mclk), .rst(rst), .srst(srst), .start(m2_start), .blk_len(k_len),
    .in_valid(m2_in_valid), .in_ls(m2_ls), .in_lp(par2_rd), .in_la(m2_la),
    .busy(m2_busy), .out_valid(m2_out_valid), .out_idx(m2_out_idx),
    .out_llr(m2_llr), .out_ext(m2_ext), .out_hard(m2_hard), .done(m2_done)
  );

  // ------------------------------------------------ extrinsic memories
  logic last_iter;
  assign last_iter = (iter == IW'(N_ITER - 1));

  virtual_memory #(.WIDTH(EXT_W), .DEPTH(KMAX)) u_le12_mem (
    .clk(mclk), .we(m1_out_valid), .waddr(BAW'(m1_out_idx)), .wdata(m1_ext),
    .raddr(BAW'(pi_in)), .rdata(le12_rd)
  );
  virtual_memory #(.WIDTH(EXT_W), .DEPTH(KMAX)) u_le21_mem (
    .clk(mclk), .we(m2_out_valid), .waddr(BAW'(pi_out)), .wdata(m2_ext),
    .raddr(BAW'(fk)), .rdata(le21_rd)
  );

  // decoded bits in natural order
  logic bit_rd, out_push, fifo_full, fifo_empty;
  logic [1:0] fifo_rd;
  virtual_memory #(.WIDTH(1), .DEPTH(KMAX)) u_bit_mem (
    .clk(mclk), .we(m2_out_valid && last_iter), .waddr(BAW'(pi_out)),
    .wdata(m2_hard), .raddr(BAW'(oidx)), .rdata(bit_rd)
  );

  // ---------------------------------------------------------- output FIFO
  assign out_push = (st == S_OUT) && !fifo_full;

  sync_fifo #(.WIDTH(2), .DEPTH(16)) u_out_fifo (
    .clk(mclk), .rst(rst), .srst(srst),
    .wr_en(out_push), .wdata({oidx == k_len - 1'b1, bit_rd}),
    .rd_en(ready_out && !fifo_empty), .rdata(fifo_rd),
    .full(fifo_full), .empty(fifo_empty), .error(fifo_error)
  );
  assign valid_out = !fifo_empty;
  assign bit_out   = fifo_rd[0];
  assign frm_end_o = fifo_rd[1];
  assign busy      = (st != S_RX) || m1_busy || m2_busy;

  // A block needs at least one data step besides the three tail steps.
  a_frame_len: assert property (@(posedge mclk) disable iff (rst || srst)
    (rx_we && frm_end_i) |-> rx_n >= KW'(3));

  // -------------------------------------------------------------- control
  always_ff @(posedge mclk or posedge rst) begin
    if (rst) begin
      st <= S_RX; k_len <= '0; rx_n <= '0; fk <= '0; oidx <= '0;
      f1_q <= '0; f2_q <= '0; iter <= '0;
      for (int i = 0; i < 3; i++) x2_tail[i] <= '0;
    end else if (srst) begin
      st <= S_RX; k_len <= '0; rx_n <= '0; fk <= '0; oidx <= '0;
      f1_q <= '0; f2_q <= '0; iter <= '0;
      for (int i = 0; i < 3; i++) x2_tail[i] <= '0;
    end else begin
      unique case (st)
        S_RX: if (valid_in) begin
          if (rx_n == '0) begin
            f1_q <= f1;
            f2_q <= f2;
          end
          // the last three x' values are the tail of encoder 2
          x2_tail[0] <= x2_tail[1];
          x2_tail[1] <= x2_tail[2];
          x2_tail[2] <= soft_to_llr(sym_x2);
          if (frm_end_i || rx_n == KW'(KMAX + 2)) begin
            k_len <= rx_n - KW'(2);
            rx_n  <= '0;
            iter  <= '0;
            st    <= S_H1_START;
          end else begin
            rx_n <= rx_n + 1'b1;
          end
        end
        S_H1_START: begin
          fk <= '0;
          st <= S_H1;
        end
        S_H1: begin
          if (m1_in_valid) fk <= fk + 1'b1;
          if (m1_done) st <= S_H2_START;
        end
        S_H2_START: begin
          fk <= '0;
          st <= S_H2;
        end
        S_H2: begin
          if (m2_in_valid) fk <= fk + 1'b1;
          if (m2_done) begin
            if (last_iter) begin
              oidx <= '0;
              st   <= S_OUT;
            end else begin
              iter <= iter + 1'b1;
              st   <= S_H1_START;
            end
          end
        end
        S_OUT: if (out_push) begin
          if (oidx == k_len - 1'b1) st <= S_RX;
          else                      oidx <= oidx + 1'b1;
        end
        default: st <= S_RX;
      endcase
    end
  end
endmodule
