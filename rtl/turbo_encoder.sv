// turbo_encoder - LTE rate-1/3 turbo encoder with trellis termination.
//
// Two identical constituent encoders (rsc_encoder) and the turbo code
// internal interleaver (qpp_interleaver). A block of K bits c_k arrives
// serially on bit_in with valid_in, the last bit marked by frm_end_i; the
// bits are kept in a block buffer, as the second encoder needs the whole
// block to read it in interleaved order. The block is then encoded at one
// bit per clock: encoder 1 takes c_k, encoder 2 takes c'_k = c_pi(k),
// pi(k) = (f1*k + f2*k^2) mod K, and each output cycle carries
//     x_out = x_k = c_k, z_out = z_k, z2_out = z'_k     (tail_out = 0).
// Afterwards both input switches move to the termination position for 3
// cycles; each tail cycle carries x_out, z_out (encoder 1) and x2_out, z2_out
// (encoder 2), with tail_out = 1 and frm_end_o on the last one. Both
// encoders start every block in the zero state and end it there.
//
// Timing: the output of a K-bit block takes K+3 cycles of valid_out and
// starts 2 cycles after frm_end_i; bits are accepted (in_ready) only while
// no block is being encoded. f1 and f2 must be held valid from frm_end_i
// until the first output. Blocks longer than KMAX bits are cut at KMAX.
// Reset: asynchronous reset or synchronous srst, both active high.
module turbo_encoder
  import turbo_pkg::*;
#(
  parameter int KMAX = 6144,
  parameter int KW   = $clog2(KMAX + 4)
) (
  input  logic          clock,
  input  logic          reset,
  input  logic          srst,
  input  logic          bit_in,
  input  logic          valid_in,
  input  logic          frm_end_i,
  input  logic [KW-1:0] f1,
  input  logic [KW-1:0] f2,
  output logic          in_ready,
  output logic          valid_out,
  output logic          x_out,
  output logic          z_out,
  output logic          z2_out,
  output logic          x2_out,
  output logic          tail_out,
  output logic          frm_end_o
);
  localparam int BAW = $clog2(KMAX);

  typedef enum logic [1:0] {S_COLLECT, S_START, S_ENCODE, S_TAIL} st_e;
  st_e st;

  logic [KW-1:0] n, k_len;
  logic [1:0]    tcnt;
  logic          c_k, c_pi;
  logic [KW-1:0] pi;
  logic          enc_en, term, clear;
  logic          sys1, par1, sys2, par2;
  state_t        st1, st2;

  assign in_ready = (st == S_COLLECT);

  // Block buffer: one write port, two read ports (natural and interleaved).
  logic buf_mem [KMAX];
  always_ff @(posedge clock) begin
    if (st == S_COLLECT && valid_in) buf_mem[BAW'(n)] <= bit_in;
  end
  assign c_k  = buf_mem[BAW'(n)];
  assign c_pi = buf_mem[BAW'(pi)];

  qpp_interleaver #(.KMAX(KMAX)) u_interleaver (
    .clk(clock), .rst(reset), .start(st == S_START), .advance(st == S_ENCODE),
    .blk_len(k_len), .f1(f1), .f2(f2), .addr(pi)
  );

  assign enc_en = (st == S_ENCODE) || (st == S_TAIL);
  assign term   = (st == S_TAIL);
  assign clear  = srst || (st == S_START);

  rsc_encoder u_enc1 (
    .clk(clock), .rst(reset), .clear(clear), .en(enc_en), .term(term),
    .u(c_k), .sys(sys1), .par(par1), .state(st1)
  );
  rsc_encoder u_enc2 (
    .clk(clock), .rst(reset), .clear(clear), .en(enc_en), .term(term),
    .u(c_pi), .sys(sys2), .par(par2), .state(st2)
  );

  // Termination must bring both encoders back to the zero state.
  a_terminated: assert property (@(posedge clock) disable iff (reset)
    frm_end_o |-> (st1 == '0 && st2 == '0));

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      st <= S_COLLECT; n <= '0; k_len <= '0; tcnt <= '0;
      valid_out <= 1'b0; x_out <= 1'b0; z_out <= 1'b0; z2_out <= 1'b0;
      x2_out <= 1'b0; tail_out <= 1'b0; frm_end_o <= 1'b0;
    end else if (srst) begin
      st <= S_COLLECT; n <= '0; k_len <= '0; tcnt <= '0;
      valid_out <= 1'b0; x_out <= 1'b0; z_out <= 1'b0; z2_out <= 1'b0;
      x2_out <= 1'b0; tail_out <= 1'b0; frm_end_o <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      frm_end_o <= 1'b0;
      tail_out  <= 1'b0;
      x2_out    <= 1'b0;
      unique case (st)
        S_COLLECT: if (valid_in) begin
          if (frm_end_i || n == KW'(KMAX - 1)) begin
            k_len <= n + 1'b1;
            st    <= S_START;
          end else begin
            n <= n + 1'b1;
          end
        end
        S_START: begin
          n  <= '0;
          st <= S_ENCODE;
        end
        S_ENCODE: begin
          valid_out <= 1'b1;
          x_out     <= sys1;
          z_out     <= par1;
          z2_out    <= par2;
          if (n == k_len - 1'b1) begin
            tcnt <= '0;
            st   <= S_TAIL;
          end else begin
            n <= n + 1'b1;
          end
        end
        S_TAIL: begin
          valid_out <= 1'b1;
          tail_out  <= 1'b1;
          x_out     <= sys1;
          z_out     <= par1;
          x2_out    <= sys2;
          z2_out    <= par2;
          if (tcnt == 2'd2) begin
            frm_end_o <= 1'b1;
            n         <= '0;
            st        <= S_COLLECT;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        default: st <= S_COLLECT;
      endcase
    end
  end
endmodule
