// turbo_codec_top - LTE turbo coding chain: encoder and iterative decoder.
//
// The transmit side (turbo_encoder) and the receive side (turbo_decoder)
// of the LTE turbo code sit side by side on one clock and one reset. The
// channel between them is not part of the chip: the encoder's bits leave on
// the enc_* ports, and the receiver's 3-bit soft symbols enter on the dec_*
// ports, in the same order the encoder sends them (K data steps with
// x, z, z', then 3 tail steps with x, z, x', z'). Both sides take the
// block's QPP interleaver coefficients f1, f2 as inputs, so any LTE block
// size up to KMAX can be used at run time. See the two blocks for the
// protocols and the cycle counts.
module turbo_codec_top
  import turbo_pkg::*;
#(
  parameter int KMAX   = 6144,
  parameter int N_ITER = 6,
  parameter int KW     = $clog2(KMAX + 4)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          srst,
  // encoder
  input  logic          enc_bit_in,
  input  logic          enc_valid_in,
  input  logic          enc_frm_end_i,
  input  logic [KW-1:0] enc_f1,
  input  logic [KW-1:0] enc_f2,
  output logic          enc_in_ready,
  output logic          enc_valid_out,
  output logic          enc_x,
  output logic          enc_z,
  output logic          enc_z2,
  output logic          enc_x2,
  output logic          enc_tail,
  output logic          enc_frm_end_o,
  // decoder
  input  logic          dec_valid_in,
  input  logic          dec_frm_end_i,
  input  soft_t         dec_sym_x,
  input  soft_t         dec_sym_z1,
  input  soft_t         dec_sym_z2,
  input  soft_t         dec_sym_x2,
  input  logic [KW-1:0] dec_f1,
  input  logic [KW-1:0] dec_f2,
  output logic          dec_in_ready,
  output logic          dec_bit_out,
  output logic          dec_frm_end_o,
  output logic          dec_valid_out,
  input  logic          dec_ready_out,
  output logic          dec_fifo_error,
  output logic          dec_busy
);
  turbo_encoder #(.KMAX(KMAX)) u_encoder (
    .clock(clk), .reset(reset), .srst(srst),
    .bit_in(enc_bit_in), .valid_in(enc_valid_in), .frm_end_i(enc_frm_end_i),
    .f1(enc_f1), .f2(enc_f2), .in_ready(enc_in_ready),
    .valid_out(enc_valid_out), .x_out(enc_x), .z_out(enc_z), .z2_out(enc_z2),
    .x2_out(enc_x2), .tail_out(enc_tail), .frm_end_o(enc_frm_end_o)
  );

  turbo_decoder #(.KMAX(KMAX), .N_ITER(N_ITER)) u_decoder (
    .mclk(clk), .rst(reset), .srst(srst),
    .valid_in(dec_valid_in), .frm_end_i(dec_frm_end_i),
    .sym_x(dec_sym_x), .sym_z1(dec_sym_z1), .sym_z2(dec_sym_z2),
    .sym_x2(dec_sym_x2), .f1(dec_f1), .f2(dec_f2), .in_ready(dec_in_ready),
    .bit_out(dec_bit_out), .frm_end_o(dec_frm_end_o),
    .valid_out(dec_valid_out), .ready_out(dec_ready_out),
    .fifo_error(dec_fifo_error), .busy(dec_busy)
  );
endmodule
