// rs_top: Reed-Solomon protected link, encoder and decoder side by side.
//
// The transmit side is the systematic RS(N,K) encoder, the receive side the
// RS(N,K) decoder; the channel between them is not part of the hardware, so
// the encoder's output and the decoder's input are separate ports. Connect
// enc_d_out/enc_out_enb to dec_d_in/dec_in_enb (through a channel, an
// interleaver or a storage medium) to close the link.
//
// Ports prefixed enc_ belong to rs_encoder and dec_ to rs_decoder; see
// those modules for the handshakes and timing. Both share clk and reset
// (synchronous, active high).
module rs_top
  import gf_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned K = 28
) (
  input  logic clk,
  input  logic reset,
  // encoder
  input  logic enc_enable,
  input  gf_t  enc_d_in,
  output logic enc_in_ready,
  output logic enc_out_enb,
  output gf_t  enc_d_out,
  output logic enc_rs_ins,
  output logic enc_rs_calc,
  // decoder
  input  logic dec_in_enb,
  input  gf_t  dec_d_in,
  output logic dec_in_ready,
  output logic dec_out_enb,
  output gf_t  dec_d_out,
  output logic dec_done,
  output logic dec_err
);

  rs_encoder #(.N(N), .K(K)) u_enc (
    .clk(clk), .reset(reset), .enable(enc_enable), .d_in(enc_d_in),
    .in_ready(enc_in_ready), .out_enb(enc_out_enb), .d_out(enc_d_out),
    .rs_ins(enc_rs_ins), .rs_calc(enc_rs_calc)
  );

  rs_decoder #(.N(N), .K(K)) u_dec (
    .clk(clk), .reset(reset), .in_enb(dec_in_enb), .d_in(dec_d_in),
    .in_ready(dec_in_ready), .out_enb(dec_out_enb), .d_out(dec_d_out),
    .dec_done(dec_done), .dec_err(dec_err)
  );

endmodule
