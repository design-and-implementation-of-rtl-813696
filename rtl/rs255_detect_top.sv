// rs255_detect_top -- RS(255,223) encode-and-detect chain.
//
// The encoder turns 223 message bytes into a 255-byte systematic codeword
// c(x). Its output passes a channel modelled by an error pattern e: each
// received byte is r = c + e (bytewise XOR), the relation r(x) = c(x) + e(x).
// The syndrome calculator evaluates r(x) at alpha^1..alpha^32 in the same
// cycle stream; after the last byte all 32 syndromes are zero for an
// error-free word and error_detected goes high otherwise.
//
// Interface: one byte per enabled clock. The source drives shift low for the
// 223 message bytes and high for the 32 parity bytes, and raises first with
// the first message byte. err_pattern is the channel error for the current
// byte (0 for a clean channel). code_out is the transmitted byte, rx_byte the
// received one. syndromes and error_detected are valid the cycle after the
// 255th byte. clrn is an asynchronous active-low clear of both blocks.
// The error pattern input is this design's way of bringing the channel into
// the chain; error correction (locating and fixing errors) is not part of it.
module rs255_detect_top
  import gf256_pkg::*;
(
  input  logic clk,
  input  logic clrn,
  input  logic enable,
  input  logic first,
  input  logic shift,
  input  gf_t  msg_in,
  input  gf_t  err_pattern,
  output gf_t  code_out,
  output gf_t  rx_byte,
  output gf_t  syndromes [RS_NPAR],
  output logic error_detected
);

  rs_encoder u_enc (
    .clk   (clk),
    .clrn  (clrn),
    .enable(enable),
    .shift (shift),
    .u     (msg_in),
    .y     (code_out)
  );

  assign rx_byte = code_out ^ err_pattern;

  syndrome u_syn (
    .clk    (clk),
    .clrn   (clrn),
    .enable (enable),
    .init   (first),
    .u      (rx_byte),
    .s      (syndromes),
    .nonzero(error_detected)
  );

endmodule
