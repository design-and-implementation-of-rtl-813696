// syndrome_block -- datapath of one syndrome cell S_i.
//
// Computes s_next = alpha^ROOT * s + r in GF(2^8), which is one step of
// Horner's rule for evaluating the received polynomial r(x) at x = alpha^ROOT.
// The multiplication by the constant alpha^ROOT is a gf_const_mult; the
// addition is a bytewise XOR. With r = 0 the block is a plain constant
// multiplier by alpha^ROOT (for ROOT = 3 the constant is 8).
//
// ROOT ranges over 1..32 for the 32 roots of the RS(255,223) generator; the
// default is 3. Purely combinational: the register that holds S_i lives in
// the syndrome module. The constants alpha^i follow the published syndrome
// block values; merging the XOR into the block is this design's choice.
module syndrome_block
  import gf256_pkg::*;
#(
  parameter int unsigned ROOT = 3
) (
  input  gf_t s,       // current partial syndrome
  input  gf_t r,       // received symbol
  output gf_t s_next   // alpha^ROOT * s + r
);

  localparam gf_t ALPHA_I = gf_alpha_pow(ROOT);

  gf_t prod;

  gf_const_mult #(.COEF(ALPHA_I)) u_mul (.a(s), .y(prod));

  assign s_next = prod ^ r;

endmodule
