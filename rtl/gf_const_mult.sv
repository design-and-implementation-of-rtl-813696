// gf_const_mult -- combinational GF(2^8) multiplier by a fixed constant.
//
// y = COEF * a in GF(2^8) with p(x) = x^8+x^4+x^3+x^2+1. The product is
// linear in the bits of a, so it is formed as an XOR network: bit b of a
// selects the precomputed column COEF * alpha^b, and the selected columns
// are XORed together. The columns are constants worked out at elaboration,
// so only XOR gates remain after synthesis (no general multiplier).
//
// The encoder uses 32 of these, one per generator coefficient g0..g31
// (default COEF = 45 = g0); the syndrome cells use them with COEF = alpha^i.
// Interface: a[7:0] in, y[7:0] out, no clock; the result follows the input
// within the same cycle. The field and the constants are the published ones;
// the XOR-matrix structure is this design's choice.
module gf_const_mult
  import gf256_pkg::*;
#(
  parameter gf_t COEF = 8'd45
) (
  input  gf_t a,
  output gf_t y
);

  // Column b of the multiplication matrix: COEF * alpha^b.
  function automatic gf_t column(int b);
    gf_t c = COEF;
    for (int i = 0; i < b; i++) c = gf_xtime(c);
    return c;
  endfunction

  always_comb begin
    y = '0;
    for (int b = 0; b < GF_M; b++)
      y ^= column(b) & {GF_M{a[b]}};
  end

endmodule
