// rs_encoder -- systematic RS(255,223) encoder built as a GF(2^8) linear
// feedback shift register.
//
// The parity register is 32 bytes, par[0..31]. While shift = 0 every enabled
// cycle takes one message byte u: the feedback byte fb = u + par[31] is
// multiplied by the generator coefficients g0..g31 (32 constant multipliers)
// and par[j] <= par[j-1] + g_j * fb, par[0] <= g0 * fb. After the 223rd
// message byte the register holds the remainder of x^32 * m(x) divided by
// g(x), i.e. the 32 parity bytes. While shift = 1 the feedback is forced to
// zero and the register becomes a plain shift register: each enabled cycle
// moves par[31] out and shifts a zero in, so after 32 shift cycles the
// register is clear again and the next block can start.
//
// Interface: u is the message byte; y is the code byte, equal to u while
// shift = 0 and to par[31] while shift = 1 (combinational, so the code byte
// appears in the same cycle as the input that produces it and a block takes
// 255 enabled cycles). clrn clears the register asynchronously (active low).
// Sequencing of shift (223 cycles low, then 32 high) is left to the source
// of the data, as in the design this follows, whose only storage is the
// 32 x 8 parity flip-flops.
module rs_encoder
  import gf256_pkg::*;
(
  input  logic clk,
  input  logic clrn,     // asynchronous clear, active low
  input  logic enable,   // one symbol per cycle when high
  input  logic shift,    // 0: message phase, 1: parity shift-out phase
  input  gf_t  u,        // message symbol
  output gf_t  y         // code symbol
);

  gf_t par  [RS_NPAR];   // par[RS_NPAR-1] is the highest-degree parity byte
  gf_t fb;
  gf_t prod [RS_NPAR];

  assign fb = shift ? '0 : (u ^ par[RS_NPAR-1]);

  for (genvar j = 0; j < RS_NPAR; j++) begin : g_mul
    gf_const_mult #(.COEF(RS_GEN[j])) u_gmul (.a(fb), .y(prod[j]));
  end

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) begin
      for (int j = 0; j < RS_NPAR; j++) par[j] <= '0;
    end else if (enable) begin
      par[0] <= prod[0];
      for (int j = 1; j < RS_NPAR; j++) par[j] <= par[j-1] ^ prod[j];
    end
  end

  assign y = shift ? par[RS_NPAR-1] : u;

endmodule
