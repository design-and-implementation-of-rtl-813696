// syndrome -- syndrome calculator for RS(255,223): S_i = r(alpha^i),
// i = 1..32, evaluated over the 255 received bytes.
//
// Each of the 32 syndrome registers is updated by a syndrome_block with
// S_i <= alpha^i * S_i + r, Horner's rule, the first received byte being the
// highest-degree coefficient r_254. When init is high with enable, the
// register is loaded with the received byte alone (its old value is ignored),
// which starts a new block without a separate clear cycle. After the 255th
// enabled byte, s[i-1] holds S_i. All syndromes are zero exactly when the
// received word is a codeword; nonzero flags any nonzero syndrome (it is a
// combinational OR of the registers and is meaningful once the block ends).
//
// Interface: u is the received byte, enable accepts it, init marks the first
// byte of a block, clrn clears all registers asynchronously (active low).
// s[0..31] are S_1..S_32. Latency: the syndromes are valid in the cycle after
// the last byte is accepted; one byte per clock, no stall.
// The 32 cells and their 32 x 8 registers follow the published structure;
// Horner evaluation, the init/enable control and the nonzero flag are this
// design's choices.
module syndrome
  import gf256_pkg::*;
(
  input  logic clk,
  input  logic clrn,                 // asynchronous clear, active low
  input  logic enable,               // accept u this cycle
  input  logic init,                 // u is the first byte of a block
  input  gf_t  u,                    // received symbol
  output gf_t  s [RS_NPAR],          // s[i-1] = S_i
  output logic nonzero               // some syndrome is nonzero: error detected
);

  gf_t s_q    [RS_NPAR];
  gf_t s_in   [RS_NPAR];
  gf_t s_next [RS_NPAR];

  for (genvar i = 0; i < RS_NPAR; i++) begin : g_cell
    assign s_in[i] = init ? '0 : s_q[i];
    syndrome_block #(.ROOT(i + 1)) u_blk (.s(s_in[i]), .r(u), .s_next(s_next[i]));
  end

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) begin
      for (int i = 0; i < RS_NPAR; i++) s_q[i] <= '0;
    end else if (enable) begin
      for (int i = 0; i < RS_NPAR; i++) s_q[i] <= s_next[i];
    end
  end

  always_comb begin
    nonzero = 1'b0;
    for (int i = 0; i < RS_NPAR; i++) nonzero |= (s_q[i] != '0);
  end

  assign s = s_q;

endmodule
