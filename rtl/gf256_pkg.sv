// gf256_pkg -- shared constants and elaboration-time functions for the
// RS(255,223) encoder and syndrome calculator.
//
// The field is GF(2^8) built from the primitive polynomial
// p(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11D), with alpha = 0x02 as primitive
// element. The code is RS(255,223): 223 message bytes, 32 parity bytes, and
// the generator polynomial g(x) = (x + alpha^1)(x + alpha^2)...(x + alpha^32),
// whose coefficients g0..g32 are listed below (g32 = 1, monic).
//
// The functions are used only to compute constants while the design is
// elaborated (multiplier matrices, powers of alpha); no function here is
// meant to be synthesized into a general multiplier.
package gf256_pkg;

  typedef logic [7:0] gf_t;              // one code symbol / field element

  localparam int unsigned  GF_M     = 8;         // bits per symbol
  localparam logic [8:0]   GF_POLY  = 9'h11D;    // x^8+x^4+x^3+x^2+1
  localparam int unsigned  RS_N     = 255;       // code length
  localparam int unsigned  RS_K     = 223;       // message symbols
  localparam int unsigned  RS_NPAR  = RS_N - RS_K; // 2t = 32 parity symbols

  // Generator polynomial coefficients, g[0] is the constant term.
  localparam gf_t RS_GEN [0:RS_NPAR] = '{
    8'd45,  8'd216, 8'd239, 8'd24,  8'd253, 8'd104, 8'd27,  8'd40,
    8'd107, 8'd50,  8'd163, 8'd210, 8'd227, 8'd134, 8'd224, 8'd158,
    8'd119, 8'd13,  8'd158, 8'd1,   8'd238, 8'd164, 8'd82,  8'd43,
    8'd15,  8'd232, 8'd246, 8'd142, 8'd50,  8'd189, 8'd29,  8'd232,
    8'd1
  };

  // Multiply by alpha (x): shift left and reduce modulo p(x).
  function automatic gf_t gf_xtime(gf_t a);
    return a[7] ? ((a << 1) ^ GF_POLY[7:0]) : (a << 1);
  endfunction

  // alpha^e, e >= 0.
  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t r = 8'h01;
    for (int unsigned i = 0; i < (e % 255); i++) r = gf_xtime(r);
    return r;
  endfunction

  // Full field product, shift-and-add; elaboration use only.
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t acc = '0;
    gf_t p   = a;
    for (int i = 0; i < GF_M; i++) begin
      if (b[i]) acc ^= p;
      p = gf_xtime(p);
    end
    return acc;
  endfunction

endpackage
