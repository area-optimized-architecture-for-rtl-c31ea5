// gf_coef_unit: multiplies one state byte by the four coefficients of the
// selected AES column matrix, with one circuit shared by both directions.
//
// Both matrices are circulant, so a byte s only ever meets four distinct
// coefficients C[0..3] (row i, column k of the matrix uses C[(k-i) mod 4]):
//   MixColumns    C = {02, 03, 01, 01}
//   InvMixColumns C = {0E, 0B, 0D, 09}
// A single chain of three xtime stages gives 2s, 4s and 8s; every product is
// an XOR of s and those, and the direction input gates the 4s and 8s terms:
//   prod[3] = s  ^ inv&8s                 ({01} or {09})
//   prod[2] = prod[3] ^ inv&4s            ({01} or {0D})
//   prod[1] = prod[3] ^ 2s                ({03} or {0B})
//   prod[0] = 2s ^ inv&(8s ^ 4s)          ({02} or {0E})
// Building each constant from shifts and XORs, and sharing the terms between
// the forward and inverse products through the mode select, follows the
// document's description; the exact factoring above is this design's own.
// Purely combinational; no clock.
module gf_coef_unit
  import aes_mc_pkg::*;
(
  input  byte_t       s,      // incoming state byte
  input  mc_mode_e    mode,   // MC_FWD or MC_INV
  output byte_t [3:0] prod    // prod[j] = C[j] * s
);

  byte_t s2, s4, s8;
  byte_t inv_mask;

  always_comb begin
    s2       = xtime(s);
    s4       = xtime(s2);
    s8       = xtime(s4);
    inv_mask = (mode == MC_INV) ? 8'hFF : 8'h00;

    prod[3]  = s ^ (s8 & inv_mask);
    prod[2]  = prod[3] ^ (s4 & inv_mask);
    prod[1]  = prod[3] ^ s2;
    prod[0]  = s2 ^ ((s8 ^ s4) & inv_mask);
  end

endmodule
