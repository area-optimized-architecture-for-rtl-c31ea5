// mc_ref_pkg: reference model for the MixColumns testbenches.
//
// Computes GF(2^8) products by the textbook shift-and-add loop over the
// bits of the multiplier (reduction polynomial x^8+x^4+x^3+x+1) and applies
// the full 4x4 matrices of MixColumns and InvMixColumns. It shares no code
// with the design, so it checks the design's factoring of the constants.
package mc_ref_pkg;

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = aa[7] ? ((aa << 1) ^ 8'h1B) : (aa << 1);
    end
    return p;
  endfunction

  // Row r, column k of the forward / inverse matrix.
  function automatic logic [7:0] coef(input bit inv, input int r, input int k);
    logic [7:0] fwd [4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    logic [7:0] bwd [4] = '{8'h0E, 8'h0B, 8'h0D, 8'h09};
    int j;
    j = (k - r + 4) % 4;
    return inv ? bwd[j] : fwd[j];
  endfunction

  // One column, row 0 in bits [31:24].
  function automatic logic [31:0] mix_col(input bit inv, input logic [31:0] c);
    logic [31:0] o;
    for (int r = 0; r < 4; r++) begin
      logic [7:0] acc;
      acc = 8'h00;
      for (int k = 0; k < 4; k++)
        acc ^= gmul(coef(inv, r, k), c[31-8*k -: 8]);
      o[31-8*r -: 8] = acc;
    end
    return o;
  endfunction

  // A whole state, byte 0 in bits [127:120].
  function automatic logic [127:0] mix_state(input bit inv, input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      o[127-32*c -: 32] = mix_col(inv, s[127-32*c -: 32]);
    return o;
  endfunction

endpackage
