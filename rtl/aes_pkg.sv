// aes_pkg: constants and GF(2^8) arithmetic shared by both AES cores.
//
// All byte arithmetic is in GF(2^8) with the AES reduction polynomial
// p(x) = x^8 + x^4 + x^3 + x + 1. The S-box is computed, not tabulated:
// multiplicative inverse (x^254) followed by the affine transform, and the
// inverse S-box as inverse affine followed by inversion. MixColumn and
// InvMixColumn act on one 32-bit column; row 0 of a column sits in bits
// [31:24], row 3 in bits [7:0]. The functions are purely combinational and
// synthesizable.
package aes_pkg;

  localparam int unsigned NR      = 10;   // rounds for a 128-bit key
  localparam int unsigned NK      = 4;    // key words for a 128-bit key
  localparam int unsigned NWORDS  = 4 * (NR + 1);  // 44 expanded key words

  typedef enum logic {MODE_ENC = 1'b0, MODE_DEC = 1'b1} aes_mode_e;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] acc, t;
    acc = 8'h00;
    t   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= t;
      t = xtime(t);
    end
    return acc;
  endfunction

  function automatic logic [7:0] gf_sq(input logic [7:0] a);
    return gf_mul(a, a);
  endfunction

  // x^14 = x^2 * x^4 * x^8 : first half of the inversion chain
  function automatic logic [7:0] gf_pow14(input logic [7:0] a);
    logic [7:0] a2, a4, a8;
    a2 = gf_sq(a);
    a4 = gf_sq(a2);
    a8 = gf_sq(a4);
    return gf_mul(gf_mul(a2, a4), a8);
  endfunction

  // x^240 = x^16 * x^32 * x^64 * x^128 : second half, from x^16
  function automatic logic [7:0] gf_pow240_from16(input logic [7:0] a16);
    logic [7:0] a32, a64, a128;
    a32  = gf_sq(a16);
    a64  = gf_sq(a32);
    a128 = gf_sq(a64);
    return gf_mul(gf_mul(a16, a32), gf_mul(a64, a128));
  endfunction

  // x^16 from x: four squarings (a linear map)
  function automatic logic [7:0] gf_pow16(input logic [7:0] a);
    return gf_sq(gf_sq(gf_sq(gf_sq(a))));
  endfunction

  // multiplicative inverse, 0 maps to 0 (0^254 = 0)
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    return gf_mul(gf_pow14(a), gf_pow240_from16(gf_pow16(a)));
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] a, input int unsigned n);
    return (a << n) | (a >> (8 - n));
  endfunction

  // affine transform of SubBytes: b ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 0x63
  function automatic logic [7:0] affine(input logic [7:0] b);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // inverse affine transform: rotl1 ^ rotl3 ^ rotl6 ^ 0x05
  function automatic logic [7:0] inv_affine(input logic [7:0] b);
    return rotl8(b, 1) ^ rotl8(b, 3) ^ rotl8(b, 6) ^ 8'h05;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    return affine(gf_inv(a));
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] a);
    return gf_inv(inv_affine(a));
  endfunction

  function automatic logic [31:0] mixcol(input logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic logic [31:0] inv_mixcol(input logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09),
            gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d),
            gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b),
            gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e)};
  endfunction

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

endpackage
