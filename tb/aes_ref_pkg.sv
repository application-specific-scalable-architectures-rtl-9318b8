// aes_ref_pkg: reference AES-128 model for the testbenches.
//
// Written independently of the RTL: GF(2^8) products are formed as a 15-bit
// carry-less product reduced by polynomial division, the S-box by searching
// for the inverse and applying the affine matrix bit by bit, and the cipher
// follows the round structure of FIPS-197 on a 4x4 byte array.
package aes_ref_pkg;

  typedef logic [7:0] state_t [16];   // byte 4*c + r

  function automatic logic [7:0] ref_mul(input logic [7:0] a, input logic [7:0] b);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] inv, s;
    inv = 8'h00;
    for (int x = 1; x < 256; x++) if (ref_mul(a, 8'(x)) == 8'h01) inv = 8'(x);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic logic [7:0] ref_inv_sbox(input logic [7:0] a);
    for (int x = 0; x < 256; x++) if (ref_sbox(8'(x)) == a) return 8'(x);
    return 8'h00;
  endfunction

  // fast tables built once from the slow functions above
  logic [7:0] SB [256];
  logic [7:0] ISB [256];
  bit tables_ready = 0;

  function automatic void build_tables();
    if (tables_ready) return;
    for (int x = 0; x < 256; x++) SB[x] = ref_sbox(8'(x));
    for (int x = 0; x < 256; x++) ISB[SB[x]] = 8'(x);
    tables_ready = 1;
  endfunction

  function automatic void expand(input logic [127:0] key, output logic [31:0] w [44]);
    logic [7:0] rc;
    logic [31:0] t;
    build_tables();
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {SB[t[23:16]], SB[t[15:8]], SB[t[7:0]], SB[t[31:24]]} ^ {rc, 24'h0};
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
  endfunction

  function automatic logic [127:0] to_vec(input state_t s);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127-8*i -: 8] = s[i];
    return v;
  endfunction

  function automatic state_t to_state(input logic [127:0] v);
    state_t s;
    for (int i = 0; i < 16; i++) s[i] = v[127-8*i -: 8];
    return s;
  endfunction

  function automatic state_t add_key(input state_t s, input logic [31:0] w [44], input int rnd);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[4*c+r] ^= w[4*rnd+c][31-8*r -: 8];
    return s;
  endfunction

  function automatic state_t mix(input state_t s, input logic [7:0] m0, input logic [7:0] m1,
                                 input logic [7:0] m2, input logic [7:0] m3);
    state_t o;
    logic [7:0] m [4];
    m = '{m0, m1, m2, m3};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[4*c+r] = 8'h00;
        for (int k = 0; k < 4; k++) o[4*c+r] ^= ref_mul(m[(k - r + 4) % 4], s[4*c+k]);
      end
    return o;
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] key, input logic [127:0] pt);
    logic [31:0] w [44];
    state_t s, t;
    expand(key, w);
    s = add_key(to_state(pt), w, 0);
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int i = 0; i < 16; i++) s[i] = SB[s[i]];
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) t[4*c+r] = s[4*((c+r)%4)+r];
      s = t;
      if (rnd != 10) s = mix(s, 8'h02, 8'h03, 8'h01, 8'h01);
      s = add_key(s, w, rnd);
    end
    return to_vec(s);
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] key, input logic [127:0] ct);
    logic [31:0] w [44];
    state_t s, t;
    expand(key, w);
    s = add_key(to_state(ct), w, 10);
    for (int rnd = 9; rnd >= 0; rnd--) begin
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) t[4*((c+r)%4)+r] = s[4*c+r];
      s = t;
      for (int i = 0; i < 16; i++) s[i] = ISB[s[i]];
      s = add_key(s, w, rnd);
      if (rnd != 0) s = mix(s, 8'h0e, 8'h0b, 8'h0d, 8'h09);
    end
    return to_vec(s);
  endfunction

endpackage
