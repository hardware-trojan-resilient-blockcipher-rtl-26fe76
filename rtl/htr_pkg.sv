// htr_pkg: shared types, constants and arithmetic for the Trojan-resilient
// AES-128 built from one trusted master and three multi-party-computation
// (MPC) slaves.
//
// Field arithmetic. AES works in GF(2^8) with the polynomial x^8+x^4+x^3+x+1.
// The slaves invert bytes in the composite field GF((2^4)^2): a byte is first
// mapped by the isomorphism delta (the 8x8 bit matrix T below, row 0 giving the
// most significant output bit, column 0 weighing the most significant input
// bit), split in a high nibble a1 and a low nibble a0, and inverted with
//   (a1 x + (a1+a0)) / (a0 (a1+a0) + a1^2 * w14)
// where GF(2^4) uses x^4+x+1 and w14 = 4'h9. The matrix T and the inversion
// formula follow the document; the GF(2^4) polynomial and the value of w14 are
// the ones for which T is a field isomorphism (checked exhaustively). The
// inverse map delta^-1 (TINV) is derived from T.
//
// Sharing. A value v is held by slave i as the pair (x_i, a_i) with
// a_i = v ^ x_{i-1} (indices wrap 1..3) and x_1 ^ x_2 ^ x_3 = 0, so that
// v = x_{i-1} ^ a_i. Linear maps apply to both components; an affine constant
// is added to the a component only.
package htr_pkg;

  // 128-bit AES state as 16 bytes, byte 0 = bits [127:120] (FIPS-197 order),
  // column c = bytes 4c..4c+3, row r = byte index mod 4.
  typedef logic [127:0] block_t;

  // One MPC share of a 128-bit value.
  typedef struct packed {
    logic [127:0] x;
    logic [127:0] a;
  } share128_t;

  localparam int AES_ROUNDS = 10;
  localparam logic [3:0] W14 = 4'h9;

  // delta (document Eq. 2.17), rows MSB first
  localparam logic [7:0] T_ROWS    [8] = '{8'hA0, 8'hD2, 8'h0C, 8'hA2,
                                           8'h16, 8'h74, 8'h48, 8'h7B};
  // delta^-1, derived from T
  localparam logic [7:0] TINV_ROWS [8] = '{8'h6A, 8'h76, 8'hEA, 8'hCC,
                                           8'h74, 8'h54, 8'h90, 8'hB5};

  // ---------------------------------------------------------------- GF(2^4)
  function automatic logic [3:0] gf16_mul(input logic [3:0] a, input logic [3:0] b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--)
      if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  function automatic logic [3:0] gf16_sq(input logic [3:0] a);
    return gf16_mul(a, a);
  endfunction

  // -------------------------------------------------------- GF(2) matrices
  function automatic logic [7:0] mat8(input logic [7:0] rows [8], input logic [7:0] v);
    logic [7:0] y;
    for (int r = 0; r < 8; r++) y[7-r] = ^(rows[r] & v);
    return y;
  endfunction

  function automatic logic [7:0] delta(input logic [7:0] v);
    return mat8(T_ROWS, v);
  endfunction

  function automatic logic [7:0] delta_inv(input logic [7:0] v);
    return mat8(TINV_ROWS, v);
  endfunction

  // Linear part of the AES S-box affine map (the 0x63 constant is separate).
  function automatic logic [7:0] aes_affine_lin(input logic [7:0] y);
    logic [7:0] o;
    for (int i = 0; i < 8; i++)
      o[i] = y[i] ^ y[(i+4)%8] ^ y[(i+5)%8] ^ y[(i+6)%8] ^ y[(i+7)%8];
    return o;
  endfunction

  localparam logic [7:0] AES_AFFINE_C = 8'h63;

  // Plain (unshared) AES S-box through the same composite-field path.
  function automatic logic [7:0] aes_sbox(input logic [7:0] v);
    logic [7:0] d;
    logic [3:0] h, l, s, dd, d2, d4, d6, d8, d14, b1, b0;
    d   = delta(v);
    h   = d[7:4];
    l   = d[3:0];
    s   = h ^ l;
    dd  = gf16_mul(s, l) ^ gf16_mul(gf16_sq(h), W14);
    d2  = gf16_sq(dd);
    d4  = gf16_sq(d2);
    d6  = gf16_mul(d2, d4);
    d8  = gf16_sq(d4);
    d14 = gf16_mul(d6, d8);
    b1  = gf16_mul(d14, h);
    b0  = gf16_mul(d14, s);
    return aes_affine_lin(delta_inv({b1, b0})) ^ AES_AFFINE_C;
  endfunction

  // -------------------------------------------------------- AES linear layer
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = s[127 - 8*(4*((c + r) % 4) + r) -: 8];
    return o;
  endfunction

  function automatic logic [31:0] mix_column(input logic [31:0] col);
    logic [7:0] b0, b1, b2, b3;
    {b0, b1, b2, b3} = col;
    return {xtime(b0) ^ xtime(b1) ^ b1 ^ b2 ^ b3,
            b0 ^ xtime(b1) ^ xtime(b2) ^ b2 ^ b3,
            b0 ^ b1 ^ xtime(b2) ^ xtime(b3) ^ b3,
            xtime(b0) ^ b0 ^ b1 ^ b2 ^ xtime(b3)};
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = mix_column(s[127 - 32*c -: 32]);
    return o;
  endfunction

  // Round constant of key-expansion round r (1..10), as the top byte of a word.
  function automatic logic [7:0] rcon(input int unsigned r);
    logic [7:0] c;
    c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

  // One AES-128 key-expansion step, given the previous round key and the
  // already substituted RotWord of its last word (with rcon added).
  function automatic block_t key_step(input block_t k, input logic [31:0] t);
    logic [31:0] w0, w1, w2, w3;
    w0 = k[127:96] ^ t;
    w1 = k[95:64]  ^ w0;
    w2 = k[63:32]  ^ w1;
    w3 = k[31:0]   ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  function automatic logic [31:0] rot_word(input logic [31:0] w);
    return {w[23:0], w[31:24]};
  endfunction

endpackage
