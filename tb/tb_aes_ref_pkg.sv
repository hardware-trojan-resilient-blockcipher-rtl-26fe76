// tb_aes_ref_pkg: reference AES-128 for the testbenches, written
// independently of the design. The S-box inverts in GF(2^8) directly
// (x^254 by square-and-multiply with the AES polynomial 0x11B) instead of
// through the composite field the design uses, then applies the FIPS-197
// affine map. Byte 0 of a block is bits [127:120].
package tb_aes_ref_pkg;

  function automatic logic [7:0] ref_gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p = '0; aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? 8'h1B : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] r, y;
    r = 8'h01;
    for (int i = 0; i < 254; i++) r = ref_gmul(r, a);
    if (a == 8'h00) r = 8'h00;
    for (int i = 0; i < 8; i++)
      y[i] = r[i] ^ r[(i+4)%8] ^ r[(i+5)%8] ^ r[(i+6)%8] ^ r[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  function automatic logic [127:0] ref_aes128(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0] s [16], t [16], k [16], tmp [4], rc;
    for (int i = 0; i < 16; i++) begin
      s[i] = pt[127-8*i -: 8] ^ key[127-8*i -: 8];
      k[i] = key[127-8*i -: 8];
    end
    rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      // key schedule
      tmp[0] = ref_sbox(k[13]) ^ rc; tmp[1] = ref_sbox(k[14]);
      tmp[2] = ref_sbox(k[15]);      tmp[3] = ref_sbox(k[12]);
      for (int i = 0; i < 4; i++) k[i] ^= tmp[i];
      for (int i = 4; i < 16; i++) k[i] ^= k[i-4];
      rc = ref_gmul(rc, 8'h02);
      // SubBytes + ShiftRows
      for (int c = 0; c < 4; c++)
        for (int rr = 0; rr < 4; rr++)
          t[4*c+rr] = ref_sbox(s[4*((c+rr)%4)+rr]);
      // MixColumns
      for (int c = 0; c < 4; c++) begin
        if (r != 10) begin
          s[4*c+0] = ref_gmul(t[4*c],8'h02)^ref_gmul(t[4*c+1],8'h03)^t[4*c+2]^t[4*c+3];
          s[4*c+1] = t[4*c]^ref_gmul(t[4*c+1],8'h02)^ref_gmul(t[4*c+2],8'h03)^t[4*c+3];
          s[4*c+2] = t[4*c]^t[4*c+1]^ref_gmul(t[4*c+2],8'h02)^ref_gmul(t[4*c+3],8'h03);
          s[4*c+3] = ref_gmul(t[4*c],8'h03)^t[4*c+1]^t[4*c+2]^ref_gmul(t[4*c+3],8'h02);
        end else begin
          for (int rr = 0; rr < 4; rr++) s[4*c+rr] = t[4*c+rr];
        end
      end
      for (int i = 0; i < 16; i++) s[i] ^= k[i];
    end
    for (int i = 0; i < 16; i++) ref_aes128[127-8*i -: 8] = s[i];
  endfunction

  // ShiftRows, MixColumns (optional) and a key XOR on a plain block
  function automatic logic [127:0] ref_round_lin(input logic [127:0] v, input logic [127:0] k,
                                                 input bit mix);
    logic [7:0] s [16], t [16];
    logic [127:0] o;
    for (int i = 0; i < 16; i++) s[i] = v[127-8*i -: 8];
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) t[4*c+r] = s[4*((c+r)%4)+r];
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s[4*c+r] = mix ? (ref_gmul(t[4*c+r], 8'h02) ^ ref_gmul(t[4*c+(r+1)%4], 8'h03) ^
                          t[4*c+(r+2)%4] ^ t[4*c+(r+3)%4])
                       : t[4*c+r];
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = s[i];
    return o ^ k;
  endfunction

  // last round key of the AES-128 key schedule
  function automatic logic [127:0] ref_last_rk(input logic [127:0] key);
    logic [7:0] k [16], tmp [4], rc;
    logic [127:0] o;
    for (int i = 0; i < 16; i++) k[i] = key[127-8*i -: 8];
    rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      tmp[0] = ref_sbox(k[13]) ^ rc; tmp[1] = ref_sbox(k[14]);
      tmp[2] = ref_sbox(k[15]);      tmp[3] = ref_sbox(k[12]);
      for (int i = 0; i < 4; i++) k[i] ^= tmp[i];
      for (int i = 4; i < 16; i++) k[i] ^= k[i-4];
      rc = ref_gmul(rc, 8'h02);
    end
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = k[i];
    return o;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
