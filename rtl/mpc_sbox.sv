// mpc_sbox: AES S-box on 16 secret-shared bytes, one third of a three-party
// computation. Every slave runs an identical copy; each holds one share
// (x, a) of every byte.
//
// How it works: the byte inverse is computed in the composite field
// GF((2^4)^2). The isomorphism delta, squarings, the constant w14, delta^-1
// and the linear part of the affine map are GF(2)-linear and are applied to
// both share components locally. The five GF(2^4) multiplications per byte are
// the only non-linear steps. For a product of shares (x, a) and (y, b) the
// slave computes c = x*y ^ a*b ^ o with fresh correlated randomness o (the
// three o sum to zero), sends c to the next slave, receives c' from the
// previous one and keeps the new share (c ^ c', c). The multiplications are
// grouped in four layers, one exchange each:
//   layer 1: p   = (h^l) * l           (64 bits exchanged, 16 x 4)
//   layer 2: d6  = d^2 * d^4           (64 bits), d = p ^ w14*h^2
//   layer 3: d14 = d6 * d^8            (64 bits), d14 = d^-1 in GF(2^4)
//   layer 4: b1 = d14 * h, b0 = d14 * (h^l)   (128 bits)
// where (h, l) are the nibbles of delta(byte). The result is
// affine(delta^-1(b1,b0)); the 0x63 constant goes into the a component only.
//
// Interface: pulse `start` with the input share on `in_sh`; `done` pulses
// with the output share on `out_sh`. Each layer first takes one 64-bit word
// (two for layer 4) from the randomness port (valid/ready), then holds
// `xchg_req` with `xchg_tx` and `xchg_len128` until `xchg_done` returns the
// neighbour's word on `xchg_rx`. Byte k uses nibble bits [4k+3:4k] (layer 4:
// b1 in the low 64 bits, b0 in the high 64 bits). Between exchanges the unit
// spends one cycle per randomness word.
//
// The inversion formula, the matrix T, the five-multiplication count and the
// multiplication protocol follow the document; computing d^-1 as d^14 with two
// multiplications is one of the two options the document mentions; the
// grouping into four 16-byte-wide layers is this design's choice.
module mpc_sbox
  import htr_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  share128_t    in_sh,
  output logic         busy,
  output logic         done,
  output share128_t    out_sh,
  // correlated randomness
  input  logic         rnd_valid,
  input  logic [63:0]  rnd_word,
  output logic         rnd_ready,
  // exchange with the ring neighbours (through the SPI link)
  output logic         xchg_req,
  output logic         xchg_len128,
  output logic [127:0] xchg_tx,
  input  logic         xchg_done,
  input  logic [127:0] xchg_rx
);

  typedef enum logic [3:0] {
    S_IDLE, S_R1, S_X1, S_R2, S_X2, S_R3, S_X3, S_R4A, S_R4B, S_X4
  } state_e;

  state_e       st;
  logic [3:0]   hx [16], ha [16], lx [16], la [16];
  logic [3:0]   dx [16], da [16], ex [16], ea [16];
  logic [127:0] c;

  // local products of each layer, before adding randomness
  logic [63:0] prod1, prod2, prod3, prod4a, prod4b;
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      logic [3:0] sx, sa, d2x, d2a, d4x, d4a, d8x, d8a;
      sx  = hx[k] ^ lx[k];
      sa  = ha[k] ^ la[k];
      d2x = gf16_sq(dx[k]);  d2a = gf16_sq(da[k]);
      d4x = gf16_sq(d2x);    d4a = gf16_sq(d2a);
      d8x = gf16_sq(d4x);    d8a = gf16_sq(d4a);
      prod1[4*k +: 4]  = gf16_mul(sx, lx[k])  ^ gf16_mul(sa, la[k]);
      prod2[4*k +: 4]  = gf16_mul(d2x, d4x)   ^ gf16_mul(d2a, d4a);
      prod3[4*k +: 4]  = gf16_mul(ex[k], d8x) ^ gf16_mul(ea[k], d8a);
      prod4a[4*k +: 4] = gf16_mul(ex[k], hx[k]) ^ gf16_mul(ea[k], ha[k]);
      prod4b[4*k +: 4] = gf16_mul(ex[k], sx)    ^ gf16_mul(ea[k], sa);
    end
  end

  // output share
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      logic [3:0] b1x, b1a, b0x, b0a;
      b1x = c[4*k +: 4]      ^ xchg_rx[4*k +: 4];
      b1a = c[4*k +: 4];
      b0x = c[64 + 4*k +: 4] ^ xchg_rx[64 + 4*k +: 4];
      b0a = c[64 + 4*k +: 4];
      out_sh.x[127 - 8*k -: 8] = aes_affine_lin(delta_inv({b1x, b0x}));
      out_sh.a[127 - 8*k -: 8] = aes_affine_lin(delta_inv({b1a, b0a})) ^ AES_AFFINE_C;
    end
  end

  assign busy        = (st != S_IDLE);
  assign rnd_ready   = (st == S_R1) || (st == S_R2) || (st == S_R3) ||
                       (st == S_R4A) || (st == S_R4B);
  assign xchg_req    = (st == S_X1) || (st == S_X2) || (st == S_X3) || (st == S_X4);
  assign xchg_len128 = (st == S_X4);
  assign xchg_tx     = c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      c    <= '0;
      done <= 1'b0;
      for (int k = 0; k < 16; k++) begin
        hx[k] <= '0; ha[k] <= '0; lx[k] <= '0; la[k] <= '0;
        dx[k] <= '0; da[k] <= '0; ex[k] <= '0; ea[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          for (int k = 0; k < 16; k++) begin
            {hx[k], lx[k]} <= delta(in_sh.x[127 - 8*k -: 8]);
            {ha[k], la[k]} <= delta(in_sh.a[127 - 8*k -: 8]);
          end
          st <= S_R1;
        end
        S_R1: if (rnd_valid) begin c[63:0] <= prod1 ^ rnd_word; st <= S_X1; end
        S_X1: if (xchg_done) begin
          for (int k = 0; k < 16; k++) begin
            dx[k] <= c[4*k +: 4] ^ xchg_rx[4*k +: 4] ^ gf16_mul(gf16_sq(hx[k]), W14);
            da[k] <= c[4*k +: 4] ^ gf16_mul(gf16_sq(ha[k]), W14);
          end
          st <= S_R2;
        end
        S_R2: if (rnd_valid) begin c[63:0] <= prod2 ^ rnd_word; st <= S_X2; end
        S_X2: if (xchg_done) begin
          for (int k = 0; k < 16; k++) begin
            ex[k] <= c[4*k +: 4] ^ xchg_rx[4*k +: 4];
            ea[k] <= c[4*k +: 4];
          end
          st <= S_R3;
        end
        S_R3: if (rnd_valid) begin c[63:0] <= prod3 ^ rnd_word; st <= S_X3; end
        S_X3: if (xchg_done) begin
          for (int k = 0; k < 16; k++) begin
            ex[k] <= c[4*k +: 4] ^ xchg_rx[4*k +: 4];
            ea[k] <= c[4*k +: 4];
          end
          st <= S_R4A;
        end
        S_R4A: if (rnd_valid) begin c[63:0]   <= prod4a ^ rnd_word; st <= S_R4B; end
        S_R4B: if (rnd_valid) begin c[127:64] <= prod4b ^ rnd_word; st <= S_X4; end
        S_X4: if (xchg_done) begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
