// mpc_aes_linear: the linear part of one AES round on a secret-shared state.
//
// ShiftRows, MixColumns and AddRoundKey are GF(2)-linear, so a slave applies
// them to both components of its share (x, a) independently and needs no
// communication: out.x = MC(SR(in.x)) ^ rk.x and out.a = MC(SR(in.a)) ^ rk.a,
// where the round key is itself shared. MixColumns is skipped when `last` is
// high (round 10). Purely combinational.
//
// The order ShiftRows, MixColumns, AddRoundKey is the AES standard; the
// document's slave figure draws MixColumns before ShiftRows, which would give a
// different cipher, so the standard order is used.
module mpc_aes_linear
  import htr_pkg::*;
(
  input  share128_t in_sh,
  input  share128_t rk_sh,
  input  logic      last,
  output share128_t out_sh
);

  block_t sx, sa;

  always_comb begin
    sx = shift_rows(in_sh.x);
    sa = shift_rows(in_sh.a);
    if (!last) begin
      sx = mix_columns(sx);
      sa = mix_columns(sa);
    end
    out_sh.x = sx ^ rk_sh.x;
    out_sh.a = sa ^ rk_sh.a;
  end

endmodule
