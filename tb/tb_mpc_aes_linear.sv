// tb_mpc_aes_linear: random 2-out-of-3 sharings of a state and of a round
// key are passed through the three slaves' copies of the linear layer; the
// reconstructed output must equal ShiftRows/MixColumns/AddRoundKey of the
// plain values (independent model), with and without MixColumns, and the x
// components must still sum to zero.
module tb_mpc_aes_linear;
  import htr_pkg::*;
  import tb_aes_ref_pkg::*;

  share128_t in_sh [3], rk_sh [3], out_sh [3];
  logic      last;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 3; i++) begin : g
    mpc_aes_linear dut (.in_sh(in_sh[i]), .rk_sh(rk_sh[i]), .last, .out_sh(out_sh[i]));
  end

  function automatic void share(input block_t v, output share128_t s [3]);
    block_t x [3];
    x[0] = rand128(); x[1] = rand128(); x[2] = x[0] ^ x[1];
    for (int i = 0; i < 3; i++) begin s[i].x = x[i]; s[i].a = v ^ x[(i+2)%3]; end
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40; n++) begin
      block_t v, k, exp;
      v = rand128(); k = rand128(); last = n[0];
      share(v, in_sh); share(k, rk_sh);
      #1;
      exp = ref_round_lin(v, k, !last);
      for (int i = 0; i < 3; i++) begin
        checks++;
        if ((out_sh[(i+2)%3].x ^ out_sh[i].a) != exp) begin
          failures++; $display("FAIL: n=%0d slave %0d reconstruct", n, i);
        end
      end
      checks++;
      if ((out_sh[0].x ^ out_sh[1].x ^ out_sh[2].x) != '0) begin failures++; $display("FAIL: x sum"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
