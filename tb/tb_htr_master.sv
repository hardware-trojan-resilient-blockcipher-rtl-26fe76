// tb_htr_master: the master alone, with three slave-side SPI engines driven
// by the testbench in place of the MPC slaves, so every word the master
// routes can be compared with what the protocol requires:
//   INIT'   slave i receives {id, key_{i-1}, key_i};
//   load    slave i receives (word sent by slave i-1) ^ key or plaintext;
//   forward slave i receives exactly the word sent by slave i-1;
//   output  the master rebuilds v from interleaved x/a beats, flags a
//           corrupted share and returns the result on ct_out.
// A reduced session count and a 4-wire bus keep the run short; the behaviour
// does not depend on either.
module tb_htr_master
  import htr_pkg::*;
;
  localparam int unsigned W = 4, NK = 2, NE = 3, MAXBITS = 384;
  localparam int unsigned BEATW = $clog2(MAXBITS / W + 1);

  logic clk = 1'b0, rst_n = 1'b0, setup_start = 1'b0, enc_start = 1'b0;
  block_t key_in, pt_in, prg_id, ct_out;
  block_t prg_key [3];
  logic ready, ct_valid, ct_err, err_any;
  logic [2:0] sck, nss, irq;
  logic [W-1:0] mosi [3], miso [3];
  int checks = 0, failures = 0;

  htr_master #(.BUS_W(W), .SCK_HALF(2), .N_KEXP(NK), .N_ENC(NE)) dut (.*);
  always #5 clk = ~clk;

  logic [2:0]         req, done;
  logic [BEATW-1:0]   nb;
  logic [2:0][MAXBITS-1:0] tx;
  logic [MAXBITS-1:0] rx [3];
  for (genvar i = 0; i < 3; i++) begin : g_s
    spi_slave #(.BUS_W(W), .MAXBITS(MAXBITS)) u (
      .clk, .rst_n, .sck(sck[i]), .nss(nss[i]), .mosi(mosi[i]), .miso(miso[i]),
      .irq(irq[i]), .req(req[i]), .nbeats(nb), .tx(tx[i]), .done(done[i]), .rx(rx[i]));
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [MAXBITS-1:0] rnd384();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
            $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  // one session: all three engines send tx[i] of `bits` bits
  task automatic session(input int bits);
    nb = BEATW'(bits / W);
    for (int i = 0; i < 3; i++) req[i] = 1'b1;
    do @(negedge clk); while (!done[0]);
    for (int i = 0; i < 3; i++) req[i] = 1'b0;
  endtask

  function automatic logic [MAXBITS-1:0] msk(input int bits);
    return {MAXBITS{1'b1}} >> (MAXBITS - bits);
  endfunction

  task automatic exchange(input int bits, input logic [127:0] add, input string what);
    for (int i = 0; i < 3; i++) tx[i] = rnd384() & msk(bits);
    session(bits);
      check((rx[i] & msk(bits)) == (tx[(i+2)%3] ^ MAXBITS'(add)),
            $sformatf("%s: slave %0d received", what, i + 1));
  endtask

  task automatic output_word(input block_t v, input bit corrupt, input int which);
    block_t x [3], a [3];
    x[0] = rnd384(); x[1] = rnd384(); x[2] = x[0] ^ x[1];
    for (int i = 0; i < 3; i++) a[i] = v ^ x[(i+2)%3];
    if (corrupt) a[which] = a[which] ^ (block_t'(1) << $urandom_range(0, 127));
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 128 / W; j++) begin
        tx[i][(2*j)*W +: W]   = x[i][j*W +: W];
        tx[i][(2*j+1)*W +: W] = a[i][j*W +: W];
      end
    fork
      session(256);
      begin while (!ct_valid) @(negedge clk); end
    join
    while (!ct_valid) @(negedge clk);
    check(ct_out == v || corrupt, "ciphertext rebuilt from the shares");
    check(ct_err == corrupt, $sformatf("error flag %0b for corrupt=%0b", ct_err, corrupt));
  endtask

  initial begin
    for (int i = 0; i < 3; i++) begin req[i] = 1'b0; tx[i] = '0; prg_key[i] = rnd384(); end
    nb = '0; key_in = rnd384(); prg_id = rnd384(); pt_in = '0;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    @(negedge clk);
    check(!ready && nss == 3'b111, "idle after reset");
    setup_start = 1'b1; @(negedge clk); setup_start = 1'b0;
    // INIT'
    session(384);
    for (int i = 0; i < 3; i++)
      check(rx[i] == {prg_id, prg_key[(i+2)%3], prg_key[i]}, $sformatf("INIT' word of slave %0d", i + 1));
    exchange(128, key_in, "key load");
    for (int s = 0; s < NK; s++) exchange(64, '0, "key expansion forward");
    repeat (4) @(negedge clk);
    check(ready, "ready after set-up");
    for (int blk = 0; blk < 4; blk++) begin
      block_t v;
      pt_in = rnd384();
      enc_start = 1'b1; @(negedge clk); enc_start = 1'b0; pt_in = '0;
      check(!ready, "busy while encrypting");
      exchange(128, dut.data, "plaintext load");
      for (int s = 0; s < NE; s++) exchange(s == NE - 1 ? 128 : 64, '0, "round forward");
      v = rnd384();
      output_word(v, blk == 2, blk % 3);
      check(err_any == (blk >= 2), "sticky error flag");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

