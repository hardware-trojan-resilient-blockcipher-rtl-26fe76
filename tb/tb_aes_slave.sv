// tb_aes_slave: three MPC slaves with the master, on single-wire links with
// the bus at a quarter of the clock, a configuration the end-to-end test does
// not use. After set-up it rebuilds every round key from the slaves' shares
// (x of slave i-1 xor a of slave i), checks that the three rebuilds agree,
// that the x components sum to zero, that round key 0 is the key and round
// key 10 is the last key of the reference schedule, and that no slave holds
// the key in clear. It then encrypts blocks, checks the state shares at every
// round boundary the same way, and compares the ciphertext with a reference.
module tb_aes_slave;
  import htr_pkg::*;
  import tb_aes_ref_pkg::*;

  localparam int unsigned W = 1;

  logic clk = 1'b0, rst_n = 1'b0, setup_start = 1'b0, enc_start = 1'b0;
  block_t key_in, pt_in, prg_id, ct_out;
  block_t prg_key [3];
  logic ready, ct_valid, ct_err, err_any;
  logic [2:0] sck, nss, irq;
  logic [W-1:0] mosi [3], miso [3];
  int checks = 0, failures = 0, rounds_seen = 0;

  htr_master #(.BUS_W(W), .SCK_HALF(2), .N_KEXP(4 * AES_ROUNDS), .N_ENC(4 * AES_ROUNDS)) u_m (.*);

  aes_slave #(.BUS_W(W)) s0 (.clk, .rst_n, .sck(sck[0]), .nss(nss[0]), .mosi(mosi[0]), .miso(miso[0]), .irq(irq[0]));
  aes_slave #(.BUS_W(W)) s1 (.clk, .rst_n, .sck(sck[1]), .nss(nss[1]), .mosi(mosi[1]), .miso(miso[1]), .irq(irq[1]));
  aes_slave #(.BUS_W(W)) s2 (.clk, .rst_n, .sck(sck[2]), .nss(nss[2]), .mosi(mosi[2]), .miso(miso[2]), .irq(irq[2]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // rebuild a shared value three ways; returns the first, checks the rest
  task automatic rebuild(input share128_t sh0, input share128_t sh1, input share128_t sh2,
                         input string what, output block_t v);
    block_t v1, v2;
    v  = sh2.x ^ sh0.a;
    v1 = sh0.x ^ sh1.a;
    v2 = sh1.x ^ sh2.a;
    check(v == v1 && v == v2, {what, ": three rebuilds agree"});
    check((sh0.x ^ sh1.x ^ sh2.x) == '0, {what, ": x components sum to zero"});
  endtask

  // state shares at each round boundary (the slaves are in lock-step)
  always @(negedge clk) if (rst_n && 4'(s0.st) == 4'd9) begin  // S_RD_S
    block_t v;
    rebuild(s0.state_sh, s1.state_sh, s2.state_sh, "round state", v);
    rounds_seen++;
  end

  initial begin
    block_t v, ref_ct;
    for (int i = 0; i < 3; i++) prg_key[i] = rand128();
    prg_id = rand128(); key_in = rand128(); pt_in = '0;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    @(negedge clk); setup_start = 1'b1; @(negedge clk); setup_start = 1'b0;
    while (!ready) @(negedge clk);
    for (int r = 0; r <= AES_ROUNDS; r++) begin
      rebuild(s0.rk[r], s1.rk[r], s2.rk[r], $sformatf("round key %0d", r), v);
      if (r == 0) check(v == key_in, "round key 0 is the key");
      if (r == AES_ROUNDS) check(v == ref_last_rk(key_in), "round key 10 matches the schedule");
    end
    check(s0.rk[0].a != key_in && s1.rk[0].a != key_in && s2.rk[0].a != key_in &&
          s0.rk[0].x != '0 && s1.rk[0].x != '0 && s2.rk[0].x != '0, "no slave holds the key in clear");
    for (int b = 0; b < 3; b++) begin
      int n_before;
      n_before = rounds_seen;
      pt_in  = rand128();
      ref_ct = ref_aes128(key_in, pt_in);
      enc_start = 1'b1; @(negedge clk); enc_start = 1'b0;
      while (!ct_valid) @(negedge clk);
      check(ct_out == ref_ct, $sformatf("block %0d ciphertext %h, expected %h", b, ct_out, ref_ct));
      check(!ct_err, "no error flag");
      check(rounds_seen - n_before == AES_ROUNDS, "one S-box pass per round");
      @(negedge clk);
    end
    check(!err_any, "no error at all");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
