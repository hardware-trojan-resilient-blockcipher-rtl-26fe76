// tb_htr_aes_top: end-to-end test of the Trojan-resilient AES-128 at its
// default parameters (8-wire links, bus at half the clock).
//
// Sets up the triplet with random PRG keys and id, encrypts the FIPS-197
// example block and a series of random blocks, and compares every result with
// an independent AES model. It then corrupts one slave's MISO during one
// output session and expects the master to flag the block, and finally resets
// and runs a second key. It counts how often each mechanism occurred (PRG
// key distribution, masked loading, forwarding sessions, reconstruction,
// mismatch detection, master waiting on IRQ while the slaves compute) and fails if one never did.
// The encryption latency is checked against the transfer lower bound
// T = 3584 bits / (0.5 * BUS_W) cycles.
module tb_htr_aes_top;
  import htr_pkg::*;
  import tb_aes_ref_pkg::*;

  localparam int unsigned BUS_W = 8;   // the top's default
  localparam int unsigned N_RANDOM = 6;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       setup_start = 1'b0, enc_start = 1'b0;
  block_t     key, pt, prg_id, ct;
  block_t     prg_key [3];
  logic       ready, ct_valid, ct_err, err_any;
  logic [2:0] link_sck, link_nss, link_irq;
  logic [BUS_W-1:0] link_mosi [3], link_miso [3];

  int checks = 0, failures = 0;
  int n_init = 0, n_load = 0, n_fwd = 0, n_rec = 0, n_err_flag = 0, n_irq_wait = 0;
  longint unsigned cyc = 0;

  htr_aes_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters, from the master's session sequence
  always @(posedge clk) if (rst_n) begin
    if (dut.u_master.sess_done) begin
      unique case (dut.u_master.st)
        dut.u_master.M_INIT:                   n_init++;
        dut.u_master.M_KEY, dut.u_master.M_LOAD: n_load++;
        dut.u_master.M_KEXP, dut.u_master.M_FWD: n_fwd++;
        dut.u_master.M_REC:                    n_rec++;
        default: ;
      endcase
    end
    if (dut.u_master.go && link_nss[0] && link_irq != 3'b111) n_irq_wait++;  // master waits for the slaves
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_setup(input block_t k);
    longint unsigned t0;
    key = k;
    for (int i = 0; i < 3; i++) prg_key[i] = rand128();
    prg_id = rand128();
    @(posedge clk); setup_start <= 1'b1; t0 = cyc;
    @(posedge clk); setup_start <= 1'b0;
    wait (ready);
    $display("set-up took %0d cycles", cyc - t0);
    @(posedge clk);
  endtask

  task automatic do_enc(input block_t p, output block_t c, output logic e, output longint unsigned lat);
    longint unsigned t0;
    pt = p;
    @(posedge clk); enc_start <= 1'b1; t0 = cyc;
    @(posedge clk); enc_start <= 1'b0;
    while (!ct_valid) @(posedge clk);
    lat = cyc - t0;
    c = ct; e = ct_err;
    @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t c, k, p;
    logic e;
    longint unsigned lat, lower;
    lower = 64'(3584 / BUS_W * 2);
    key = '0; pt = '0; prg_id = '0; prg_key = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // FIPS-197 Appendix C.1 example
    k = 128'h000102030405060708090a0b0c0d0e0f;
    do_setup(k);
    do_enc(128'h00112233445566778899aabbccddeeff, c, e, lat);
    check(c == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("FIPS-197 vector: got %h", c));
    check(!e, "no error flag on a clean block");
    check(lat >= lower, $sformatf("latency %0d not below transfer bound %0d", lat, lower));
    $display("encryption latency %0d cycles (transfer lower bound %0d)", lat, lower);

    for (int n = 0; n < N_RANDOM; n++) begin
      p = rand128();
      do_enc(p, c, e, lat);
      check(c == ref_aes128(k, p) && !e, $sformatf("random block %0d: pt %h got %h", n, p, c));
    end

    // corrupt one bit of slave 2's output share during reconstruction
    fork
      begin
        wait (dut.u_master.st == dut.u_master.M_REC && !link_nss[0]);
        repeat (6) @(posedge clk);
        force dut.g_slave[1].u_slave.miso = ~dut.g_slave[1].u_slave.u_spi.txreg[7:0];
        repeat (2) @(posedge clk);
        release dut.g_slave[1].u_slave.miso;
      end
    join_none
    p = rand128();
    do_enc(p, c, e, lat);
    check(e, "master flags a corrupted share");
    if (e) n_err_flag++;
    check(err_any, "sticky error output set");

    // the next block is clean again
    p = rand128();
    do_enc(p, c, e, lat);
    check(c == ref_aes128(k, p) && !e, "clean block after a corrupted one");

    // new key after reset
    rst_n = 1'b0; repeat (2) @(posedge clk); rst_n = 1'b1;
    k = rand128();
    do_setup(k);
    p = rand128();
    do_enc(p, c, e, lat);
    check(c == ref_aes128(k, p) && !e, "second key after reset");
    check(!err_any, "sticky error cleared by reset");

    $display("mechanisms: init=%0d load=%0d forward=%0d reconstruct=%0d err_flag=%0d irq_wait=%0d",
             n_init, n_load, n_fwd, n_rec, n_err_flag, n_irq_wait);
    check(n_init > 0,     "INIT' key distribution happened");
    check(n_load > 0,     "masked loading happened");
    check(n_fwd > 0,      "forwarding happened");
    check(n_rec > 0,      "reconstruction happened");
    check(n_err_flag > 0, "mismatch detection happened");
    check(n_irq_wait > 0,  "master waited on IRQ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
