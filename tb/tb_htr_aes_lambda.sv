// tb_htr_aes_lambda: the complete design with three slave triplets (nine
// slaves) behind one master, each triplet with its own PRG keys. The master
// reconstructs the ciphertext once per triplet and outputs the bitwise
// majority. The test encrypts the FIPS-197 example and random blocks, then
// corrupts the output share of one slave of one triplet and then the output
// of a whole triplet: the majority must still give the right ciphertext, and
// the error flag must be raised in both cases and not otherwise.
module tb_htr_aes_lambda;
  import htr_pkg::*;
  import tb_aes_ref_pkg::*;

  localparam int unsigned BUS_W = 8, LAMBDA = 3;

  logic clk = 1'b0, rst_n = 1'b0, setup_start = 1'b0, enc_start = 1'b0;
  block_t key, pt, prg_id, ct;
  block_t prg_key [3*LAMBDA];
  logic ready, ct_valid, ct_err, err_any;
  logic [3*LAMBDA-1:0] link_sck, link_nss, link_irq;
  logic [BUS_W-1:0] link_mosi [3*LAMBDA], link_miso [3*LAMBDA];
  int checks = 0, failures = 0;

  htr_aes_top #(.BUS_W(BUS_W), .LAMBDA(LAMBDA)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic enc(input block_t p, output block_t c, output logic e);
    pt = p;
    @(negedge clk); enc_start = 1'b1;
    @(negedge clk); enc_start = 1'b0;
    while (!ct_valid) @(negedge clk);
    c = ct; e = ct_err;
  endtask

  initial begin
    block_t c, p;
    logic e;
    for (int i = 0; i < 3 * LAMBDA; i++) prg_key[i] = rand128();
    prg_id = rand128();
    key = 128'h000102030405060708090a0b0c0d0e0f;
    pt  = '0;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    @(negedge clk); setup_start = 1'b1; @(negedge clk); setup_start = 1'b0;
    while (!ready) @(negedge clk);
    enc(128'h00112233445566778899aabbccddeeff, c, e);
    check(c == 128'h69c4e0d86a7b0430d8cdb78070b4c55a && !e, "FIPS-197 example");
    for (int n = 0; n < 3; n++) begin
      p = rand128();
      enc(p, c, e);
      check(c == ref_aes128(key, p) && !e, "random block");
    end
    check(!err_any, "no error before corruption");

    // one slave (second slave of triplet 0) sends a wrong output share:
    // once its output word is latched, one bit of a later a-chunk is flipped
    fork
      begin
        wait (3'(dut.u_master.st) == 3'd7 && !link_nss[0]);
        repeat (2) @(posedge clk);
        dut.g_slave[1].u_slave.u_spi.txreg[100] = ~dut.g_slave[1].u_slave.u_spi.txreg[100];
      end
    join_none
    p = rand128();
    enc(p, c, e);
    check(c == ref_aes128(key, p), "majority corrects one bad slave");
    check(e, "one bad slave is flagged");

    // all three slaves of triplet 2 send x and a words with the same bit
    // flipped, so that triplet agrees with itself on a wrong value
    fork
      begin
        wait (3'(dut.u_master.st) == 3'd7 && !link_nss[0]);
        repeat (2) @(posedge clk);
        dut.g_slave[6].u_slave.u_spi.txreg[120] = ~dut.g_slave[6].u_slave.u_spi.txreg[120];
        dut.g_slave[7].u_slave.u_spi.txreg[120] = ~dut.g_slave[7].u_slave.u_spi.txreg[120];
        dut.g_slave[8].u_slave.u_spi.txreg[120] = ~dut.g_slave[8].u_slave.u_spi.txreg[120];
      end
    join_none
    p = rand128();
    enc(p, c, e);
    check(c == ref_aes128(key, p), "majority corrects one bad triplet");
    check(e, "a disagreeing triplet is flagged");

    p = rand128();
    enc(p, c, e);
    check(c == ref_aes128(key, p) && !e, "clean block after the faults");
    check(err_any, "sticky error flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
