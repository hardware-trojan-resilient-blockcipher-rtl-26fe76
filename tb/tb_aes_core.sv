// tb_aes_core: checks the iterative AES-128 core against the FIPS-197
// example and random vectors from an independent model, and checks that the
// result arrives exactly 51 cycles after the start pulse.
module tb_aes_core;
  import htr_pkg::*;
  import tb_aes_ref_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  block_t key, pt, ct;
  int checks = 0, failures = 0;

  aes_core dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input block_t k, input block_t p, input block_t exp);
    int lat;
    @(negedge clk); key = k; pt = p; start = 1'b1;
    @(negedge clk); start = 1'b0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (ct !== exp) begin failures++; $display("FAIL: ct %h expected %h", ct, exp); end
    if (lat != 51)  begin failures++; $display("FAIL: latency %0d, expected 51", lat); end
  endtask

  initial begin
    key = '0; pt = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int n = 0; n < 20; n++) begin
      block_t k, p;
      k = rand128(); p = rand128();
      run(k, p, ref_aes128(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
