// tb_corr_rng: three generators seeded as in INIT' (slave i holds k_i and
// k_{i-1}, all share id). Checks that every 64-bit word satisfies
// o1 ^ o2 ^ o3 = 0, that each word equals the expected
// AES_{k_i}(id+n) ^ AES_{k_{i-1}}(id+n) half computed by an independent model,
// and that words are not constant.
module tb_corr_rng;
  import htr_pkg::*;
  import tb_aes_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, seed = 1'b0;
  block_t      k [3], id;
  logic        valid [3], ready [3];
  logic [63:0] word [3];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 3; i++) begin : g
    corr_rng dut (.clk, .rst_n, .seed, .k_self(k[i]), .k_prev(k[(i+2)%3]), .id_in(id),
                  .rnd_valid(valid[i]), .rnd_word(word[i]), .rnd_ready(ready[i]));
  end
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] prev;
    for (int i = 0; i < 3; i++) begin k[i] = rand128(); ready[i] = 1'b0; end
    id = rand128(); prev = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    @(negedge clk); seed = 1'b1;
    @(negedge clk); seed = 1'b0;
    for (int n = 0; n < 8; n++) begin
      logic [127:0] blk [3];
      int waited;
      waited = 0;
      while (!(valid[0] && valid[1] && valid[2])) begin @(negedge clk); waited++; end
      for (int i = 0; i < 3; i++)
        blk[i] = ref_aes128(k[i], id + {96'b0, 32'(n / 2 + 1)}) ^ ref_aes128(k[(i+2)%3], id + {96'b0, 32'(n / 2 + 1)});
      checks += 3;
      if ((word[0] ^ word[1] ^ word[2]) != 64'h0) begin failures++; $display("FAIL: words do not sum to 0"); end
      if (word[0] != ((n % 2 == 0) ? blk[0][63:0] : blk[0][127:64])) begin
        failures++; $display("FAIL: word %0d of slave 1 = %h", n, word[0]);
      end
      if (word[0] == prev) begin failures++; $display("FAIL: repeated word"); end
      prev = word[0];
      for (int i = 0; i < 3; i++) ready[i] = 1'b1;
      @(negedge clk);
      for (int i = 0; i < 3; i++) ready[i] = 1'b0;
      // first block after seeding: within one AES latency and a few cycles
      if (n == 0) begin
        checks++;
        if (waited > 55) begin failures++; $display("FAIL: first block after %0d cycles", waited); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
