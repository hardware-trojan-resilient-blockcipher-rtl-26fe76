// tb_mpc_sbox: three copies of the MPC S-box unit, one per slave, joined by
// a behavioural ring exchange (slave i receives what slave i-1 sent, after a
// random delay) and fed with correlated randomness (o1 ^ o2 ^ o3 = 0 for each
// word). Random bytes are shared 2-out-of-3; after the unit finishes, all
// three reconstructions x_{i-1} ^ a_i of every byte must equal the AES S-box
// of an independent model (all 256 byte values are covered), and the x
// components must sum to zero. Also checks the exchange sizes 64/64/64/128.
module tb_mpc_sbox;
  import htr_pkg::*;
  import tb_aes_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  share128_t    in_sh [3], out_sh [3];
  logic         busy [3], done [3], rnd_valid, rnd_ready [3];
  logic [63:0]  rnd_word [3];
  logic         xreq [3], xlen128 [3], xdone;
  logic [127:0] xtx [3], xrx [3];
  int checks = 0, failures = 0;
  int n_x64 = 0, n_x128 = 0;

  for (genvar i = 0; i < 3; i++) begin : g
    mpc_sbox dut (.clk, .rst_n, .start, .in_sh(in_sh[i]), .busy(busy[i]), .done(done[i]),
                  .out_sh(out_sh[i]), .rnd_valid, .rnd_word(rnd_word[i]), .rnd_ready(rnd_ready[i]),
                  .xchg_req(xreq[i]), .xchg_len128(xlen128[i]), .xchg_tx(xtx[i]),
                  .xchg_done(xdone), .xchg_rx(xrx[i]));
  end
  always #5 clk = ~clk;

  // correlated randomness: a fresh triplet whenever the units take a word
  assign rnd_valid = 1'b1;
  always @(posedge clk) begin
    if (!rst_n || (rnd_ready[0] && rnd_valid)) begin
      rnd_word[0] <= {$urandom, $urandom};
      rnd_word[1] <= {$urandom, $urandom};
    end
  end
  assign rnd_word[2] = rnd_word[0] ^ rnd_word[1];

  // ring exchange through a behavioural "master"
  initial begin
    xdone = 1'b0;
    forever begin
      @(negedge clk);
      if (xreq[0] && xreq[1] && xreq[2]) begin
        if (xlen128[0]) n_x128++; else n_x64++;
        repeat ($urandom_range(1, 6)) @(negedge clk);
        for (int i = 0; i < 3; i++)
          xrx[i] = xlen128[0] ? xtx[(i+2)%3] : {64'h0, xtx[(i+2)%3][63:0]};
        xdone = 1'b1;
        @(negedge clk);
        xdone = 1'b0;
      end
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++) in_sh[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 20; n++) begin
      block_t v, x [3];
      for (int b = 0; b < 16; b++) v[127-8*b -: 8] = (n < 16) ? 8'(16*n + b) : 8'($urandom);
      x[0] = rand128(); x[1] = rand128(); x[2] = x[0] ^ x[1];
      for (int i = 0; i < 3; i++) begin in_sh[i].x = x[i]; in_sh[i].a = v ^ x[(i+2)%3]; end
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      while (!done[0]) @(negedge clk);
      for (int b = 0; b < 16; b++) begin
        logic [7:0] exp;
        exp = ref_sbox(v[127-8*b -: 8]);
        for (int i = 0; i < 3; i++) begin
          checks++;
          if ((out_sh[(i+2)%3].x[127-8*b -: 8] ^ out_sh[i].a[127-8*b -: 8]) != exp) begin
            failures++;
            $display("FAIL: byte %h via slave %0d", v[127-8*b -: 8], i);
          end
        end
      end
      checks++;
      if ((out_sh[0].x ^ out_sh[1].x ^ out_sh[2].x) != '0) begin failures++; $display("FAIL: x sum"); end
    end
    checks++;
    if (n_x64 != 3 * 20 || n_x128 != 20) begin
      failures++; $display("FAIL: exchanges 64-bit %0d, 128-bit %0d", n_x64, n_x128);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
