// tb_htr_aes_widths: bus-width sweep of the complete design. Six copies of
// the top run side by side, one per evaluated bus configuration:
//   1 wire,  bus at 1/2 of the clock (0.5 bit per cycle and wire)
//   1, 2, 4, 8 wires, bus at 1/4 of the clock (0.25 bit per cycle and wire)
//   32 wires, bus at 1/4 of the clock (the wider bus of the extrapolation)
// Each copy is set up with its own random key, encrypts the FIPS-197 example
// and one random block, and is checked against a reference AES. The
// encryption latency (enc_start to ct_valid) of each is printed and checked
// against two limits: it cannot be below the transfer time of the 3584 bits
// a block moves per link (128 load, 10 x 320 exchange, 256 output), and it
// must not exceed the cycle counts published for the same configurations
// (9356; 16820, 9119, 5268, 3343), which include a key load per block that
// this design does once at set-up. For 32 wires no cycle count is published
// (only a throughput scaled from 8 wires), so only its latency is reported;
// there the correlated-randomness generator, not the bus, sets the pace.
module tb_htr_aes_widths;
  import htr_pkg::*;
  import tb_aes_ref_pkg::*;

  localparam int NCFG = 6;
  localparam int CW [NCFG] = '{1, 1, 2, 4, 8, 32};
  localparam int CH [NCFG] = '{1, 2, 2, 2, 2, 2};
  localparam int CPUB [NCFG] = '{9356, 16820, 9119, 5268, 3343, 0};  // 0: none published

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  bit fin [NCFG];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int W = CW[g];
    block_t key, pt, prg_id, ct;
    block_t prg_key [3];
    logic setup_start = 1'b0, enc_start = 1'b0;
    logic ready, ct_valid, ct_err, err_any;
    logic [2:0] link_sck, link_nss, link_irq;
    logic [W-1:0] link_mosi [3], link_miso [3];

    htr_aes_top #(.BUS_W(W), .SCK_HALF(CH[g])) dut (.*);

    initial begin
      block_t ref_ct;
      int lat, bound;
      fin[g] = 1'b0;
      for (int i = 0; i < 3; i++) prg_key[i] = rand128();
      prg_id = rand128();
      pt = '0;
      key = 128'h000102030405060708090a0b0c0d0e0f;
      @(posedge rst_n); @(negedge clk);
      setup_start = 1'b1; @(negedge clk); setup_start = 1'b0;
      while (!ready) @(negedge clk);
      for (int b = 0; b < 2; b++) begin
        pt = (b == 0) ? 128'h00112233445566778899aabbccddeeff : rand128();
        ref_ct = ref_aes128(key, pt);
        enc_start = 1'b1; @(negedge clk); enc_start = 1'b0;
        lat = 1;
        while (!ct_valid) begin @(negedge clk); lat++; end
        check(ct == ref_ct && !ct_err, $sformatf("width %0d: block %0d ciphertext", W, b));
        bound = 3584 * 2 * CH[g] / W;
        check(lat >= bound, $sformatf("width %0d: latency %0d below transfer bound %0d", W, lat, bound));
        if (CPUB[g] > 0) check(lat <= CPUB[g], $sformatf("width %0d: latency %0d above published %0d", W, lat, CPUB[g]));
        if (b == 0)
          $display("width %0d, %0d cycles per SCK period: %0d cycles per block (transfer bound %0d, published %0d)",
                   W, 2 * CH[g], lat, bound, CPUB[g]);
        @(negedge clk);
      end
      check(!err_any, $sformatf("width %0d: no error flag", W));
      fin[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    forever begin
      bit all;
      @(negedge clk);
      all = 1'b1;
      for (int g = 0; g < NCFG; g++) all &= fin[g];
      if (all) break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
