// tb_spi_slave: drives two slave SPI engines (8-wire and 1-wire) from a
// behavioural master that waits for IRQ, pulls nSS low and toggles SCK with a
// random half period. Checks, for words of random length, that the received
// word equals what was sent on MOSI, that MISO carried the requested word
// beat by beat (least significant first), that IRQ drops after exactly the
// requested number of beats, that `done` pulses once, and that no new session
// starts while nSS is still low.
module tb_spi_slave;

  localparam int unsigned MAXBITS = 384;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // ---------------- one engine per bus width, each with its own driver
  logic                 sck8, nss8, req8, done8, irq8;
  logic [7:0]           mosi8, miso8;
  logic [6:0]           nb8;
  logic [MAXBITS-1:0]   tx8, rx8;
  spi_slave #(.BUS_W(8), .MAXBITS(MAXBITS)) dut8 (
    .clk, .rst_n, .sck(sck8), .nss(nss8), .mosi(mosi8), .miso(miso8), .irq(irq8),
    .req(req8), .nbeats(nb8), .tx(tx8), .done(done8), .rx(rx8));

  logic                 sck1, nss1, req1, done1, irq1;
  logic [0:0]           mosi1, miso1;
  logic [8:0]           nb1;
  logic [MAXBITS-1:0]   tx1, rx1;
  spi_slave #(.BUS_W(1), .MAXBITS(MAXBITS)) dut1 (
    .clk, .rst_n, .sck(sck1), .nss(nss1), .mosi(mosi1), .miso(miso1), .irq(irq1),
    .req(req1), .nbeats(nb1), .tx(tx1), .done(done1), .rx(rx1));

  // behavioural master for the 8-wire engine; returns what it saw on MISO
  task automatic session8(input int nbeats, input logic [MAXBITS-1:0] mo,
                          output logic [MAXBITS-1:0] mi, output int beats, output int ndone);
    int half;
    half = $urandom_range(1, 3);
    mi = '0; beats = 0; ndone = 0;
    while (!irq8) @(negedge clk);
    nss8 = 1'b0;
    while (irq8) begin
      mosi8 = mo[beats*8 +: 8];
      repeat (half) begin @(negedge clk); if (done8) ndone++; end
      mi[beats*8 +: 8] = miso8;
      sck8 = 1'b1; beats++;
      repeat (half) begin @(negedge clk); if (done8) ndone++; end
      sck8 = 1'b0;
    end
    repeat (2) begin @(negedge clk); if (done8) ndone++; end
    check(irq8 == 1'b0, "8: no new session while nSS low");
    nss8 = 1'b1;
  endtask

  task automatic session1(input int nbeats, input logic [MAXBITS-1:0] mo,
                          output logic [MAXBITS-1:0] mi, output int beats, output int ndone);
    mi = '0; beats = 0; ndone = 0;
    while (!irq1) @(negedge clk);
    nss1 = 1'b0;
    while (irq1) begin
      mosi1 = mo[beats];
      @(negedge clk); if (done1) ndone++;
      mi[beats] = miso1;
      sck1 = 1'b1; beats++;
      @(negedge clk); if (done1) ndone++;
      sck1 = 1'b0;
    end
    @(negedge clk); if (done1) ndone++;
    nss1 = 1'b1;
  endtask

  initial begin
    logic [MAXBITS-1:0] mo, mi, word, mask;
    int beats, nd, n;
    {sck8, nss8, req8, mosi8, nb8, tx8} = '0; nss8 = 1'b1;
    {sck1, nss1, req1, mosi1, nb1, tx1} = '0; nss1 = 1'b1;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 12; t++) begin
      n    = (t % 3 == 0) ? 48 : (t % 3 == 1) ? 8 : 16;
      word = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
              $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      mo   = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
              $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      @(negedge clk); req8 = 1'b1; nb8 = 7'(n); tx8 = word;
      session8(n, mo, mi, beats, nd);
      req8 = 1'b0;
      check(beats == n, $sformatf("8: %0d beats for %0d requested", beats, n));
      check(nd == 1, "8: one done pulse");
      mask = {MAXBITS{1'b1}} >> (MAXBITS - n * 8);
      check((mi & mask) == (word & mask), "8: MISO carried the word");
      check((rx8 & mask) == (mo & mask), "8: received word");
    end
    for (int t = 0; t < 4; t++) begin
      n    = (t % 2 == 0) ? 64 : 128;
      word = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
              $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      mo   = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
              $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      @(negedge clk); req1 = 1'b1; nb1 = 9'(n); tx1 = word;
      session1(n, mo, mi, beats, nd);
      req1 = 1'b0;
      check(beats == n, "1: beat count");
      check(nd == 1, "1: one done pulse");
      mask = {MAXBITS{1'b1}} >> (MAXBITS - n);
      check((mi & mask) == (word & mask), "1: MISO carried the word");
      check((rx1 & mask) == (mo & mask), "1: received word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
