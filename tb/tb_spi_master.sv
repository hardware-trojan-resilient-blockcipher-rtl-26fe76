// tb_spi_master: behavioural slaves raise their IRQ lines at random times and
// drop them after a chosen number of SCK rising edges. Checks that the master
// starts a session only when `go` is high and all three IRQ lines are high,
// that SCK never moves while nSS is high, that the SCK period is
// 2*SCK_HALF cycles, that `beat` counts the rising edges, and that nSS rises
// and `sess_done` pulses once all IRQ lines are low.
module tb_spi_master;

  localparam int unsigned SCK_HALF = 2;

  logic       clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic [2:0] irq = '0;
  logic       nss, sck, rise, sess_start, sess_done;
  logic [8:0] beat;
  int checks = 0, failures = 0;
  int rises = 0, last_rise = 0, cyc = 0, n_done = 0;
  logic sck_q = 1'b0;

  spi_master #(.SCK_HALF(SCK_HALF), .BEATW(9)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor on the falling edge, where all outputs are settled
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (nss && sck) begin failures++; $display("FAIL: SCK high while nSS high"); end
    if (nss) rises = 0;
    if (sck && !sck_q) begin
      if (rises > 0 && cyc - last_rise != 2 * SCK_HALF) begin
        failures++; $display("FAIL: SCK period %0d", cyc - last_rise);
      end
      checks++;
      last_rise = cyc; rises++;
    end
    if (sess_done) n_done++;
    sck_q = sck;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int s = 0; s < 10; s++) begin
      int n, seen;
      n = $urandom_range(1, 40);
      go = (s != 3);
      // slaves become ready one by one
      for (int i = 0; i < 3; i++) begin
        repeat ($urandom_range(0, 5)) @(negedge clk);
        irq[i] = 1'b1;
        if (i < 2) begin @(negedge clk); check(nss, "no session before all IRQ high"); end
      end
      if (s == 3) begin
        repeat (10) @(negedge clk);
        check(nss, "no session without go");
        go = 1'b1;
      end
      while (nss) @(negedge clk);
      seen = 0;
      while (seen < n) begin
        @(negedge clk);
        if (rise) begin
          check(32'(beat) == seen, "beat counts rising edges");
          seen++;
        end
      end
      irq = '0;
      repeat (3) @(negedge clk);
      check(nss, "nSS high after all IRQ low");
      check(n_done == s + 1, "one sess_done per session");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
