// tb_master_recon: streams random 2-out-of-3 shares of random 128-bit words
// into the reconstruction unit as alternating x and a beats (8-wire and
// 1-wire versions). Checks every reconstructed chunk against the shared word
// and that `mismatch` stays low for clean shares and is set when one bit of
// one slave's share is flipped, and cleared again by `clear`.
module tb_master_recon;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, rise = 1'b0, rise8 = 1'b0, odd = 1'b0;
  logic [7:0] miso8 [3], v8;
  logic [0:0] miso1 [3], v1;
  logic       vv8, vv1, mm8, mm1;
  int checks = 0, failures = 0;

  master_recon #(.BUS_W(8)) dut8 (.clk, .rst_n, .clear, .rise(rise8), .odd, .miso(miso8),
                                  .v(v8), .v_valid(vv8), .mismatch(mm8));
  master_recon #(.BUS_W(1)) dut1 (.clk, .rst_n, .clear, .rise, .odd, .miso(miso1),
                                  .v(v1), .v_valid(vv1), .mismatch(mm1));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    miso8 = '{default: '0}; miso1 = '{default: '0};
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 8; n++) begin
      logic [127:0] v, x [3], a [3];
      logic [127:0] got8, got1;
      int flip;
      flip = (n % 2 == 1) ? $urandom_range(0, 127) : -1;
      v = {$urandom, $urandom, $urandom, $urandom};
      x[0] = {$urandom, $urandom, $urandom, $urandom};
      x[1] = {$urandom, $urandom, $urandom, $urandom};
      x[2] = x[0] ^ x[1];
      for (int i = 0; i < 3; i++) a[i] = v ^ x[(i+2)%3];
      if (flip >= 0) a[2][flip] = ~a[2][flip];
      @(negedge clk); clear = 1'b1;
      @(negedge clk); clear = 1'b0;
      for (int b = 0; b < 256; b++) begin
        odd = b[0];
        for (int i = 0; i < 3; i++) begin
          if (b < 32) miso8[i] = odd ? a[i][(b/2)*8 +: 8] : x[i][(b/2)*8 +: 8];
          miso1[i] = odd ? a[i][b/2] : x[i][b/2];
        end
        rise = 1'b1; rise8 = (b < 32);
        #1;
        if (b < 32 && vv8) got8[(b/2)*8 +: 8] = v8;
        if (vv1) got1[b/2] = v1;
        @(negedge clk); rise = 1'b0; rise8 = 1'b0;
        @(negedge clk);
      end
      checks += 4;
      if (flip < 0) begin
        if (got8 != v) begin failures++; $display("FAIL: 8-wire word"); end
        if (got1 != v) begin failures++; $display("FAIL: 1-wire word"); end
        if (mm8 || mm1) begin failures++; $display("FAIL: false mismatch"); end
      end else begin
        if (!mm8) begin failures++; $display("FAIL: 8-wire missed a flipped bit"); end
        if (!mm1) begin failures++; $display("FAIL: 1-wire missed a flipped bit"); end
        checks -= 2;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
