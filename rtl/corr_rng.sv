// corr_rng: correlated-randomness generator of one slave.
//
// Slave i holds two PRG keys, its own k_i and its predecessor's k_{i-1}, and a
// public counter id, all sent by the master during INIT'. Each block it
// computes o_i = F_{k_i}(id) ^ F_{k_{i-1}}(id) with two AES-128 cores running
// in parallel (counter mode: id is incremented before every block). Because
// every key is used by exactly two neighbouring slaves, o_1 ^ o_2 ^ o_3 = 0
// while no slave can compute another slave's o.
//
// Interface: `seed` (one cycle) loads k_self, k_prev and id and starts the
// generator. Randomness leaves as 64-bit words on a valid/ready handshake
// (`rnd_valid`, `rnd_word`, `rnd_ready`): the low half of each 128-bit block
// first, then the high half. The next block is computed in the background
// while the current one is handed out, so a new block is ready at most one
// AES latency (51 cycles) after the previous one was loaded.
//
// The two-AES counter-mode construction follows the document; the 64-bit word
// interface and the single-block buffer are this design's choices.
//
// The reset also disables the assertions below; verilator therefore lists
// rst_n as used both asynchronously and synchronously, which concerns only
// that simulation check.
module corr_rng
  import htr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed,
  input  block_t      k_self,
  input  block_t      k_prev,
  input  block_t      id_in,
  output logic        rnd_valid,
  output logic [63:0] rnd_word,
  input  logic        rnd_ready
);

  block_t     ks, kp, id, buffer;
  logic       seeded, running, res_valid;
  logic [1:0] words_left;
  logic       busy_a, busy_b, done_a, done_b;
  block_t     ct_a, ct_b;
  logic       start_cores;

  assign start_cores = seeded && !running && !res_valid;

  aes_core u_aes_self (
    .clk, .rst_n, .start(start_cores), .key(ks), .pt(id + 128'd1),
    .busy(busy_a), .done(done_a), .ct(ct_a)
  );
  aes_core u_aes_prev (
    .clk, .rst_n, .start(start_cores), .key(kp), .pt(id + 128'd1),
    .busy(busy_b), .done(done_b), .ct(ct_b)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ks <= '0; kp <= '0; id <= '0; buffer <= '0;
      seeded <= 1'b0; running <= 1'b0; res_valid <= 1'b0; words_left <= '0;
    end else if (seed) begin
      ks <= k_self; kp <= k_prev; id <= id_in;
      seeded <= 1'b1; running <= 1'b0; res_valid <= 1'b0; words_left <= '0;
    end else begin
      if (start_cores) begin
        running <= 1'b1;
        id      <= id + 128'd1;
      end
      if (running && done_a && done_b) begin
        running   <= 1'b0;
        res_valid <= 1'b1;
      end
      if (res_valid && words_left == 2'd0) begin
        buffer     <= ct_a ^ ct_b;
        words_left <= 2'd2;
        res_valid  <= 1'b0;
      end else if (rnd_valid && rnd_ready) begin
        words_left <= words_left - 2'd1;
      end
    end
  end

  assign rnd_valid = (words_left != 2'd0);
  assign rnd_word  = (words_left == 2'd2) ? buffer[63:0] : buffer[127:64];

  // the two cores always run in lock step
  assert property (@(posedge clk) disable iff (!rst_n) busy_a == busy_b);

endmodule
