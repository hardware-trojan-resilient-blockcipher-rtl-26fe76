// aes_slave: one untrusted slave of the Trojan-resilient AES-128 triplet.
//
// What it does: the slave computes AES-128 on a 2-out-of-3 secret sharing of
// key and plaintext without ever seeing either. It talks only to the master,
// over one SPI link (SCK, nSS, MOSI, MISO, IRQ); words are identified by their
// order, so the slave follows a fixed sequence of sessions:
//   1. INIT'   receive 384 bits {id, k_prev, k_self} and seed the PRG.
//   2. key     loader: send 128 bits o_i (own correlated randomness, kept as
//              x_i), receive key ^ o_{i-1} (kept as a_i).
//   3. expand  10 key-expansion rounds on shares; each runs SubWord through the
//              MPC S-box (4 exchanges of 64, 64, 64, 128 bits; only the first
//              4 of its 16 byte lanes carry key bytes) and stores round keys
//              1..10, so the expansion is paid once per key.
//   then, for every block:
//   4. load    loader as in 2 for the plaintext, then AddRoundKey(rk0).
//   5. rounds  10 rounds: MPC S-box (4 exchanges), then ShiftRows, MixColumns
//              (not in round 10) and AddRoundKey on both share components.
//   6. output  send the share as 256 bits, beats alternating between a chunk
//              of x and the same chunk of a (x first), for reconstruction.
//   and back to 4. A new key needs a reset.
//
// Sharing convention: slave i holds (x_i, a_i) with a_i = v ^ x_{i-1}; in an
// exchange it sends to slave i+1 and receives from slave i-1 (through the
// master). A finite state machine sequences the phases and hands the SPI and
// the randomness port to either the loader or the S-box unit.
//
// Timing: every transfer moves BUS_W bits per SCK period; the linear steps
// take one cycle per round; the PRG supplies 128 bits per ~51 cycles.
//
// The block structure (loader, S-box, MixColumns, ShiftRows, AddKey, SPI slave
// with a multiplexer, FSM), the sharing and multiplication protocols and the
// INIT'/SHARE' sequence follow the document. The session order, the one-off
// key expansion on shares, the interleaved output order and the requirement of
// a reset for a new key are this design's choices.
//
// The reset also disables the assertions below; verilator therefore lists
// rst_n as used both asynchronously and synchronously, which concerns only
// that simulation check.
module aes_slave
  import htr_pkg::*;
#(
  parameter int unsigned BUS_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sck,
  input  logic             nss,
  input  logic [BUS_W-1:0] mosi,
  output logic [BUS_W-1:0] miso,
  output logic             irq
);

  localparam int unsigned MAXBITS = 384;
  localparam int unsigned BEATW   = $clog2(MAXBITS / BUS_W + 1);

  typedef enum logic [3:0] {
    S_INIT, S_KL_R0, S_KL_R1, S_KL_X, S_KE_S, S_KE_W,
    S_PL_R0, S_PL_R1, S_PL_X, S_RD_S, S_RD_W, S_REC
  } state_e;

  state_e     st;
  logic [3:0] rnd_i;
  share128_t  rk [AES_ROUNDS+1];
  share128_t  state_sh;
  block_t     o_reg;

  // ---------------------------------------------------------------- SPI
  logic               spi_req, spi_done;
  logic [BEATW-1:0]   spi_nbeats;
  logic [MAXBITS-1:0] spi_tx, spi_rx;

  spi_slave #(.BUS_W(BUS_W), .MAXBITS(MAXBITS)) u_spi (
    .clk, .rst_n, .sck, .nss, .mosi, .miso, .irq,
    .req(spi_req), .nbeats(spi_nbeats), .tx(spi_tx), .done(spi_done), .rx(spi_rx)
  );

  // ---------------------------------------------------------------- PRG
  logic        rnd_valid, rnd_ready, rng_seed;
  logic [63:0] rnd_word;

  corr_rng u_rng (
    .clk, .rst_n, .seed(rng_seed),
    .k_self(spi_rx[127:0]), .k_prev(spi_rx[255:128]), .id_in(spi_rx[383:256]),
    .rnd_valid, .rnd_word, .rnd_ready
  );

  // ---------------------------------------------------------------- S-box
  logic         sb_start, sb_busy, sb_done, sb_rnd_ready;
  logic         sb_xreq, sb_xlen128;
  logic [127:0] sb_xtx;
  share128_t    sb_in, sb_out;

  mpc_sbox u_sbox (
    .clk, .rst_n, .start(sb_start), .in_sh(sb_in), .busy(sb_busy), .done(sb_done),
    .out_sh(sb_out), .rnd_valid, .rnd_word, .rnd_ready(sb_rnd_ready),
    .xchg_req(sb_xreq), .xchg_len128(sb_xlen128), .xchg_tx(sb_xtx),
    .xchg_done(spi_done), .xchg_rx(spi_rx[127:0])
  );

  // ---------------------------------------------------------------- linear
  share128_t lin_out, rk_cur;
  assign rk_cur = rk[rnd_i];

  mpc_aes_linear u_lin (
    .in_sh(sb_out), .rk_sh(rk_cur), .last(rnd_i == 4'(AES_ROUNDS)), .out_sh(lin_out)
  );

  // S-box input: RotWord of the last key word in lanes 0..3, or the state
  share128_t rk_prev;
  assign rk_prev = rk[(rnd_i == 4'd0) ? 4'd0 : rnd_i - 4'd1];
  always_comb begin
    if (st == S_KE_S) begin
      sb_in.x = {rot_word(rk_prev.x[31:0]), 96'h0};
      sb_in.a = {rot_word(rk_prev.a[31:0]), 96'h0};
    end else begin
      sb_in = state_sh;
    end
  end
  assign sb_start = (st == S_KE_S) || (st == S_RD_S);

  // key-expansion step on shares: rcon is a constant, added to a only
  share128_t rk_next;
  always_comb begin
    rk_next.x = key_step(rk_prev.x, sb_out.x[127:96]);
    rk_next.a = key_step(rk_prev.a, sb_out.a[127:96] ^ {rcon(32'(rnd_i)), 24'h0});
  end

  // output word: beat 2j carries x[j], beat 2j+1 carries a[j]
  logic [255:0] rec_word;
  always_comb begin
    for (int j = 0; j < 128 / BUS_W; j++) begin
      rec_word[(2*j)*BUS_W   +: BUS_W] = state_sh.x[j*BUS_W +: BUS_W];
      rec_word[(2*j+1)*BUS_W +: BUS_W] = state_sh.a[j*BUS_W +: BUS_W];
    end
  end

  // ---------------------------------------------------------------- arbitration
  always_comb begin
    spi_req    = 1'b0;
    spi_nbeats = '0;
    spi_tx     = '0;
    rnd_ready  = 1'b0;
    unique case (st)
      S_INIT: begin
        spi_req    = 1'b1;
        spi_nbeats = BEATW'(384 / BUS_W);
      end
      S_KL_X, S_PL_X: begin
        spi_req    = 1'b1;
        spi_nbeats = BEATW'(128 / BUS_W);
        spi_tx     = MAXBITS'(o_reg);
      end
      S_REC: begin
        spi_req    = 1'b1;
        spi_nbeats = BEATW'(256 / BUS_W);
        spi_tx     = MAXBITS'(rec_word);
      end
      S_KL_R0, S_KL_R1, S_PL_R0, S_PL_R1: rnd_ready = 1'b1;
      S_KE_W, S_RD_W: begin
        spi_req    = sb_xreq;
        spi_nbeats = sb_xlen128 ? BEATW'(128 / BUS_W) : BEATW'(64 / BUS_W);
        spi_tx     = MAXBITS'(sb_xtx);
        rnd_ready  = sb_rnd_ready;
      end
      default: ;
    endcase
  end

  assign rng_seed = (st == S_INIT) && spi_done;

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_INIT;
      rnd_i    <= '0;
      state_sh <= '0;
      o_reg    <= '0;
      for (int r = 0; r <= AES_ROUNDS; r++) rk[r] <= '0;
    end else begin
      unique case (st)
        S_INIT:  if (spi_done) st <= S_KL_R0;
        S_KL_R0: if (rnd_valid) begin o_reg[63:0]   <= rnd_word; st <= S_KL_R1; end
        S_KL_R1: if (rnd_valid) begin o_reg[127:64] <= rnd_word; st <= S_KL_X;  end
        S_KL_X:  if (spi_done) begin
          rk[0] <= '{x: o_reg, a: spi_rx[127:0]};
          rnd_i <= 4'd1;
          st    <= S_KE_S;
        end
        S_KE_S:  st <= S_KE_W;
        S_KE_W:  if (sb_done) begin
          rk[rnd_i] <= rk_next;
          if (rnd_i == 4'(AES_ROUNDS)) st <= S_PL_R0;
          else begin
            rnd_i <= rnd_i + 4'd1;
            st    <= S_KE_S;
          end
        end
        S_PL_R0: if (rnd_valid) begin o_reg[63:0]   <= rnd_word; st <= S_PL_R1; end
        S_PL_R1: if (rnd_valid) begin o_reg[127:64] <= rnd_word; st <= S_PL_X;  end
        S_PL_X:  if (spi_done) begin
          state_sh.x <= o_reg ^ rk[0].x;
          state_sh.a <= spi_rx[127:0] ^ rk[0].a;
          rnd_i      <= 4'd1;
          st         <= S_RD_S;
        end
        S_RD_S:  st <= S_RD_W;
        S_RD_W:  if (sb_done) begin
          state_sh <= lin_out;
          if (rnd_i == 4'(AES_ROUNDS)) st <= S_REC;
          else begin
            rnd_i <= rnd_i + 4'd1;
            st    <= S_RD_S;
          end
        end
        S_REC:   if (spi_done) st <= S_PL_R0;
        default: st <= S_INIT;
      endcase
    end
  end

  // the S-box unit is only started when idle
  assert property (@(posedge clk) disable iff (!rst_n) sb_start |-> !sb_busy);

  initial assert (128 % BUS_W == 0 && 64 % BUS_W == 0)
    else $error("BUS_W must divide 64");

endmodule
