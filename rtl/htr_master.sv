// htr_master: the small trusted master of the Trojan-resilient AES-128.
//
// The master never computes AES. It shares inputs, forwards the slaves'
// exchanges and reconstructs the result, and is the only part that must be
// trusted. It runs a fixed sequence of SPI sessions with the three slaves:
//   setup (pulse `setup_start`):
//     INIT'   slave i receives {prg_id, prg_key[i-1], prg_key[i]} (384 bits),
//             streamed straight from the input ports;
//     key     loading: MOSI_i = MISO_{i-1} ^ key, i.e. slave i receives
//             key ^ o_{i-1} while it sends its own o_i (three XOR gates, no
//             storage of the slaves' randomness);
//     expand  N_KEXP forwarding sessions: MOSI_i = MISO_{i-1}.
//   encryption (pulse `enc_start`, only while `ready`):
//     load    as key loading, with the plaintext;
//     rounds  N_ENC forwarding sessions;
//     output  serial reconstruction (master_recon); the ciphertext is
//             collected in the same 128-bit register that held the plaintext.
// At the end `ct_valid` pulses with `ct_out` and `ct_err` (the three
// reconstructions disagreed); `err_any` stays high once any block failed.
//
// LAMBDA slave triplets: the slaves number 3*LAMBDA, slave s belongs to
// triplet s/3 and exchanges only inside its triplet. Every triplet gets its own
// PRG keys and its own reconstruction unit; the output chunk is the bitwise
// majority of the LAMBDA reconstructions, and `ct_err` is also raised when the
// triplets disagree. With LAMBDA = 1 (the default, as on the demonstration
// board) the vote is the single reconstruction.
//
// Interface and timing: `key_in` and `pt_in` are captured at the start
// pulses; `prg_key` and `prg_id` must stay stable until `ready` rises. The
// master's size does not depend on the cipher except for the session counter.
// Ports are per slave (index 0..2 = slaves 1..3): separate SCK, nSS, MOSI,
// MISO and IRQ so that no slave sees another's traffic.
//
// Loading by XOR, pure forwarding, the serial reconstruction, INIT' with
// master-chosen keys and the majority over LAMBDA triplets follow the document. The session counts, the streaming of
// the PRG keys from ports and the host-side start/valid signals are this
// design's choices.
//
// The lint note that rst_n is used both asynchronously and synchronously
// comes from the `disable iff` of the assertions in the sub-blocks; it
// concerns only those simulation checks.
module htr_master
  import htr_pkg::*;
#(
  parameter int unsigned BUS_W    = 8,
  parameter int unsigned SCK_HALF = 1,
  parameter int unsigned N_KEXP   = 40,  // 10 key-expansion S-box passes x 4 exchanges
  parameter int unsigned N_ENC    = 40,  // 10 rounds x 4 exchanges
  parameter int unsigned LAMBDA   = 1    // number of slave triplets
) (
  input  logic             clk,
  input  logic             rst_n,
  // host side
  input  logic             setup_start,
  input  block_t           key_in,
  input  block_t           prg_key [3*LAMBDA],
  input  block_t           prg_id,
  input  logic             enc_start,
  input  block_t           pt_in,
  output logic             ready,
  output logic             ct_valid,
  output block_t           ct_out,
  output logic             ct_err,
  output logic             err_any,
  // slave links
  output logic [3*LAMBDA-1:0] sck,
  output logic [3*LAMBDA-1:0] nss,
  output logic [BUS_W-1:0]    mosi [3*LAMBDA],
  input  logic [BUS_W-1:0]    miso [3*LAMBDA],
  input  logic [3*LAMBDA-1:0] irq
);

  localparam int unsigned NS = 3 * LAMBDA;

  localparam int unsigned BEATW = $clog2(384 / BUS_W + 1);

  typedef enum logic [2:0] {
    M_OFF, M_INIT, M_KEY, M_KEXP, M_READY, M_LOAD, M_FWD, M_REC
  } mstate_e;

  mstate_e          st;
  block_t           data;
  logic [5:0]       sess_cnt;
  logic             go, nss_w, sck_w, rise, sess_start, sess_done;
  logic [BEATW-1:0] beat;

  assign go = (st != M_OFF) && (st != M_READY);

  // the controller starts when every slave requests and ends when none does
  logic [2:0] irq3;
  assign irq3 = (&irq) ? 3'b111 : (|irq) ? 3'b001 : 3'b000;

  spi_master #(.SCK_HALF(SCK_HALF), .BEATW(BEATW)) u_spi (
    .clk, .rst_n, .go, .irq(irq3), .nss(nss_w), .sck(sck_w), .rise, .beat,
    .sess_start, .sess_done
  );

  assign sck = {NS{sck_w}};
  assign nss = {NS{nss_w}};

  // ---------------------------------------------------------------- MOSI
  logic [BUS_W-1:0] data_beat;
  assign data_beat = BUS_W'(data >> (beat * BUS_W));

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      logic [383:0] init_word;
      int           prev;
      prev      = s - (s % 3) + ((s % 3) + 2) % 3;  // previous slave in the same triplet
      init_word = {prg_id, prg_key[prev], prg_key[s]};
      unique case (st)
        M_INIT:          mosi[s] = BUS_W'(init_word >> (beat * BUS_W));
        M_KEY, M_LOAD:   mosi[s] = miso[prev] ^ data_beat;
        M_KEXP, M_FWD:   mosi[s] = miso[prev];
        default:         mosi[s] = '0;
      endcase
    end
  end

  // ---------------------------------------------------------------- output
  // one reconstruction unit per triplet, then a bitwise majority vote
  logic [BUS_W-1:0]  vt [LAMBDA];
  logic [LAMBDA-1:0] vt_valid, mm_t;

  for (genvar t = 0; t < LAMBDA; t++) begin : g_rec
    logic [BUS_W-1:0] miso_t [3];
    assign miso_t = '{miso[3*t], miso[3*t+1], miso[3*t+2]};
    master_recon #(.BUS_W(BUS_W)) u_recon (
      .clk, .rst_n, .clear(sess_start), .rise(rise && st == M_REC), .odd(beat[0]),
      .miso(miso_t), .v(vt[t]), .v_valid(vt_valid[t]), .mismatch(mm_t[t])
    );
  end

  logic [BUS_W-1:0] v;
  logic             v_valid, mismatch, vote_diff, vote_err;

  always_comb begin
    vote_diff = 1'b0;
    for (int b = 0; b < BUS_W; b++) begin
      int ones;
      ones = 0;
      for (int t = 0; t < LAMBDA; t++) ones += int'(vt[t][b]);
      v[b] = (2 * ones > LAMBDA);
    end
    for (int t = 1; t < LAMBDA; t++) vote_diff |= (vt[t] != vt[0]);
  end
  assign v_valid  = vt_valid[0];
  assign mismatch = (|mm_t) | vote_err;

  // the triplets disagreed on some chunk of this output session
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              vote_err <= 1'b0;
    else if (sess_start)     vote_err <= 1'b0;
    else if (v_valid && vote_diff) vote_err <= 1'b1;
  end

  assign ready  = (st == M_READY);
  assign ct_out = data;

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= M_OFF;
      data     <= '0;
      sess_cnt <= '0;
      ct_valid <= 1'b0;
      ct_err   <= 1'b0;
      err_any  <= 1'b0;
    end else begin
      ct_valid <= 1'b0;
      if (v_valid) data[32'(beat >> 1) * BUS_W +: BUS_W] <= v;
      unique case (st)
        M_OFF:   if (setup_start) begin data <= key_in; st <= M_INIT; end
        M_INIT:  if (sess_done) st <= M_KEY;
        M_KEY:   if (sess_done) begin sess_cnt <= '0; st <= M_KEXP; end
        M_KEXP:  if (sess_done) begin
          if (sess_cnt == 6'(N_KEXP - 1)) st <= M_READY;
          else sess_cnt <= sess_cnt + 6'd1;
        end
        M_READY: if (enc_start) begin data <= pt_in; st <= M_LOAD; end
        M_LOAD:  if (sess_done) begin sess_cnt <= '0; st <= M_FWD; end
        M_FWD:   if (sess_done) begin
          if (sess_cnt == 6'(N_ENC - 1)) st <= M_REC;
          else sess_cnt <= sess_cnt + 6'd1;
        end
        M_REC:   if (sess_done) begin
          ct_valid <= 1'b1;
          ct_err   <= mismatch;
          err_any  <= err_any | mismatch;
          st       <= M_READY;
        end
        default: st <= M_OFF;
      endcase
    end
  end

endmodule
