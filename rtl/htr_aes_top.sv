// htr_aes_top: Trojan-resilient AES-128 encryption with one trusted master
// and LAMBDA triplets of untrusted slaves (default one triplet).
//
// The plaintext and key are secret-shared 2-out-of-3 between three identical
// slaves, which compute AES on the shares with a three-party protocol: linear
// steps locally, each GF(2^4) multiplication with one exchanged element per
// slave. The slaves are not wired to each other; every exchange passes through
// the master over three independent SPI links, so no slave ever sees more than
// its own uniformly random share. Correlated randomness is generated inside the
// slaves from PRG keys the master chooses at set-up. The master reconstructs
// the ciphertext three ways and flags any disagreement.
//
// Usage: hold `prg_key`, `prg_id` and `key` and pulse `setup_start`; wait for
// `ready` (the slaves have expanded the key on shares). Then pulse `enc_start`
// with `pt`; `ct_valid` pulses with `ct` and `ct_err`. `err_any` stays high
// once any block failed. The SPI link signals are brought out for observation.
//
// Parameters: BUS_W is the number of data wires per direction and link (the
// demonstration configuration of the document uses 8; 1, 2, 4 and 8 are
// supported), SCK_HALF the SCK half period in clock cycles (1 = bus at half the
// internal clock). LAMBDA is the number of slave triplets: each triplet
// computes the same block on its own sharing and the master takes a bitwise
// majority of the triplets' results (the default of 1 is the document's
// prototype). A single clock drives all parties here; on a board the master
// forwards its clock to the slaves.
//
// The lint note that rst_n is used both asynchronously and synchronously
// comes from the `disable iff` of the assertions in the sub-blocks; it
// concerns only those simulation checks.
module htr_aes_top
  import htr_pkg::*;
#(
  parameter int unsigned BUS_W    = 8,
  parameter int unsigned SCK_HALF = 1,
  parameter int unsigned LAMBDA   = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             setup_start,
  input  block_t           key,
  input  block_t           prg_key [3*LAMBDA],
  input  block_t           prg_id,
  input  logic             enc_start,
  input  block_t           pt,
  output logic             ready,
  output logic             ct_valid,
  output block_t           ct,
  output logic             ct_err,
  output logic             err_any,
  // the 3*LAMBDA SPI links, for observation
  output logic [3*LAMBDA-1:0] link_sck,
  output logic [3*LAMBDA-1:0] link_nss,
  output logic [3*LAMBDA-1:0] link_irq,
  output logic [BUS_W-1:0]    link_mosi [3*LAMBDA],
  output logic [BUS_W-1:0]    link_miso [3*LAMBDA]
);

  localparam int unsigned N_SESS = 4 * AES_ROUNDS;  // four exchanges per S-box layer pass

  htr_master #(
    .BUS_W(BUS_W), .SCK_HALF(SCK_HALF), .N_KEXP(N_SESS), .N_ENC(N_SESS), .LAMBDA(LAMBDA)
  ) u_master (
    .clk, .rst_n,
    .setup_start, .key_in(key), .prg_key, .prg_id,
    .enc_start, .pt_in(pt), .ready, .ct_valid, .ct_out(ct), .ct_err, .err_any,
    .sck(link_sck), .nss(link_nss), .mosi(link_mosi), .miso(link_miso), .irq(link_irq)
  );

  for (genvar i = 0; i < 3 * LAMBDA; i++) begin : g_slave
    aes_slave #(.BUS_W(BUS_W)) u_slave (
      .clk, .rst_n,
      .sck(link_sck[i]), .nss(link_nss[i]), .mosi(link_mosi[i]),
      .miso(link_miso[i]), .irq(link_irq[i])
    );
  end

endmodule
