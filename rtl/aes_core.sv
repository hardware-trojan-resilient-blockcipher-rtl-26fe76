// aes_core: iterative AES-128 encryption core, used as the pseudorandom
// function F_k(id) inside each slave's correlated-randomness generator.
//
// How it works: four S-boxes are shared between the state and the key
// schedule. A round takes five cycles: in cycles 0..3 the four S-boxes
// substitute one column of the state each cycle; in cycle 4 they substitute
// RotWord of the last round-key word, the next round key is formed and
// ShiftRows, MixColumns (not in round 10) and AddRoundKey are applied to the
// state in the same cycle.
//
// Interface and timing: pulse `start` with `key` and `pt` valid while the core
// is idle. The initial AddRoundKey happens in the start cycle; `done` pulses
// 50 cycles later with `ct` valid (51 cycles from start to result, `ct` holds
// until the next start). `busy` is high in between.
//
// The document only says that the PRG uses AES cores producing 128 bits in 55
// cycles; this column-serial organisation and its 51-cycle latency are this
// design's own choice.
module aes_core
  import htr_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t key,
  input  block_t pt,
  output logic   busy,
  output logic   done,
  output block_t ct
);

  block_t      state, rk;
  logic [3:0]  round;
  logic [2:0]  phase;
  logic [31:0] sb_in, sb_out;

  // S-box input: a state column in phases 0..3, RotWord(w3) in phase 4
  always_comb begin
    if (phase == 3'd4) sb_in = rot_word(rk[31:0]);
    else               sb_in = state[127 - 32*phase -: 32];
    for (int b = 0; b < 4; b++) sb_out[31 - 8*b -: 8] = aes_sbox(sb_in[31 - 8*b -: 8]);
  end

  block_t next_rk, lin;
  always_comb begin
    next_rk = key_step(rk, sb_out ^ {rcon(32'(round)), 24'h0});
    lin     = shift_rows(state);
    if (round != 4'(AES_ROUNDS)) lin = mix_columns(lin);
    lin     = lin ^ next_rk;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      rk    <= '0;
      round <= '0;
      phase <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state <= pt ^ key;
          rk    <= key;
          round <= 4'd1;
          phase <= 3'd0;
          busy  <= 1'b1;
        end
      end else if (phase != 3'd4) begin
        state[127 - 32*phase -: 32] <= sb_out;
        phase <= phase + 3'd1;
      end else begin
        state <= lin;
        rk    <= next_rk;
        phase <= 3'd0;
        if (round == 4'(AES_ROUNDS)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          round <= round + 4'd1;
        end
      end
    end
  end

  assign ct = state;

endmodule
