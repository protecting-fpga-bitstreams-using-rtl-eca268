// aes32_core: compact AES-128 encryption core with a 32-bit data path.
//
// One quarter of a round is computed per clock cycle. The input register
// (st_q) holds the state at the start of a round; each cycle a 4:1 column
// select takes one column of ShiftRows(st_q), the four S-boxes substitute it,
// the single MixColumns unit mixes it (bypassed in the last round), one
// 32-bit word of the round key is XORed in and the result is written into
// one 32-bit slot of the output register (ob_q). After four columns the
// output register holds the round result and is copied back into the input
// register over the 128-bit feedback path.
//
// The key schedule shares the four S-boxes with the data path: in the first
// cycle of every round the S-boxes process RotWord(w3) of the round key and
// the next round key is formed, while the input register takes the previous
// round's result. The cycle budget is therefore
//   1 (load) + 4 (initial AddRoundKey, one column per cycle)
//   + 10 rounds x (1 key cycle + 4 column cycles) = 55 cycles,
// matching the 55-cycle figure for a quarter-round AES.
// In the initial AddRoundKey cycles both ShiftRows and SubBytes/MixColumns
// are bypassed, so the key word is added to the raw input column.
//
// Interface: start (one cycle, accepted when busy is low) samples din and
// key. 55 rising edges later, counting the one that samples start, dout
// holds the ciphertext and done is high for one cycle. dout stays valid
// until the next start. start may be given in the cycle done is high.
// Reset (rst_n, active low, synchronous) only clears the control state.
module aes32_core
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t din,
  input  block_t key,
  output logic   busy,
  output logic   done,
  output block_t dout
);

  typedef enum logic [1:0] {
    S_IDLE = 2'd0,   // waiting for start
    S_ARK0 = 2'd1,   // initial AddRoundKey, one column per cycle
    S_KEY  = 2'd2,   // S-boxes used by the key schedule, round result fed back
    S_COL  = 2'd3    // one column of a round per cycle
  } phase_e;

  phase_e     phase_q;
  logic [1:0] col_q;
  logic [3:0] round_q;
  logic       done_q;

  block_t st_q;      // input (ShiftRows) register
  block_t ob_q;      // output register, four 32-bit slots

  word_t  rk_word, rot_w3;
  word_t  sb_in, sb_out, mc_out, col_val;
  logic   last_round;

  assign last_round = (round_q == 4'(NR));

  // S-box input: key word in key cycles, else a column of ShiftRows(state).
  always_comb begin
    if (phase_q == S_KEY) sb_in = rot_w3;
    else                  sb_in = shifted_col(st_q, col_q);
  end

  aes_sbox4 u_sbox (
    .din  (sb_in),
    .dout (sb_out)
  );

  aes_mixcolumn u_mix (
    .din  (sb_out),
    .dout (mc_out)
  );

  aes_key_sched u_ks (
    .clk     (clk),
    .load    (start && !busy),
    .key     (key),
    .step    (phase_q == S_KEY),
    .subword (sb_out),
    .sel     (col_q),
    .rk_word (rk_word),
    .rot_w3  (rot_w3)
  );

  // Column result: bypass everything for the initial key addition, skip
  // MixColumns in the last round.
  always_comb begin
    if (phase_q == S_ARK0)  col_val = get_col(st_q, col_q) ^ rk_word;
    else if (last_round)    col_val = sb_out ^ rk_word;
    else                    col_val = mc_out ^ rk_word;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q <= S_IDLE;
      col_q   <= '0;
      round_q <= '0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (phase_q)
        S_IDLE: begin
          if (start) begin
            phase_q <= S_ARK0;
            col_q   <= '0;
            round_q <= '0;
          end
        end
        S_ARK0: begin
          col_q <= col_q + 2'd1;
          if (col_q == 2'd3) begin
            phase_q <= S_KEY;
            round_q <= 4'd1;
          end
        end
        S_KEY: begin
          phase_q <= S_COL;
          col_q   <= '0;
        end
        S_COL: begin
          col_q <= col_q + 2'd1;
          if (col_q == 2'd3) begin
            if (last_round) begin
              phase_q <= S_IDLE;
              done_q  <= 1'b1;
            end else begin
              phase_q <= S_KEY;
              round_q <= round_q + 4'd1;
            end
          end
        end
        default: phase_q <= S_IDLE;
      endcase
    end
  end

  // Data registers carry no reset.
  always_ff @(posedge clk) begin
    if (phase_q == S_IDLE && start) st_q <= din;
    else if (phase_q == S_KEY)      st_q <= ob_q;
    if (phase_q == S_ARK0 || phase_q == S_COL) ob_q[127 - 32*col_q -: 32] <= col_val;
  end

  assign busy = (phase_q != S_IDLE);
  assign done = done_q;
  assign dout = ob_q;

endmodule
