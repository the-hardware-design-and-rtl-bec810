// key_schedule -- round-key generator of the cipher.
//
// The 128-bit user key is held in a register and only ever rotated:
//   encryption : round 1 key = user key,        round i key = round i-1 key <<< 25
//   decryption : round 1 key = user key >>> 81, round i key = round i-1 key >>> 25
// (user key >>> 81 equals user key <<< 175, the eighth encryption round key,
// so decryption walks the encryption keys backwards).
//
// Interface/timing: round_key_o is the key for the round the core computes
// in the current cycle. In the cycle of load_i it is formed combinationally
// from key_i and mode_i, so the first round can run in the load cycle; on
// that edge the register takes the next key. While step_i is high it advances
// one round per clock. The mode is latched at load. Synchronous active-high
// reset.
module key_schedule
  import lwbc_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  load_i,      // take a new user key (first round runs this cycle)
  input  logic  step_i,      // advance to the next round key
  input  mode_e mode_i,      // sampled with load_i
  input  key_t  key_i,       // 128-bit user key
  output key_t  round_key_o  // key of the round computed this cycle
);
  key_t  key_q;
  mode_e mode_q;
  mode_e mode_cur;
  key_t  key_next;

  assign mode_cur    = load_i ? mode_i : mode_q;
  assign round_key_o = load_i ? ((mode_i == MODE_DEC) ? rotr(key_i, DEC_ROT0) : key_i)
                              : key_q;
  assign key_next    = (mode_cur == MODE_DEC) ? rotr(round_key_o, KEY_ROT)
                                              : rotl(round_key_o, KEY_ROT);

  always_ff @(posedge clk) begin
    if (reset) begin
      key_q  <= '0;
      mode_q <= MODE_ENC;
    end else begin
      if (load_i) mode_q <= mode_i;
      if (load_i || step_i) key_q <= key_next;
    end
  end
endmodule
