// add_round_key -- AddRoundKey layer of the cipher.
//
// XORs a 32-bit state word with a 32-bit round-key word, bit by bit
// (S'[i] = S[i] ^ K[i]). The same layer is used four times per round: before
// the S-box of each stage, and after the P-box of each stage, where the
// stage result is also folded into the other Feistel half (that second XOR
// is done in feistel_stage). Purely combinational, no latency.
module add_round_key
  import lwbc_pkg::*;
(
  input  half_t state_i,  // S31..S0
  input  half_t key_i,    // K31..K0
  output half_t state_o
);
  assign state_o = state_i ^ key_i;
endmodule
