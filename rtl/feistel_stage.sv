// feistel_stage -- one stage (half round) of the cipher.
//
// new = other ^ Kb ^ P(S(src ^ Ka), {Ka,Kb})
//   src   : the half that goes through the round function
//   other : the half it is XORed into
//   Ka    : first AddRoundKey word (K0 in encryption stage 1, K2 in stage 2)
//   Kb    : second AddRoundKey word (K1 resp. K3)
// The P-box select bits are folded from the same two words. Two stages make
// one round; decryption uses the same stage with the key-word pairs swapped.
// Purely combinational.
module feistel_stage
  import lwbc_pkg::*;
(
  input  half_t src_i,
  input  half_t other_i,
  input  half_t ka_i,
  input  half_t kb_i,
  output half_t new_o
);
  half_t keyed, subst, perm, mixed;

  add_round_key u_ark1 (.state_i(src_i), .key_i(ka_i), .state_o(keyed));
  sbox_layer    u_sbox (.state_i(keyed), .state_o(subst));
  pbox_omega    u_pbox (.in_data(subst), .stage_key({ka_i, kb_i}), .pbox(perm));
  add_round_key u_ark2 (.state_i(perm),  .key_i(kb_i), .state_o(mixed));

  assign new_o = mixed ^ other_i;
endmodule
