// sbox_layer -- S-box layer of the cipher.
//
// The 32-bit state S31..S0 is cut into eight nibbles W7..W0 with
// Wi = S[4i+3:4i]; each nibble is replaced by S[Wi] from the PRESENT 4-bit
// S-box (table in lwbc_pkg). Encryption and decryption use the same layer.
// Purely combinational, no latency.
module sbox_layer
  import lwbc_pkg::*;
(
  input  half_t state_i,
  output half_t state_o
);
  always_comb begin
    for (int i = 0; i < HALF_W/4; i++)
      state_o[4*i +: 4] = sbox4(state_i[4*i +: 4]);
  end
endmodule
