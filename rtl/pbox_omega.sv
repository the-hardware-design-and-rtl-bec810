// pbox_omega -- key-dependent one-stage omega permutation network (P-box).
//
// The network is one stage of an omega network on 32 lines: a perfect
// shuffle followed by a column of sixteen 2x2 switches. Switch j receives
// S-box output bits j and j+16 and drives P-box output bits 2j and 2j+1;
// it is built from two 2-to-1 multiplexers that share one select signal,
// KEY_BITS[j] (32 multiplexers, 16 selects):
//   KEY_BITS[j] = 0 : out[2j] = in[j],    out[2j+1] = in[j+16]
//   KEY_BITS[j] = 1 : out[2j] = in[j+16], out[2j+1] = in[j]
// KEY_BITS is the XOR of the four 16-bit slices of the 64 key bits that the
// stage uses (the two 32-bit key words of the stage):
//   KEY_BITS = k[63:48] ^ k[47:32] ^ k[31:16] ^ k[15:0].
// The fold and the 32-mux structure are as described for this cipher; which
// input pair feeds which switch, and the select polarity, were fixed so that
// the published test vectors are reproduced. Combinational, no latency.
module pbox_omega
  import lwbc_pkg::*;
(
  input  half_t              in_data,   // S-box output
  input  logic [2*HALF_W-1:0] stage_key, // {Ka, Kb}, the stage's two key words
  output half_t              pbox       // P-box output
);
  logic [KBITS_W-1:0] key_bits;

  assign key_bits = stage_key[63:48] ^ stage_key[47:32] ^ stage_key[31:16] ^ stage_key[15:0];

  always_comb begin
    for (int j = 0; j < KBITS_W; j++) begin
      pbox[2*j]   = key_bits[j] ? in_data[j+KBITS_W] : in_data[j];
      pbox[2*j+1] = key_bits[j] ? in_data[j]         : in_data[j+KBITS_W];
    end
  end
endmodule
