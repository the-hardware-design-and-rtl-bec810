// lwbc_pkg -- shared constants, types and the S-box table of the lightweight
// block cipher.
//
// The cipher is a 64-bit-block, 128-bit-key Feistel cipher with 8 rounds;
// every round has two stages (AddRoundKey, S-box, P-box, AddRoundKey). The
// S-box is the PRESENT 4-bit S-box. The round key is rotated by 25 bits per
// round; decryption starts from the user key rotated right by 81 bits, which
// is the eighth encryption round key.
//
// Key-word numbering: the 128-bit key is split into four 32-bit words K0..K3
// with K0 the most significant word (key[127:96]) and K3 the least
// significant (key[31:0]). With this numbering the published test vectors
// (key ABCDEF02758191AD185DABF04954C78A) are reproduced bit for bit.
package lwbc_pkg;

  localparam int unsigned BLOCK_W    = 64;   // block length
  localparam int unsigned HALF_W     = 32;   // Feistel half
  localparam int unsigned KEY_W      = 128;  // key length
  localparam int unsigned ROUNDS     = 8;    // rounds per block
  localparam int unsigned KEY_ROT    = 25;   // per-round key rotation
  localparam int unsigned DEC_ROT0   = 81;   // initial right rotation for decryption
  localparam int unsigned KBITS_W    = 16;   // P-box select bits

  typedef logic [HALF_W-1:0]  half_t;
  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [KEY_W-1:0]   key_t;

  // Operating mode of a core.
  typedef enum logic {
    MODE_ENC = 1'b0,
    MODE_DEC = 1'b1
  } mode_e;

  // PRESENT S-box, S[x] for x = 0..F.
  function automatic logic [3:0] sbox4(input logic [3:0] x);
    case (x)
      4'h0: sbox4 = 4'hC;  4'h1: sbox4 = 4'h5;  4'h2: sbox4 = 4'h6;  4'h3: sbox4 = 4'hB;
      4'h4: sbox4 = 4'h9;  4'h5: sbox4 = 4'h0;  4'h6: sbox4 = 4'hA;  4'h7: sbox4 = 4'hD;
      4'h8: sbox4 = 4'h3;  4'h9: sbox4 = 4'hE;  4'hA: sbox4 = 4'hF;  4'hB: sbox4 = 4'h8;
      4'hC: sbox4 = 4'h4;  4'hD: sbox4 = 4'h7;  4'hE: sbox4 = 4'h1;  default: sbox4 = 4'h2;
    endcase
  endfunction

  // Word w (0..3) of a round key; K0 is the most significant word.
  function automatic half_t key_word(input key_t k, input int unsigned w);
    return k[KEY_W-1-HALF_W*w -: HALF_W];
  endfunction

  function automatic key_t rotl(input key_t k, input int unsigned n);
    return (k << n) | (k >> (KEY_W - n));
  endfunction

  function automatic key_t rotr(input key_t k, input int unsigned n);
    return (k >> n) | (k << (KEY_W - n));
  endfunction

endpackage
