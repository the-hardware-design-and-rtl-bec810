// lwbc_ref_pkg -- bit-level reference model of the lightweight block cipher
// for the testbenches, plus the published test vectors.
//
// Written independently of the RTL: the S-box is a lookup array, the P-box
// is evaluated per output bit, the key words are sliced by explicit shifts
// and the key schedule is a loop of single-bit rotations.
package lwbc_ref_pkg;

  localparam logic [3:0] SBOX [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                        4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  // Published vectors: key ABCDEF02758191AD185DABF04954C78A, plaintext 0..9.
  localparam logic [127:0] TV_KEY = 128'hABCDEF02758191AD185DABF04954C78A;
  localparam logic [63:0]  TV_CT [10] = '{
    64'hD0EBBFB002FC211E, 64'hA8013D5725FC8496, 64'h1B9A72BACD398D34,
    64'hD25667B09B4DB802, 64'h936F3EDA60197859, 64'h8959DC899621A7CF,
    64'hEB5B8A40466BAEC6, 64'hA88459CA673E9FA2, 64'h8906477C8E40B4C7,
    64'h45AF2659DDC09CF5};

  function automatic logic [31:0] ref_sbox(input logic [31:0] x);
    logic [31:0] y;
    y = '0;
    for (int i = 0; i < 8; i++) begin
      logic [3:0] n;
      n = 4'((x >> (4*i)) & 32'hF);
      y = (y & ~(32'hF << (4*i))) | (32'(SBOX[n]) << (4*i));
    end
    return y;
  endfunction

  function automatic logic [15:0] ref_keybits(input logic [63:0] k);
    logic [15:0] kb;
    kb = '0;
    for (int s = 0; s < 4; s++) kb ^= 16'(k >> (16*s));
    return kb;
  endfunction

  // Output bit o comes from switch o/2; straight passes in[o/2] to the even
  // output, crossed passes it to the odd output.
  function automatic logic [31:0] ref_pbox(input logic [31:0] x, input logic [15:0] kb);
    logic [31:0] y;
    for (int o = 0; o < 32; o++) begin
      int j;
      j = o / 2;
      y[o] = ((o % 2) == int'(kb[j])) ? x[j] : x[j+16];
    end
    return y;
  endfunction

  function automatic logic [31:0] ref_f(input logic [31:0] x, input logic [31:0] ka,
                                        input logic [31:0] kb);
    return ref_pbox(ref_sbox(x ^ ka), ref_keybits({ka, kb})) ^ kb;
  endfunction

  function automatic logic [127:0] rot_left(input logic [127:0] k, input int n);
    for (int i = 0; i < n; i++) k = {k[126:0], k[127]};
    return k;
  endfunction

  function automatic logic [127:0] rot_right(input logic [127:0] k, input int n);
    for (int i = 0; i < n; i++) k = {k[0], k[127:1]};
    return k;
  endfunction

  function automatic logic [31:0] kw(input logic [127:0] k, input int w);
    return 32'(k >> (32 * (3 - w)));
  endfunction

  // Round key r (1..8) of encryption.
  function automatic logic [127:0] enc_round_key(input logic [127:0] key, input int r);
    return rot_left(key, 25 * (r - 1));
  endfunction

  function automatic logic [63:0] ref_encrypt(input logic [63:0] pt, input logic [127:0] key);
    logic [31:0] l, r;
    logic [127:0] k;
    l = pt[63:32]; r = pt[31:0];
    for (int i = 1; i <= 8; i++) begin
      k = enc_round_key(key, i);
      l = l ^ ref_f(r, kw(k, 0), kw(k, 1));
      r = r ^ ref_f(l, kw(k, 2), kw(k, 3));
    end
    return {r, l};
  endfunction

  // Decryption undoes the encryption rounds in reverse order (written as the
  // inverse of ref_encrypt, not as a second run of the same routine).
  function automatic logic [63:0] ref_decrypt(input logic [63:0] ct, input logic [127:0] key);
    logic [31:0] l, r;
    logic [127:0] k;
    r = ct[63:32]; l = ct[31:0];
    for (int i = 8; i >= 1; i--) begin
      k = enc_round_key(key, i);
      r = r ^ ref_f(l, kw(k, 2), kw(k, 3));
      l = l ^ ref_f(r, kw(k, 0), kw(k, 1));
    end
    return {l, r};
  endfunction

  // Synthetic picture of the image ROM, from its documented formula.
  function automatic logic [63:0] ref_pixel(input int unsigned a);
    logic [7:0] r, g, b;
    r = 8'(a);
    g = 8'(a >> 8);
    b = {1'(a >> 16), 7'(a) ^ 7'(a >> 7)};
    return {40'd0, r, g, b};
  endfunction

endpackage
