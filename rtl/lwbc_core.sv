// lwbc_core -- iterative encryption/decryption core of the lightweight
// block cipher (64-bit block, 128-bit key, 8 rounds).
//
// One full round -- two Feistel stages -- is computed combinationally per
// clock, so a block takes 8 clocks. Encryption round (L, R halves, round key
// words K0..K3, K0 most significant):
//   L <= L ^ K1 ^ P(S(R ^ K0), {K0,K1})
//   R <= R ^ K3 ^ P(S(L_new ^ K2), {K2,K3})
// Decryption uses the same stages with {K2,K3} in stage 1 and {K0,K1} in
// stage 2, and the round keys in reverse order (key_schedule). The result
// is read out as {R, L}; with this final swap a ciphertext loaded as
// {L, R} decrypts with the very same datapath and comes out in plaintext
// order. The round function, stage order, key usage and key schedule follow
// the cipher's description; the handshake (ready) and the reset are this
// design's own.
//
// Interface/timing: data_in, key and enc_dec (0 = encrypt, 1 = decrypt) are
// sampled on the clock edge where valid_in && ready; that edge already
// performs round 1. Rounds 2..8 follow on the next 7 edges; after the 8th
// edge valid_out is high for one cycle and data_out holds the result until
// the next block is accepted. ready is high whenever no block is in flight,
// including the cycle of valid_out, so blocks can follow every 8 clocks.
// Synchronous active-high reset.
module lwbc_core
  import lwbc_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  key_t   key,
  input  block_t data_in,
  input  logic   valid_in,
  input  logic   enc_dec,   // 0: encryption, 1: decryption
  output logic   ready,
  output block_t data_out,
  output logic   valid_out
);
  logic        start;
  logic        busy;
  logic [2:0]  rnd;        // rounds already done (1..7 while busy)
  half_t       l_q, r_q;
  half_t       l_cur, r_cur, l_new, r_new;
  mode_e       mode_q, mode_cur;
  key_t        rk;
  half_t       k0, k1, k2, k3;
  half_t       s1_ka, s1_kb, s2_ka, s2_kb;

  assign ready    = !busy;
  assign start    = valid_in && ready;
  assign mode_cur = start ? mode_e'(enc_dec) : mode_q;
  assign l_cur    = start ? data_in[BLOCK_W-1:HALF_W] : l_q;
  assign r_cur    = start ? data_in[HALF_W-1:0]       : r_q;

  key_schedule u_ks (
    .clk, .reset,
    .load_i     (start),
    .step_i     (busy),
    .mode_i     (mode_e'(enc_dec)),
    .key_i      (key),
    .round_key_o(rk)
  );

  assign k0 = key_word(rk, 0);
  assign k1 = key_word(rk, 1);
  assign k2 = key_word(rk, 2);
  assign k3 = key_word(rk, 3);

  always_comb begin
    if (mode_cur == MODE_DEC) begin
      s1_ka = k2; s1_kb = k3; s2_ka = k0; s2_kb = k1;
    end else begin
      s1_ka = k0; s1_kb = k1; s2_ka = k2; s2_kb = k3;
    end
  end

  feistel_stage u_stage1 (.src_i(r_cur), .other_i(l_cur), .ka_i(s1_ka), .kb_i(s1_kb), .new_o(l_new));
  feistel_stage u_stage2 (.src_i(l_new), .other_i(r_cur), .ka_i(s2_ka), .kb_i(s2_kb), .new_o(r_new));

  always_ff @(posedge clk) begin
    if (reset) begin
      busy      <= 1'b0;
      rnd       <= '0;
      l_q       <= '0;
      r_q       <= '0;
      mode_q    <= MODE_ENC;
      valid_out <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      if (start) begin
        l_q    <= l_new;
        r_q    <= r_new;
        mode_q <= mode_e'(enc_dec);
        busy   <= 1'b1;
        rnd    <= 3'd1;
      end else if (busy) begin
        l_q <= l_new;
        r_q <= r_new;
        if (rnd == 3'(ROUNDS-1)) begin
          busy      <= 1'b0;
          valid_out <= 1'b1;
        end
        rnd <= rnd + 3'd1;
      end
    end
  end

  assign data_out = {r_q, l_q};

  // A block offered while the core is busy would be lost.
  a_no_valid_while_busy: assert property (@(posedge clk) disable iff (reset) valid_in |-> ready)
    else $error("lwbc_core: valid_in raised while busy");
endmodule
