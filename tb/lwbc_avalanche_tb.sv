// lwbc_avalanche_tb -- avalanche test of the cipher core.
// Encrypts the ten published plaintexts 0..9 under the published key,
// checks the published ciphertexts, and prints the Hamming distance between
// the ciphertexts of consecutive plaintexts. Then, for 300 random
// (key, plaintext, bit) triples, encrypts the plaintext and the plaintext
// with that one bit flipped and accumulates the Hamming distance of the two
// ciphertexts and how often each output bit changed. An ideal cipher flips
// every output bit with probability 1/2: the mean distance must lie within
// 32 +/- 2, and every output bit must flip in 30%..70% of the trials.
module lwbc_avalanche_tb;
  import lwbc_pkg::*;
  import lwbc_ref_pkg::*;
  localparam int TRIALS = 300;
  logic   clk = 0, reset = 1, valid_in = 0;
  key_t   key;
  block_t din, dout;
  logic   ready, valid_out;
  int     checks = 0, failures = 0;

  lwbc_core dut (.clk, .reset, .key, .data_in(din), .valid_in, .enc_dec(1'b0),
                 .ready, .data_out(dout), .valid_out);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt(input block_t d, input key_t k, output block_t c);
    @(negedge clk);
    while (!ready) @(negedge clk);
    din = d; key = k; valid_in = 1;
    @(negedge clk);
    valid_in = 0;
    while (!valid_out) @(negedge clk);
    c = dout;
  endtask

  initial begin
    block_t c, c_prev, c2, p;
    key_t   k;
    int     total, hd;
    int     flips [64];
    repeat (3) @(posedge clk);
    reset = 0;

    for (int i = 0; i < 10; i++) begin
      encrypt(64'(i), TV_KEY, c);
      checks++;
      if (c != TV_CT[i]) begin
        failures++;
        $display("FAIL plaintext %0d: %h expected %h", i, c, TV_CT[i]);
      end
      if (i > 0) $display("pt %0d ct %h  distance to pt %0d: %0d", i, c, i - 1, $countones(c ^ c_prev));
      else       $display("pt %0d ct %h", i, c);
      c_prev = c;
    end

    total = 0;
    foreach (flips[b]) flips[b] = 0;
    for (int t = 0; t < TRIALS; t++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom};
      encrypt(p, k, c);
      encrypt(p ^ (64'd1 << $urandom_range(0, 63)), k, c2);
      hd = $countones(c ^ c2);
      total += hd;
      for (int b = 0; b < 64; b++) if (c[b] != c2[b]) flips[b]++;
    end
    $display("mean Hamming distance over %0d single-bit flips: %0d.%02d", TRIALS,
             total / TRIALS, (total % TRIALS) * 100 / TRIALS);
    checks++;
    if (total < 30 * TRIALS || total > 34 * TRIALS) begin
      failures++;
      $display("FAIL mean distance out of 32 +/- 2");
    end
    for (int b = 0; b < 64; b++) begin
      checks++;
      if (flips[b] < TRIALS * 3 / 10 || flips[b] > TRIALS * 7 / 10) begin
        failures++;
        $display("FAIL output bit %0d flipped in %0d of %0d trials", b, flips[b], TRIALS);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
