// lwbc_core_tb -- self-checking test of the encryption/decryption core.
//   1. the ten published test vectors (key ABCDEF02...C78A, plaintext 0..9)
//      encrypt to the published ciphertexts and decrypt back;
//   2. random keys and blocks against the reference model, both directions;
//   3. latency: valid_out comes exactly 8 clocks after the accepting edge;
//   4. throughput: blocks offered as soon as ready are accepted every 8 clocks;
//   5. data_out holds its value after valid_out, and a reset clears valid_out.
module lwbc_core_tb;
  import lwbc_pkg::*;
  import lwbc_ref_pkg::*;
  logic   clk = 0, reset = 1, valid_in = 0, enc_dec = 0;
  key_t   key;
  block_t din, dout;
  logic   ready, valid_out;
  int     checks = 0, failures = 0;
  longint cyc = 0;

  lwbc_core dut (.clk, .reset, .key, .data_in(din), .valid_in, .enc_dec,
                 .ready, .data_out(dout), .valid_out);

  always #5 clk = ~clk;
  always @(negedge clk) cyc++;   // stable at every rising edge

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input block_t got, input block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Offer one block, wait for the result, check the latency: counting the
  // accepting edge, the result must appear after exactly 8 rising edges.
  task automatic run_block(input block_t d, input key_t k, input logic dec, output block_t res);
    int n;
    @(negedge clk);
    while (!ready) @(negedge clk);
    din = d; key = k; enc_dec = dec; valid_in = 1;
    n = 0;
    do begin
      @(posedge clk);
      n++;
      @(negedge clk);
      valid_in = 0; din = ~d; key = ~k; enc_dec = ~dec;   // inputs must not matter now
    end while (!valid_out && n < 20);
    checks++;
    if (n != 8) begin
      failures++;
      $display("FAIL latency %0d clocks, expected 8", n);
    end
    res = dout;
  endtask

  initial begin
    block_t c, p, d;
    key_t   k;
    repeat (3) @(posedge clk);
    reset = 0;

    for (int i = 0; i < 10; i++) begin
      run_block(64'(i), TV_KEY, 1'b0, c);
      expect_eq($sformatf("published vector %0d", i), c, TV_CT[i]);
      run_block(TV_CT[i], TV_KEY, 1'b1, p);
      expect_eq($sformatf("decrypt vector %0d", i), p, 64'(i));
    end

    repeat (100) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      d = {$urandom, $urandom};
      run_block(d, k, 1'b0, c);
      expect_eq("random encrypt", c, ref_encrypt(d, k));
      run_block(d, k, 1'b1, p);
      expect_eq("random decrypt", p, ref_decrypt(d, k));
    end

    // data_out holds after valid_out
    repeat (5) @(negedge clk);
    expect_eq("hold", dout, ref_decrypt(d, k));

    // back-to-back stream: offer whenever ready; accepts must be 8 clocks apart
    begin
      longint last_acc;
      int n_out;
      last_acc = -1; n_out = 0;
      k = TV_KEY;
      fork
        for (int i = 0; i < 10; i++) begin
          @(negedge clk);
          while (!ready) @(negedge clk);
          din = 64'(i); key = k; enc_dec = 0; valid_in = 1;
          @(posedge clk);
          if (last_acc >= 0) begin
            checks++;
            if (cyc - last_acc != 8) begin
              failures++;
              $display("FAIL accept spacing %0d", cyc - last_acc);
            end
          end
          last_acc = cyc;
          @(negedge clk);
          valid_in = 0;
        end
        while (n_out < 10) begin
          @(posedge clk);
          #1;
          if (valid_out) begin
            expect_eq("stream", dout, TV_CT[n_out]);
            n_out++;
          end
        end
      join
    end

    // reset in the middle of a block
    @(negedge clk);
    din = 0; key = TV_KEY; enc_dec = 0; valid_in = 1;
    @(negedge clk);
    valid_in = 0;
    reset = 1;
    @(negedge clk);
    reset = 0;
    checks++;
    if (!ready) begin failures++; $display("FAIL not ready after reset"); end
    repeat (10) begin
      @(negedge clk);
      checks++;
      if (valid_out) begin failures++; $display("FAIL valid_out after reset"); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
