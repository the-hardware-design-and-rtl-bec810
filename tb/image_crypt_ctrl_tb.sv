// image_crypt_ctrl_tb -- self-checking test of the run sequencer (NPIX = 12).
// The two cores are modelled by counters with the core's handshake (ready
// while idle, done 8 clocks after an accept). Checks: blocks are issued in
// address order from 0 to NPIX-1 in each pass, results are written in order
// to the right RAM, the encryption pass ends before the decryption pass
// begins, issues are 8 clocks apart, done follows, and the cycle count is
// 2*NPIX*8 plus 5 clocks: memory-read start-up of each pass and the
// write of the last result of each pass.
module image_crypt_ctrl_tb;
  localparam int unsigned N = 12, AW = 4;
  logic clk = 0, reset = 1, start = 0;
  logic busy, done, enc_phase, dec_phase;
  logic [31:0] cycles;
  logic [AW-1:0] src_addr, dst_addr;
  logic enc_valid, enc_ready, enc_done, dec_valid, dec_ready, dec_done, cram_we, pram_we;
  int checks = 0, failures = 0;

  image_crypt_ctrl #(.NPIX(N), .AW(AW)) dut (
    .clk, .reset, .start, .busy, .done, .cycles, .enc_phase, .dec_phase, .src_addr,
    .enc_valid, .enc_ready, .enc_done, .dec_valid, .dec_ready, .dec_done,
    .cram_we, .pram_we, .dst_addr);

  // core models: busy for 8 clocks from the accepting edge
  int enc_cnt = 0, dec_cnt = 0;
  assign enc_ready = (enc_cnt == 0);
  assign dec_ready = (dec_cnt == 0);
  always_ff @(posedge clk) begin
    enc_done <= 1'b0;
    dec_done <= 1'b0;
    if (enc_valid) enc_cnt <= 1;
    else if (enc_cnt == 7) begin enc_cnt <= 0; enc_done <= 1'b1; end
    else if (enc_cnt != 0) enc_cnt <= enc_cnt + 1;
    if (dec_valid) dec_cnt <= 1;
    else if (dec_cnt == 7) begin dec_cnt <= 0; dec_done <= 1'b1; end
    else if (dec_cnt != 0) dec_cnt <= dec_cnt + 1;
  end
  // like the core, done is raised on the 8th edge counting the accepting one
  // (the counter runs 1..7 over the next edges)

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  int n_enc_iss = 0, n_dec_iss = 0, n_cw = 0, n_pw = 0;
  longint cyc = 0, last_iss = -1;
  bit saw_dec = 0;
  always @(negedge clk) cyc++;
  always @(posedge clk) begin
    if (!reset) begin
      if (enc_valid) begin
        chk(src_addr == AW'(n_enc_iss), $sformatf("enc issue addr %0d", src_addr));
        chk(!saw_dec, "encryption issue after decryption began");
        if (last_iss >= 0 && n_enc_iss > 0) chk(cyc - last_iss == 8, $sformatf("issue spacing %0d", cyc - last_iss));
        last_iss = cyc;
        n_enc_iss++;
      end
      if (dec_valid) begin
        saw_dec = 1;
        chk(n_cw == N, "decryption began before the cipher RAM was full");
        chk(src_addr == AW'(n_dec_iss), $sformatf("dec issue addr %0d", src_addr));
        if (n_dec_iss > 0) chk(cyc - last_iss == 8, $sformatf("issue spacing %0d", cyc - last_iss));
        last_iss = cyc;
        n_dec_iss++;
      end
      if (cram_we) begin chk(dst_addr == AW'(n_cw), "cipher RAM write order"); n_cw++; end
      if (pram_we) begin chk(dst_addr == AW'(n_pw), "plain RAM write order"); n_pw++; end
      chk(!(enc_valid && dec_valid), "both cores issued at once");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    @(negedge clk);
    chk(!busy && !done, "idle after reset");
    start = 1;
    @(negedge clk);
    start = 0;
    chk(busy && enc_phase, "encryption pass after start");
    wait (done);
    @(negedge clk);
    chk(n_enc_iss == N && n_dec_iss == N, $sformatf("issued %0d/%0d", n_enc_iss, n_dec_iss));
    chk(n_cw == N && n_pw == N, $sformatf("written %0d/%0d", n_cw, n_pw));
    chk(cycles == 32'(2 * N * 8 + 5), $sformatf("cycles %0d expected %0d", cycles, 2 * N * 8 + 5));
    chk(!busy, "not busy when done");
    // a second run restarts from address 0
    n_enc_iss = 0; n_dec_iss = 0; n_cw = 0; n_pw = 0; saw_dec = 0; last_iss = -1;
    start = 1;
    @(negedge clk);
    start = 0;
    chk(!done && busy, "restart");
    wait (done);
    @(negedge clk);
    chk(n_enc_iss == N && n_dec_iss == N && n_pw == N, "second run complete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
