// key_schedule_tb -- self-checking test of the round-key generator.
// For random user keys, loads the key and steps 7 times, checking the 8
// round keys: encryption gives key <<< 25(r-1); decryption gives the same
// keys in reverse order (first key = user key >>> 81). The reference uses
// single-bit rotation loops.
module key_schedule_tb;
  import lwbc_pkg::*;
  import lwbc_ref_pkg::*;
  logic clk = 0, reset = 1, load = 0, step = 0;
  mode_e mode;
  key_t key, rk;
  int checks = 0, failures = 0;

  key_schedule dut (.clk, .reset, .load_i(load), .step_i(step), .mode_i(mode),
                    .key_i(key), .round_key_o(rk));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input key_t k, input mode_e m);
    @(negedge clk);
    key = k; mode = m; load = 1; step = 0;
    for (int r = 1; r <= 8; r++) begin
      key_t exp;
      exp = (m == MODE_ENC) ? enc_round_key(k, r) : enc_round_key(k, 9 - r);
      #1;
      checks++;
      if (rk != exp) begin
        failures++;
        $display("FAIL mode=%0d round %0d rk=%h expected %h", m, r, rk, exp);
      end
      @(negedge clk);
      load = 0; step = 1;
      key = ~k;   // the register must not follow the input after load
    end
    step = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    reset = 0;
    run(TV_KEY, MODE_ENC);
    run(TV_KEY, MODE_DEC);
    checks++;
    if (rotr(TV_KEY, 81) != rot_left(TV_KEY, 175)) begin
      failures++;
      $display("FAIL decryption start key is not the eighth encryption key");
    end
    repeat (40) begin
      run({$urandom, $urandom, $urandom, $urandom}, mode_e'($urandom_range(0, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
