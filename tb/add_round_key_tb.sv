// add_round_key_tb -- self-checking test of the AddRoundKey layer.
// Drives walking-one and random state/key pairs and checks every output bit
// against the bitwise XOR definition S'[i] = S[i] ^ K[i].
module add_round_key_tb;
  import lwbc_pkg::*;
  logic clk = 0;
  half_t s, k, y;
  int checks = 0, failures = 0;

  add_round_key dut (.state_i(s), .key_i(k), .state_o(y));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input half_t a, input half_t b);
    s = a; k = b;
    @(posedge clk);
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (y[i] != (a[i] != b[i])) begin
        failures++;
        $display("FAIL s=%h k=%h bit %0d y=%h", a, b, i, y);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) check(32'h1 << i, 32'h0);
    for (int i = 0; i < 32; i++) check(32'hFFFF_FFFF, 32'h1 << i);
    repeat (200) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
