// pbox_omega_tb -- self-checking test of the key-dependent omega P-box.
// Checks (1) that all-zero and all-one KEY_BITS give the plain perfect
// shuffle and the fully crossed shuffle, (2) single-bit inputs land where
// the switch settings say, (3) random data and keys against the bit-level
// reference, and (4) that the output is always a permutation (same weight).
module pbox_omega_tb;
  import lwbc_pkg::*;
  import lwbc_ref_pkg::*;
  logic clk = 0;
  half_t x, y;
  logic [63:0] k;
  int checks = 0, failures = 0;

  pbox_omega dut (.in_data(x), .stage_key(k), .pbox(y));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input half_t exp);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL x=%h k=%h y=%h expected %h", x, k, y, exp);
    end
  endtask

  initial begin
    // KEY_BITS = 0: perfect shuffle, input bit i -> output bit 2i (i<16), 2(i-16)+1 (i>=16)
    k = 64'd0;
    for (int i = 0; i < 32; i++) begin
      x = 32'h1 << i;
      @(posedge clk);
      expect_eq(32'h1 << ((i < 16) ? 2*i : 2*(i-16)+1));
    end
    // KEY_BITS = FFFF (fold of 000000000000FFFF): every switch crossed
    k = 64'h0000_0000_0000_FFFF;
    for (int i = 0; i < 32; i++) begin
      x = 32'h1 << i;
      @(posedge clk);
      expect_eq(32'h1 << ((i < 16) ? 2*i+1 : 2*(i-16)));
    end
    // one crossed switch selected through a different key slice
    for (int j = 0; j < 16; j++) begin
      k = 64'(1) << (48 + j);
      x = 32'h1 << j;
      @(posedge clk);
      expect_eq(32'h1 << (2*j+1));
    end
    repeat (500) begin
      x = $urandom;
      k = {$urandom, $urandom};
      @(posedge clk);
      expect_eq(ref_pbox(x, ref_keybits(k)));
      checks++;
      if ($countones(y) != $countones(x)) begin
        failures++;
        $display("FAIL not a permutation x=%h y=%h", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
