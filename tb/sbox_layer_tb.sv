// sbox_layer_tb -- self-checking test of the S-box layer.
// Every nibble position sees all 16 values (the other nibbles random); the
// result is compared with the PRESENT S-box table of the reference package.
module sbox_layer_tb;
  import lwbc_pkg::*;
  import lwbc_ref_pkg::*;
  logic clk = 0;
  half_t x, y;
  int checks = 0, failures = 0;

  sbox_layer dut (.state_i(x), .state_o(y));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pos = 0; pos < 8; pos++)
      for (int v = 0; v < 16; v++) begin
        x = $urandom;
        x[4*pos +: 4] = 4'(v);
        @(posedge clk);
        checks++;
        if (y[4*pos +: 4] != SBOX[v] || y != ref_sbox(x)) begin
          failures++;
          $display("FAIL x=%h y=%h expected %h", x, y, ref_sbox(x));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
