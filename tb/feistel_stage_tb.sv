// feistel_stage_tb -- self-checking test of one Feistel stage.
// Random source half, other half and key words; the result is compared with
// other ^ F(src), F computed by the bit-level reference model. Also checks
// that the stage is an involution in the other half (applying it twice with
// the same source restores the other half), which decryption relies on.
module feistel_stage_tb;
  import lwbc_pkg::*;
  import lwbc_ref_pkg::*;
  logic clk = 0;
  half_t src, oth, ka, kb, y;
  int checks = 0, failures = 0;

  feistel_stage dut (.src_i(src), .other_i(oth), .ka_i(ka), .kb_i(kb), .new_o(y));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    half_t first;
    repeat (500) begin
      src = $urandom; oth = $urandom; ka = $urandom; kb = $urandom;
      @(posedge clk);
      checks++;
      if (y != (oth ^ ref_f(src, ka, kb))) begin
        failures++;
        $display("FAIL src=%h oth=%h ka=%h kb=%h y=%h", src, oth, ka, kb, y);
      end
      first = oth;
      oth = y;
      @(posedge clk);
      checks++;
      if (y != first) begin
        failures++;
        $display("FAIL stage is not self-inverse: %h vs %h", y, first);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
