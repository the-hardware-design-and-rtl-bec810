// image_rom_tb -- self-checking test of the image ROM at its full 480x272 size.
// Reads the first 256 addresses in order and 2000 random ones and checks the word, one clock
// after the address, against the documented pixel formula; also checks
// that an address past the image reads as zero.
module image_rom_tb;
  import lwbc_ref_pkg::*;
  localparam int unsigned W = 480, H = 272, N = W * H, AW = $clog2(N);
  logic clk = 0;
  logic [AW-1:0] addr;
  logic [63:0] q;
  int checks = 0, failures = 0;

  image_rom dut (.clk, .addr, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned a;
    for (int i = 0; i < 2256; i++) begin
      a = (i < 256) ? i : ((i == 256) ? N - 1 : $urandom_range(0, N - 1));
      @(negedge clk);
      addr = AW'(a);
      @(negedge clk);
      addr = ~addr;           // q must come from the sampled address
      checks++;
      if (q != ref_pixel(a)) begin
        failures++;
        $display("FAIL addr %0d q=%h expected %h", a, q, ref_pixel(a));
      end
    end
    @(negedge clk);
    addr = AW'(N + 3);
    @(negedge clk);
    checks++;
    if (q != 64'd0) begin failures++; $display("FAIL out-of-range read %h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
