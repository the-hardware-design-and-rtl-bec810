// image_crypt_system_full_tb -- full-size run of the image application:
// the 480x272 image (130,560 blocks) is encrypted and decrypted with the
// published test key, the top at its default parameters. Checks the run
// length against 2 x 130,560 x 8 clocks (+5), reports the run time at a
// 10 ns clock (about 0.021 s), and reads back every pixel of the encrypted
// and decrypted images through the display port, comparing them with the
// reference cipher and the ROM picture.
module image_crypt_system_full_tb;
  import lwbc_pkg::*;
  import lwbc_ref_pkg::*;
  localparam int unsigned N = 480 * 272, AW = $clog2(N);
  logic clk = 0, reset = 1, start = 0;
  key_t key = TV_KEY;
  logic busy, done;
  logic [31:0] cycles;
  logic [1:0] disp_sel = 0;
  logic [AW-1:0] disp_addr = 0;
  block_t disp_data;
  int checks = 0, failures = 0;
  int n_enc_pass = 0, n_dec_pass = 0;

  image_crypt_system dut (
    .clk, .reset, .start, .key, .busy, .done, .cycles,
    .disp_sel, .disp_addr, .disp_data);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic enc_seen = 0, dec_seen = 0;
  always @(posedge clk) begin
    if (dut.enc_phase && !enc_seen) begin enc_seen <= 1; n_enc_pass++; end
    if (dut.dec_phase && !dec_seen) begin dec_seen <= 1; n_dec_pass++; end
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok && failures < 20) $display("FAIL %s", msg);
    if (!ok) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    chk(cycles == 32'(16 * N + 5), $sformatf("run took %0d clocks, expected %0d", cycles, 16 * N + 5));
    $display("image %0d blocks: %0d clocks = %0d us at 10 ns", N, cycles, cycles / 100);
    for (int a = 0; a < N; a++) begin
      block_t pix;
      pix = ref_pixel(a);
      disp_addr = AW'(a);
      disp_sel = 2'd1;
      @(negedge clk);
      chk(disp_data == ref_encrypt(pix, TV_KEY), $sformatf("encrypted pixel %0d", a));
      disp_sel = 2'd2;
      @(negedge clk);
      chk(disp_data == pix, $sformatf("decrypted pixel %0d", a));
    end
    chk(n_enc_pass == 1 && n_dec_pass == 1, "one encryption and one decryption pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
