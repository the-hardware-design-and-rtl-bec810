// image_crypt_system_tb -- end-to-end test of the image application on a
// small 16x4 image (64 blocks).
// Runs the whole chain twice with different keys (the published test key,
// then a random one). After each run it reads all three images back through
// the display port and checks: original = the ROM picture, encrypted = the
// reference cipher of each pixel, decrypted = original. It checks the run
// length (2 x 64 x 8 + 5 clocks) and counts the mechanisms exercised:
// encryption pass, decryption pass, display of each of the three images,
// restart after done. A mechanism that never happened counts as a failure.
module image_crypt_system_tb;
  import lwbc_pkg::*;
  import lwbc_ref_pkg::*;
  localparam int unsigned W = 16, H = 4, N = W * H, AW = $clog2(N);
  logic clk = 0, reset = 1, start = 0;
  key_t key;
  logic busy, done;
  logic [31:0] cycles;
  logic [1:0] disp_sel = 0;
  logic [AW-1:0] disp_addr = 0;
  block_t disp_data;
  int checks = 0, failures = 0;
  int n_enc_pass = 0, n_dec_pass = 0, n_restart = 0;
  int n_disp [3] = '{0, 0, 0};

  image_crypt_system #(.IMG_W(W), .IMG_H(H)) dut (
    .clk, .reset, .start, .key, .busy, .done, .cycles,
    .disp_sel, .disp_addr, .disp_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watch the passes from inside the design
  logic enc_seen, dec_seen;
  always @(posedge clk) begin
    if (dut.enc_phase && !enc_seen) begin enc_seen <= 1; n_enc_pass++; end
    if (dut.dec_phase && !dec_seen) begin dec_seen <= 1; n_dec_pass++; end
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run_and_check(input key_t k);
    enc_seen = 0; dec_seen = 0;
    @(negedge clk);
    key = k; start = 1;
    @(negedge clk);
    start = 0;
    chk(busy && !done, "busy after start");
    wait (done);
    @(negedge clk);
    chk(cycles == 32'(16 * N + 5), $sformatf("run took %0d clocks, expected %0d", cycles, 16 * N + 5));
    for (int s = 0; s < 3; s++) begin
      for (int a = 0; a < N; a++) begin
        block_t exp;
        disp_sel = 2'(s); disp_addr = AW'(a);
        @(negedge clk);
        case (s)
          0: exp = ref_pixel(a);
          1: exp = ref_encrypt(ref_pixel(a), k);
          default: exp = ref_pixel(a);
        endcase
        chk(disp_data == exp, $sformatf("image %0d pixel %0d: %h expected %h", s, a, disp_data, exp));
        if (s == 1) chk(disp_data != ref_pixel(a), "encrypted pixel equals the original");
        n_disp[s]++;
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    run_and_check(TV_KEY);
    n_restart++;
    run_and_check({$urandom, $urandom, $urandom, $urandom});
    chk(n_enc_pass == 2, $sformatf("encryption passes %0d", n_enc_pass));
    chk(n_dec_pass == 2, $sformatf("decryption passes %0d", n_dec_pass));
    for (int s = 0; s < 3; s++) chk(n_disp[s] > 0, $sformatf("display of image %0d never exercised", s));
    chk(n_restart > 0, "restart never exercised");
    $display("mechanisms: enc_pass=%0d dec_pass=%0d disp_orig=%0d disp_enc=%0d disp_dec=%0d restart=%0d",
             n_enc_pass, n_dec_pass, n_disp[0], n_disp[1], n_disp[2], n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
