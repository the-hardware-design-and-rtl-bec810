// image_rom -- on-chip read-only image store feeding the encryption core.
//
// Holds an IMG_W x IMG_H image, one 64-bit cipher block per pixel, in raster
// order (address = y*IMG_W + x). One block per pixel is what the 480x272
// image timing of the application implies (2 x 130,560 blocks of 8 clocks).
// The original photograph is not available, so the contents are a synthetic
// 24-bit RGB test picture computed from the address, zero-extended to 64
// bits:  R = addr[7:0], G = addr[15:8], B = addr[6:0] ^ addr[13:7] (with
// addr[16] as the top bit). A fixed function of the address synthesises to
// the same lookup table a ROM initialisation file would produce.
//
// Timing: synchronous read, q is valid on the clock after addr.
module image_rom #(
  parameter int unsigned IMG_W = 480,
  parameter int unsigned IMG_H = 272,
  parameter int unsigned DEPTH = IMG_W * IMG_H,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [63:0]   q
);
  function automatic logic [63:0] pixel(input logic [AW-1:0] a);
    logic [16:0] w;
    w = 17'(a);
    return {40'd0, w[7:0], w[15:8], w[16], w[6:0] ^ w[13:7]};
  endfunction

  always_ff @(posedge clk) begin
    q <= (32'(addr) < DEPTH) ? pixel(addr) : 64'd0;
  end
endmodule
