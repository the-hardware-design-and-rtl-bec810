// image_crypt_system -- image encryption/decryption application of the
// lightweight block cipher (top level).
//
// An image ROM feeds an encryption core; its output is stored in the cipher
// RAM. When the whole image is encrypted, the cipher RAM feeds a decryption
// core whose output is stored in the plain RAM. Each pixel is one 64-bit
// block. Both cores use the same 128-bit key. After the run, any of the
// three images can be read back through the display port, which is where a
// display controller would attach (disp_sel: 0 = original, 1 = encrypted,
// 2 = decrypted; disp_data follows disp_addr/disp_sel by one clock). The
// display port only sees a memory while the sequencer is not reading it.
//
// Timing: start begins a run; busy is high for about 2 x IMG_W*IMG_H x 8
// clocks (about 20.9 ms for 480x272 at 100 MHz); done then stays high until
// the next start. cycles holds the length of the run in clocks.
// The block chain (ROM -> encryption -> RAM -> decryption -> RAM) follows
// the application's description; the display port, the start/done control
// and the one-pass-after-the-other order are this design's own choices.
module image_crypt_system
  import lwbc_pkg::*;
#(
  parameter int unsigned IMG_W = 480,
  parameter int unsigned IMG_H = 272,
  parameter int unsigned NPIX  = IMG_W * IMG_H,
  parameter int unsigned AW    = (NPIX > 1) ? $clog2(NPIX) : 1
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          start,
  input  key_t          key,
  output logic          busy,
  output logic          done,
  output logic [31:0]   cycles,
  input  logic [1:0]    disp_sel,
  input  logic [AW-1:0] disp_addr,
  output block_t        disp_data
);
  logic          enc_phase, dec_phase;
  logic [AW-1:0] src_addr, dst_addr;
  logic          enc_valid, enc_ready, enc_done;
  logic          dec_valid, dec_ready, dec_done;
  logic          cram_we, pram_we;
  block_t        rom_q, cram_q, pram_q, enc_out, dec_out;
  logic [AW-1:0] rom_addr, cram_raddr;
  logic [1:0]    disp_sel_q;

  image_crypt_ctrl #(.NPIX(NPIX), .AW(AW)) u_ctrl (
    .clk, .reset, .start, .busy, .done, .cycles,
    .enc_phase, .dec_phase, .src_addr,
    .enc_valid, .enc_ready, .enc_done,
    .dec_valid, .dec_ready, .dec_done,
    .cram_we, .pram_we, .dst_addr
  );

  assign rom_addr   = enc_phase ? src_addr : disp_addr;
  assign cram_raddr = dec_phase ? src_addr : disp_addr;

  image_rom #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DEPTH(NPIX), .AW(AW)) u_rom (
    .clk, .addr(rom_addr), .q(rom_q)
  );

  lwbc_core u_enc (
    .clk, .reset, .key, .data_in(rom_q), .valid_in(enc_valid), .enc_dec(1'b0),
    .ready(enc_ready), .data_out(enc_out), .valid_out(enc_done)
  );

  block_ram #(.DEPTH(NPIX), .DW(BLOCK_W), .AW(AW)) u_cram (
    .clk, .we(cram_we), .waddr(dst_addr), .wdata(enc_out),
    .raddr(cram_raddr), .rdata(cram_q)
  );

  lwbc_core u_dec (
    .clk, .reset, .key, .data_in(cram_q), .valid_in(dec_valid), .enc_dec(1'b1),
    .ready(dec_ready), .data_out(dec_out), .valid_out(dec_done)
  );

  block_ram #(.DEPTH(NPIX), .DW(BLOCK_W), .AW(AW)) u_pram (
    .clk, .we(pram_we), .waddr(dst_addr), .wdata(dec_out),
    .raddr(disp_addr), .rdata(pram_q)
  );

  always_ff @(posedge clk) begin
    if (reset) disp_sel_q <= '0;
    else       disp_sel_q <= disp_sel;
  end

  always_comb begin
    case (disp_sel_q)
      2'd0:    disp_data = rom_q;
      2'd1:    disp_data = cram_q;
      default: disp_data = pram_q;
    endcase
  end
endmodule
