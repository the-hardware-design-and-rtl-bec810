// image_crypt_ctrl -- sequencer of the image encryption/decryption run.
//
// After start it streams the NPIX blocks of the image ROM through the
// encryption core into the cipher RAM, then streams the cipher RAM through
// the decryption core into the plain RAM, then reports done. The two passes
// run one after the other, so the whole run takes about 2 x NPIX x 8 clocks.
// The data paths (ROM -> core -> RAM) are wired outside; this block only
// drives addresses, valid and write strobes.
//
// Source side of a pass: src_addr points at the next block to issue. The
// memories read synchronously, so after src_addr changes the block is
// offered one clock later (src_ok); it is issued (valid) when the core is
// ready. Sink side: every valid_out of the core writes one word at dst_addr.
// A new block is issued in the same cycle the previous result is written,
// which keeps the core busy every clock.
//
// cycles counts the clocks from the start edge to the end of the run.
// Synchronous active-high reset. The pass order and the run-time counter
// follow the application's description; the rest is this design's own.
module image_crypt_ctrl #(
  parameter int unsigned NPIX = 480 * 272,
  parameter int unsigned AW   = (NPIX > 1) ? $clog2(NPIX) : 1
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [31:0]   cycles,
  output logic          enc_phase,   // source = image ROM, sink = cipher RAM
  output logic          dec_phase,   // source = cipher RAM, sink = plain RAM
  // source memory read address (ROM in enc_phase, cipher RAM in dec_phase)
  output logic [AW-1:0] src_addr,
  // encryption core
  output logic          enc_valid,
  input  logic          enc_ready,
  input  logic          enc_done,
  // decryption core
  output logic          dec_valid,
  input  logic          dec_ready,
  input  logic          dec_done,
  // sink memory write port (cipher RAM in enc_phase, plain RAM in dec_phase)
  output logic          cram_we,
  output logic          pram_we,
  output logic [AW-1:0] dst_addr
);
  typedef enum logic [1:0] {S_IDLE, S_ENC, S_DEC, S_DONE} state_e;

  state_e      state;
  logic [AW:0] rd_idx;   // blocks issued in this pass
  logic [AW:0] wr_idx;   // blocks written in this pass
  logic        src_ok;   // memory output holds the block at rd_idx
  logic        more;
  logic        issue;
  logic        wr;

  assign enc_phase = (state == S_ENC);
  assign dec_phase = (state == S_DEC);
  assign busy      = enc_phase || dec_phase;
  assign done      = (state == S_DONE);
  assign src_addr  = AW'(rd_idx);
  assign dst_addr  = AW'(wr_idx);
  assign more      = (rd_idx < (AW+1)'(NPIX));

  assign issue     = busy && src_ok && more && (enc_phase ? enc_ready : dec_ready);
  assign enc_valid = enc_phase && issue;
  assign dec_valid = dec_phase && issue;
  assign wr        = (enc_phase && enc_done) || (dec_phase && dec_done);
  assign cram_we   = enc_phase && enc_done;
  assign pram_we   = dec_phase && dec_done;

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= S_IDLE;
      rd_idx <= '0;
      wr_idx <= '0;
      src_ok <= 1'b0;
      cycles <= '0;
    end else begin
      if (busy) cycles <= cycles + 32'd1;
      src_ok <= !issue;
      if (issue) rd_idx <= rd_idx + 1'b1;
      if (wr)    wr_idx <= wr_idx + 1'b1;
      case (state)
        S_IDLE, S_DONE: if (start) begin
          state  <= S_ENC;
          rd_idx <= '0;
          wr_idx <= '0;
          src_ok <= 1'b0;
          cycles <= 32'd1;
        end
        S_ENC: if (wr && wr_idx == (AW+1)'(NPIX - 1)) begin
          state  <= S_DEC;
          rd_idx <= '0;
          wr_idx <= '0;
          src_ok <= 1'b0;
        end
        S_DEC: if (wr && wr_idx == (AW+1)'(NPIX - 1)) begin
          state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
