// block_ram -- simple dual-port block RAM for cipher blocks.
//
// One write port and one read port on the same clock. Used twice in the
// image application: once to hold the encrypted image, once to hold the
// decrypted image. Write: wdata is stored at waddr on the edge where we is
// high. Read: synchronous, rdata shows the word at raddr one clock later
// (read-before-write when both ports hit the same address). No reset: the
// contents are undefined until written, as in an FPGA block RAM.
module block_ram #(
  parameter int unsigned DEPTH = 480 * 272,
  parameter int unsigned DW    = 64,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
