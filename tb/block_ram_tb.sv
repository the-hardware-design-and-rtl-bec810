// block_ram_tb -- self-checking test of the dual-port block RAM (depth 200).
// Fills the RAM with random words, reads them all back with one clock of
// read latency, checks read-before-write on a simultaneous access, and
// checks that a cycle without write enable changes nothing.
module block_ram_tb;
  localparam int unsigned D = 200, AW = 8;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr, raddr;
  logic [63:0] wdata, rdata;
  logic [63:0] model [D];
  int checks = 0, failures = 0;

  block_ram #(.DEPTH(D), .DW(64), .AW(AW)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input int a);
    @(negedge clk);
    raddr = AW'(a); we = 0;
    @(negedge clk);
    checks++;
    if (rdata != model[a]) begin
      failures++;
      $display("FAIL addr %0d rdata=%h expected %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    raddr = 0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = {$urandom, $urandom};
      model[a] = wdata;
    end
    @(negedge clk);
    we = 0; waddr = 0; wdata = '1;   // strobe low: must not write
    for (int a = 0; a < D; a++) read_check(a);
    // simultaneous read and write of address 7: old data is read
    @(negedge clk);
    we = 1; waddr = 7; wdata = 64'h0123_4567_89AB_CDEF; raddr = 7;
    @(negedge clk);
    we = 0;
    checks++;
    if (rdata != model[7]) begin failures++; $display("FAIL read-before-write %h", rdata); end
    model[7] = 64'h0123_4567_89AB_CDEF;
    for (int i = 0; i < 50; i++) read_check($urandom_range(0, D - 1));
    read_check(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
