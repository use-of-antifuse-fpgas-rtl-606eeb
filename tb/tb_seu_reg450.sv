// Self-checking test of seu_reg450: the irradiation test cycle. A random
// 450-bit pattern is written in 30 words, read back with its one-cycle read
// latency and compared; then refresh and monitor run overlapped, each word
// being read one cycle after the new pattern's word is written. The one-cycle
// read latency is checked by looking at rdata before the clock edge.
module tb_seu_reg450;
  localparam int NBITS = 450, W = 15, NW = NBITS / W, AW = $clog2(NW);

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = !clk;

  logic we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [NBITS-1:0] pattern;

  seu_reg450 dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 20; pass++) begin
      for (int b = 0; b < NBITS; b++) pattern[b] = 1'($urandom);
      // refresh
      for (int a = 0; a < NW; a++) begin
        @(negedge clk);
        we = 1; waddr = AW'(a); wdata = pattern[a*W +: W];
      end
      @(negedge clk);
      we = 0;
      // monitor: rdata follows raddr by one clock
      for (int a = 0; a < NW; a++) begin
        raddr = AW'(a);
        #1;
        if (a > 0) check("read latency one clock", rdata == pattern[(a-1)*W +: W]);
        @(posedge clk); #1;
        check($sformatf("pass %0d word %0d", pass, a), rdata == pattern[a*W +: W]);
      end
    end
    // address outside the register reads zero
    raddr = AW'(NW); @(posedge clk); #1;
    check("out of range read", rdata == '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
