// Irradiation-test procedure on seu_reg450, as run with the pattern
// generator: every microsecond the whole 450-bit register is refreshed with a
// new pattern and, in the same microsecond, the previous pattern is read back
// and compared. The chip clock is taken as 40 MHz, so a microsecond is 40
// cycles, of which the 30-word refresh and the 30-word read-back (overlapped
// on the separate ports) use 31. Upsets are injected by flipping stored bits
// directly in the register array, including one event in which about a
// third of the flip-flops change state at once; the monitor must count
// exactly the flipped bits, and the next refresh must restore full function.
module tb_seu_irradiation;
  localparam int NBITS = 450, W = 15, NW = NBITS / W, AW = $clog2(NW);
  localparam int CYCLES_PER_US = 40;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #12.5 clk = !clk;   // 40 MHz

  logic we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;

  seu_reg450 dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000 * CYCLES_PER_US) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NBITS-1:0] cur, nxt;
  int upset_bits;

  // flip bit b of the stored register, as an upset would
  task automatic flip(input int b);
    dut.mem[b / W][b % W] = !dut.mem[b / W][b % W];
  endtask

  initial begin
    int cycles_per_pass = 0;
    int total_events = 0;
    for (int b = 0; b < NBITS; b++) cur[b] = 1'($urandom);
    // initial load
    for (int a = 0; a < NW; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = cur[a*W +: W];
    end
    @(negedge clk); we = 0;
    for (int us = 0; us < 1000; us++) begin
      int errs, start;
      errs = 0;
      upset_bits = 0;
      // inject: a single-bit upset every 97 us, a massive one at 500 us
      if (us % 97 == 50) begin flip(us % NBITS); upset_bits = 1; end
      if (us == 500) begin
        for (int b = 0; b < NBITS; b += 3) flip(b);
        upset_bits = (NBITS + 2) / 3;
      end
      for (int b = 0; b < NBITS; b++) nxt[b] = 1'($urandom);
      start = $time;
      // overlapped refresh of word a and read-back of word a
      for (int a = 0; a <= NW; a++) begin
        @(negedge clk);
        if (a < NW) begin
          raddr = AW'(a);
          we = 1; waddr = AW'(a); wdata = nxt[a*W +: W];
        end else begin
          we = 0;
        end
        if (a > 0) errs += $countones(rdata ^ cur[(a-1)*W +: W]);
      end
      @(negedge clk); we = 0;
      cycles_per_pass = int'(($time - start) / 25);
      check($sformatf("us %0d: %0d flipped bits seen, %0d injected", us, errs, upset_bits),
            errs == upset_bits);
      if (errs > 0) total_events++;
      cur = nxt;
      repeat (CYCLES_PER_US - cycles_per_pass - 1) @(negedge clk);
    end
    check($sformatf("refresh and monitor fit in 1 us (%0d cycles)", cycles_per_pass + 1),
          cycles_per_pass + 1 <= CYCLES_PER_US);
    check("upset events recorded", total_events == 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
