// Self-checking test of tsm_jtag_tap with TCK at one eighth of the chip clock.
// Covered: IDCODE after reset, the captured instruction pattern, the BYPASS
// one-bit delay, configuration writes through the CFG data register (seen on
// the register port), configuration reads (select an address, then capture),
// a write without the write bit (no effect), a scan paused in Pause-DR,
// and recovery through
// Test-Logic-Reset by TMS held high.
module tb_tsm_jtag_tap;
  import tsm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  localparam logic [31:0] ID = 32'h1540_36A1;

  logic tck = 0, tms = 1, tdi = 0, tdo;
  logic cfg_we;
  logic [CFG_AW-1:0] cfg_addr;
  logic [7:0] cfg_wdata, cfg_rdata;
  logic [7:0] regs [4];
  int writes = 0;

  tsm_jtag_tap dut (.clk, .rst_n, .tck, .tms, .tdi, .tdo, .idcode(ID),
                    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata);

  assign cfg_rdata = regs[cfg_addr];
  always_ff @(posedge clk) if (cfg_we) begin regs[cfg_addr] <= cfg_wdata; writes++; end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one TCK period; tdo is sampled just before the rising edge
  task automatic pulse(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    repeat (4) @(negedge clk);
    o = tdo;
    tck = 1;
    repeat (4) @(negedge clk);
    tck = 0;
  endtask

  task automatic go(input logic m);
    logic o;
    pulse(m, 0, o);
  endtask

  task automatic tap_reset();
    repeat (5) go(1);
    go(0);  // Run-Test/Idle
  endtask

  // from Run-Test/Idle, shift n bits (LSB first) through IR or DR, back to RTI
  task automatic shift(input bit ir, input int n, input logic [63:0] din,
                       output logic [63:0] dout);
    logic o;
    dout = '0;
    go(1);               // Select-DR
    if (ir) go(1);       // Select-IR
    go(0);               // Capture
    go(0);               // Shift
    for (int i = 0; i < n; i++) begin
      pulse(i == n - 1, din[i], o);
      dout[i] = o;
    end
    go(1);               // Update
    go(0);               // Run-Test/Idle
  endtask

  // an 11-bit DR scan that pauses after the first k bits (Exit1, Pause, Exit2)
  task automatic shift_paused(input int k, input logic [10:0] din);
    logic o;
    go(1); go(0); go(0);
    for (int i = 0; i < k; i++) pulse(i == k - 1, din[i], o);
    go(0); go(0); go(0);   // Exit1 -> Pause, stay in Pause
    go(1); go(0);          // Exit2 -> Shift
    for (int i = k; i < 11; i++) pulse(i == 10, din[i], o);
    go(1); go(0);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] q;
    regs = '{8'h11, 8'h22, 8'h33, 8'h44};
    repeat (3) @(negedge clk);
    rst_n = 1;
    tap_reset();
    shift(0, 32, 64'h0, q);
    check($sformatf("idcode after reset %h", q[31:0]), q[31:0] == ID);
    // instruction capture pattern
    shift(1, 4, 64'hF, q);
    check("ir capture 0001", q[3:0] == 4'b0001);
    // bypass: data comes out delayed by one bit, first bit is 0
    shift(0, 16, 64'hA5C3, q);
    check($sformatf("bypass %h", q[15:0]), q[15:0] == {16'hA5C3 << 1});
    // CFG: write register 2
    shift(1, 4, 64'h8, q);
    shift(0, 11, {53'h0, 1'b1, 2'd2, 8'h3C}, q);
    check("cfg write", regs[2] == 8'h3C && writes == 1);
    // write bit clear: selects address 1, no write
    shift(0, 11, {53'h0, 1'b0, 2'd1, 8'hFF}, q);
    check("no write without write bit", regs[1] == 8'h22 && writes == 1);
    // next capture reads register 1
    shift(0, 11, {53'h0, 1'b0, 2'd3, 8'h00}, q);
    check($sformatf("cfg read reg1 %h", q[10:0]), q[10:0] == {1'b0, 2'd1, 8'h22});
    shift(0, 11, {53'h0, 1'b0, 2'd3, 8'h00}, q);
    check("cfg read reg3", q[10:0] == {1'b0, 2'd3, 8'h44});
    // random write/read-back
    for (int t = 0; t < 20; t++) begin
      logic [1:0] a;
      logic [7:0] v;
      a = 2'($urandom); v = 8'($urandom);
      shift(0, 11, {53'h0, 1'b1, a, v}, q);
      shift(0, 11, {53'h0, 1'b0, a, 8'h00}, q);
      check($sformatf("cfg rw %0d", t), q[10:0] == {1'b0, a, v} && regs[a] == v);
    end
    // a scan interrupted in Pause-DR still writes the right value
    shift_paused(5, {1'b1, 2'd0, 8'hC9});
    check($sformatf("paused write %h", regs[0]), regs[0] == 8'hC9);
    // Test-Logic-Reset restores IDCODE
    tap_reset();
    shift(0, 32, 64'h0, q);
    check("idcode after tlr", q[31:0] == ID);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
