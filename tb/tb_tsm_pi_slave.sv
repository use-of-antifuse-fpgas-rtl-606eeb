// Self-checking test of tsm_pi_slave. Two slaves share one PI bus, as on the
// board: a forwarding one with the TSMS address and a plain one with the
// TSMD0 address, each backed by a small register array in the testbench.
// Covered: writes and reads to each chip, no response to a wrong global or
// individual address, bus driven only during read strobes of the addressed
// chip, forwarding to each trigger board, and restart after nProg rises.
module tb_tsm_pi_slave;
  import tsm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  localparam logic [7:0] GADDR = 8'h5A;

  logic nprog = 1, strobe = 0, nwrite = 1;
  logic [7:0] picd_in = 0;
  logic [7:0] out_s, out_d;
  logic oe_s, oe_d;
  logic we_s, we_d, fwd_s, fwd_d;
  logic [CFG_AW-1:0] addr_s, addr_d;
  logic [7:0] wd_s, wd_d;
  logic [2:0] fb_s, fb_d;
  logic [7:0] regs_s [4], regs_d [4];

  tsm_pi_slave #(.CHIP_ID(PI_ID_TSMS), .FORWARD(1'b1)) dut_s (
    .clk, .rst_n, .gaddr(GADDR), .nprog, .strobe, .nwrite, .picd_in,
    .picd_out(out_s), .picd_oe(oe_s), .reg_we(we_s), .reg_addr(addr_s),
    .reg_wdata(wd_s), .reg_rdata(regs_s[addr_s]), .fwd_active(fwd_s), .fwd_board(fb_s));
  tsm_pi_slave #(.CHIP_ID(PI_ID_TSMD0), .FORWARD(1'b0)) dut_d (
    .clk, .rst_n, .gaddr(GADDR), .nprog, .strobe, .nwrite, .picd_in,
    .picd_out(out_d), .picd_oe(oe_d), .reg_we(we_d), .reg_addr(addr_d),
    .reg_wdata(wd_d), .reg_rdata(regs_d[addr_d]), .fwd_active(fwd_d), .fwd_board(fb_d));

  always_ff @(posedge clk) begin
    if (we_s) regs_s[addr_s] <= wd_s;
    if (we_d) regs_d[addr_d] <= wd_d;
  end

  int oe_outside_read = 0;
  logic in_read = 0;
  always @(posedge clk) if ((oe_s || oe_d) && !in_read) oe_outside_read++;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one strobe cycle; returns what the slaves drove while strobe was high
  task automatic pi_cycle(input logic [7:0] b, input logic wr, output logic [7:0] rd,
                          output logic drv);
    @(negedge clk);
    picd_in = wr ? b : 8'h00;
    nwrite  = !wr;
    in_read = !wr;
    strobe  = 1;
    @(negedge clk);
    @(negedge clk);
    drv = oe_s || oe_d;
    rd  = (oe_s ? out_s : 8'h00) | (oe_d ? out_d : 8'h00);
    strobe = 0;
    @(negedge clk);
    in_read = 0;
    nwrite = 1;
  endtask

  task automatic pi_access(input logic [7:0] g, input logic [7:0] id, input logic [7:0] ra,
                           input logic wr, input logic [7:0] wdat,
                           output logic [7:0] rd, output logic drv);
    logic [7:0] dummy;
    logic dd;
    @(negedge clk); nprog = 0;
    pi_cycle(g,  1, dummy, dd);
    pi_cycle(id, 1, dummy, dd);
    pi_cycle(ra, 1, dummy, dd);
    pi_cycle(wdat, wr, rd, drv);
    @(negedge clk); nprog = 1;
    @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] rd;
    logic drv;
    for (int i = 0; i < 4; i++) begin regs_s[i] = 8'(i); regs_d[i] = 8'(16 + i); end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      logic [7:0] v;
      logic [1:0] ra;
      logic to_d;
      logic [7:0] exp_s [4], exp_d [4];
      v = 8'($urandom); ra = 2'($urandom); to_d = 1'($urandom);
      exp_s = regs_s; exp_d = regs_d;
      if (to_d) exp_d[ra] = v; else exp_s[ra] = v;
      pi_access(GADDR, to_d ? PI_ID_TSMD0 : PI_ID_TSMS, {6'h0, ra}, 1, v, rd, drv);
      check($sformatf("write t=%0d", t), regs_s == exp_s && regs_d == exp_d);
      pi_access(GADDR, to_d ? PI_ID_TSMD0 : PI_ID_TSMS, {6'h0, ra}, 0, 8'h00, rd, drv);
      check($sformatf("read t=%0d", t), drv && rd == v);
    end
    // wrong global address: nothing written, nothing driven
    begin
      logic [7:0] exp_s [4], exp_d [4];
      exp_s = regs_s; exp_d = regs_d;
      pi_access(GADDR ^ 8'h01, PI_ID_TSMD0, 8'h01, 1, 8'hEE, rd, drv);
      check("wrong global no write", regs_s == exp_s && regs_d == exp_d);
      pi_access(GADDR ^ 8'h80, PI_ID_TSMS, 8'h01, 0, 8'h00, rd, drv);
      check("wrong global no read", !drv);
      pi_access(GADDR, 8'h02, 8'h01, 1, 8'hEE, rd, drv);
      check("other chip id no write", regs_s == exp_s && regs_d == exp_d);
      pi_access(GADDR, 8'h02, 8'h01, 0, 8'h00, rd, drv);
      check("other chip id no read", !drv);
    end
    // forwarding to each trigger board (only the forwarding slave reacts)
    for (int b = 0; b < 7; b++) begin
      logic [7:0] dummy;
      logic dd;
      @(negedge clk); nprog = 0;
      pi_cycle(GADDR, 1, dummy, dd);
      pi_cycle(PI_ID_TRB0 + 8'(b), 1, dummy, dd);
      check($sformatf("forward board %0d", b), fwd_s && fb_s == 3'(b) && !fwd_d);
      pi_cycle(8'h33, 1, dummy, dd);
      check("forward keeps state", fwd_s && fb_s == 3'(b));
      @(negedge clk); nprog = 1;
      @(negedge clk);
      check("nprog ends forwarding", !fwd_s);
    end
    // board ids beyond the seventh are not forwarded
    begin
      logic [7:0] dummy;
      logic dd;
      @(negedge clk); nprog = 0;
      pi_cycle(GADDR, 1, dummy, dd);
      pi_cycle(PI_ID_TRB0 + 8'd7, 1, dummy, dd);
      check("no board 7", !fwd_s);
      @(negedge clk); nprog = 1;
    end
    check("bus driven only in read strobes", oe_outside_read == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
