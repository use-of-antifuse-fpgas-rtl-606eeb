// Self-checking test of tsm_cfg_regs: reset values, writes from the PI port
// and from the JTAG port, PI priority on simultaneous writes, the read-only
// status register, and random write/read sequences against a shadow copy.
module tb_tsm_cfg_regs;
  import tsm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic pi_we = 0, jt_we = 0;
  logic [CFG_AW-1:0] pi_addr = 0, jt_addr = 0;
  logic [7:0] pi_wdata = 0, jt_wdata = 0, pi_rdata, jt_rdata, status = 8'hA5;
  logic [7:0] mode, qmin, mask;

  tsm_cfg_regs dut (.*);

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

  logic [7:0] shadow [3];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset mode", mode == 8'h01);
    check("reset qmin", qmin == 8'h01);
    check("reset mask", mask == 8'h7F);
    pi_addr = CFG_STATUS; jt_addr = CFG_STATUS;
    #1 check("status pi", pi_rdata == 8'hA5);
    check("status jt", jt_rdata == 8'hA5);
    // status cannot be written
    pi_we = 1; pi_wdata = 8'h00; @(negedge clk); pi_we = 0;
    check("status read-only", pi_rdata == 8'hA5);
    // PI write
    pi_we = 1; pi_addr = CFG_QMIN; pi_wdata = 8'h05; @(negedge clk); pi_we = 0;
    check("pi write", qmin == 8'h05);
    // JTAG write, read back through the PI port
    jt_we = 1; jt_addr = CFG_MASK; jt_wdata = 8'h0F; @(negedge clk); jt_we = 0;
    pi_addr = CFG_MASK; #1;
    check("jtag write", mask == 8'h0F && pi_rdata == 8'h0F);
    // simultaneous: PI wins
    pi_we = 1; jt_we = 1; pi_addr = CFG_MODE; jt_addr = CFG_MODE;
    pi_wdata = 8'h06; jt_wdata = 8'h03; @(negedge clk); pi_we = 0; jt_we = 0;
    check("pi priority", mode == 8'h06);
    // random traffic
    shadow[0] = mode; shadow[1] = qmin; shadow[2] = mask;
    for (int t = 0; t < 500; t++) begin
      pi_we = $urandom_range(0, 1); jt_we = $urandom_range(0, 1);
      pi_addr = CFG_AW'($urandom_range(0, 3)); jt_addr = CFG_AW'($urandom_range(0, 3));
      pi_wdata = 8'($urandom); jt_wdata = 8'($urandom);
      #1;
      check("random pi read", pi_rdata == (pi_addr == 3 ? 8'hA5 : shadow[pi_addr]));
      check("random jt read", jt_rdata == (jt_addr == 3 ? 8'hA5 : shadow[jt_addr]));
      if (pi_we && pi_addr != 3) shadow[pi_addr] = pi_wdata;
      else if (jt_we && jt_addr != 3) shadow[jt_addr] = jt_wdata;
      @(negedge clk);
      check("random outputs", mode == shadow[0] && qmin == shadow[1] && mask == shadow[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
