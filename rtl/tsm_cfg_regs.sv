// Configuration registers of one TSM chip.
//
// Each of the three TSM chips holds the registers that select its processing
// mode and set up the sorting and fake-rejection algorithms. They can be
// reached in two independent ways, through the Parallel Interface (PI) and
// through JTAG, so the register file has two write ports and two read ports.
// If both ports write in the same cycle the PI write wins (design choice).
// Register 3 (CFG_STATUS) is read-only and returns the status input.
//
// Timing: writes take effect at the next rising clock edge; reads are
// combinational. Reset values: automatic mode on, lowest accepted quality 1,
// all trigger boards enabled. The register map and reset values are this
// design's own; the published description gives only the purpose of the
// registers.
module tsm_cfg_regs
  import tsm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // PI port
  input  logic              pi_we,
  input  logic [CFG_AW-1:0] pi_addr,
  input  logic [7:0]        pi_wdata,
  output logic [7:0]        pi_rdata,
  // JTAG port
  input  logic              jt_we,
  input  logic [CFG_AW-1:0] jt_addr,
  input  logic [7:0]        jt_wdata,
  output logic [7:0]        jt_rdata,
  // status and register outputs
  input  logic [7:0]        status,
  output logic [7:0]        mode,
  output logic [7:0]        qmin,
  output logic [7:0]        mask
);

  logic [7:0] regs [N_CFG-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs[CFG_MODE] <= CFG_MODE_RST;
      regs[CFG_QMIN] <= CFG_QMIN_RST;
      regs[CFG_MASK] <= CFG_MASK_RST;
    end else if (pi_we && pi_addr != CFG_STATUS) begin
      regs[pi_addr] <= pi_wdata;
    end else if (jt_we && jt_addr != CFG_STATUS) begin
      regs[jt_addr] <= jt_wdata;
    end
  end

  assign pi_rdata = (pi_addr == CFG_STATUS) ? status : regs[pi_addr];
  assign jt_rdata = (jt_addr == CFG_STATUS) ? status : regs[jt_addr];

  assign mode = regs[CFG_MODE];
  assign qmin = regs[CFG_QMIN];
  assign mask = regs[CFG_MASK];

endmodule
