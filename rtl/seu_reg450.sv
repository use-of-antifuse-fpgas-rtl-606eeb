// Irradiation test register: a 450-bit register with word access.
//
// To measure single event upsets and total dose effects, test chips were
// programmed with a 450-bit register, a size similar to the registers of the
// TSMS and TSMD chips, which an external pattern generator refreshes and
// reads back continuously (1 MHz in the test). This module is that register.
// It is organised as NBITS/W words of W bits: a write stores wdata in word
// waddr at the rising clock edge, and rdata returns word raddr one clock
// after raddr is presented. Refreshing the whole register takes NBITS/W
// writes and reading it back NBITS/W reads; at the default sizes that is 30
// of each. Reads and writes have separate ports and may overlap, so a full
// refresh-and-check pass fits in 1 us at any clock above 30 MHz.
//
// The register has no reset on purpose: its contents are the object of the
// test, and after power-up they are refreshed before being monitored. The
// 450-bit size follows the published TSM description; the word width and the
// port scheme are this design's own choices.
module seu_reg450 #(
  parameter int unsigned NBITS = 450,
  parameter int unsigned W     = 15,
  parameter int unsigned NW    = NBITS / W,
  parameter int unsigned AW    = $clog2(NW)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [NW];

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(NW)) mem[waddr] <= wdata;
    rdata <= (raddr < AW'(NW)) ? mem[raddr] : '0;
  end

  initial assert (NW * W == NBITS) else $error("NBITS must be a multiple of W");

endmodule
