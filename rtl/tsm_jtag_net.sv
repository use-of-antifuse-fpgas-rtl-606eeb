// JTAG net of the TSM board.
//
// The serial JTAG chain runs through TSMD0, TSMD1 and the Sorter (TSMS), in
// that order from TDI to TDO. Each chip sits between two isolation switches
// and has a bypass switch in parallel, all driven by the chip's power enable
// line. When a chip is powered (its nPWRen low) the chain passes through it;
// when it is off its TDI, TMS and TCK are disconnected (held low here) and the
// bypass closes, so the net runs only through the chips that are powered.
// The isolation switches are bus switches; this module describes their
// connection logic as combinational multiplexing, with no delay. The chain
// order and the switching rule follow the published TSM description; holding
// the disconnected inputs low is this design's choice.
//
// Index 0 is TSMD0, 1 is TSMD1, 2 is the Sorter.
module tsm_jtag_net (
  input  logic       tck,
  input  logic       tms,
  input  logic       tdi,
  output logic       tdo,
  input  logic [2:0] n_pwren,
  output logic [2:0] chip_tck,
  output logic [2:0] chip_tms,
  output logic [2:0] chip_tdi,
  input  logic [2:0] chip_tdo
);

  logic [3:0] node;

  assign node[0] = tdi;

  for (genvar i = 0; i < 3; i++) begin : g_chip
    assign chip_tck[i] = !n_pwren[i] && tck;
    assign chip_tms[i] = !n_pwren[i] && tms;
    assign chip_tdi[i] = !n_pwren[i] && node[i];
    assign node[i+1]   = n_pwren[i] ? node[i] : chip_tdo[i];
  end

  assign tdo = node[3];

endmodule
