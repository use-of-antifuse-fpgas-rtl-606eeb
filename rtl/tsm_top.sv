// Track-Sorter-Master server board.
//
// The Track-Sorter-Master (TSM) produces the trigger output of one drift tube
// chamber: out of the tracks preselected by the seven phi trigger boards it
// sends the best two, with their full data, to the sector collector, together
// with the theta information. To survive the failure of any one chip the
// function is split over three chips with separate power: the Selection chip
// TSMS sorts the 13-bit Preselect Words (PRW), and two Data multiplexing chips
// TSMD0 (boards 0-3) and TSMD1 (boards 4-6) hold the 25-bit full track data
// and put the selected tracks on the shared TRACK bus.
//
// Power and isolation. The controller switches each chip's power with an
// active-low enable (n_pwren_sort, n_pwren_d0, n_pwren_d1). The same lines
// drive the bus isolation switches: a chip that is off is held in reset here,
// its inputs are disconnected (seen as zero) and its outputs do not reach the
// board. Every chip also sees the enables of the other two, which is how the
// processing mode follows the power state:
//   all on           default processing, TSMS picks two tracks anywhere;
//   one TSMD off     TSMS ignores the PRWs of that half, both tracks from the
//                    other half;
//   TSMS off         back-up processing, each TSMD sorts its own half and
//                    sends one track (TSMD0 in slot 0, TSMD1 in slot 1).
// The configuration registers can also force these modes.
//
// Configuration access. The Parallel Interface (PI) reaches the three chips,
// and through the TSMS one trigger board at a time over the bi-directional PRW
// lines. The JTAG chain passes through the powered chips only
// (tsm_jtag_net). Bi-directional lines are modelled as separate in, out and
// output-enable signals.
//
// Output timing. The board runs at two clock cycles per bunch crossing;
// bx_phase (0 then 1) is generated here from reset. Inputs presented during a
// crossing are sampled at the end of its phase-0 cycle; the first track word
// appears on track_out three cycles later (phase 1), the second track word
// four cycles later (phase 0 of the crossing after next), theta_out is valid
// during both. A word with valid = 0 means "no track".
//
// Alongside, and independent of the TSM, the board-level top also carries the
// 450-bit irradiation test register (seu_reg450) with its own ports.
//
// The partition, the mode rules, the power-enable driven switching, the JTAG
// net and the two-step PI addressing follow the published TSM description. The
// clock scheme, the word layouts, the slot order and all register and PI
// encodings are this
// design's own choices (see tsm_pkg).
module tsm_top
  import tsm_pkg::*;
#(
  parameter int unsigned SEU_NBITS = 450,
  parameter int unsigned SEU_W     = 15,
  parameter int unsigned SEU_AW    = $clog2(SEU_NBITS / SEU_W)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 bx_phase,
  // board straps
  input  logic [7:0]           gaddr,
  input  logic [3:0]           jadd,
  input  logic [3:0]           badd,
  // power enables from the controller (active low)
  input  logic                 n_pwren_sort,
  input  logic                 n_pwren_d0,
  input  logic                 n_pwren_d1,
  // phi trigger boards
  input  prw_t                 prw_in     [N_BOARDS],
  output logic [PI_W-1:0]      prw_out    [N_BOARDS],
  output logic                 prw_oe     [N_BOARDS],
  output logic                 strobe_trb [N_BOARDS],
  output logic                 nwrite_trb,
  input  trk_t                 trk_in     [N_BOARDS],
  // theta trigger boards
  input  logic [THETA_W-1:0]   theta_in   [2],
  // to the sector collector
  output track_t               track_out,
  output logic [2*THETA_W-1:0] theta_out,
  // Parallel Interface from the controller
  input  logic                 nprog,
  input  logic                 strobe,
  input  logic                 nwrite,
  input  logic [PI_W-1:0]      picd_in,
  output logic [PI_W-1:0]      picd_out,
  output logic                 picd_oe,
  // JTAG
  input  logic                 tck,
  input  logic                 tms,
  input  logic                 tdi,
  output logic                 tdo,
  // irradiation test register
  input  logic                 seu_we,
  input  logic [SEU_AW-1:0]    seu_waddr,
  input  logic [SEU_W-1:0]     seu_wdata,
  input  logic [SEU_AW-1:0]    seu_raddr,
  output logic [SEU_W-1:0]     seu_rdata
);

  logic on_s, on_0, on_1;
  assign on_s = !n_pwren_sort;
  assign on_0 = !n_pwren_d0;
  assign on_1 = !n_pwren_d1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bx_phase <= 1'b0;
    else        bx_phase <= !bx_phase;
  end

  // ---- JTAG net -----------------------------------------------------------------
  logic [2:0] j_tck, j_tms, j_tdi, j_tdo;

  tsm_jtag_net u_jtag (
    .tck, .tms, .tdi, .tdo,
    .n_pwren({n_pwren_sort, n_pwren_d1, n_pwren_d0}),
    .chip_tck(j_tck), .chip_tms(j_tms), .chip_tdi(j_tdi), .chip_tdo(j_tdo)
  );

  // ---- TSMS ---------------------------------------------------------------------
  prw_t               s_prw_in  [N_BOARDS];
  logic [PI_W-1:0]    s_prw_out [N_BOARDS];
  logic               s_prw_oe  [N_BOARDS];
  logic               s_strobe  [N_BOARDS];
  logic               s_nwrite_trb, s_picd_oe;
  logic [THETA_W-1:0] s_theta_in [2];
  logic [SEL_W-1:0]   s_d0_f, s_d0_s, s_d1_f, s_d1_s;
  logic [2*THETA_W-1:0] s_theta_out;
  logic [PI_W-1:0]    s_picd_out;

  always_comb begin
    for (int unsigned i = 0; i < N_BOARDS; i++) begin
      s_prw_in[i]   = on_s ? prw_in[i] : '0;
      prw_out[i]    = on_s ? s_prw_out[i] : '0;
      prw_oe[i]     = on_s && s_prw_oe[i];
      strobe_trb[i] = on_s && s_strobe[i];
    end
    for (int unsigned i = 0; i < 2; i++) s_theta_in[i] = on_s ? theta_in[i] : '0;
  end
  assign nwrite_trb = on_s ? s_nwrite_trb : 1'b1;
  assign theta_out  = on_s ? s_theta_out : '0;

  tsms u_tsms (
    .clk, .rst_n(rst_n && on_s), .bx_phase, .gaddr, .jadd, .badd,
    .n_pwren_d0, .n_pwren_d1,
    .prw_in(s_prw_in), .prw_out(s_prw_out), .prw_oe(s_prw_oe),
    .strobe_trb(s_strobe), .nwrite_trb(s_nwrite_trb), .theta_in(s_theta_in),
    .sel_d0_first(s_d0_f), .sel_d0_second(s_d0_s),
    .sel_d1_first(s_d1_f), .sel_d1_second(s_d1_s),
    .theta_out(s_theta_out),
    .nprog(nprog || !on_s), .strobe(strobe && on_s), .nwrite(nwrite || !on_s),
    .picd_in(on_s ? picd_in : '0), .picd_out(s_picd_out), .picd_oe(s_picd_oe),
    .tck(j_tck[2]), .tms(j_tms[2]), .tdi(j_tdi[2]), .tdo(j_tdo[2])
  );

  // ---- TSMD0 / TSMD1 -------------------------------------------------------------
  trk_t      d0_trk [N_D0];
  trk_t      d1_trk [N_D1];
  track_t    d0_out, d1_out;
  logic      d0_oe, d1_oe, d0_picd_oe, d1_picd_oe;
  logic [PI_W-1:0] d0_picd_out, d1_picd_out;

  always_comb begin
    for (int unsigned i = 0; i < N_D0; i++) d0_trk[i] = on_0 ? trk_in[i] : '0;
    for (int unsigned i = 0; i < N_D1; i++) d1_trk[i] = on_1 ? trk_in[N_D0 + i] : '0;
  end

  tsmd #(.N_IN(N_D0), .BOARD0(0), .SLOT(1'b0), .CHIP_ID(PI_ID_TSMD0)) u_tsmd0 (
    .clk, .rst_n(rst_n && on_0), .bx_phase, .gaddr, .jadd, .badd,
    .n_pwren_sort, .n_pwren_other(n_pwren_d1),
    .trk_in(d0_trk),
    .sel_first(on_0 && on_s ? s_d0_f : '0), .sel_second(on_0 && on_s ? s_d0_s : '0),
    .track_out(d0_out), .track_oe(d0_oe),
    .nprog(nprog || !on_0), .strobe(strobe && on_0), .nwrite(nwrite || !on_0),
    .picd_in(on_0 ? picd_in : '0), .picd_out(d0_picd_out), .picd_oe(d0_picd_oe),
    .tck(j_tck[0]), .tms(j_tms[0]), .tdi(j_tdi[0]), .tdo(j_tdo[0])
  );

  tsmd #(.N_IN(N_D1), .BOARD0(N_D0), .SLOT(1'b1), .CHIP_ID(PI_ID_TSMD1)) u_tsmd1 (
    .clk, .rst_n(rst_n && on_1), .bx_phase, .gaddr, .jadd, .badd,
    .n_pwren_sort, .n_pwren_other(n_pwren_d0),
    .trk_in(d1_trk),
    .sel_first(on_1 && on_s ? s_d1_f : '0), .sel_second(on_1 && on_s ? s_d1_s : '0),
    .track_out(d1_out), .track_oe(d1_oe),
    .nprog(nprog || !on_1), .strobe(strobe && on_1), .nwrite(nwrite || !on_1),
    .picd_in(on_1 ? picd_in : '0), .picd_out(d1_picd_out), .picd_oe(d1_picd_oe),
    .tck(j_tck[1]), .tms(j_tms[1]), .tdi(j_tdi[1]), .tdo(j_tdo[1])
  );

  // ---- shared buses ----------------------------------------------------------------
  logic t0, t1, p0, p1, ps;
  assign t0 = on_0 && d0_oe;
  assign t1 = on_1 && d1_oe;
  assign ps = on_s && s_picd_oe;
  assign p0 = on_0 && d0_picd_oe;
  assign p1 = on_1 && d1_picd_oe;

  assign track_out = (t0 ? d0_out : '0) | (t1 ? d1_out : '0);
  assign picd_out  = (ps ? s_picd_out : '0) | (p0 ? d0_picd_out : '0) | (p1 ? d1_picd_out : '0);
  assign picd_oe   = ps || p0 || p1;

  a_track_bus: assert property (@(posedge clk) disable iff (!rst_n) !(t0 && t1));
  a_pi_bus:    assert property (@(posedge clk) disable iff (!rst_n) $onehot0({ps, p0, p1}));

  // ---- irradiation test register -------------------------------------------------
  seu_reg450 #(.NBITS(SEU_NBITS), .W(SEU_W)) u_seu (
    .clk, .we(seu_we), .waddr(seu_waddr), .wdata(seu_wdata),
    .raddr(seu_raddr), .rdata(seu_rdata)
  );

endmodule
