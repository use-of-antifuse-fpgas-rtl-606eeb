// TSMS: Selection chip of the Track-Sorter-Master.
//
// The TSMS receives one Preselect Word (PRW) from the Track Sorter Slave of
// each of the seven phi trigger boards. In default processing it picks the two
// best tracks of the chamber and tells the Data multiplexing chips which full
// track data to send: each TSMD gets two 4-bit Select words, one for the first
// and one for the second output slot of the bunch crossing. A Select word is
// one-hot over the boards of that half chamber (TSMD0: boards 0-3, TSMD1:
// boards 4-6); zero means "not in this half". Both tracks may come from the
// same TSMD, or one from each.
//
// A PRW takes part in the sort when its quality is non-zero and at least
// CFG_QMIN, its board is enabled in CFG_MASK, it is not a second-choice track
// while fake rejection (CFG_MODE bit 2) is on and, in automatic mode
// (CFG_MODE bit 0), the TSMD serving its half chamber is powered
// (nPWrenD0 / nPWrenD1 low). So when one TSMD is off, both tracks come from
// the other half, as the published TSM description requires.
//
// The chip also registers the two 8-bit theta words and outputs them as
// Theta(15:0) aligned with the track words, and it is the Parallel Interface
// gateway to the trigger boards: the PRW lines are bi-directional and, while
// a PI transaction addressed to trigger board i is in progress, the chip
// drives PI data onto the low eight PRW lines of that board and pulses only
// Strobe_i. PRWs are treated as empty while nProg is low.
//
// Timing (two clock cycles per bunch crossing, bx_phase 0 then 1): inputs are
// sampled at the end of a phase-0 cycle, Select is registered at the end of
// the following phase-1 cycle and held for a whole crossing, Theta(15:0) is
// registered at the end of the next phase-0 cycle so that it is valid together
// with the two track words. The selection rules in the first two paragraphs
// follow the published TSM description; PRW field layout, ranking, timing and
// the PI byte format are this design's own choices.
module tsms
  import tsm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bx_phase,
  input  logic [7:0]         gaddr,
  input  logic [3:0]         jadd,
  input  logic [3:0]         badd,
  // power enable state of the TSMDs (active low)
  input  logic               n_pwren_d0,
  input  logic               n_pwren_d1,
  // trigger board side
  input  prw_t               prw_in     [N_BOARDS],
  output logic [PI_W-1:0]    prw_out    [N_BOARDS],
  output logic               prw_oe     [N_BOARDS],
  output logic               strobe_trb [N_BOARDS],
  output logic               nwrite_trb,
  input  logic [THETA_W-1:0] theta_in   [2],
  // to the TSMDs and the sector collector
  output logic [SEL_W-1:0]   sel_d0_first,
  output logic [SEL_W-1:0]   sel_d0_second,
  output logic [SEL_W-1:0]   sel_d1_first,
  output logic [SEL_W-1:0]   sel_d1_second,
  output logic [2*THETA_W-1:0] theta_out,
  // Parallel Interface
  input  logic               nprog,
  input  logic               strobe,
  input  logic               nwrite,
  input  logic [PI_W-1:0]    picd_in,
  output logic [PI_W-1:0]    picd_out,
  output logic               picd_oe,
  // JTAG
  input  logic               tck,
  input  logic               tms,
  input  logic               tdi,
  output logic               tdo
);

  // ---- configuration access ------------------------------------------------
  logic              pi_we, jt_we, fwd_active, slave_oe;
  logic [CFG_AW-1:0] pi_addr, jt_addr;
  logic [7:0]        pi_wdata, pi_rdata, jt_wdata, jt_rdata, slave_out;
  logic [7:0]        mode, qmin, mask, status;
  logic [2:0]        fwd_board;

  tsm_pi_slave #(.CHIP_ID(PI_ID_TSMS), .FORWARD(1'b1)) u_pi (
    .clk, .rst_n, .gaddr, .nprog, .strobe, .nwrite, .picd_in,
    .picd_out(slave_out), .picd_oe(slave_oe),
    .reg_we(pi_we), .reg_addr(pi_addr), .reg_wdata(pi_wdata), .reg_rdata(pi_rdata),
    .fwd_active, .fwd_board
  );

  tsm_jtag_tap u_tap (
    .clk, .rst_n, .tck, .tms, .tdi, .tdo,
    .idcode({4'h1, 8'h54, 4'h0, jadd, badd, 7'h00, 1'b1}),
    .cfg_we(jt_we), .cfg_addr(jt_addr), .cfg_wdata(jt_wdata), .cfg_rdata(jt_rdata)
  );

  tsm_cfg_regs u_cfg (
    .clk, .rst_n,
    .pi_we, .pi_addr, .pi_wdata, .pi_rdata,
    .jt_we, .jt_addr, .jt_wdata, .jt_rdata,
    .status, .mode, .qmin, .mask
  );

  assign status = {5'b0, fwd_active, !n_pwren_d1, !n_pwren_d0};

  // ---- PI forwarding to one trigger board ------------------------------------
  always_comb begin
    for (int unsigned i = 0; i < N_BOARDS; i++) begin
      prw_out[i]    = picd_in;
      prw_oe[i]     = fwd_active && !nprog && !nwrite && fwd_board == 3'(i);
      strobe_trb[i] = fwd_active && !nprog && strobe && fwd_board == 3'(i);
    end
  end
  assign nwrite_trb = fwd_active ? nwrite : 1'b1;
  assign picd_out   = fwd_active ? prw_in[fwd_board][PI_W-1:0] : slave_out;
  assign picd_oe    = fwd_active ? (!nprog && nwrite && strobe) : slave_oe;

  // ---- sorting pipeline ------------------------------------------------------
  prw_t                prw_q [N_BOARDS];
  logic [THETA_W-1:0]  theta_q [2], theta_d [2];
  rank_t               rank  [N_BOARDS];
  logic                en    [N_BOARDS];
  logic                f_vld, s_vld;
  logic [2:0]          f_idx, s_idx;

  always_comb begin
    for (int unsigned i = 0; i < N_BOARDS; i++) begin
      logic half_on;
      half_on = (i < N_D0) ? !n_pwren_d0 : !n_pwren_d1;
      rank[i] = prw_rank(prw_q[i]);
      en[i]   = prw_q[i].quality != 3'd0 &&
                prw_q[i].quality >= qmin[2:0] &&
                mask[i] &&
                !(mode[MODE_REJ2ND] && prw_q[i].second) &&
                (half_on || !mode[MODE_AUTO]);
    end
  end

  tsm_sorter #(.N(N_BOARDS)) u_sort (
    .rank, .en,
    .first_vld(f_vld), .first_idx(f_idx),
    .second_vld(s_vld), .second_idx(s_idx)
  );

  function automatic logic [SEL_W-1:0] onehot_d0(logic vld, logic [2:0] idx);
    return (vld && idx < 3'(N_D0)) ? SEL_W'(1) << idx : '0;
  endfunction

  function automatic logic [SEL_W-1:0] onehot_d1(logic vld, logic [2:0] idx);
    return (vld && idx >= 3'(N_D0)) ? SEL_W'(1) << (idx - 3'(N_D0)) : '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N_BOARDS; i++) prw_q[i] <= '0;
      theta_q       <= '{default: '0};
      theta_d       <= '{default: '0};
      theta_out     <= '0;
      sel_d0_first  <= '0;
      sel_d0_second <= '0;
      sel_d1_first  <= '0;
      sel_d1_second <= '0;
    end else if (!bx_phase) begin
      for (int unsigned i = 0; i < N_BOARDS; i++) prw_q[i] <= nprog ? prw_in[i] : '0;
      theta_q   <= theta_in;
      theta_out <= {theta_d[1], theta_d[0]};
    end else begin
      theta_d       <= theta_q;
      sel_d0_first  <= onehot_d0(f_vld, f_idx);
      sel_d0_second <= onehot_d0(s_vld, s_idx);
      sel_d1_first  <= onehot_d1(f_vld, f_idx);
      sel_d1_second <= onehot_d1(s_vld, s_idx);
    end
  end

  // Each output slot is given to at most one TSMD and one board.
  a_slot_first:  assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0({sel_d0_first, sel_d1_first}));
  a_slot_second: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0({sel_d0_second, sel_d1_second}));

endmodule
