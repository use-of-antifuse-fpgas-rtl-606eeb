// TSMD: Data multiplexing chip of the Track-Sorter-Master.
//
// Each TSMD covers half a chamber: TSMD0 receives the full 25-bit TRACO data
// (TRK) of the tracks selected by the Track Sorter Slaves of boards 0-3,
// TSMD1 those of boards 4-6. The chip works in one of two processing modes:
//
//  * Default processing: the TSMS does the sorting and sends two one-hot
//    Select words, one for each output slot of the bunch crossing. For every
//    slot whose Select is non-zero the chip drives the chosen TRK data, with
//    its board number, onto the shared 30-bit TRACK bus.
//  * Back-up processing: the TSMS is not used. The chip sorts its own inputs
//    by TRK quality (non-zero and at least CFG_QMIN) and outputs its single
//    best track in its own slot: slot 0 for TSMD0, slot 1 for TSMD1
//    (parameter SLOT).
//
// Back-up processing is entered when CFG_MODE bit 1 forces it, or in automatic
// mode (CFG_MODE bit 0) when the TSMS power enable nPWrenSort is high. The
// power state of the other TSMD is reported in the status register.
// Configuration is reachable through the Parallel Interface (individual
// address CHIP_ID) and JTAG, as in the TSMS.
//
// Timing (two clock cycles per bunch crossing, bx_phase 0 then 1): TRK inputs
// are sampled at the end of a phase-0 cycle and delayed by one cycle so that
// they line up with the Select words of the TSMS. The first-slot word is
// registered at the end of the next phase-0 cycle and the second-slot word at
// the end of the phase-1 cycle after it, so the two words of a crossing leave
// the chip three and four cycles after its inputs were sampled. track_oe marks
// the cycles in which this chip drives the bus. The two modes and the
// switching rule follow the published TSM description; the slot scheme, word
// layout and timing are this design's own choices.
module tsmd
  import tsm_pkg::*;
#(
  parameter int unsigned N_IN    = N_D0,
  parameter int unsigned BOARD0  = 0,
  parameter bit          SLOT    = 1'b0,
  parameter logic [7:0]  CHIP_ID = PI_ID_TSMD0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bx_phase,
  input  logic [7:0]         gaddr,
  input  logic [3:0]         jadd,
  input  logic [3:0]         badd,
  // power enable state of the TSMS and of the other TSMD (active low)
  input  logic               n_pwren_sort,
  input  logic               n_pwren_other,
  // data
  input  trk_t               trk_in [N_IN],
  input  logic [SEL_W-1:0]   sel_first,
  input  logic [SEL_W-1:0]   sel_second,
  output track_t             track_out,
  output logic               track_oe,
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

  localparam int unsigned IW = $clog2(N_IN);

  // ---- configuration access ------------------------------------------------
  logic              pi_we, jt_we;
  logic [CFG_AW-1:0] pi_addr, jt_addr;
  logic [7:0]        pi_wdata, pi_rdata, jt_wdata, jt_rdata;
  logic [7:0]        mode, qmin, mask, status;
  logic              backup;

  tsm_pi_slave #(.CHIP_ID(CHIP_ID), .FORWARD(1'b0)) u_pi (
    .clk, .rst_n, .gaddr, .nprog, .strobe, .nwrite, .picd_in, .picd_out, .picd_oe,
    .reg_we(pi_we), .reg_addr(pi_addr), .reg_wdata(pi_wdata), .reg_rdata(pi_rdata),
    .fwd_active(), .fwd_board()
  );

  tsm_jtag_tap u_tap (
    .clk, .rst_n, .tck, .tms, .tdi, .tdo,
    .idcode({4'h1, 8'h54, CHIP_ID[3:0], jadd, badd, 7'h00, 1'b1}),
    .cfg_we(jt_we), .cfg_addr(jt_addr), .cfg_wdata(jt_wdata), .cfg_rdata(jt_rdata)
  );

  tsm_cfg_regs u_cfg (
    .clk, .rst_n,
    .pi_we, .pi_addr, .pi_wdata, .pi_rdata,
    .jt_we, .jt_addr, .jt_wdata, .jt_rdata,
    .status, .mode, .qmin, .mask
  );

  assign backup = mode[MODE_BACKUP] || (mode[MODE_AUTO] && n_pwren_sort);
  assign status = {5'b0, backup, !n_pwren_other, !n_pwren_sort};

  // ---- back-up sorter ----------------------------------------------------------
  trk_t           trk_q [N_IN], trk_d [N_IN];
  rank_t          rank  [N_IN];
  logic           en    [N_IN];
  logic           b_vld, b_vld_q;
  logic [IW-1:0]  b_idx, b_idx_q;

  always_comb begin
    for (int unsigned i = 0; i < N_IN; i++) begin
      rank[i] = trk_rank(trk_q[i]);
      en[i]   = trk_q[i].quality != 3'd0 && trk_q[i].quality >= qmin[2:0] && mask[BOARD0 + i];
    end
  end

  tsm_sorter #(.N(N_IN)) u_sort (
    .rank, .en,
    .first_vld(b_vld), .first_idx(b_idx),
    .second_vld(), .second_idx()
  );

  // ---- select decoding ---------------------------------------------------------
  function automatic logic sel_any(logic [SEL_W-1:0] sel);
    return |sel[N_IN-1:0];
  endfunction

  function automatic logic [IW-1:0] sel_idx(logic [SEL_W-1:0] sel);
    logic [IW-1:0] idx;
    idx = '0;
    for (int i = N_IN - 1; i >= 0; i--) if (sel[i]) idx = IW'(i);
    return idx;
  endfunction

  function automatic track_t make_word(trk_t t, logic [IW-1:0] idx, logic second);
    track_t w;
    w.valid  = 1'b1;
    w.second = second;
    w.board  = 3'(BOARD0 + 32'(idx));
    w.trk    = t;
    return w;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N_IN; i++) begin
        trk_q[i] <= '0;
        trk_d[i] <= '0;
      end
      b_vld_q   <= 1'b0;
      b_idx_q   <= '0;
      track_out <= '0;
      track_oe  <= 1'b0;
    end else if (!bx_phase) begin
      trk_q <= trk_in;
      // first output slot
      if (backup ? (b_vld_q && SLOT == 1'b0) : sel_any(sel_first)) begin
        track_out <= make_word(trk_d[backup ? b_idx_q : sel_idx(sel_first)],
                               backup ? b_idx_q : sel_idx(sel_first), 1'b0);
        track_oe  <= 1'b1;
      end else begin
        track_out <= '0;
        track_oe  <= 1'b0;
      end
    end else begin
      trk_d   <= trk_q;
      b_vld_q <= b_vld;
      b_idx_q <= b_idx;
      // second output slot
      if (backup ? (b_vld_q && SLOT == 1'b1) : sel_any(sel_second)) begin
        track_out <= make_word(trk_d[backup ? b_idx_q : sel_idx(sel_second)],
                               backup ? b_idx_q : sel_idx(sel_second), 1'b1);
        track_oe  <= 1'b1;
      end else begin
        track_out <= '0;
        track_oe  <= 1'b0;
      end
    end
  end

  // The TSMS selects at most one input per slot.
  a_sel_first:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel_first));
  a_sel_second: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel_second));

endmodule
