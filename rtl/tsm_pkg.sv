// Track-Sorter-Master shared definitions.
//
// Word formats and constants used by the Selection chip (TSMS), the two Data
// multiplexing chips (TSMD0, TSMD1) and the server board that joins them.
// The widths follow the block diagram of the TSM: seven 13-bit Preselect
// Words (PRW) from the Track Sorter Slaves, 25-bit full track data (TRK),
// a 30-bit TRACK output, 8-bit theta words and an 8-bit parallel access bus.
// The split of those words into fields, the register map and the chip
// addresses are this design's own choices; they are documented next to each
// definition.
package tsm_pkg;

  // ---- sizes taken from the block diagram ---------------------------------
  localparam int unsigned N_BOARDS = 7;   // phi trigger boards / TSS units (7xPRW)
  localparam int unsigned N_D0     = 4;   // boards served by TSMD0 (4xTRK)
  localparam int unsigned N_D1     = 3;   // boards served by TSMD1 (3xTRK)
  localparam int unsigned SEL_W    = 4;   // Select(3:0)
  localparam int unsigned PRW_W    = 13;  // PRW(12:0)
  localparam int unsigned TRK_W    = 25;  // TRK(24:0)
  localparam int unsigned TRACK_W  = 30;  // TRACK(29:0)
  localparam int unsigned THETA_W  = 8;   // Theta(7:0) per theta board
  localparam int unsigned PI_W     = 8;   // PICD(7:0)

  // ---- field layout (design choice) ----------------------------------------
  // PRW: quality code of the track the TSS selected (0 = no track), a flag
  // set when the TSS reports a second-choice track, and nine preview bits
  // that the TSM does not interpret.
  typedef struct packed {
    logic [2:0] quality;   // [12:10] 0 = empty, 7 = best
    logic       second;    // [9]     TSS second-choice track
    logic [8:0] preview;   // [8:0]   not used by the TSM
  } prw_t;

  // TRK: full TRACO data of the selected segment.
  typedef struct packed {
    logic [2:0]  quality;  // [24:22] 0 = empty
    logic [9:0]  k;        // [21:12] bending
    logic [11:0] x;        // [11:0]  position
  } trk_t;

  // TRACK: one word per output slot; two slots per bunch crossing.
  typedef struct packed {
    logic       valid;     // [29]
    logic       second;    // [28] word of the second slot
    logic [2:0] board;     // [27:25] source trigger board 0..6
    trk_t       trk;       // [24:0]
  } track_t;

  // ---- sort key --------------------------------------------------------------
  typedef logic [3:0] rank_t;

  // Higher is better: quality first, first-choice tracks before second ones.
  function automatic rank_t prw_rank(prw_t p);
    return {p.quality, ~p.second};
  endfunction

  function automatic rank_t trk_rank(trk_t t);
    return {t.quality, 1'b1};
  endfunction

  // ---- configuration registers (design choice) -----------------------------
  localparam int unsigned N_CFG  = 4;
  localparam int unsigned CFG_AW = 2;
  localparam logic [CFG_AW-1:0] CFG_MODE   = 2'd0;  // mode control
  localparam logic [CFG_AW-1:0] CFG_QMIN   = 2'd1;  // [2:0] lowest accepted quality
  localparam logic [CFG_AW-1:0] CFG_MASK   = 2'd2;  // [6:0] board enable mask (TSMS)
  localparam logic [CFG_AW-1:0] CFG_STATUS = 2'd3;  // read-only status

  // CFG_MODE bits
  localparam int unsigned MODE_AUTO     = 0;  // follow the power enable lines
  localparam int unsigned MODE_BACKUP   = 1;  // force back-up processing (TSMD)
  localparam int unsigned MODE_REJ2ND   = 2;  // fake rejection: drop second-choice tracks

  localparam logic [7:0] CFG_MODE_RST = 8'h01;
  localparam logic [7:0] CFG_QMIN_RST = 8'h01;
  localparam logic [7:0] CFG_MASK_RST = 8'h7F;

  // ---- Parallel Interface individual addresses (design choice) ---------------
  localparam logic [7:0] PI_ID_TSMS  = 8'h00;
  localparam logic [7:0] PI_ID_TSMD0 = 8'h01;
  localparam logic [7:0] PI_ID_TSMD1 = 8'h02;
  localparam logic [7:0] PI_ID_TRB0  = 8'h08;  // TRB i is PI_ID_TRB0 + i

endpackage
