// Parallel Interface (PI) slave of one TSM chip.
//
// The chamber controller reaches the configuration registers of the TSM chips,
// and of the trigger boards behind the TSMS, over an 8-bit parallel bus PICD
// with the control lines nProg, Strobe and nWrite. Addressing is in two
// steps: a global address first, then an individual address. This slave
// implements that scheme with a strobe-counting state machine:
//
//   strobe 1  global address     must equal the board's TSM address (gaddr)
//   strobe 2  individual address CHIP_ID selects this chip; with FORWARD set,
//                                PI_ID_TRB0+i selects trigger board i
//   strobe 3  register address   (low CFG_AW bits)
//   strobe 4+ data               written when nWrite is low, read when high
//
// A transaction lasts while nProg is low; nProg high returns to the first
// step. A mismatching address makes the slave ignore the rest of the
// transaction. In forwarding mode (TSMS only) the slave stays in S_FWD and the
// chip routes the remaining strobes and data to the one selected board, so
// only one trigger board is reached at a time.
//
// Timing: the bus lines are taken as synchronous to clk and are sampled at the
// first clock edge at which Strobe is seen high; PICD must be stable while
// Strobe is high. A write reaches the register one clock after that edge. On
// a read the chip drives PICD for as long as Strobe is high. The two-step
// addressing and the forwarding follow the published TSM description; the byte
// sequence, the chip addresses and the timing are this design's own choices.
module tsm_pi_slave
  import tsm_pkg::*;
#(
  parameter logic [7:0] CHIP_ID = PI_ID_TSMS,
  parameter bit         FORWARD = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        gaddr,
  // PI bus
  input  logic              nprog,
  input  logic              strobe,
  input  logic              nwrite,
  input  logic [PI_W-1:0]   picd_in,
  output logic [PI_W-1:0]   picd_out,
  output logic              picd_oe,
  // register access
  output logic              reg_we,
  output logic [CFG_AW-1:0] reg_addr,
  output logic [7:0]        reg_wdata,
  input  logic [7:0]        reg_rdata,
  // forwarding to a trigger board
  output logic              fwd_active,
  output logic [2:0]        fwd_board
);

  typedef enum logic [2:0] {
    S_GLOBAL, S_INDIV, S_REG, S_DATA, S_FWD, S_IGNORE
  } pi_state_e;

  pi_state_e state;
  logic      strobe_q;
  logic      rise;

  assign rise = strobe && !strobe_q && !nprog;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_GLOBAL;
      strobe_q  <= 1'b0;
      reg_addr  <= '0;
      fwd_board <= '0;
    end else begin
      strobe_q <= strobe;
      if (nprog) begin
        state <= S_GLOBAL;
      end else if (rise) begin
        unique case (state)
          S_GLOBAL: state <= (picd_in == gaddr) ? S_INDIV : S_IGNORE;
          S_INDIV: begin
            if (picd_in == CHIP_ID) begin
              state <= S_REG;
            end else if (FORWARD && picd_in >= PI_ID_TRB0 &&
                         picd_in < PI_ID_TRB0 + 8'(N_BOARDS)) begin
              state     <= S_FWD;
              fwd_board <= 3'(picd_in - PI_ID_TRB0);
            end else begin
              state <= S_IGNORE;
            end
          end
          S_REG: begin
            reg_addr <= picd_in[CFG_AW-1:0];
            state    <= S_DATA;
          end
          default: ;  // S_DATA, S_FWD and S_IGNORE hold until nProg rises
        endcase
      end
    end
  end

  assign reg_we     = rise && state == S_DATA && !nwrite;
  assign reg_wdata  = picd_in;
  assign picd_oe    = !nprog && state == S_DATA && nwrite && strobe;
  assign picd_out   = reg_rdata;
  assign fwd_active = state == S_FWD;

  // The chip must never drive the bus during a write cycle.
  a_no_drive_on_write: assert property (@(posedge clk) disable iff (!rst_n)
                                        !(picd_oe && !nwrite));

endmodule
