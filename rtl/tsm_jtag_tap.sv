// JTAG test access port of one TSM chip, with a configuration register path.
//
// Besides the Parallel Interface, the configuration registers of every TSM
// chip can be reached through the serial JTAG net that also serves boundary
// scan. This TAP implements the IEEE 1149.1 sixteen-state controller with a
// 4-bit instruction register and three data registers:
//
//   IR_BYPASS (4'hF) 1-bit bypass register
//   IR_IDCODE (4'h1) 32-bit identification word (idcode input), the reset
//                    instruction
//   IR_CFG    (4'h8) 11-bit register {write, address[1:0], data[7:0]}; Capture
//                    loads {0, last address, its contents}, Update writes the
//                    data when the write bit is set and remembers the address
//
// TCK, TMS and TDI are brought into the chip clock domain through two-flop
// synchronisers, so TCK must be slower than a quarter of clk. The controller
// advances on rising TCK edges; TDO changes and Update actions happen on
// falling TCK edges, as in the standard. The instruction codes and the
// configuration data register are this design's own choices; the published
// description states only that the registers can be reached through JTAG.
module tsm_jtag_tap
  import tsm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tck,
  input  logic              tms,
  input  logic              tdi,
  output logic              tdo,
  input  logic [31:0]       idcode,
  output logic              cfg_we,
  output logic [CFG_AW-1:0] cfg_addr,
  output logic [7:0]        cfg_wdata,
  input  logic [7:0]        cfg_rdata
);

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_state_e;

  localparam logic [3:0] IR_IDCODE = 4'h1;
  localparam logic [3:0] IR_CFG    = 4'h8;
  localparam logic [3:0] IR_BYPASS = 4'hF;
  localparam int unsigned CFG_DR_W = 1 + CFG_AW + 8;

  logic [2:0] tck_s;
  logic [1:0] tms_s, tdi_s;
  logic       tck_rise, tck_fall, tms_i, tdi_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tck_s <= '0;
      tms_s <= '1;
      tdi_s <= '0;
    end else begin
      tck_s <= {tck_s[1:0], tck};
      tms_s <= {tms_s[0], tms};
      tdi_s <= {tdi_s[0], tdi};
    end
  end

  assign tck_rise = tck_s[1] && !tck_s[2];
  assign tck_fall = !tck_s[1] && tck_s[2];
  assign tms_i    = tms_s[1];
  assign tdi_i    = tdi_s[1];

  tap_state_e state, state_n;

  always_comb begin
    unique case (state)
      TLR:    state_n = tms_i ? TLR    : RTI;
      RTI:    state_n = tms_i ? SEL_DR : RTI;
      SEL_DR: state_n = tms_i ? SEL_IR : CAP_DR;
      CAP_DR: state_n = tms_i ? EX1_DR : SH_DR;
      SH_DR:  state_n = tms_i ? EX1_DR : SH_DR;
      EX1_DR: state_n = tms_i ? UPD_DR : PAU_DR;
      PAU_DR: state_n = tms_i ? EX2_DR : PAU_DR;
      EX2_DR: state_n = tms_i ? UPD_DR : SH_DR;
      UPD_DR: state_n = tms_i ? SEL_DR : RTI;
      SEL_IR: state_n = tms_i ? TLR    : CAP_IR;
      CAP_IR: state_n = tms_i ? EX1_IR : SH_IR;
      SH_IR:  state_n = tms_i ? EX1_IR : SH_IR;
      EX1_IR: state_n = tms_i ? UPD_IR : PAU_IR;
      PAU_IR: state_n = tms_i ? EX2_IR : PAU_IR;
      EX2_IR: state_n = tms_i ? UPD_IR : SH_IR;
      UPD_IR: state_n = tms_i ? SEL_DR : RTI;
      default: state_n = TLR;
    endcase
  end

  logic [3:0]          ir, ir_sh;
  logic                byp_sh;
  logic [31:0]         id_sh;
  logic [CFG_DR_W-1:0] cfg_sh;
  logic [CFG_AW-1:0]   last_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= TLR;
      ir        <= IR_IDCODE;
      ir_sh     <= '0;
      byp_sh    <= 1'b0;
      id_sh     <= '0;
      cfg_sh    <= '0;
      last_addr <= '0;
      tdo       <= 1'b0;
    end else begin
      if (tck_rise) begin
        state <= state_n;
        unique case (state)
          CAP_IR: ir_sh <= 4'b0001;
          SH_IR:  ir_sh <= {tdi_i, ir_sh[3:1]};
          CAP_DR: begin
            byp_sh <= 1'b0;
            id_sh  <= idcode;
            cfg_sh <= {1'b0, last_addr, cfg_rdata};
          end
          SH_DR: begin
            unique case (ir)
              IR_IDCODE: id_sh  <= {tdi_i, id_sh[31:1]};
              IR_CFG:    cfg_sh <= {tdi_i, cfg_sh[CFG_DR_W-1:1]};
              IR_BYPASS: byp_sh <= tdi_i;
              default:   byp_sh <= tdi_i;  // unused codes act as BYPASS
            endcase
          end
          default: ;
        endcase
      end
      if (tck_fall) begin
        unique case (state)
          TLR:    ir <= IR_IDCODE;
          UPD_IR: ir <= ir_sh;
          UPD_DR: if (ir == IR_CFG) last_addr <= cfg_sh[CFG_DR_W-2 -: CFG_AW];
          default: ;
        endcase
        unique case (state)
          SH_IR: tdo <= ir_sh[0];
          SH_DR: begin
            unique case (ir)
              IR_IDCODE: tdo <= id_sh[0];
              IR_CFG:    tdo <= cfg_sh[0];
              default:   tdo <= byp_sh;
            endcase
          end
          default: tdo <= 1'b0;
        endcase
      end
    end
  end

  assign cfg_we    = tck_fall && state == UPD_DR && ir == IR_CFG && cfg_sh[CFG_DR_W-1];
  assign cfg_wdata = cfg_sh[7:0];
  assign cfg_addr  = cfg_we ? cfg_sh[CFG_DR_W-2 -: CFG_AW] : last_addr;

endmodule
