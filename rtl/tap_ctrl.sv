// tap_ctrl: IEEE 1149.1 test access port controller with instruction register.
//
// The sixteen-state TAP state machine advances on the rising edge of TCK
// under TMS; TRST_N (active low, asynchronous) or five TCK cycles with TMS
// high bring it to Test-Logic-Reset, which selects BYPASS.  The 4-bit
// instruction register captures 4'b0001 in Capture-IR, shifts LSB first in
// Shift-IR and is loaded on the rising edge that leaves Update-IR.  The
// state is exported so that the data registers of the LBIST and MBIST
// controllers can capture, shift and update themselves; each data register
// hands its serial output in on `user_tdo`, indexed by instruction code.
// TDO changes on the falling edge of TCK, as the standard requires.  The
// document reuses the chip's JTAG-based BIST access (TDI, TMS, TRST, TCK,
// TDO); the instruction codes are this design's own.
`timescale 1ps/1ps
module tap_ctrl
  import dart_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  input  logic       tdi,
  output logic       tdo,
  output tap_state_e state,
  output tap_instr_e ir,
  input  logic [15:0] user_tdo
);
  tap_state_e         nxt;
  logic [IR_W-1:0]    ir_sr;
  logic               bypass_q;

  always_comb begin
    unique case (state)
      TS_RESET:    nxt = tms ? TS_RESET    : TS_IDLE;
      TS_IDLE:     nxt = tms ? TS_SEL_DR   : TS_IDLE;
      TS_SEL_DR:   nxt = tms ? TS_SEL_IR   : TS_CAP_DR;
      TS_CAP_DR:   nxt = tms ? TS_EXIT1_DR : TS_SHIFT_DR;
      TS_SHIFT_DR: nxt = tms ? TS_EXIT1_DR : TS_SHIFT_DR;
      TS_EXIT1_DR: nxt = tms ? TS_UPD_DR   : TS_PAUSE_DR;
      TS_PAUSE_DR: nxt = tms ? TS_EXIT2_DR : TS_PAUSE_DR;
      TS_EXIT2_DR: nxt = tms ? TS_UPD_DR   : TS_SHIFT_DR;
      TS_UPD_DR:   nxt = tms ? TS_SEL_DR   : TS_IDLE;
      TS_SEL_IR:   nxt = tms ? TS_RESET    : TS_CAP_IR;
      TS_CAP_IR:   nxt = tms ? TS_EXIT1_IR : TS_SHIFT_IR;
      TS_SHIFT_IR: nxt = tms ? TS_EXIT1_IR : TS_SHIFT_IR;
      TS_EXIT1_IR: nxt = tms ? TS_UPD_IR   : TS_PAUSE_IR;
      TS_PAUSE_IR: nxt = tms ? TS_EXIT2_IR : TS_PAUSE_IR;
      TS_EXIT2_IR: nxt = tms ? TS_UPD_IR   : TS_SHIFT_IR;
      default:     nxt = tms ? TS_SEL_DR   : TS_IDLE;   // TS_UPD_IR
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      state    <= TS_RESET;
      ir       <= IR_BYPASS;
      ir_sr    <= '0;
      bypass_q <= 1'b0;
    end else begin
      state <= nxt;
      unique case (state)
        TS_RESET:    ir <= IR_BYPASS;
        TS_CAP_IR:   ir_sr <= 4'b0001;
        TS_SHIFT_IR: ir_sr <= {tdi, ir_sr[IR_W-1:1]};
        TS_UPD_IR:   ir <= tap_instr_e'(ir_sr);
        TS_CAP_DR:   bypass_q <= 1'b0;
        TS_SHIFT_DR: bypass_q <= tdi;
        default: ;
      endcase
    end
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) tdo <= 1'b0;
    else if (state == TS_SHIFT_IR) tdo <= ir_sr[0];
    else if (state == TS_SHIFT_DR) tdo <= (ir == IR_BYPASS) ? bypass_q : user_tdo[ir];
  end
endmodule
