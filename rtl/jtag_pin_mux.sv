// jtag_pin_mux: switches the five JTAG pins to the DART controller.
//
// In user and production-test operation (`dart_sel` low) the TAP sees the
// chip pins TCK, TMS, TDI and TRST_N and drives the TDO pin.  While the
// DART controller runs a field test (`dart_sel` high) the TAP sees the
// controller's signals instead, TDO is returned to the controller, and the
// TDO pin is held low; the chip-pin TRST_N still resets the TAP when DRTPIN
// selects production test (`force_pins`), whatever dart_sel is.  The
// switching of all five pins follows the document's structure figure; the
// held-low TDO pin and the `force_pins` override are this design's choices.
`timescale 1ps/1ps
module jtag_pin_mux (
  input  logic force_pins,   // DRTPIN: production test owns the pins
  input  logic dart_sel,     // DART controller owns the TAP
  // chip pins
  input  logic pin_tck,
  input  logic pin_tms,
  input  logic pin_tdi,
  input  logic pin_trst_n,
  output logic pin_tdo,
  // DART controller side
  input  logic ctl_tck,
  input  logic ctl_tms,
  input  logic ctl_tdi,
  input  logic ctl_trst_n,
  output logic ctl_tdo,
  // TAP side
  output logic tap_tck,
  output logic tap_tms,
  output logic tap_tdi,
  output logic tap_trst_n,
  input  logic tap_tdo
);
  logic use_ctl;
  assign use_ctl    = dart_sel && !force_pins;
  assign tap_tck    = use_ctl ? ctl_tck    : pin_tck;
  assign tap_tms    = use_ctl ? ctl_tms    : pin_tms;
  assign tap_tdi    = use_ctl ? ctl_tdi    : pin_tdi;
  assign tap_trst_n = use_ctl ? ctl_trst_n : pin_trst_n;
  assign pin_tdo    = use_ctl ? 1'b0       : tap_tdo;
  assign ctl_tdo    = use_ctl ? tap_tdo    : 1'b0;
endmodule
