// ttg_delay_line: behavioural model of the test timing generator's buffer
// chain (not synthesizable).
//
// A chain of TAPS-1 identical buffers, each of UNIT_PS delay (40 ps, the
// document's example), and a tap multiplexer: `out` is `in` delayed by
// sel x UNIT_PS (sel = 0 is the undelayed input).  Each buffer is modelled
// with an inertial delay, so pulses shorter than one unit are swallowed;
// test-clock pulses are far wider.  `sel` must be held steady while a pulse
// is in flight.  The tap count is this design's choice.
`timescale 1ps/1ps
module ttg_delay_line #(
  parameter int TAPS    = 64,
  parameter int UNIT_PS = 40,
  parameter int SEL_W   = $clog2(TAPS)
) (
  input  logic             in,
  input  logic [SEL_W-1:0] sel,
  output logic             out
);
  logic [TAPS-1:0] tap;

  // tap[i] is `in` after i buffers
  assign tap[0] = in;
  for (genvar i = 1; i < TAPS; i++) begin : g_buf
    assign #(UNIT_PS) tap[i] = tap[i-1];
  end

  assign out = tap[sel];
endmodule
