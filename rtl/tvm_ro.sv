// tvm_ro: behavioural model of one TVM ring oscillator (not synthesizable).
//
// The real part is a loop of an odd number of inverting standard-cell
// stages; every stage is gated by `enable`, and the first stage is also
// gated by `start`, so that a disabled ring sits at a static level instead
// of oscillating (the document's ring has a structure meant to tolerate
// NBTI).  This model reproduces only the behaviour seen at `ro_out`: while
// start and enable are both high it toggles with a half period of
// STAGES x stage delay; otherwise it holds 1.  The stage delay follows a
// linear temperature/voltage model,
//   d = STAGE_PS * (1 + TC_PPM*1e-6*dT - VC_PPM*1e-6*dV_mV),
// whose sensitivities differ between the three RO types.  A testbench may
// set the variables `delta_t_c` and `delta_v_mv` hierarchically to emulate
// a change of environment.  The stage count and sensitivities are this
// model's choices, as is the nominal frequency of about 300 MHz; the
// document gives only the ring's shape (its Fig. 4).
// The toggle delay is a variable computed at run time, so a linter cannot
// prove it non-zero and may warn about a possible zero delay; it is never
// zero because the stage delay stays positive for any sensible dT and dV.
`timescale 1ps/1ps
module tvm_ro #(
  parameter int  STAGES   = 9,
  parameter real STAGE_PS = 185.0,
  parameter real TC_PPM   = 1200.0,
  parameter real VC_PPM   = 1300.0
) (
  input  logic start,
  input  logic enable,
  output logic ro_out
);
  real delta_t_c  = 0.0;
  real delta_v_mv = 0.0;
  real half_ps;

  initial ro_out = 1'b1;

  always begin
    if (start && enable) begin
      half_ps = STAGES * STAGE_PS * (1.0 + TC_PPM * 1.0e-6 * delta_t_c
                                         - VC_PPM * 1.0e-6 * delta_v_mv);
      #(half_ps) ro_out = (start && enable) ? ~ro_out : 1'b1;
    end else begin
      ro_out = 1'b1;
      @(start or enable);
    end
  end
endmodule
