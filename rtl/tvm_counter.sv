// tvm_counter: counts ring-oscillator cycles for the TVM.
//
// Clocked by the oscillator output itself.  `reset` (asynchronous, active
// high) clears the count; while `count_start` is high every rising edge of
// ro_clk adds one, saturating at all ones.  count_start comes from the slow
// controller clock and is synchronised into the oscillator domain by two
// flip-flops, so the counting window is exact to within two oscillator
// cycles.  The value is read by the controller only after the oscillator
// has stopped, so no synchroniser is needed on the way out (the document
// reads the counters after the ROs have stopped and waited).  Width is this
// design's choice.
`timescale 1ps/1ps
module tvm_counter #(
  parameter int CNT_W = 16
) (
  input  logic             ro_clk,
  input  logic             reset,
  input  logic             count_start,
  output logic [CNT_W-1:0] count
);
  logic [1:0] sync;

  always_ff @(posedge ro_clk or posedge reset) begin
    if (reset) begin
      sync  <= '0;
      count <= '0;
    end else begin
      sync <= {sync[0], count_start};
      if (sync[1] && count != '1) count <= count + 1'b1;
    end
  end
endmodule
