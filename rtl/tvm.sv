// tvm: temperature and voltage monitor.
//
// Three ring oscillators of different types (different sensitivity of
// frequency to temperature and to voltage) each drive their own counter.
// The controller raises `enable` and `ro_start` to start the rings, holds
// `count_start` high for a fixed window of its own clock, drops it, stops
// the rings, and then reads the three counts one at a time through
// `out_select` (0..2) on `count_value`.  `reset` clears the counters before
// a measurement.  The three-RO/three-counter structure and the control pin
// names follow the document's TVM figure; the ring oscillators are
// behavioural models, the per-type sensitivities are this design's choices,
// and the single muxed output port is this design's reading of the figure's
// "Count Values".
`timescale 1ps/1ps
module tvm #(
  parameter int CNT_W = 16
) (
  input  logic             reset,
  input  logic             count_start,
  input  logic             ro_start,
  input  logic             enable,
  input  logic [1:0]       out_select,
  output logic [CNT_W-1:0] count_value
);
  logic [2:0]       ro_clk;
  logic [CNT_W-1:0] cnt [3];

  // Type 1: strongly temperature dependent, Type 2: strongly voltage
  // dependent, Type 3: mixed.
  tvm_ro #(.STAGES(9),  .STAGE_PS(185.0), .TC_PPM(2000.0), .VC_PPM(600.0))  u_ro1
    (.start(ro_start), .enable(enable), .ro_out(ro_clk[0]));
  tvm_ro #(.STAGES(11), .STAGE_PS(150.0), .TC_PPM(500.0),  .VC_PPM(2200.0)) u_ro2
    (.start(ro_start), .enable(enable), .ro_out(ro_clk[1]));
  tvm_ro #(.STAGES(7),  .STAGE_PS(240.0), .TC_PPM(1200.0), .VC_PPM(1200.0)) u_ro3
    (.start(ro_start), .enable(enable), .ro_out(ro_clk[2]));

  for (genvar i = 0; i < 3; i++) begin : g_cnt
    tvm_counter #(.CNT_W(CNT_W)) u_cnt (
      .ro_clk(ro_clk[i]), .reset(reset), .count_start(count_start), .count(cnt[i]));
  end

  always_comb begin
    unique case (out_select)
      2'd0:    count_value = cnt[0];
      2'd1:    count_value = cnt[1];
      default: count_value = cnt[2];
    endcase
  end
endmodule
