// test_timing_generator: variable test timing generator (on-die clock shrink).
//
// Makes the test clock of the domain under test from the PLL clock without
// changing the PLL frequency.  A divider gives `cyc_en`, high for one PLL
// cycle in every `div` (div = 0 counts as 1): the clock configuration of
// the domain.  A request from the LBIST controller (`req_a` or `req_b`) is
// taken on the falling PLL edge and gates the next high phase of the PLL
// clock into a pulse: path A carries scan and release pulses, path B the
// capture pulse.  Path A is delayed by the full buffer chain, TAPS-1
// units; path B by TAPS-1-shrink units, so the capture edge arrives
// `shrink` x UNIT_PS earlier and the release-to-capture interval is
// div x T_pll - shrink x UNIT_PS.  The two paths are ORed into `test_clk`.
// The pulses stay separate as long as shrink x UNIT_PS is below half a PLL
// period at div = 1; a larger code merges them and the test fails, which
// the timing search treats as any other failure.  The buffer chain
// (UNIT_PS = 40 ps) follows the document; the gating, the two-path
// arrangement and the chain length are this design's.  The full chain
// delay must stay below one PLL period (63 x 40 ps = 2.52 ns < 3.33 ns).
`timescale 1ps/1ps
module test_timing_generator
  import dart_pkg::*;
#(
  parameter int TAPS    = 64,
  parameter int UNIT_PS = 40
) (
  input  logic                pll_clk,
  input  logic                rst_n,
  input  logic [DIV_W-1:0]    div,
  input  logic [SHRINK_W-1:0] shrink,
  input  logic                req_a,
  input  logic                req_b,
  output logic                cyc_en,
  output logic                test_clk
);
  localparam int SEL_W = $clog2(TAPS);
  logic [DIV_W-1:0] dcnt;
  logic             en_a, en_b, g_a, g_b, d_a, d_b;
  logic [SEL_W-1:0] sel_a, sel_b;

  always_ff @(posedge pll_clk or negedge rst_n) begin
    if (!rst_n) begin
      dcnt <= '0; cyc_en <= 1'b0;
    end else begin
      if (dcnt == '0) dcnt <= (div == '0) ? '0 : div - 1'b1;
      else            dcnt <= dcnt - 1'b1;
      cyc_en <= (dcnt == '0);
    end
  end

  // clock gating: enables change only while the PLL clock is low
  always_ff @(negedge pll_clk or negedge rst_n) begin
    if (!rst_n) begin en_a <= 1'b0; en_b <= 1'b0; end
    else        begin en_a <= req_a; en_b <= req_b; end
  end

  assign g_a   = pll_clk & en_a;
  assign g_b   = pll_clk & en_b;
  assign sel_a = SEL_W'(TAPS - 1);
  assign sel_b = SEL_W'(TAPS - 1) - SEL_W'(shrink);

  ttg_delay_line #(.TAPS(TAPS), .UNIT_PS(UNIT_PS)) u_dl_a (.in(g_a), .sel(sel_a), .out(d_a));
  ttg_delay_line #(.TAPS(TAPS), .UNIT_PS(UNIT_PS)) u_dl_b (.in(g_b), .sel(sel_b), .out(d_b));

  assign test_clk = d_a | d_b;
endmodule
