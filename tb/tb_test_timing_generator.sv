// tb_test_timing_generator: self-checking test of the on-die clock shrink.
// With a 300 MHz PLL clock (3332 ps period) it checks
//  - cyc_en is high one PLL cycle in every `div` (div 1, 2, 3),
//  - a release request (req_a) followed div cycles later by a capture
//    request (req_b) gives two test-clock pulses whose rising edges are
//    div x 3332 - shrink x 40 ps apart, for several shrink codes,
//  - each pulse is as wide as the PLL high phase,
//  - no pulse appears without a request.
`timescale 1ps/1ps
module tb_test_timing_generator;
  import dart_pkg::*;
  localparam int HALF = 1666, PER = 2 * HALF;
  logic pll_clk = 0, rst_n = 0, req_a = 0, req_b = 0, cyc_en, test_clk;
  logic [DIV_W-1:0]    div = 1;
  logic [SHRINK_W-1:0] shrink = '0;
  time  edges [$];
  time  t_rise;
  int   widths [$];
  int checks = 0, failures = 0;

  test_timing_generator dut (.*);
  always #HALF pll_clk = ~pll_clk;
  always @(posedge test_clk) begin edges.push_back($time); t_rise = $time; end
  always @(negedge test_clk) widths.push_back(int'($time - t_rise));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #(5 * PER) rst_n = 1;
    // cyc_en rate
    for (int d = 1; d <= 3; d++) begin
      int n;
      n = 0;
      div = DIV_W'(d);
      repeat (4 * d) @(posedge pll_clk);
      for (int i = 0; i < 12 * d; i++) begin @(posedge pll_clk); #1 n += cyc_en; end
      chk(n == 12, $sformatf("div %0d: cyc_en high %0d times in %0d cycles", d, n, 12 * d));
    end
    // idle: no pulses
    edges.delete();
    repeat (10) @(posedge pll_clk);
    chk(edges.size() == 0, "no test clock without a request");
    // release/capture intervals
    for (int d = 1; d <= 2; d++) begin
      int codes [5] = '{0, 1, 10, 25, 40};
      div = DIV_W'(d);
      foreach (codes[k]) begin
        if (d == 1 && codes[k] * 40 >= HALF) continue;
        shrink = SHRINK_W'(codes[k]);
        edges.delete(); widths.delete();
        @(posedge pll_clk); req_a <= 1;
        @(posedge pll_clk); req_a <= 0;
        repeat (d - 1) @(posedge pll_clk);
        req_b <= 1;
        @(posedge pll_clk); req_b <= 0;
        repeat (4) @(posedge pll_clk);
        chk(edges.size() == 2, $sformatf("div %0d shrink %0d: %0d pulses", d, codes[k], edges.size()));
        if (edges.size() == 2)
          chk(edges[1] - edges[0] == time'(d * PER - codes[k] * 40),
              $sformatf("div %0d shrink %0d: interval %0t expected %0d", d, codes[k],
                        edges[1] - edges[0], d * PER - codes[k] * 40));
        foreach (widths[i]) chk(widths[i] == HALF, $sformatf("pulse width %0d", widths[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
