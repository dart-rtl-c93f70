// tb_ttg_delay_line: self-checking test of the buffer delay line.
// For a set of tap selections it sends a 1.6 ns pulse (about half a
// 300 MHz PLL period) and measures the delay of both edges at the output;
// each must be sel x 40 ps exactly, and the pulse width must be kept.
`timescale 1ps/1ps
module tb_ttg_delay_line;
  localparam int TAPS = 64, UNIT_PS = 40;
  logic in = 0, out;
  logic [5:0] sel = '0;
  time t_in_r, t_in_f, t_out_r, t_out_f;
  int checks = 0, failures = 0;

  ttg_delay_line dut (.*);

  always @(posedge out) t_out_r = $time;
  always @(negedge out) t_out_f = $time;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int sels [6] = '{0, 1, 2, 17, 40, 63};
    foreach (sels[k]) begin
      sel = 6'(sels[k]);
      #5000;
      t_out_r = 0; t_out_f = 0;
      in = 1; t_in_r = $time;
      #1666 in = 0; t_in_f = $time;
      #5000;
      chk(t_out_r - t_in_r == time'(sels[k] * UNIT_PS),
          $sformatf("sel %0d rising delay %0t", sels[k], t_out_r - t_in_r));
      chk(t_out_f - t_in_f == time'(sels[k] * UNIT_PS),
          $sformatf("sel %0d falling delay %0t", sels[k], t_out_f - t_in_f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
