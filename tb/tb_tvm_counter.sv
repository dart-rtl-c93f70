// tb_tvm_counter: self-checking test of the RO cycle counter.
// Drives ro_clk at 3000 ps and opens count_start windows of known length:
// the count must equal the number of ro_clk edges in the window to within
// the two-flop synchroniser (0..2 cycles short).  Also checks the
// asynchronous reset, that the count holds when the window closes and when
// ro_clk stops, and saturation at all ones with a fast clock.
`timescale 1ps/1ps
module tb_tvm_counter;
  localparam int CNT_W = 16;
  logic ro_clk = 1, reset = 1, count_start = 0;
  logic [CNT_W-1:0] count;
  int   per = 3000;
  bit   run = 1;
  int checks = 0, failures = 0;

  tvm_counter dut (.*);
  always begin
    if (run) begin #(per / 2) ro_clk = ~ro_clk; end
    else     #1000;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int wins [3] = '{300, 1000, 5000};   // windows in ro_clk periods
    #10000 reset = 0;
    foreach (wins[k]) begin
      reset = 1; #1000 reset = 0;
      chk(count == 0, "reset clears");
      #7000 count_start = 1;
      #(wins[k] * per) count_start = 0;
      #(4 * per);
      chk(int'(count) <= wins[k] && int'(count) >= wins[k] - 2,
          $sformatf("window %0d cycles: count %0d", wins[k], count));
      begin
        logic [CNT_W-1:0] held;
        held = count;
        #(20 * per) chk(count == held, "holds after window");
      end
    end
    // saturation
    reset = 1; #1000 reset = 0;
    per = 100;
    count_start = 1;
    #(70000 * 100) count_start = 0;
    #1000 chk(count == '1, $sformatf("saturates, count %0d", count));
    reset = 1; #10 chk(count == 0, "asynchronous reset");
    reset = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
