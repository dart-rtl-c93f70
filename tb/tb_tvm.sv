// tb_tvm: self-checking test of one TVM (three ring oscillators and their
// counters).  Runs the measurement sequence used by the DART controller
// (reset, start the rings, open a 1 us counting window, stop, read the
// three counters through out_select) at nominal conditions, then heated by
// 40 C and then with the supply 100 mV low.  Checks the nominal counts
// against 1 us / RO period, and the direction and relative size of every
// change: RO type 1 is the most temperature sensitive, type 2 the most
// voltage sensitive.  Also checks that a disabled TVM counts nothing.
`timescale 1ps/1ps
module tb_tvm;
  localparam int CNT_W = 16;
  logic reset = 1, count_start = 0, ro_start = 0, enable = 0;
  logic [1:0] out_select = 0;
  logic [CNT_W-1:0] count_value;
  int checks = 0, failures = 0;

  tvm dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic measure(input bit en, output int f [3]);
    enable = en; reset = 1; #10000 reset = 0;
    ro_start = 1; #10000 count_start = 1;
    #1000000 count_start = 0;
    #20000 ro_start = 0; #10000;
    for (int i = 0; i < 3; i++) begin out_select = 2'(i); #10 f[i] = int'(count_value); end
    enable = 0;
  endtask

  function automatic set_env(real t, real v);
    dut.u_ro1.delta_t_c = t; dut.u_ro1.delta_v_mv = v;
    dut.u_ro2.delta_t_c = t; dut.u_ro2.delta_v_mv = v;
    dut.u_ro3.delta_t_c = t; dut.u_ro3.delta_v_mv = v;
  endfunction

  initial begin
    int f0 [3], ft [3], fv [3], fo [3];
    real nom [3] = '{1.0e6 / 3330.0, 1.0e6 / 3300.0, 1.0e6 / 3360.0};
    real rt [3], rv [3];
    #10000;
    measure(1, f0);
    for (int i = 0; i < 3; i++)
      chk(real'(f0[i]) > nom[i] - 4.0 && real'(f0[i]) <= nom[i] + 1.0,
          $sformatf("RO%0d nominal count %0d, expected about %0.1f", i + 1, f0[i], nom[i]));
    set_env(40.0, 0.0);
    measure(1, ft);
    set_env(0.0, -100.0);
    measure(1, fv);
    set_env(0.0, 0.0);
    for (int i = 0; i < 3; i++) begin
      rt[i] = real'(f0[i] - ft[i]) / real'(f0[i]);
      rv[i] = real'(f0[i] - fv[i]) / real'(f0[i]);
      chk(ft[i] < f0[i] && fv[i] < f0[i], $sformatf("RO%0d slows when hot or at low supply", i + 1));
    end
    chk(rt[0] > rt[2] && rt[2] > rt[1], "temperature sensitivity order RO1 > RO3 > RO2");
    chk(rv[1] > rv[2] && rv[2] > rv[0], "voltage sensitivity order RO2 > RO3 > RO1");
    measure(0, fo);
    chk(fo[0] == 0 && fo[1] == 0 && fo[2] == 0, "disabled TVM does not count");
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
