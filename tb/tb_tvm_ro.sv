// tb_tvm_ro: self-checking test of the ring-oscillator model.
// Checks that the output is a steady 1 while disabled, that it oscillates
// with a period of 2 x STAGES x STAGE_PS (3330 ps, about 300 MHz) when
// started, that heating it by 50 C lengthens the period by the modelled
// 2000 ppm/C x 50 C (10 %), that a 100 mV lower supply lengthens it by
// 600 ppm/mV x 100 mV (6 %), and that it stops when `enable` drops.
`timescale 1ps/1ps
module tb_tvm_ro;
  logic start = 0, enable = 0, ro_out;
  time  t_last, per;
  int   n_edges;
  int checks = 0, failures = 0;

  tvm_ro #(.STAGES(9), .STAGE_PS(185.0), .TC_PPM(2000.0), .VC_PPM(600.0)) dut (.*);

  always @(posedge ro_out) begin
    if (n_edges > 0) per = $time - t_last;
    t_last = $time;
    n_edges++;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic measure(output real p);
    n_edges = 0;
    start = 1; enable = 1;
    #200000;
    p = real'(per);
    start = 0;
    #20000;
  endtask

  initial begin
    real p0, pt, pv;
    #100 n_edges = 0;
    #50000;
    chk(ro_out === 1'b1 && n_edges == 0, "steady 1 while disabled");
    measure(p0);
    chk(p0 > 3320.0 && p0 < 3340.0, $sformatf("nominal period %0.1f ps", p0));
    dut.delta_t_c = 50.0;
    measure(pt);
    chk(pt / p0 > 1.095 && pt / p0 < 1.105, $sformatf("+50 C period ratio %0.4f", pt / p0));
    dut.delta_t_c = 0.0;
    dut.delta_v_mv = -100.0;
    measure(pv);
    chk(pv / p0 > 1.055 && pv / p0 < 1.065, $sformatf("-100 mV period ratio %0.4f", pv / p0));
    // enable low stops it
    start = 1; enable = 1;
    #20000 enable = 0;
    #10000 n_edges = 0;
    #50000 chk(n_edges == 0 && ro_out === 1'b1, "stopped by enable");
    start = 0;
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
