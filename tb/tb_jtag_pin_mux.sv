// tb_jtag_pin_mux: exhaustive test of the JTAG pin multiplexer.
// Applies every combination of the two select inputs and of the pin-side,
// controller-side and TAP-side signals and checks the routing: the DART
// controller owns the TAP only when it asks for it and DRTPIN is low.
`timescale 1ps/1ps
module tb_jtag_pin_mux;
  logic force_pins, dart_sel;
  logic pin_tck, pin_tms, pin_tdi, pin_trst_n, pin_tdo;
  logic ctl_tck, ctl_tms, ctl_tdi, ctl_trst_n, ctl_tdo;
  logic tap_tck, tap_tms, tap_tdi, tap_trst_n, tap_tdo;
  int checks = 0, failures = 0;

  jtag_pin_mux dut (.*);

  initial begin
    for (int v = 0; v < 1024; v++) begin
      {force_pins, dart_sel, pin_tck, pin_tms, pin_tdi, pin_trst_n,
       ctl_tck, ctl_tms, ctl_tdi, ctl_trst_n} = 10'(v);
      for (int t = 0; t < 2; t++) begin
        logic ctl;
        tap_tdo = 1'(t);
        #10;
        ctl = dart_sel && !force_pins;
        checks++;
        if ({tap_tck, tap_tms, tap_tdi, tap_trst_n} !==
              (ctl ? {ctl_tck, ctl_tms, ctl_tdi, ctl_trst_n} : {pin_tck, pin_tms, pin_tdi, pin_trst_n})
            || pin_tdo !== (ctl ? 1'b0 : tap_tdo) || ctl_tdo !== (ctl ? tap_tdo : 1'b0)) begin
          failures++;
          $display("FAIL: routing for input %b tdo %b", 10'(v), tap_tdo);
        end
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
