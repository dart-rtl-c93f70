// tb_jtag_master: self-checking test of the controller's JTAG engine.
// The engine drives a real tap_ctrl.  A 40-bit user data register on
// instruction LB_CFG (code 2) is modelled in the testbench with a fixed
// capture value.  Checks: the reset command leaves the TAP in
// Run-Test/Idle with BYPASS; an IR scan loads the instruction and returns
// the Capture-IR pattern 0001; a DR scan returns the captured value and
// loads the shifted value at Update-DR; a BYPASS scan returns the data one
// bit late; every command ends in Run-Test/Idle with TCK low; `done` pulses
// once; and the scan time is two controller clocks per TCK cycle: a DR
// scan of n bits takes 2 x (n + 5) clocks (3 TCK to reach Shift-DR, n shift
// cycles, 2 to return to Run-Test/Idle), an IR scan one TCK cycle more.
`timescale 1ps/1ps
module tb_jtag_master;
  import dart_pkg::*;
  localparam int MAXB = 64, LEN_W = 7;
  logic clk = 0, rst_n = 0, start = 0, is_ir = 0, is_reset = 0;
  logic [LEN_W-1:0] len = '0;
  logic [MAXB-1:0] wdata = '0, rdata;
  logic busy, done, tck, tms, tdi, tdo;
  tap_state_e state;
  tap_instr_e ir;
  logic [15:0] user_tdo;
  logic [39:0] ureg, usr;
  localparam logic [39:0] UCAP = 40'hC3_1234_5678;
  int checks = 0, failures = 0;

  jtag_master dut (.*);
  tap_ctrl u_tap (.tck(tck), .trst_n(rst_n), .tms(tms), .tdi(tdi), .tdo(tdo),
                  .state(state), .ir(ir), .user_tdo(user_tdo));
  always #20000 clk = ~clk;

  // testbench user register
  always_ff @(posedge tck) begin
    if (ir == IR_LB_CFG) begin
      if (state == TS_CAP_DR)   usr  <= UCAP;
      if (state == TS_SHIFT_DR) usr  <= {tdi, usr[39:1]};
      if (state == TS_UPD_DR)   ureg <= usr;
    end
  end
  always_comb begin user_tdo = '0; user_tdo[IR_LB_CFG] = usr[0]; end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic cmd(input bit ir_c, input bit rs, input int n, input logic [63:0] w, output int cyc);
    int dones;
    @(negedge clk);
    chk(!busy, "idle before command");
    start = 1; is_ir = ir_c; is_reset = rs; len = LEN_W'(n); wdata = w;
    @(negedge clk); start = 0;
    cyc = 1; dones = 0;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
    dones = done;
    @(negedge clk); dones += done;
    chk(dones == 1, "done pulses once");
    chk(state == TS_IDLE && tck == 0, $sformatf("ends in Run-Test/Idle with TCK low (state %0d)", state));
  endtask

  initial begin
    int c_rst, c_ir, c_dr8, c_dr40, c_dr;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cmd(0, 1, 0, '0, c_rst);
    chk(ir == IR_BYPASS, "reset command selects BYPASS");
    cmd(1, 0, 4, 64'(IR_LB_CFG), c_ir);
    chk(ir == IR_LB_CFG, "IR scan loads instruction");
    chk(rdata[3:0] == 4'b0001, $sformatf("IR capture %b", rdata[3:0]));
    cmd(0, 0, 40, 64'hAB_CDEF_0123, c_dr40);
    chk(rdata[39:0] == UCAP, $sformatf("DR capture %h", rdata[39:0]));
    chk(ureg == 40'hAB_CDEF_0123, $sformatf("DR update %h", ureg));
    cmd(1, 0, 4, 64'(IR_BYPASS), c_ir);
    cmd(0, 0, 8, 64'h5A, c_dr8);
    chk(rdata[7:0] == 8'hB4, $sformatf("bypass scan %h", rdata[7:0]));
    cmd(0, 0, 64, 64'hFEDC_BA98_7654_3210, c_dr);
    chk(rdata == 64'hFDB9_7530_ECA8_6420, $sformatf("64-bit bypass scan %h", rdata));
    chk(c_dr40 == 2 * (40 + 5) + 2 && c_dr8 == 2 * (8 + 5) + 2,
        $sformatf("DR scan clocks: 8 bits %0d, 40 bits %0d", c_dr8, c_dr40));
    chk(c_ir == c_dr8 - 2 * 4 + 2, $sformatf("IR scan clocks %0d", c_ir));
    chk(c_rst == 2 * 6 + 2, $sformatf("reset clocks %0d", c_rst));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1s;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
