// tb_mbist_ctrl: self-checking test of the memory BIST controller.
// The controller is driven through a real tap_ctrl, exactly as the DART
// controller does: shift the configuration (algorithm, first and last
// address), select MB_RUN and poll the {fail, done} status until done.
// The memory under test is sram_sp with 1024 words plus a fault injector
// in the testbench that can make one bit of one word stuck at 0 or 1.
// Checks: a good memory passes both algorithms; the number of reads and
// writes is exactly 2N/3N for MATS+ and 5N/5N for March C- over N words;
// the run takes about 12N and 25N clocks; every access stays inside the
// test group; a stuck-at-1 and a stuck-at-0 cell inside the group are
// reported as fail, a fault outside the group is not; the configuration
// register reads back what was written.
`timescale 1ps/1ps
module tb_mbist_ctrl;
  import dart_pkg::*;
  localparam int TCK_HALF = 50000, AW = 10, DW = 32;
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo;
  logic clk = 0, rst_n = 0;
  tap_state_e state;
  tap_instr_e ir;
  logic [15:0] user_tdo;
  logic tdo_cfg, tdo_run, active, mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata, raw_rdata;
  // fault injector
  int   f_addr = -1, f_bit = 0;
  logic f_val = 0;
  logic [AW-1:0] last_addr;
  int   n_rd, n_wr, n_act, n_out;
  int   lo, hi;
  int checks = 0, failures = 0;

  tap_ctrl u_tap (.tck(tck), .trst_n(trst_n), .tms(tms), .tdi(tdi), .tdo(tdo),
                  .state(state), .ir(ir), .user_tdo(user_tdo));
  mbist_ctrl #(.AW(AW), .DW(DW)) dut (.tstate(state), .*);
  sram_sp #(.WORDS(1 << AW), .DW(DW)) u_mem (.clk(clk), .en(mem_en), .we(mem_we), .addr(mem_addr),
                                             .wdata(mem_wdata), .rdata(raw_rdata));
  always_comb begin
    user_tdo = '0;
    user_tdo[IR_MB_CFG] = tdo_cfg;
    user_tdo[IR_MB_RUN] = tdo_run;
    mem_rdata = raw_rdata;
    if (int'(last_addr) == f_addr) mem_rdata[f_bit] = f_val;
  end
  always #20000 clk = ~clk;
  always_ff @(posedge clk) begin
    if (mem_en) begin
      last_addr <= mem_addr;
      if (mem_we) n_wr++; else n_rd++;
      if (int'(mem_addr) < lo || int'(mem_addr) > hi) n_out++;
    end
    if (active) n_act++;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  // ---- JTAG driver: TMS/TDI change while TCK is low, TDO sampled before the rising edge
  task automatic tck_cycle(input logic tms_v, input logic tdi_v, output logic tdo_v);
    tms = tms_v; tdi = tdi_v;
    #(TCK_HALF) tdo_v = tdo; tck = 1;
    #(TCK_HALF) tck = 0;
  endtask
  task automatic tap_reset();
    logic d;
    repeat (5) tck_cycle(1, 0, d);
    tck_cycle(0, 0, d);                       // Run-Test/Idle
  endtask
  task automatic shift_ir(input logic [3:0] v, output logic [3:0] cap);
    logic d;
    tck_cycle(1, 0, d); tck_cycle(1, 0, d); tck_cycle(0, 0, d); tck_cycle(0, 0, d);
    for (int i = 0; i < 4; i++) tck_cycle(i == 3, v[i], cap[i]);
    tck_cycle(1, 0, d); tck_cycle(0, 0, d);   // Update-IR, Run-Test/Idle
  endtask
  task automatic shift_dr(input int n, input logic [63:0] v, output logic [63:0] cap);
    logic d;
    cap = '0;
    tck_cycle(1, 0, d); tck_cycle(0, 0, d); tck_cycle(0, 0, d);
    for (int i = 0; i < n; i++) tck_cycle(i == n - 1, v[i], cap[i]);
    tck_cycle(1, 0, d); tck_cycle(0, 0, d);   // Update-DR, Run-Test/Idle
  endtask
  task automatic idle(input int n);
    logic d;
    repeat (n) tck_cycle(0, 0, d);
  endtask

  task automatic run_group(input mbist_alg_e alg, input int first, input int last,
                           output logic fail);
    logic [3:0]  cap;
    logic [63:0] dout;
    int polls;
    lo = first; hi = last;
    shift_ir(IR_MB_CFG, cap);
    shift_dr(MB_CFG_W, 64'({alg, 16'(last), 16'(first)}), dout);
    shift_dr(MB_CFG_W, 64'({alg, 16'(last), 16'(first)}), dout);
    chk(dout[MB_CFG_W-1:0] == MB_CFG_W'({alg, 16'(last), 16'(first)}), "configuration read back");
    n_rd = 0; n_wr = 0; n_act = 0; n_out = 0;
    shift_ir(IR_MB_RUN, cap);
    polls = 0;
    do begin idle(20); shift_dr(2, '0, dout); polls++; end while (!dout[0] && polls < 2000);
    chk(dout[0], "run finished");
    fail = dout[1];
    shift_ir(IR_BYPASS, cap);
    idle(4);
    chk(n_out == 0, "accesses stay inside the group");
  endtask

  initial begin
    logic fail;
    int n;
    #(TCK_HALF) trst_n = 0;
    #(2 * TCK_HALF) trst_n = 1;
    rst_n = 1;
    tap_reset();
    n = 256;
    run_group(ALG_MATS_PLUS, 0, n - 1, fail);
    chk(!fail, "MATS+ passes a good memory");
    chk(n_rd == 2 * n && n_wr == 3 * n, $sformatf("MATS+ reads %0d writes %0d", n_rd, n_wr));
    chk(n_act >= 11 * n && n_act <= 13 * n, $sformatf("MATS+ takes %0d clocks for %0d words", n_act, n));
    run_group(ALG_MARCH_CM, 256, 256 + n - 1, fail);
    chk(!fail, "March C- passes a good memory");
    chk(n_rd == 5 * n && n_wr == 5 * n, $sformatf("March C- reads %0d writes %0d", n_rd, n_wr));
    chk(n_act >= 24 * n && n_act <= 26 * n, $sformatf("March C- takes %0d clocks for %0d words", n_act, n));
    f_addr = 100; f_bit = 3; f_val = 1;
    run_group(ALG_MATS_PLUS, 0, 255, fail);
    chk(fail, "MATS+ finds a stuck-at-1 cell");
    f_addr = 700; f_bit = 31; f_val = 0;
    run_group(ALG_MARCH_CM, 512, 1023, fail);
    chk(fail, "March C- finds a stuck-at-0 cell");
    run_group(ALG_MARCH_CM, 0, 511, fail);
    chk(!fail, "fault outside the group is not reported");
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
