// tb_tap_ctrl: self-checking test of the IEEE 1149.1 TAP controller.
// Drives 3000 random TMS values and compares the state after every TCK
// rising edge with a reference next-state table; checks that five TMS
// highs reach Test-Logic-Reset from every state, that Capture-IR loads
// 0001 (read back while shifting), that a shifted instruction is taken on
// the TCK edge that leaves Update-IR and not before, that BYPASS is a one-bit delay from TDI to TDO, that in
// Shift-DR the user register selected by the instruction drives TDO, and
// that TRST* resets state and instruction asynchronously.
`timescale 1ps/1ps
module tb_tap_ctrl;
  import dart_pkg::*;
  localparam int TCK_HALF = 50000;
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo;
  tap_state_e state;
  tap_instr_e ir;
  logic [15:0] user_tdo = '0;
  int checks = 0, failures = 0;

  tap_ctrl dut (.*);

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

  function automatic tap_state_e ref_next(tap_state_e s, logic m);
    case (s)
      TS_RESET:    return m ? TS_RESET    : TS_IDLE;
      TS_IDLE:     return m ? TS_SEL_DR   : TS_IDLE;
      TS_SEL_DR:   return m ? TS_SEL_IR   : TS_CAP_DR;
      TS_CAP_DR:   return m ? TS_EXIT1_DR : TS_SHIFT_DR;
      TS_SHIFT_DR: return m ? TS_EXIT1_DR : TS_SHIFT_DR;
      TS_EXIT1_DR: return m ? TS_UPD_DR   : TS_PAUSE_DR;
      TS_PAUSE_DR: return m ? TS_EXIT2_DR : TS_PAUSE_DR;
      TS_EXIT2_DR: return m ? TS_UPD_DR   : TS_SHIFT_DR;
      TS_UPD_DR:   return m ? TS_SEL_DR   : TS_IDLE;
      TS_SEL_IR:   return m ? TS_RESET    : TS_CAP_IR;
      TS_CAP_IR:   return m ? TS_EXIT1_IR : TS_SHIFT_IR;
      TS_SHIFT_IR: return m ? TS_EXIT1_IR : TS_SHIFT_IR;
      TS_EXIT1_IR: return m ? TS_UPD_IR   : TS_PAUSE_IR;
      TS_PAUSE_IR: return m ? TS_EXIT2_IR : TS_PAUSE_IR;
      TS_EXIT2_IR: return m ? TS_UPD_IR   : TS_SHIFT_IR;
      default:     return m ? TS_SEL_DR   : TS_IDLE;
    endcase
  endfunction

  initial begin
    logic d;
    logic [3:0] cap;
    logic [63:0] dout;
    tap_state_e exp_s;
    int errs;
    #(TCK_HALF) trst_n = 0;
    #(2 * TCK_HALF) trst_n = 1;
    chk(state == TS_RESET && ir == IR_BYPASS, "TRST* reset");
    // random walk against the reference table
    exp_s = TS_RESET; errs = 0;
    for (int i = 0; i < 3000; i++) begin
      logic m;
      m = 1'($urandom_range(0, 1));
      tck_cycle(m, 0, d);
      exp_s = ref_next(exp_s, m);
      if (state != exp_s) errs++;
      // from the current state, five TMS highs must reach reset
      if (i % 300 == 299) begin
        repeat (5) tck_cycle(1, 0, d);
        chk(state == TS_RESET, "five TMS highs reach Test-Logic-Reset");
        exp_s = TS_RESET;
      end
    end
    chk(errs == 0, $sformatf("random walk: %0d state mismatches", errs));
    tap_reset();
    // instruction register
    shift_ir(IR_LB_SEED, cap);
    chk(cap == 4'b0001, $sformatf("Capture-IR value %b", cap));
    chk(ir == IR_LB_SEED, "instruction updated");
    // instruction changes only on Update-IR
    tck_cycle(1, 0, d); tck_cycle(1, 0, d); tck_cycle(0, 0, d); tck_cycle(0, 0, d);
    for (int i = 0; i < 4; i++) tck_cycle(i == 3, IR_MB_CFG >> i, d);
    chk(ir == IR_LB_SEED, "instruction unchanged in Exit1-IR");
    tck_cycle(1, 0, d);
    chk(ir == IR_LB_SEED, "instruction unchanged on entering Update-IR");
    tck_cycle(0, 0, d);
    chk(ir == IR_MB_CFG, "instruction taken on the edge leaving Update-IR");
    // user register routing: constant 1 on the selected index only
    user_tdo = 16'h0020;
    shift_dr(8, '0, dout);
    chk(dout[7:0] == 8'hFF, $sformatf("Shift-DR of IR 5 gives user_tdo[5]: %h", dout[7:0]));
    user_tdo = 16'hFFDF;
    shift_dr(8, '0, dout);
    chk(dout[7:0] == 8'h00, "other user outputs ignored");
    // bypass
    shift_ir(IR_BYPASS, cap);
    shift_dr(16, 64'hA5C3, dout);
    chk(dout[15:0] == 16'h4B86, $sformatf("bypass: one-bit delay, got %h", dout[15:0]));
    // asynchronous TRST*
    shift_ir(IR_LB_RUN, cap);
    tck_cycle(1, 0, d);
    #1000 trst_n = 0;
    #1000 chk(state == TS_RESET && ir == IR_BYPASS, "asynchronous TRST*");
    trst_n = 1;
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
