// tb_lbist_ctrl: self-checking test of the LBIST controller.
// The controller is driven through a real tap_ctrl.  The PLL clock runs at
// 300 MHz; the testbench makes `cyc_en` itself (one PLL cycle in `div`)
// and supplies a distinct signature for every domain.  Checks:
//  - the configuration register reads back what was written,
//  - Capture-DR of the seed register returns the signature of the
//    configured domain while the next seed goes in, and Update-DR
//    presents that seed,
//  - a run with chain length L and P patterns issues exactly
//    1 + P(L+1) + L release/shift requests (req_a) and P capture requests
//    (req_b), one TPG load and one RA clear (each held for one
//    test-clock period), with P(L+3) + L cycle-enable
//    periods from the first to the last request (rate check, div 1 and 3),
//  - a capture request always follows a release request by exactly one
//    cycle-enable period, with scan enable low for both,
//  - the status register reports busy, then done, and the run stops when
//    the instruction changes.
`timescale 1ps/1ps
module tb_lbist_ctrl;
  import dart_pkg::*;
  localparam int TCK_HALF = 50000, PLL_HALF = 1666, N_DOM = 12;
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo;
  logic pll_clk = 0, pll_rst_n = 0, cyc_en;
  tap_state_e state;
  tap_instr_e ir;
  logic [15:0] user_tdo;
  logic tdo_cfg, tdo_seed, tdo_run, req_a, req_b, running;
  logic scan_en, tpg_load, tpg_step, ra_clear, ra_step;
  lbist_cfg_t cfg;
  logic [SEED_W-1:0] seed;
  logic [SEED_W-1:0] sig [N_DOM];
  int div_tb = 1, dcnt = 0;
  int n_a, n_b, n_load, n_clr, n_en, t_first, t_last, last_a_en, bad_cap, bad_scan;
  bit counting;
  int checks = 0, failures = 0;

  tap_ctrl u_tap (.tck(tck), .trst_n(trst_n), .tms(tms), .tdi(tdi), .tdo(tdo),
                  .state(state), .ir(ir), .user_tdo(user_tdo));
  lbist_ctrl dut (.tstate(state), .*);
  always_comb begin
    user_tdo = '0;
    user_tdo[IR_LB_CFG]  = tdo_cfg;
    user_tdo[IR_LB_SEED] = tdo_seed;
    user_tdo[IR_LB_RUN]  = tdo_run;
  end
  initial for (int d = 0; d < N_DOM; d++) sig[d] = 32'h5100_0000 + 32'(d * 32'h0101_0101);
  always #PLL_HALF pll_clk = ~pll_clk;

  // cycle enable and request monitor
  always_ff @(posedge pll_clk) begin
    dcnt   <= (dcnt == div_tb - 1) ? 0 : dcnt + 1;
    cyc_en <= (dcnt == 0);
    if (counting) begin
      if (cyc_en) n_en++;
      if (req_a || req_b) begin
        if (t_first < 0) t_first = n_en;
        t_last = n_en;
      end
      if (req_a) begin n_a++; last_a_en = n_en; end
      if (req_b) begin
        n_b++;
        if (n_en - last_a_en != 1) bad_cap++;
      end
      if (tpg_load && !load_d) n_load++;
      if (ra_clear && !clr_d) n_clr++;
    end
  end
  // scan enable is sampled by the domain at the test-clock pulse, which
  // comes one PLL cycle after the request: it must be low for release and capture
  logic req_b_d;
  logic load_d, clr_d;
  always_ff @(posedge pll_clk) begin
    load_d  <= tpg_load;
    clr_d   <= ra_clear;
    req_b_d <= req_b;
    if (counting && req_b_d && scan_en) bad_scan++;
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

  task automatic do_run(input int dom, input int dv, input int len, input int pats);
    logic [3:0]  cap;
    logic [63:0] dout;
    lbist_cfg_t  c;
    int polls;
    bit seen_busy;
    c = '{chain_len: CHAINLEN_W'(len), patterns: PATCNT_W'(pats), shrink: SHRINK_W'(7),
          div: DIV_W'(dv), dom: DOM_W'(dom)};
    div_tb = dv;
    shift_ir(IR_LB_CFG, cap);
    shift_dr(LB_CFG_W, 64'(c), dout);
    shift_dr(LB_CFG_W, 64'(c), dout);
    chk(dout[LB_CFG_W-1:0] == LB_CFG_W'(c), "configuration read back");
    chk(cfg == c, "configuration presented");
    shift_ir(IR_LB_SEED, cap);
    shift_dr(SEED_W, 64'(32'hACE0_0000 + dom), dout);
    chk(seed == 32'hACE0_0000 + dom, "seed presented at Update-DR");
    chk(dout[SEED_W-1:0] == sig[dom], $sformatf("signature of domain %0d captured: %h", dom, dout[SEED_W-1:0]));
    n_a = 0; n_b = 0; n_load = 0; n_clr = 0; n_en = 0; t_first = -1; t_last = -1;
    bad_cap = 0; bad_scan = 0; last_a_en = -100;
    counting = 1;
    shift_ir(IR_LB_RUN, cap);
    polls = 0; seen_busy = 0;
    do begin shift_dr(2, '0, dout); polls++; seen_busy |= dout[1]; end while (!dout[0] && polls < 2000);
    chk(dout[0] && !dout[1], "status done, not busy");
    chk(running, "running while LB_RUN is selected");
    shift_ir(IR_BYPASS, cap);
    idle(3);
    counting = 0;
    chk(!running, "stops when the instruction changes");
    chk(n_a == 1 + pats * (len + 1) + len && n_b == pats,
        $sformatf("L=%0d P=%0d: %0d release/shift, %0d capture requests", len, pats, n_a, n_b));
    chk(n_load == 1 && n_clr == 1, "one TPG load and one RA clear");
    chk(t_last - t_first == pats * (len + 3) + len,
        $sformatf("div %0d: %0d cycle periods from first to last request", dv, t_last - t_first));
    chk(bad_cap == 0, "capture one test-clock period after release");
    chk(bad_scan == 0, "scan enable low at capture");
  endtask

  initial begin
    counting = 0;
    #(TCK_HALF) trst_n = 0;
    #(2 * TCK_HALF) trst_n = 1;
    pll_rst_n = 1;
    tap_reset();
    do_run(3, 1, 5, 3);
    do_run(7, 3, 20, 4);
    do_run(11, 1, 300, 2);
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
