// tb_dart_top: end-to-end test of dart_top with every top parameter at its
// default.
//
// Two user clock domains are modelled with scan_domain_model: domain 0 at
// the PLL rate (divider 1) with a 2.0 ns slow path, domain 2 at half rate
// (divider 2) with a 6.0 ns slow path.  The processor side is played by the
// testbench through the host port: it writes a test specification whose
// signatures it computes itself with an independent model of TPG, scan
// domain and MISR, seeds the log with a previous timing, starts DART and
// checks the log afterwards.  With a 3332 ps PLL period and 40 ps steps the
// shortest passing interval is reached at shrink 33 for domain 0
// (3332 - 40k > 2000) and 16 for domain 2 (6664 - 40k > 6000).
// Sessions: LBIST (timing search in both directions, TVM characterisation),
// LBIST again after aging domain 0 by 200 ps and heating the TVMs by 20 C,
// MBIST with two test groups, and a production-test check with DRTPIN
// high.  CL and NPAT set the scan chain length and the patterns per seed
// written into the specification.
`timescale 1ps/1ps
module tb_dart_top #(
  parameter int CL   = 24,
  parameter int NPAT = 8
);
  import dart_pkg::*;
  localparam int N_DOM    = 12;
  localparam int CHAINS   = 4;
  localparam int CLK_HALF = 20000;   // 25 MHz DART clock
  localparam int PLL_HALF = 1666;    // 300 MHz PLL clock
  localparam int PATH0    = 2000;
  localparam int PATH2    = 6000;

  logic clk = 0, pll_clk = 0, rst_n = 0, drtpin = 0, drtstart = 0;
  dart_menu_e menu = MENU_LBIST;
  dart_mode_e mode;
  logic chip_reset;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 0, tdo;
  logic host_en = 0, host_we = 0;
  logic [DMEM_AW-1:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic umem_en = 0, umem_we = 0;
  logic [9:0] umem_addr = '0;
  logic [31:0] umem_wdata = '0, umem_rdata;
  logic [N_DOM-1:0] test_clk;
  logic scan_en;
  logic [CHAINS-1:0] scan_in [N_DOM];
  logic [CHAINS-1:0] scan_out [N_DOM];
  logic [CHAINS-1:0] so0, so2;

  always #CLK_HALF clk = ~clk;
  always #PLL_HALF pll_clk = ~pll_clk;

  dart_top dut (
    .clk, .pll_clk, .rst_n, .drtpin, .drtstart, .menu, .mode, .chip_reset,
    .tck, .tms, .tdi, .trst_n, .tdo,
    .host_en, .host_we, .host_addr, .host_wdata, .host_rdata,
    .umem_en, .umem_we, .umem_addr, .umem_wdata, .umem_rdata,
    .test_clk, .scan_en, .scan_in, .scan_out);

  scan_domain_model #(.CHAINS(CHAINS), .LEN(CL), .PATH_PS(PATH0)) cut0 (
    .clk(test_clk[0]), .scan_en, .scan_in(scan_in[0]), .scan_out(so0));
  scan_domain_model #(.CHAINS(CHAINS), .LEN(CL), .PATH_PS(PATH2)) cut2 (
    .clk(test_clk[2]), .scan_en, .scan_in(scan_in[2]), .scan_out(so2));

  always_comb
    for (int d = 0; d < N_DOM; d++)
      scan_out[d] = (d == 0) ? so0 : (d == 2) ? so2 : '0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- reference model
  function automatic logic [31:0] lfsr_next(input logic [31:0] l);
    return {l[30:0], l[31] ^ l[21] ^ l[1] ^ l[0]};
  endfunction

  function automatic logic [31:0] golden_sig(input logic [31:0] seed, input int len, input int pats);
    bit s [CHAINS][512];
    bit n [CHAINS][512];
    logic [31:0] l = seed, m = '0, mn;
    bit si [CHAINS];
    for (int c = 0; c < CHAINS; c++) for (int j = 0; j < len; j++) s[c][j] = 0;
    for (int p = 0; p <= pats; p++) begin
      for (int i = 0; i < len; i++) begin
        for (int c = 0; c < CHAINS; c++)
          si[c] = l[c % 32] ^ l[(2 * c + 11) % 32] ^ l[(4 * c + 21) % 32];
        if (p > 0) begin
          mn = {m[30:0], m[31] ^ m[21] ^ m[1] ^ m[0]};
          for (int c = 0; c < CHAINS; c++) mn[c] ^= s[c][len-1];
          m = mn;
        end
        for (int c = 0; c < CHAINS; c++) begin
          for (int j = len - 1; j > 0; j--) s[c][j] = s[c][j-1];
          s[c][0] = si[c];
        end
        l = lfsr_next(l);
      end
      if (p == pats) break;
      repeat (2) begin   // release and capture
        for (int c = 0; c < CHAINS; c++)
          for (int j = 0; j < len; j++)
            n[c][j] = s[c][(j + 1) % len] ^ s[(c + 1) % CHAINS][j];
        s = n;
      end
    end
    return m;
  endfunction

  // ---------------------------------------------------------------- host port
  task automatic host_wr(input int a, input logic [31:0] d);
    @(negedge clk); host_en = 1; host_we = 1; host_addr = DMEM_AW'(a); host_wdata = d;
    @(negedge clk); host_en = 0; host_we = 0;
  endtask
  task automatic host_rd(input int a, output logic [31:0] d);
    @(negedge clk); host_en = 1; host_we = 0; host_addr = DMEM_AW'(a);
    @(negedge clk); host_en = 0; d = host_rdata;
  endtask
  task automatic umem_wr(input int a, input logic [31:0] d);
    @(negedge clk); umem_en = 1; umem_we = 1; umem_addr = 10'(a); umem_wdata = d;
    @(negedge clk); umem_en = 0; umem_we = 0;
  endtask
  task automatic umem_rd(input int a, output logic [31:0] d);
    @(negedge clk); umem_en = 1; umem_we = 0; umem_addr = 10'(a);
    @(negedge clk); umem_en = 0; d = umem_rdata;
  endtask

  // runs one DART session, returns the number of DART clocks it took
  int chip_resets = 0;
  always @(posedge chip_reset) chip_resets++;
  task automatic run_session(input dart_menu_e m, output int cycles);
    int c = 0;
    @(negedge clk); menu = m; drtstart = 1;
    @(negedge clk); drtstart = 0;
    check(mode == ((m == MENU_LBIST) ? MODE_LBIST : MODE_MBIST), "mode entered");
    while (!chip_reset) begin @(negedge clk); c++; end
    while (chip_reset) @(negedge clk);
    check(mode == MODE_IDLE, "back to user mode after chip reset");
    cycles = c;
  endtask

  // ---------------------------------------------------------------- mechanism monitors
  // domains without a test must never see a test clock pulse
  int stray_pulses = 0;
  for (genvar d = 0; d < N_DOM; d++) begin : g_stray
    if (d != 0 && d != 2) begin : g_m
      always @(posedge test_clk[d]) stray_pulses++;
    end
  end
  int n_trial_pass = 0, n_trial_fail = 0, n_capture = 0;
  logic [7:0] prev_trials = 0;
  always @(posedge clk) begin
    prev_trials <= dut.u_ctrl.trials;
    if (dut.u_ctrl.trials == prev_trials + 8'd1) begin
      if (dut.u_ctrl.trial_pass) n_trial_pass++; else n_trial_fail++;
    end
  end
  always @(posedge dut.u_lbist.req_b) n_capture++;

  `define SET_TV(T) \
    dut.g_tvm[T].u_tvm.u_ro1.delta_t_c = dtc; dut.g_tvm[T].u_tvm.u_ro2.delta_t_c = dtc; \
    dut.g_tvm[T].u_tvm.u_ro3.delta_t_c = dtc;

  // ---------------------------------------------------------------- JTAG pins
  task automatic pin_tck(input logic tms_v, input logic tdi_v, output logic tdo_v);
    tms = tms_v; tdi = tdi_v; #50000;
    tdo_v = tdo; tck = 1; #50000; tck = 0;
  endtask

  // ---------------------------------------------------------------- main
  logic [31:0] seeds [4] = '{32'h1234_5678, 32'h9ABC_DEF1, 32'h0F0F_3C3C, 32'hCAFE_F00D};
  logic [31:0] sigs [4];
  int n_dec = 0, n_inc = 0, n_char = 0, n_tv = 0, n_mb = 0, n_prot = 0, n_prod = 0, n_aging = 0;

  initial begin
    logic [31:0] w, w2;
    int cyc, a;
    real dtc;
    #100000 rst_n = 1; trst_n = 1;
    repeat (4) @(negedge clk);

    // reference signatures
    sigs[0] = golden_sig(seeds[0], CL, NPAT);
    sigs[1] = golden_sig(seeds[1], CL, NPAT);
    sigs[2] = golden_sig(seeds[2], CL, NPAT / 2);
    sigs[3] = golden_sig(seeds[3], CL, NPAT);

    // clear the log region
    for (int i = LOG_BASE; i < LOG_BASE + 128; i++) host_wr(i, 0);
    // LBIST specification
    a = 0;
    host_wr(a++, 2);
    host_wr(a++, 0 | (1 << 4) | (CL << 8) | (2 << 18));        // domain 0, div 1, 2 menus
    host_wr(a++, NPAT | (2 << 16));                            // menu 0: 2 seeds
    host_wr(a++, seeds[0]); host_wr(a++, sigs[0]);
    host_wr(a++, seeds[1]); host_wr(a++, sigs[1]);
    host_wr(a++, (NPAT / 2) | (1 << 16));                      // menu 1: 1 seed
    host_wr(a++, seeds[2]); host_wr(a++, sigs[2]);
    host_wr(a++, 2 | (2 << 4) | (CL << 8) | (1 << 18));        // domain 2, div 2, 1 menu
    host_wr(a++, NPAT | (1 << 16));
    host_wr(a++, seeds[3]); host_wr(a++, sigs[3]);
    // last timings from an earlier test
    host_wr(LOG_TIMING + 0, 32'h8000_0000 | 31);
    host_wr(LOG_TIMING + 2, 32'h8000_0000 | 19);
    // user memory word outside the MBIST range
    umem_wr(900, 32'h0000_1234);

    // ------------------------------------------------ session 1: LBIST
    fork
      run_session(MENU_LBIST, cyc);
      begin   // writes attempted while DART runs must be blocked
        repeat (50) @(negedge clk);
        umem_wr(900, 32'hDEAD_BEEF);
        host_wr(5, 32'hFFFF_FFFF);
      end
    join
    $display("LBIST session 1: %0d DART clocks", cyc);
    host_rd(LOG_TIMING + 0, w); check(w == (32'h8000_0000 | 33), $sformatf("dom0 min timing %h", w));
    host_rd(LOG_TIMING + 2, w); check(w == (32'h8000_0000 | 16), $sformatf("dom2 min timing %h", w));
    host_rd(LOG_DRES + 0, w);
    check(w[31] && w[30] && w[23:16] == 4 && w[5:0] == 33, $sformatf("dom0 result %h", w));
    if (w[23:16] > 1) n_dec++;
    host_rd(LOG_DRES + 2, w);
    check(w[31] && w[30] && w[23:16] == 4 && w[5:0] == 16, $sformatf("dom2 result %h", w));
    if (w[23:16] > 1) n_inc++;
    host_rd(LOG_STATUS, w); check(w == 32'(MODE_LBIST), $sformatf("status %h", w));
    for (int i = 0; i < 15; i++) begin
      host_rd(LOG_F0 + i, w); host_rd(LOG_F + i, w2);
      check(w > 2500 && w < 3700 && w == w2, $sformatf("characterisation count %0d: %0d %0d", i, w, w2));
      if (w != 0) n_char++;
    end
    for (int t = 0; t < 5; t++) begin
      host_rd(LOG_TV + 3 * t, w);
      check($signed(w) > -256 && $signed(w) < 256, $sformatf("dT at reference %0d", $signed(w)));
    end
    umem_rd(900, w); check(w == 32'h0000_1234, "user memory write blocked during DART");
    host_rd(5, w2); check(w2 == seeds[1], "DART memory host write blocked during DART");
    if (w == 32'h0000_1234 && w2 == seeds[1]) n_prot++;

    // ------------------------------------------------ session 2: aging + heat
    cut0.path_ps = PATH0 + 200;
    dtc = 20.0;
    `SET_TV(0) `SET_TV(1) `SET_TV(2) `SET_TV(3) `SET_TV(4)
    run_session(MENU_LBIST, cyc);
    $display("LBIST session 2: %0d DART clocks", cyc);
    host_rd(LOG_TIMING + 0, w); check(w == (32'h8000_0000 | 28), $sformatf("aged dom0 min timing %h", w));
    if (w[5:0] < 33) n_aging++;
    host_rd(LOG_DRES + 0, w); check(w[23:16] == 6, $sformatf("aged dom0 trials %0d", w[23:16]));
    host_rd(LOG_TIMING + 2, w); check(w == (32'h8000_0000 | 16), $sformatf("dom2 unchanged %h", w));
    for (int t = 0; t < 5; t++) begin
      host_rd(LOG_TV + 3 * t, w); host_rd(LOG_TV + 3 * t + 1, w2);
      $display("TVM %0d: dT = %0.2f C, dV = %0.2f mV", t, $itor($signed(w)) / 256.0, $itor($signed(w2)) / 256.0);
      check($signed(w) > 17 * 256 && $signed(w) < 23 * 256, "dT within 3 C of +20 C");
      check($signed(w2) > -15 * 256 && $signed(w2) < 15 * 256, "dV within 15 mV of 0");
      n_tv++;
    end

    // ------------------------------------------------ session 3: MBIST
    a = 0;
    host_wr(a++, 2);
    host_wr(a++, 32'(ALG_MATS_PLUS)); host_wr(a++, (63 << 16) | 0);
    host_wr(a++, 32'(ALG_MARCH_CM));  host_wr(a++, (191 << 16) | 64);
    run_session(MENU_MBIST, cyc);
    $display("MBIST session: %0d DART clocks", cyc);
    host_rd(LOG_MRES + 0, w); check(w == 32'h1, $sformatf("MBIST group 0 %h", w));
    host_rd(LOG_MRES + 1, w); check(w == 32'h1, $sformatf("MBIST group 1 %h", w));
    if (w == 32'h1) n_mb++;
    umem_rd(100, w); check(w == 32'h0, "March C- leaves zeros");
    umem_rd(900, w); check(w == 32'h0000_1234, "word outside the groups untouched");

    // ------------------------------------------------ production test: pins own the TAP
    drtpin = 1;
    @(negedge clk); drtstart = 1; @(negedge clk); drtstart = 0;
    repeat (3) @(negedge clk);
    check(mode == MODE_IDLE, "DRTSTART ignored with DRTPIN high");
    begin
      logic b;
      logic [3:0] cap;
      repeat (5) pin_tck(1, 0, b);
      pin_tck(0, 0, b);                 // Run-Test/Idle
      pin_tck(1, 0, b); pin_tck(1, 0, b); pin_tck(0, 0, b); pin_tck(0, 0, b);  // Shift-IR
      for (int i = 0; i < 4; i++) begin pin_tck(i == 3, 1, b); cap[i] = b; end
      pin_tck(1, 0, b); pin_tck(0, 0, b);
      check(cap == 4'b0001, $sformatf("IR capture through pins %b", cap));
      check(dut.u_tap.ir == IR_BYPASS, "IR loaded through pins");
      if (cap == 4'b0001) n_prod++;
    end

    // ------------------------------------------------ mechanisms
    $display("mechanisms: pass trials %0d, fail trials %0d, captures %0d, timing decrease %0d, increase %0d, aging %0d, characterisation %0d, T/V %0d, MBIST %0d, protection %0d, chip resets %0d, production pins %0d",
             n_trial_pass, n_trial_fail, n_capture, n_dec, n_inc, n_aging, n_char, n_tv, n_mb, n_prot, chip_resets, n_prod);
    check(n_trial_pass > 0, "a trial passed");
    check(n_trial_fail > 0, "a trial failed");
    check(n_capture > 0, "capture pulses issued");
    check(n_dec > 0, "timing decreased after a pass");
    check(n_inc > 0, "timing increased after a fail");
    check(n_aging > 0, "aging seen as a smaller shrink");
    check(n_char > 0, "TVM characterisation stored");
    check(n_tv > 0, "T/V estimated");
    check(n_mb > 0, "MBIST passed");
    check(n_prot > 0, "write protection");
    check(chip_resets == 3, "one chip reset per session");
    check(n_prod > 0, "production-test pin path");
    check(stray_pulses == 0, $sformatf("%0d test clock pulses reached domains not under test", stray_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (400000 + 200 * CL * NPAT) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
