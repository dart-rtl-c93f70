// dart_top: DART field-test infrastructure of one chip.
//
// The DART controller runs from the slow DART clock `clk` (25 MHz in the
// document).  When the processor raises DRTSTART it takes over the five
// JTAG pins through jtag_pin_mux and drives the chip's TAP like an external
// tester: for each clock domain in the test specification it programs the
// logic BIST (lbist_ctrl, one TPG and one RA per domain), lets the test
// timing generator produce scan and release/capture pulses from the PLL
// clock with a programmable shortening of the capture edge, checks the
// signatures and searches the shortest passing release-to-capture
// interval.  In MBIST mode it runs March tests on the memory under test.
// Five TVMs give temperature and voltage during the test.  Specification
// and log live in the 8 kB DART memory, which the processor reaches through
// the host port while DART is idle.  Write enables of the DART memory's
// host port and of the user port of the tested memory are disabled while
// DART runs (write protection).
//
// The user logic of the clock domains is outside this module: each domain
// d gets test_clk[d], the shared scan_en and scan_in[d] and returns
// scan_out[d].  The PLL is outside too; its output is `pll_clk`.
// Block structure, pin switching, number of TVMs (5), DART memory size
// (8 kB), unit delay (40 ps) and number of clock domains (12) follow the
// document; chains per domain, tested memory size and all encodings are
// this design's choices.
//
// Lint notes: rst_n is used as the asynchronous reset of the system-clock
// logic and, passed on, of the PLL-clock logic; a linter that also sees the
// assertion inside dart_ctrl reports it as a mixed sync/async net, which is
// intended.  lb_cfg is the configuration held in lbist_ctrl; this level
// uses only its domain, divider and shrink fields (the sequencer itself
// uses the rest), so its upper bits are unused here.
`timescale 1ps/1ps
module dart_top
  import dart_pkg::*;
#(
  parameter int N_DOM     = 12,
  parameter int CHAINS    = 4,
  parameter int N_TVM     = 5,
  parameter int CNT_W     = 16,
  parameter int TAPS      = 64,
  parameter int UNIT_PS   = 40,
  parameter int MUT_WORDS = 1024,
  parameter int MUT_AW    = $clog2(MUT_WORDS)
) (
  input  logic                 clk,
  input  logic                 pll_clk,
  input  logic                 rst_n,         // SYSRESET (active low)
  input  logic                 drtpin,
  input  logic                 drtstart,
  input  dart_menu_e           menu,
  output dart_mode_e           mode,
  output logic                 chip_reset,
  // JTAG pins
  input  logic                 tck,
  input  logic                 tms,
  input  logic                 tdi,
  input  logic                 trst_n,
  output logic                 tdo,
  // processor port to the DART memory
  input  logic                 host_en,
  input  logic                 host_we,
  input  logic [DMEM_AW-1:0]   host_addr,
  input  logic [31:0]          host_wdata,
  output logic [31:0]          host_rdata,
  // user port of the memory under MBIST
  input  logic                 umem_en,
  input  logic                 umem_we,
  input  logic [MUT_AW-1:0]    umem_addr,
  input  logic [31:0]          umem_wdata,
  output logic [31:0]          umem_rdata,
  // clock domains under test
  output logic [N_DOM-1:0]     test_clk,
  output logic                 scan_en,
  output logic [CHAINS-1:0]    scan_in  [N_DOM],
  input  logic [CHAINS-1:0]    scan_out [N_DOM]
);
  // ------------------------------------------------------------ controller
  logic               dart_sel;
  logic               c_mem_en, c_mem_we;
  logic [DMEM_AW-1:0] c_mem_addr;
  logic [31:0]        c_mem_wdata, dmem_rdata;
  logic               c_tck, c_tms, c_tdi, c_trst_n, c_tdo;
  logic               tvm_reset, tvm_count_start, tvm_ro_start, tvm_enable;
  logic [1:0]         tvm_sel;
  logic [CNT_W-1:0]   tvm_count [N_TVM];

  dart_ctrl #(.N_TVM(N_TVM), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n, .drtpin, .drtstart, .menu, .mode, .chip_reset, .dart_sel,
    .mem_en(c_mem_en), .mem_we(c_mem_we), .mem_addr(c_mem_addr),
    .mem_wdata(c_mem_wdata), .mem_rdata(dmem_rdata),
    .jtck(c_tck), .jtms(c_tms), .jtdi(c_tdi), .jtrst_n(c_trst_n), .jtdo(c_tdo),
    .tvm_reset, .tvm_count_start, .tvm_ro_start, .tvm_enable, .tvm_sel, .tvm_count);

  // ------------------------------------------------------------ DART memory
  logic               d_en, d_we;
  logic [DMEM_AW-1:0] d_addr;
  logic [31:0]        d_wdata;

  always_comb begin
    if (dart_sel) begin
      d_en = c_mem_en; d_we = c_mem_we; d_addr = c_mem_addr; d_wdata = c_mem_wdata;
    end else begin
      d_en = host_en;  d_we = host_we;  d_addr = host_addr;  d_wdata = host_wdata;
    end
  end

  sram_sp #(.WORDS(DMEM_WORDS), .DW(32)) u_dmem (
    .clk, .en(d_en), .we(d_we), .addr(d_addr), .wdata(d_wdata), .rdata(dmem_rdata));
  assign host_rdata = dmem_rdata;

  // ------------------------------------------------------------ JTAG / TAP
  logic       t_tck, t_tms, t_tdi, t_trst_n, t_tdo;
  tap_state_e tstate;
  tap_instr_e ir;
  logic [15:0] user_tdo;
  logic        lb_tdo_cfg, lb_tdo_seed, lb_tdo_run, mb_tdo_cfg, mb_tdo_run;

  jtag_pin_mux u_pmux (
    .force_pins(drtpin), .dart_sel,
    .pin_tck(tck), .pin_tms(tms), .pin_tdi(tdi), .pin_trst_n(trst_n), .pin_tdo(tdo),
    .ctl_tck(c_tck), .ctl_tms(c_tms), .ctl_tdi(c_tdi), .ctl_trst_n(c_trst_n), .ctl_tdo(c_tdo),
    .tap_tck(t_tck), .tap_tms(t_tms), .tap_tdi(t_tdi), .tap_trst_n(t_trst_n), .tap_tdo(t_tdo));

  always_comb begin
    user_tdo             = '0;
    user_tdo[IR_LB_CFG]  = lb_tdo_cfg;
    user_tdo[IR_LB_SEED] = lb_tdo_seed;
    user_tdo[IR_LB_RUN]  = lb_tdo_run;
    user_tdo[IR_MB_CFG]  = mb_tdo_cfg;
    user_tdo[IR_MB_RUN]  = mb_tdo_run;
  end

  tap_ctrl u_tap (
    .tck(t_tck), .trst_n(t_trst_n), .tms(t_tms), .tdi(t_tdi), .tdo(t_tdo),
    .state(tstate), .ir, .user_tdo);

  // ------------------------------------------------------------ LBIST
  logic              cyc_en, req_a, req_b, lb_running;
  lbist_cfg_t        lb_cfg;
  logic              tpg_load, tpg_step, ra_clear, ra_step;
  logic [SEED_W-1:0] seed;
  logic [SEED_W-1:0] sig [N_DOM];
  logic              ttg_clk;

  lbist_ctrl #(.N_DOM(N_DOM)) u_lbist (
    .tck(t_tck), .trst_n(t_trst_n), .tdi(t_tdi), .tstate, .ir,
    .tdo_cfg(lb_tdo_cfg), .tdo_seed(lb_tdo_seed), .tdo_run(lb_tdo_run),
    .pll_clk, .pll_rst_n(rst_n), .cyc_en, .req_a, .req_b, .cfg(lb_cfg),
    .running(lb_running), .scan_en, .tpg_load, .tpg_step, .ra_clear, .ra_step,
    .seed, .sig);

  test_timing_generator #(.TAPS(TAPS), .UNIT_PS(UNIT_PS)) u_ttg (
    .pll_clk, .rst_n, .div(lb_cfg.div), .shrink(lb_cfg.shrink),
    .req_a, .req_b, .cyc_en, .test_clk(ttg_clk));

  for (genvar d = 0; d < N_DOM; d++) begin : g_dom
    // only the domain under test receives test clock pulses
    assign test_clk[d] = ttg_clk & lb_running & (int'(lb_cfg.dom) == d);

    lbist_tpg #(.SEED_W(SEED_W), .CHAINS(CHAINS)) u_tpg (
      .clk(test_clk[d]), .load(tpg_load), .step(tpg_step), .seed, .scan_in(scan_in[d]));

    lbist_ra #(.SEED_W(SEED_W), .CHAINS(CHAINS)) u_ra (
      .clk(test_clk[d]), .clear(ra_clear), .step(ra_step), .scan_out(scan_out[d]),
      .signature(sig[d]));
  end

  // ------------------------------------------------------------ MBIST
  logic              mb_active, mb_en, mb_we;
  logic [MUT_AW-1:0] mb_addr;
  logic [31:0]       mb_wdata, mut_rdata;
  logic              m_en, m_we;
  logic [MUT_AW-1:0] m_addr;
  logic [31:0]       m_wdata;

  mbist_ctrl #(.AW(MUT_AW), .DW(32)) u_mbist (
    .tck(t_tck), .trst_n(t_trst_n), .tdi(t_tdi), .tstate, .ir,
    .tdo_cfg(mb_tdo_cfg), .tdo_run(mb_tdo_run),
    .clk, .rst_n, .active(mb_active),
    .mem_en(mb_en), .mem_we(mb_we), .mem_addr(mb_addr), .mem_wdata(mb_wdata),
    .mem_rdata(mut_rdata));

  always_comb begin
    if (mb_active) begin
      m_en = mb_en; m_we = mb_we; m_addr = mb_addr; m_wdata = mb_wdata;
    end else begin
      // user writes are disabled while DART runs
      m_en = umem_en; m_we = umem_we && !dart_sel; m_addr = umem_addr; m_wdata = umem_wdata;
    end
  end

  sram_sp #(.WORDS(MUT_WORDS), .DW(32)) u_mut (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(mut_rdata));
  assign umem_rdata = mut_rdata;

  // ------------------------------------------------------------ TVMs
  logic [CNT_W-1:0] tvm_val [N_TVM];
  for (genvar t = 0; t < N_TVM; t++) begin : g_tvm
    tvm #(.CNT_W(CNT_W)) u_tvm (
      .reset(tvm_reset), .count_start(tvm_count_start), .ro_start(tvm_ro_start),
      .enable(tvm_enable), .out_select(tvm_sel), .count_value(tvm_val[t]));
  end
  assign tvm_count = tvm_val;
endmodule
