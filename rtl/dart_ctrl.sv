// dart_ctrl: DART controller.
//
// Mode machine.  After reset (SYSRESET with DRTPIN low) the controller is
// idle in user mode.  DRTSTART = 1 starts a field test: MENU = LBIST enters
// LBIST mode, MENU = MBIST enters MBIST mode.  At the end of the mode it
// pulses `chip_reset` for CHIPRST_CYC clocks (the processor restarts) and
// returns to idle.  With DRTPIN high (production test) it never leaves idle
// and does not claim the JTAG pins.
//
// LBIST mode (the document's LBIST test flow): for every domain entry of
// the test specification in the DART memory
//   1. measure temperature and voltage with all TVMs: reset the counters,
//      start the rings, count for TVM_WINDOW clocks, stop, read the
//      3 x N_TVM counts, store the first counts ever seen as the
//      characterisation (F0), log the counts and the estimated dT/dV;
//   2. start at the last minimum passing timing read from the log;
//   3. run one trial: for every test menu, load the configuration (domain,
//      divider, chain length, patterns, shrink) through the TAP, then for
//      every (seed, signature) pair shift the seed in (the signature of the
//      previous seed comes out in the same scan), run the LBIST, poll its
//      status, and finally shift out the last signature; any mismatch
//      fails the trial;
//   4. if the first trial passed, shorten the timing (shrink + 1) until a
//      trial fails; if it failed, lengthen it (shrink - 1) until one passes;
//      the minimum passing timing is written back to the log.
// MBIST mode: for every test group, load algorithm and address range, run
// the MBIST through the TAP, poll until done and log pass/fail.
// All TAP traffic goes through jtag_master (TCK = clk / 2).
//
// DART memory port: one access per clock; the controller registers the
// address, the memory registers the data, so a read takes three clocks.  The memory map and record layouts are in dart_pkg.  The flow,
// modes and signal names (DRTPIN, DRTSTART, MENU, CHIPRESET) follow the
// document; record formats, the search rule details, the TVM timing and
// the limits (MAX_TRIALS, POLL_MAX) are this design's choices.
//
// Lint notes: rst_n is an asynchronous reset here and also disables the
// handshake assertion at the end of the file, so a linter sees it used both
// asynchronously and synchronously; that is intended.  Only the low 32 bits
// of a JTAG read are ever looked at (signatures and status words are at
// most 32 bits wide), so j_rdata[63:32] is unused.
`timescale 1ps/1ps
module dart_ctrl
  import dart_pkg::*;
#(
  parameter int N_TVM       = 5,
  parameter int CNT_W       = 16,
  parameter int TVM_WINDOW  = 256,
  parameter int TVM_SETTLE  = 8,
  parameter int MAX_TRIALS  = 16,
  parameter int POLL_MAX    = 4095,
  parameter int CHIPRST_CYC = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 drtpin,
  input  logic                 drtstart,
  input  dart_menu_e           menu,
  output dart_mode_e           mode,
  output logic                 chip_reset,
  output logic                 dart_sel,
  // DART memory
  output logic                 mem_en,
  output logic                 mem_we,
  output logic [DMEM_AW-1:0]   mem_addr,
  output logic [31:0]          mem_wdata,
  input  logic [31:0]          mem_rdata,
  // JTAG (to the pin multiplexer)
  output logic                 jtck,
  output logic                 jtms,
  output logic                 jtdi,
  output logic                 jtrst_n,
  input  logic                 jtdo,
  // TVMs
  output logic                 tvm_reset,
  output logic                 tvm_count_start,
  output logic                 tvm_ro_start,
  output logic                 tvm_enable,
  output logic [1:0]           tvm_sel,
  input  logic [CNT_W-1:0]     tvm_count [N_TVM]
);
  // ------------------------------------------------------------ sub-units
  logic              j_start, j_ir, j_rst, j_done, j_busy;
  logic [6:0]        j_len;
  logic [63:0]       j_wdata, j_rdata;

  jtag_master #(.MAXB(64)) u_jm (
    .clk, .rst_n, .start(j_start), .is_ir(j_ir), .is_reset(j_rst), .len(j_len),
    .wdata(j_wdata), .rdata(j_rdata), .busy(j_busy), .done(j_done),
    .tck(jtck), .tms(jtms), .tdi(jtdi), .tdo(jtdo));
  assign jtrst_n = 1'b1;

  logic              e_start, e_done;
  logic [CNT_W-1:0]  e_f [3];
  logic [CNT_W-1:0]  e_f0 [3];
  logic signed [31:0] e_dt, e_dv;
  logic [1:0]        e_tr, e_vr;

  tv_estimator #(.CNT_W(CNT_W)) u_est (
    .clk, .rst_n, .start(e_start), .f(e_f), .f0(e_f0), .done(e_done),
    .dt(e_dt), .dv(e_dv), .t_rng(e_tr), .v_rng(e_vr));

  // ------------------------------------------------------------ state
  typedef enum logic [5:0] {
    S_IDLE, S_RDADR, S_RDWAIT, S_JWAIT, S_JRST,
    // LBIST
    L_HDR0, L_DOM, L_DOMHDR,
    T_RESET, T_RUNUP, T_COUNT, T_STOP, T_STOPPED, T_READ, T_F0RD, T_F0, T_WR, T_EST, T_ESTW, T_WRT, T_WRR, T_NEXT,
    L_LOGRD, L_LOGT, L_TRIAL, L_MENU, L_MENUHDR, L_CFGIR, L_CFGDR, L_SEEDIR,
    L_SEED, L_SEEDRD, L_SEEDDR, L_RUNIR, L_POLL, L_POLLCHK, L_SIGIR, L_SIGRD, L_SIGGOT,
    L_LASTDR, L_LASTCHK, L_TRIALEND, L_LOGW1, L_LOGW2,
    // MBIST
    M_HDR0, M_GRP, M_ALG, M_RANGE, M_CFGIR, M_CFGDR, M_RUNIR, M_POLL, M_POLLCHK, M_LOG,
    // end of mode
    S_FINISH, S_CHIPRST
  } st_e;

  st_e               st, ret;
  logic [31:0]       rd;                 // last word read
  logic [DMEM_AW-1:0] ptr, mptr, nxt_ptr;
  logic [7:0]        n_ent, ent;
  // domain entry
  logic [3:0]        dom, div;
  logic [9:0]        clen;
  logic [7:0]        n_menu, mi;
  logic [15:0]       pats;
  logic [7:0]        n_seed, si;
  logic [31:0]       exp_sig;
  // timing search
  logic [5:0]        shrink, best;
  logic              first_pass, trial_pass, found, fail_seen;
  logic [7:0]        trials;
  logic [15:0]       polls;
  // TVM
  logic [15:0]       tcnt;
  logic [$clog2(N_TVM+1)-1:0] tv;
  logic [1:0]        ri;
  logic [CNT_W-1:0]  fcur [3];
  logic [CNT_W-1:0]  f0cur [3];
  logic              err;
  logic [2:0]        rstc;

  assign e_f  = fcur;
  assign e_f0 = f0cur;
  assign dart_sel = (mode != MODE_IDLE);

  // TAP operation helpers (used inside the sequential block)
  `define JOP(IR, RST, LEN, DATA, RET) begin \
      j_start <= 1'b1; j_ir <= IR; j_rst <= RST; j_len <= 7'(LEN); j_wdata <= 64'(DATA); \
      ret <= RET; st <= S_JWAIT; end
  `define RDM(ADDR, RET) begin \
      mem_en <= 1'b1; mem_addr <= DMEM_AW'(ADDR); ret <= RET; st <= S_RDADR; end
  `define WRM(ADDR, DATA) begin \
      mem_en <= 1'b1; mem_we <= 1'b1; mem_addr <= DMEM_AW'(ADDR); mem_wdata <= 32'(DATA); end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ret <= S_IDLE; mode <= MODE_IDLE; chip_reset <= 1'b0;
      mem_en <= 1'b0; mem_we <= 1'b0; mem_addr <= '0; mem_wdata <= '0;
      j_start <= 1'b0; j_ir <= 1'b0; j_rst <= 1'b0; j_len <= '0; j_wdata <= '0;
      e_start <= 1'b0; rd <= '0; ptr <= '0; mptr <= '0; nxt_ptr <= '0;
      n_ent <= '0; ent <= '0; dom <= '0; div <= '0; clen <= '0; n_menu <= '0; mi <= '0;
      pats <= '0; n_seed <= '0; si <= '0; exp_sig <= '0;
      shrink <= '0; best <= '0; first_pass <= 1'b0; trial_pass <= 1'b0; found <= 1'b0;
      fail_seen <= 1'b0; trials <= '0; polls <= '0; tcnt <= '0; tv <= '0; ri <= '0;
      tvm_reset <= 1'b0; tvm_count_start <= 1'b0; tvm_ro_start <= 1'b0; tvm_enable <= 1'b0;
      tvm_sel <= '0; err <= 1'b0; rstc <= '0;
      for (int i = 0; i < 3; i++) begin fcur[i] <= '0; f0cur[i] <= '0; end
    end else begin
      mem_en  <= 1'b0;
      mem_we  <= 1'b0;
      j_start <= 1'b0;
      e_start <= 1'b0;
      unique case (st)
        // ---------------------------------------------------- idle / common
        S_IDLE: begin
          chip_reset <= 1'b0;
          if (drtstart && !drtpin) begin
            mode <= (menu == MENU_LBIST) ? MODE_LBIST : MODE_MBIST;
            err  <= 1'b0;
            `JOP(1'b0, 1'b1, 1, 0, (menu == MENU_LBIST) ? L_HDR0 : M_HDR0)
          end
        end
        S_RDADR:  st <= S_RDWAIT;                         // memory samples the address
        S_RDWAIT: begin rd <= mem_rdata; st <= ret; end
        S_JWAIT:  if (j_done) st <= ret;
        // ---------------------------------------------------- LBIST
        L_HDR0: `RDM(0, L_DOM)
        L_DOM: begin
          if (ptr == '0) begin   // rd holds the entry count
            n_ent <= rd[7:0]; ent <= '0; ptr <= DMEM_AW'(1);
            if (rd[7:0] == '0) st <= S_FINISH;
            else `RDM(1, L_DOMHDR)
          end else if (ent == n_ent) st <= S_FINISH;
          else `RDM(ptr, L_DOMHDR)
        end
        L_DOMHDR: begin
          dom <= rd[3:0]; div <= rd[7:4]; clen <= rd[17:8]; n_menu <= rd[25:18];
          tvm_reset <= 1'b1; tvm_enable <= 1'b1; tcnt <= '0;
          st <= T_RESET;
        end
        // ---- temperature / voltage measurement
        T_RESET: begin tvm_reset <= 1'b0; tvm_ro_start <= 1'b1; st <= T_RUNUP; end
        T_RUNUP: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 16'(TVM_SETTLE)) begin tcnt <= '0; tvm_count_start <= 1'b1; st <= T_COUNT; end
        end
        T_COUNT: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 16'(TVM_WINDOW - 1)) begin tcnt <= '0; tvm_count_start <= 1'b0; st <= T_STOP; end
        end
        T_STOP: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 16'(TVM_SETTLE)) begin tcnt <= '0; tvm_ro_start <= 1'b0; st <= T_STOPPED; end
        end
        T_STOPPED: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 16'(TVM_SETTLE)) begin tcnt <= '0; tv <= '0; ri <= '0; tvm_sel <= '0; st <= T_READ; end
        end
        T_READ: begin   // tvm_sel was set one clock ago
          fcur[ri] <= tvm_count[tv];
          if (ri == 2'd2) begin ri <= '0; tvm_sel <= '0; st <= T_F0RD; end
          else begin ri <= ri + 1'b1; tvm_sel <= ri + 1'b1; end
        end
        T_F0RD: `RDM(LOG_F0 + 3 * int'(tv) + int'(ri), T_F0)
        T_F0: begin
          // a zero entry means not yet characterised: this measurement becomes F0
          f0cur[ri] <= (rd == '0) ? fcur[ri] : rd[CNT_W-1:0];
          if (rd == '0) `WRM(LOG_F0 + 3 * int'(tv) + int'(ri), fcur[ri])
          st <= T_WR;
        end
        T_WR: begin
          `WRM(LOG_F + 3 * int'(tv) + int'(ri), fcur[ri])
          if (ri == 2'd2) begin ri <= '0; st <= T_EST; end
          else begin ri <= ri + 1'b1; st <= T_F0RD; end
        end
        T_EST:  begin e_start <= 1'b1; st <= T_ESTW; end
        T_ESTW: if (e_done) begin `WRM(LOG_TV + 3 * int'(tv), e_dt) st <= T_WRT; end
        T_WRT:  begin `WRM(LOG_TV + 3 * int'(tv) + 1, e_dv) st <= T_WRR; end
        T_WRR:  begin `WRM(LOG_TV + 3 * int'(tv) + 2, {e_tr, e_vr}) st <= T_NEXT; end
        T_NEXT: begin
          if (int'(tv) == N_TVM - 1) begin tvm_enable <= 1'b0; st <= L_LOGRD; end
          else begin tv <= tv + 1'b1; ri <= '0; tvm_sel <= '0; st <= T_READ; end
        end
        // ---- timing search
        L_LOGRD: `RDM(LOG_TIMING + int'(dom), L_LOGT)
        L_LOGT: begin
          shrink <= rd[31] ? rd[5:0] : '0;
          best <= '0; found <= 1'b0; fail_seen <= 1'b0; trials <= '0;
          st <= L_TRIAL;
        end
        L_TRIAL: begin
          trial_pass <= 1'b1; mi <= '0; mptr <= ptr + 1'b1; st <= L_MENU;
        end
        L_MENU: begin
          if (mi == n_menu) begin nxt_ptr <= mptr; st <= L_TRIALEND; end
          else `RDM(mptr, L_MENUHDR)
        end
        L_MENUHDR: begin
          pats <= rd[15:0]; n_seed <= rd[23:16]; mptr <= mptr + 1'b1; si <= '0;
          `JOP(1'b1, 1'b0, IR_W, IR_LB_CFG, L_CFGDR)
        end
        L_CFGDR: begin
          lbist_cfg_t c;
          c.chain_len = clen; c.patterns = pats; c.shrink = shrink; c.div = div; c.dom = dom;
          `JOP(1'b0, 1'b0, LB_CFG_W, c, L_SEEDIR)
        end
        L_SEEDIR: `JOP(1'b1, 1'b0, IR_W, IR_LB_SEED, L_SEED)
        L_SEED: begin
          if (si == n_seed) `JOP(1'b0, 1'b0, SEED_W, 0, L_LASTCHK)
          else `RDM(mptr + DMEM_AW'(2 * si), L_SEEDDR)
        end
        L_SEEDDR: `JOP(1'b0, 1'b0, SEED_W, rd, L_RUNIR)
        L_RUNIR: begin
          // the scan just done returned the previous seed's signature
          if (si != '0 && j_rdata[31:0] != exp_sig) trial_pass <= 1'b0;
          polls <= '0;
          `JOP(1'b1, 1'b0, IR_W, IR_LB_RUN, L_POLL)
        end
        L_POLL: `JOP(1'b0, 1'b0, 2, 0, L_POLLCHK)
        L_POLLCHK: begin
          if (j_rdata[0]) st <= L_SIGIR;
          else if (polls == 16'(POLL_MAX)) begin err <= 1'b1; trial_pass <= 1'b0; st <= L_SIGIR; end
          else begin polls <= polls + 1'b1; st <= L_POLL; end
        end
        L_SIGIR: `JOP(1'b1, 1'b0, IR_W, IR_LB_SEED, L_SIGRD)   // drops the run request
        L_SIGRD: `RDM(mptr + DMEM_AW'(2 * si + 1), L_SIGGOT)
        L_SIGGOT: begin exp_sig <= rd; si <= si + 1'b1; st <= L_SEED; end
        L_LASTCHK: begin
          if (j_rdata[31:0] != exp_sig) trial_pass <= 1'b0;
          mptr <= mptr + DMEM_AW'(2 * n_seed); mi <= mi + 1'b1; st <= L_MENU;
        end
        L_TRIALEND: begin
          trials <= trials + 1'b1;
          if (trials == '0) first_pass <= trial_pass;
          if (trial_pass) begin best <= shrink; found <= 1'b1; end
          else fail_seen <= 1'b1;
          if ((trials != '0 && trial_pass != first_pass) ||
              ( trial_pass && shrink == '1) ||
              (!trial_pass && shrink == '0) ||
              (int'(trials) == MAX_TRIALS - 1))
            st <= L_LOGW1;
          else begin
            shrink <= trial_pass ? shrink + 1'b1 : shrink - 1'b1;
            st <= L_TRIAL;
          end
        end
        L_LOGW1: begin
          `WRM(LOG_TIMING + int'(dom), {found, 25'd0, best})
          st <= L_LOGW2;
        end
        L_LOGW2: begin
          `WRM(LOG_DRES + int'(dom), {found, fail_seen, 6'd0, trials, 10'd0, best})
          ptr <= nxt_ptr; ent <= ent + 1'b1; st <= L_DOM;
        end
        // ---------------------------------------------------- MBIST
        M_HDR0: `RDM(0, M_GRP)
        M_GRP: begin
          if (ptr == '0) begin
            n_ent <= rd[7:0]; ent <= '0; ptr <= DMEM_AW'(1);
            if (rd[7:0] == '0) st <= S_FINISH;
            else `RDM(1, M_ALG)
          end else if (ent == n_ent) st <= S_FINISH;
          else `RDM(ptr, M_ALG)
        end
        M_ALG: begin exp_sig <= rd; `RDM(ptr + 1'b1, M_RANGE) end
        M_RANGE: `JOP(1'b1, 1'b0, IR_W, IR_MB_CFG, M_CFGDR)
        M_CFGDR: begin
          mbist_cfg_t c;
          c.alg = mbist_alg_e'(exp_sig[1:0]); c.first = rd[15:0]; c.last = rd[31:16];
          polls <= '0;
          `JOP(1'b0, 1'b0, MB_CFG_W, c, M_RUNIR)
        end
        M_RUNIR: `JOP(1'b1, 1'b0, IR_W, IR_MB_RUN, M_POLL)
        M_POLL:  `JOP(1'b0, 1'b0, 2, 0, M_POLLCHK)
        M_POLLCHK: begin
          if (j_rdata[0]) `JOP(1'b1, 1'b0, IR_W, IR_BYPASS, M_LOG)
          else if (polls == 16'(POLL_MAX)) begin err <= 1'b1; `JOP(1'b1, 1'b0, IR_W, IR_BYPASS, M_LOG) end
          else begin polls <= polls + 1'b1; st <= M_POLL; end
          rd <= {30'd0, j_rdata[1:0]};
        end
        M_LOG: begin
          `WRM(LOG_MRES + int'(ent), rd)
          ptr <= ptr + DMEM_AW'(2); ent <= ent + 1'b1; st <= M_GRP;
        end
        // ---------------------------------------------------- end of mode
        S_FINISH: begin
          `WRM(LOG_STATUS, {err, 29'd0, mode})
          rstc <= '0; chip_reset <= 1'b1; st <= S_CHIPRST;
        end
        S_CHIPRST: begin
          rstc <= rstc + 1'b1;
          if (int'(rstc) == CHIPRST_CYC - 1) begin
            chip_reset <= 1'b0; mode <= MODE_IDLE; ptr <= '0; st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // a scan command is only issued while the JTAG engine is idle
  a_jop_idle: assert property (@(posedge clk) disable iff (!rst_n) j_start |-> !j_busy);

  `undef JOP
  `undef RDM
  `undef WRM
endmodule
