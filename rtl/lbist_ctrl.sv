// lbist_ctrl: logic BIST controller.
//
// TAP side (TCK domain).  Three data registers, selected by the TAP
// instruction:
//   IR_LB_CFG  : lbist_cfg_t (domain, clock divider, shrink code, patterns
//                per seed, scan chain length), captured as its own value.
//   IR_LB_SEED : SEED_W bits.  Capture-DR loads the signature of the domain
//                under test, Update-DR stores the shifted-in seed, so the
//                next seed goes in while the last signature comes out.
//   IR_LB_RUN  : 2-bit status {busy, done}.  The run request is high for as
//                long as this instruction is in the instruction register.
// Test side (PLL domain).  On a rising run request the sequencer issues,
// once per domain test-clock cycle (`cyc_en` from the timing generator):
//   LOAD    one pulse: seed into the TPG, RA cleared
//   per pattern: SHIFT chain_len pulses with scan enable (the RA compacts
//           the unloaded response of the previous pattern), one GAP cycle
//           without pulse while scan enable falls, RELEASE pulse (path A),
//           CAPTURE pulse (path B, shortened by the shrink code)
//   UNLOAD  chain_len shift pulses into the RA, then DONE.
// `req_a`/`req_b` ask the timing generator for a pulse one PLL cycle later;
// the control outputs (scan_en, tpg_*, ra_*) are delayed by one PLL cycle so
// that they are steady when that pulse reaches the domain.  The register
// contents (seed, signature, options, timing, domain) follow the document;
// the sequence above, its encodings and the launch-on-capture release/
// capture scheme are this design's reading of "release-capture clocks".
// The configuration and seed are written in the TCK domain and used in the
// PLL domain only while the synchronised run request is high, when they
// are static.
`timescale 1ps/1ps
module lbist_ctrl
  import dart_pkg::*;
#(
  parameter int N_DOM = 12
) (
  // TAP side
  input  logic              tck,
  input  logic              trst_n,
  input  logic              tdi,
  input  tap_state_e        tstate,
  input  tap_instr_e        ir,
  output logic              tdo_cfg,
  output logic              tdo_seed,
  output logic              tdo_run,
  // PLL side
  input  logic              pll_clk,
  input  logic              pll_rst_n,
  input  logic              cyc_en,
  output logic              req_a,
  output logic              req_b,
  output lbist_cfg_t        cfg,
  output logic              running,
  output logic              scan_en,
  output logic              tpg_load,
  output logic              tpg_step,
  output logic              ra_clear,
  output logic              ra_step,
  output logic [SEED_W-1:0] seed,
  input  logic [SEED_W-1:0] sig [N_DOM]
);
  // ------------------------------------------------------------ TCK domain
  logic [LB_CFG_W-1:0] cfg_sr;
  logic [SEED_W-1:0]   seed_sr;
  logic [1:0]          run_sr;
  logic [1:0]          done_sync, busy_sync;
  logic                done_p, busy_p;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      cfg <= '0; seed <= '0; cfg_sr <= '0; seed_sr <= '0; run_sr <= '0;
      done_sync <= '0; busy_sync <= '0;
    end else begin
      done_sync <= {done_sync[0], done_p};
      busy_sync <= {busy_sync[0], busy_p};
      unique case (ir)
        IR_LB_CFG: unique case (tstate)
          TS_CAP_DR:   cfg_sr <= cfg;
          TS_SHIFT_DR: cfg_sr <= {tdi, cfg_sr[LB_CFG_W-1:1]};
          TS_UPD_DR:   cfg    <= cfg_sr;
          default: ;
        endcase
        IR_LB_SEED: unique case (tstate)
          TS_CAP_DR:   seed_sr <= (int'(cfg.dom) < N_DOM) ? sig[cfg.dom] : '0;
          TS_SHIFT_DR: seed_sr <= {tdi, seed_sr[SEED_W-1:1]};
          TS_UPD_DR:   seed    <= seed_sr;
          default: ;
        endcase
        IR_LB_RUN: unique case (tstate)
          TS_CAP_DR:   run_sr <= {busy_sync[1], done_sync[1]};
          TS_SHIFT_DR: run_sr <= {tdi, run_sr[1]};
          default: ;
        endcase
        default: ;
      endcase
    end
  end

  assign tdo_cfg  = cfg_sr[0];
  assign tdo_seed = seed_sr[0];
  assign tdo_run  = run_sr[0];

  logic run_req;
  assign run_req = (ir == IR_LB_RUN) && (tstate != TS_RESET);

  // ------------------------------------------------------------ PLL domain
  typedef enum logic [2:0] {Q_IDLE, Q_LOAD, Q_SHIFT, Q_GAP, Q_REL, Q_CAP, Q_UNLOAD, Q_DONE} seq_e;
  seq_e                  q;
  logic [1:0]            run_sync;
  logic [CHAINLEN_W-1:0] bit_cnt;
  logic [PATCNT_W-1:0]   pat_cnt;
  // control word for the next pulse, then its delayed copy
  logic                  c_scan, c_load, c_tstep, c_clr, c_rstep;

  always_ff @(posedge pll_clk or negedge pll_rst_n) begin
    if (!pll_rst_n) begin
      q <= Q_IDLE; run_sync <= '0; bit_cnt <= '0; pat_cnt <= '0;
      req_a <= 1'b0; req_b <= 1'b0;
      {c_scan, c_load, c_tstep, c_clr, c_rstep} <= '0;
      {scan_en, tpg_load, tpg_step, ra_clear, ra_step} <= '0;
    end else begin
      run_sync <= {run_sync[0], run_req};
      {scan_en, tpg_load, tpg_step, ra_clear, ra_step} <= {c_scan, c_load, c_tstep, c_clr, c_rstep};
      req_a <= 1'b0;
      req_b <= 1'b0;
      if (!run_sync[1]) begin
        q <= Q_IDLE;
        {c_scan, c_load, c_tstep, c_clr, c_rstep} <= '0;
      end else if (cyc_en) begin
        {c_load, c_clr} <= 2'b00;
        unique case (q)
          Q_IDLE: begin
            // a new run: Q_IDLE is re-entered only when the request drops
            q <= Q_LOAD; req_a <= 1'b1;
            {c_scan, c_load, c_tstep, c_clr, c_rstep} <= 5'b11010;
            bit_cnt <= '0; pat_cnt <= '0;
          end
          Q_LOAD, Q_SHIFT, Q_CAP: begin
            if (q == Q_CAP && pat_cnt == cfg.patterns - 1'b1) begin
              q <= Q_UNLOAD; req_a <= 1'b1; bit_cnt <= '0;
              {c_scan, c_tstep, c_rstep} <= 3'b111;
            end else if (q != Q_SHIFT || bit_cnt != cfg.chain_len - 1'b1) begin
              if (q == Q_CAP) pat_cnt <= pat_cnt + 1'b1;
              bit_cnt <= (q == Q_SHIFT) ? bit_cnt + 1'b1 : '0;
              q <= Q_SHIFT; req_a <= 1'b1;
              c_scan  <= 1'b1;
              c_tstep <= 1'b1;
              c_rstep <= (q == Q_CAP) || (q == Q_SHIFT && pat_cnt != '0);
            end else begin
              q <= Q_GAP;
              {c_scan, c_tstep, c_rstep} <= 3'b000;
            end
          end
          Q_GAP:  begin q <= Q_REL; req_a <= 1'b1; end
          Q_REL:  begin q <= Q_CAP; req_b <= 1'b1; end
          Q_UNLOAD: begin
            if (bit_cnt == cfg.chain_len - 1'b1) begin
              q <= Q_DONE; {c_scan, c_tstep, c_rstep} <= 3'b000;
            end else begin
              bit_cnt <= bit_cnt + 1'b1; req_a <= 1'b1;
            end
          end
          default: ;   // Q_DONE: wait for the request to drop
        endcase
      end
    end
  end

  assign done_p  = (q == Q_DONE);
  assign busy_p  = (q != Q_IDLE) && (q != Q_DONE);
  assign running = run_sync[1];
endmodule
