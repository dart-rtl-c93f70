// mbist_ctrl: memory BIST controller.
//
// TAP side (TCK domain): IR_MB_CFG selects an mbist_cfg_t data register
// (algorithm, first and last address of the test group); IR_MB_RUN selects
// a 2-bit status register {fail, done} and, while it stays selected,
// requests a run.  Test side (`clk`, a fixed test clock): the run request
// is synchronised, the March algorithm is applied to words first..last of
// the memory, and the result is held until the request drops.  Two
// algorithms are built in, with solid all-0/all-1 data backgrounds:
//   ALG_MATS_PLUS : {any(w0); up(r0,w1); down(r1,w0)}              (5N)
//   ALG_MARCH_CM  : {any(w0); up(r0,w1); up(r1,w0); down(r0,w1);
//                    down(r1,w0); any(r0)}                          (10N)
// A write takes two clocks and a read three (issue, wait, compare with the
// one-cycle-latency read data), so MATS+ takes about 12N and March C-
// about 25N cycles for N words.  The document states that memory test algorithms are applied at
// a fixed test clock, that different test groups use different algorithms
// and that the controller learns pass or fail; the algorithms, register
// layouts and memory interface are this design's choices.
`timescale 1ps/1ps
module mbist_ctrl
  import dart_pkg::*;
#(
  parameter int AW = 10,
  parameter int DW = 32
) (
  input  logic          tck,
  input  logic          trst_n,
  input  logic          tdi,
  input  tap_state_e    tstate,
  input  tap_instr_e    ir,
  output logic          tdo_cfg,
  output logic          tdo_run,
  input  logic          clk,
  input  logic          rst_n,
  output logic          active,
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [DW-1:0] mem_wdata,
  input  logic [DW-1:0] mem_rdata
);
  // ------------------------------------------------------------ TCK domain
  mbist_cfg_t          cfg;
  logic [MB_CFG_W-1:0] cfg_sr;
  logic [1:0]          st_sr, done_sync, fail_sync;
  logic                done_q, fail_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      cfg <= '0; cfg_sr <= '0; st_sr <= '0; done_sync <= '0; fail_sync <= '0;
    end else begin
      done_sync <= {done_sync[0], done_q};
      fail_sync <= {fail_sync[0], fail_q};
      if (ir == IR_MB_CFG) begin
        unique case (tstate)
          TS_CAP_DR:   cfg_sr <= cfg;
          TS_SHIFT_DR: cfg_sr <= {tdi, cfg_sr[MB_CFG_W-1:1]};
          TS_UPD_DR:   cfg    <= cfg_sr;
          default: ;
        endcase
      end else if (ir == IR_MB_RUN) begin
        unique case (tstate)
          TS_CAP_DR:   st_sr <= {fail_sync[1], done_sync[1]};
          TS_SHIFT_DR: st_sr <= {tdi, st_sr[1]};
          default: ;
        endcase
      end
    end
  end
  assign tdo_cfg = cfg_sr[0];
  assign tdo_run = st_sr[0];

  logic run_req;
  assign run_req = (ir == IR_MB_RUN) && (tstate != TS_RESET);

  // ------------------------------------------------------------ march engine
  // element descriptor: {valid, down, two_ops, op0_read, op0_val, op1_read, op1_val}
  typedef struct packed {
    logic valid, down, two, r0, v0, r1, v1;
  } elem_t;

  function automatic elem_t elem(input mbist_alg_e alg, input logic [2:0] i);
    elem_t e = '0;
    if (alg == ALG_MATS_PLUS) begin
      unique case (i)
        3'd0: e = '{1, 0, 0, 0, 0, 0, 0};   // w0
        3'd1: e = '{1, 0, 1, 1, 0, 0, 1};   // up (r0,w1)
        3'd2: e = '{1, 1, 1, 1, 1, 0, 0};   // down (r1,w0)
        default: e = '0;
      endcase
    end else begin
      unique case (i)
        3'd0: e = '{1, 0, 0, 0, 0, 0, 0};   // w0
        3'd1: e = '{1, 0, 1, 1, 0, 0, 1};   // up (r0,w1)
        3'd2: e = '{1, 0, 1, 1, 1, 0, 0};   // up (r1,w0)
        3'd3: e = '{1, 1, 1, 1, 0, 0, 1};   // down (r0,w1)
        3'd4: e = '{1, 1, 1, 1, 1, 0, 0};   // down (r1,w0)
        3'd5: e = '{1, 0, 0, 1, 0, 0, 0};   // r0
        default: e = '0;
      endcase
    end
    return e;
  endfunction

  typedef enum logic [2:0] {M_IDLE, M_ELEM, M_OP, M_CHECK, M_NEXT, M_DONE} mst_e;
  mst_e          st;
  logic [1:0]    run_sync;
  logic [2:0]    eidx;
  logic          opi;
  logic [AW-1:0] addr;
  elem_t         e;
  logic          exp_v;
  logic          last_was_read;

  assign e      = elem(cfg.alg, eidx);
  assign active = (st != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; run_sync <= '0; eidx <= '0; opi <= 1'b0; addr <= '0;
      done_q <= 1'b0; fail_q <= 1'b0; exp_v <= 1'b0;
      mem_en <= 1'b0; mem_we <= 1'b0; mem_addr <= '0; mem_wdata <= '0;
    end else begin
      run_sync <= {run_sync[0], run_req};
      mem_en <= 1'b0;
      mem_we <= 1'b0;
      unique case (st)
        M_IDLE: if (run_sync[1]) begin
          st <= M_ELEM; eidx <= '0; done_q <= 1'b0; fail_q <= 1'b0;
        end
        M_ELEM: begin
          if (!e.valid) st <= M_DONE;
          else begin
            addr <= e.down ? AW'(cfg.last) : AW'(cfg.first);
            opi  <= 1'b0;
            st   <= M_OP;
          end
        end
        M_OP: begin
          mem_en   <= 1'b1;
          mem_addr <= addr;
          if (opi ? e.r1 : e.r0) begin
            exp_v <= opi ? e.v1 : e.v0;
            st    <= M_CHECK;
          end else begin
            mem_we    <= 1'b1;
            mem_wdata <= {DW{opi ? e.v1 : e.v0}};
            st        <= M_NEXT;
          end
        end
        M_CHECK: st <= M_NEXT;   // read data arrives during this cycle
        M_NEXT: begin
          if (e.two && !opi) begin
            opi <= 1'b1; st <= M_OP;
          end else if (addr == (e.down ? AW'(cfg.first) : AW'(cfg.last))) begin
            eidx <= eidx + 3'd1; st <= M_ELEM;
          end else begin
            addr <= e.down ? addr - 1'b1 : addr + 1'b1;
            opi  <= 1'b0;
            st   <= M_OP;
          end
        end
        M_DONE: begin
          done_q <= 1'b1;
          if (!run_sync[1]) begin st <= M_IDLE; done_q <= 1'b0; end
        end
        default: st <= M_IDLE;
      endcase
      // compare read data (valid in the cycle after M_CHECK's issue)
      if (st == M_NEXT && last_was_read && mem_rdata != {DW{exp_v}}) fail_q <= 1'b1;
      if (!run_sync[1] && st != M_IDLE && st != M_DONE) st <= M_IDLE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_was_read <= 1'b0;
    else        last_was_read <= (st == M_CHECK);
  end
endmodule
