// jtag_master: JTAG scan engine of the DART controller.
//
// Turns one command into the TCK/TMS/TDI sequence of a complete IR scan,
// DR scan or TAP reset, starting and ending in Run-Test/Idle.  TCK runs at
// half the controller clock: in the first clock of each TCK period TCK is
// low and TMS/TDI are set up, in the second TCK rises and TDO is sampled
// (the TAP changes TDO on the falling edge).  A scan of `len` bits shifts
// `wdata` LSB first and returns the bits seen on TDO in `rdata`, LSB first
// (bit i of rdata is the bit shifted out while bit i of wdata went in).
// `start` is accepted when `busy` is low; `done` pulses for one clock at the
// end.  A reset command gives five TCK cycles with TMS high then one with
// TMS low.  The document states only that the controller drives the TAP
// through TMS and TDI; the engine itself is this design's.
`timescale 1ps/1ps
module jtag_master #(
  parameter int MAXB  = 64,
  parameter int LEN_W = $clog2(MAXB + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             is_ir,
  input  logic             is_reset,
  input  logic [LEN_W-1:0] len,
  input  logic [MAXB-1:0]  wdata,
  output logic [MAXB-1:0]  rdata,
  output logic             busy,
  output logic             done,
  output logic             tck,
  output logic             tms,
  output logic             tdi,
  input  logic             tdo
);
  typedef enum logic [1:0] {J_IDLE, J_PRE, J_SHIFT, J_POST} jst_e;
  jst_e             st;
  logic             phase;     // 0: TCK low half, 1: TCK high half
  logic [2:0]       step;
  logic [LEN_W-1:0] bitn;
  logic             ir_q, rst_q;
  logic [LEN_W-1:0] len_q;
  logic [MAXB-1:0]  sh;

  assign busy = (st != J_IDLE);

  // TMS for the preamble: DR = 1,0,0   IR = 1,1,0,0   reset = 1,1,1,1,1,0
  function automatic logic pre_tms(input logic ir, input logic rs, input logic [2:0] s);
    if (rs)      return (s != 3'd5);
    else if (ir) return (s < 3'd2);
    else         return (s == 3'd0);
  endfunction

  function automatic logic [2:0] pre_len(input logic ir, input logic rs);
    return rs ? 3'd6 : (ir ? 3'd4 : 3'd3);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= J_IDLE; phase <= 1'b0; step <= '0; bitn <= '0;
      ir_q <= 1'b0; rst_q <= 1'b0; len_q <= '0; sh <= '0; rdata <= '0;
      tck <= 1'b0; tms <= 1'b0; tdi <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        J_IDLE: begin
          tck <= 1'b0;
          if (start) begin
            st <= J_PRE; phase <= 1'b0; step <= '0; bitn <= '0;
            ir_q <= is_ir; rst_q <= is_reset; len_q <= (len == '0) ? LEN_W'(1) : len;
            sh <= wdata; rdata <= '0;
          end
        end
        J_PRE: begin
          if (!phase) begin
            tck <= 1'b0; tms <= pre_tms(ir_q, rst_q, step); tdi <= 1'b0; phase <= 1'b1;
          end else begin
            tck <= 1'b1; phase <= 1'b0;
            if (step == pre_len(ir_q, rst_q) - 3'd1) begin
              step <= '0;
              st   <= rst_q ? J_POST : J_SHIFT;
              if (rst_q) step <= 3'd2;   // skip the two post steps
            end else step <= step + 3'd1;
          end
        end
        J_SHIFT: begin
          if (!phase) begin
            tck <= 1'b0; tms <= (bitn == len_q - 1'b1); tdi <= sh[0]; phase <= 1'b1;
          end else begin
            tck <= 1'b1; phase <= 1'b0;
            rdata[bitn[$clog2(MAXB)-1:0]] <= tdo;
            sh <= sh >> 1;
            if (bitn == len_q - 1'b1) begin st <= J_POST; step <= '0; end
            else bitn <= bitn + 1'b1;
          end
        end
        J_POST: begin
          if (step >= 3'd2) begin
            // final falling edge, back to idle
            tck <= 1'b0; tms <= 1'b0; st <= J_IDLE; done <= 1'b1;
          end else if (!phase) begin
            tck <= 1'b0; tms <= (step == 3'd0); tdi <= 1'b0; phase <= 1'b1;
          end else begin
            tck <= 1'b1; phase <= 1'b0; step <= step + 3'd1;
          end
        end
        default: st <= J_IDLE;
      endcase
    end
  end
endmodule
