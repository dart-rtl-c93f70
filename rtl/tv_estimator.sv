// tv_estimator: temperature and voltage estimate from three RO counts.
//
// Implements dT = a1 dF1 + a2 dF2 + a3 dF3 and dV = b1 dF1 + b2 dF2 + b3 dF3,
// where dFi is the count of ring oscillator i minus its count at the first
// (characterisation) measurement in the field.  It works in two passes, as
// the document describes: a rough estimate with one coefficient set picks
// one of three temperature intervals and one of three voltage intervals;
// the precise estimate then uses the coefficient set of that interval pair
// (nine sets).  Coefficients are signed Q8.8, so results are in 1/256 °C
// and 1/256 mV.  `start` latches the inputs; `done` pulses three clocks
// later with dt, dv and the chosen intervals t_rng, v_rng.
// The equations, the rough/precise passes and the 3 x 3 intervals follow
// the document.  The document derives the coefficients by circuit
// simulation and does not print them: the defaults here are this design's,
// fitted to its behavioural ring-oscillator models (rows 1 and 2 only),
// and the interval limits assume a characterisation at 25 °C and 1.2 V
// (document intervals -40..20..80..110 °C and 1.0..1.1..1.2..1.3 V).
`timescale 1ps/1ps
module tv_estimator #(
  parameter int CNT_W = 16,
  parameter logic signed [15:0] A_ROUGH [3] = '{-16'sd45, 16'sd12, 16'sd0},
  parameter logic signed [15:0] B_ROUGH [3] = '{-16'sd10, 16'sd40, 16'sd0},
  parameter logic signed [15:0] A_PREC [9][3] = '{'{-16'sd45, 16'sd12, 16'sd0}, '{-16'sd45, 16'sd12, 16'sd0}, '{-16'sd45, 16'sd12, 16'sd0}, '{-16'sd45, 16'sd12, 16'sd0}, '{-16'sd45, 16'sd12, 16'sd0}, '{-16'sd45, 16'sd12, 16'sd0}, '{-16'sd45, 16'sd12, 16'sd0}, '{-16'sd45, 16'sd12, 16'sd0}, '{-16'sd45, 16'sd12, 16'sd0}},
  parameter logic signed [15:0] B_PREC [9][3] = '{'{-16'sd10, 16'sd40, 16'sd0}, '{-16'sd10, 16'sd40, 16'sd0}, '{-16'sd10, 16'sd40, 16'sd0}, '{-16'sd10, 16'sd40, 16'sd0}, '{-16'sd10, 16'sd40, 16'sd0}, '{-16'sd10, 16'sd40, 16'sd0}, '{-16'sd10, 16'sd40, 16'sd0}, '{-16'sd10, 16'sd40, 16'sd0}, '{-16'sd10, 16'sd40, 16'sd0}},
  parameter int T_LIM1 = -5 * 256,     // 20 °C  - 25 °C
  parameter int T_LIM2 = 55 * 256,     // 80 °C  - 25 °C
  parameter int V_LIM1 = -100 * 256,   // 1.1 V  - 1.2 V
  parameter int V_LIM2 = 0             // 1.2 V  - 1.2 V
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [CNT_W-1:0]    f  [3],
  input  logic [CNT_W-1:0]    f0 [3],
  output logic                done,
  output logic signed [31:0]  dt,
  output logic signed [31:0]  dv,
  output logic [1:0]          t_rng,
  output logic [1:0]          v_rng
);
  logic signed [CNT_W:0] df [3];
  logic                  busy1, busy2;
  logic signed [31:0]    rt, rv, pt, pv;
  logic [1:0]            ti, vi;
  logic [3:0]            set;

  // rough pass (combinational on the latched differences)
  always_comb begin
    rt = 0; rv = 0;
    for (int i = 0; i < 3; i++) begin
      rt += 32'(A_ROUGH[i]) * 32'(df[i]);
      rv += 32'(B_ROUGH[i]) * 32'(df[i]);
    end
    ti = (rt < T_LIM1) ? 2'd0 : (rt < T_LIM2) ? 2'd1 : 2'd2;
    vi = (rv < V_LIM1) ? 2'd0 : (rv < V_LIM2) ? 2'd1 : 2'd2;
  end

  // precise pass with the selected set
  always_comb begin
    set = 4'(t_rng) * 4'd3 + 4'(v_rng);
    pt = 0; pv = 0;
    for (int i = 0; i < 3; i++) begin
      pt += 32'(A_PREC[set][i]) * 32'(df[i]);
      pv += 32'(B_PREC[set][i]) * 32'(df[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy1 <= 1'b0; busy2 <= 1'b0; done <= 1'b0; dt <= '0; dv <= '0; t_rng <= '0; v_rng <= '0;
      for (int i = 0; i < 3; i++) df[i] <= '0;
    end else begin
      done  <= 1'b0;
      busy1 <= 1'b0;
      if (start) begin
        for (int i = 0; i < 3; i++)
          df[i] <= $signed({1'b0, f[i]}) - $signed({1'b0, f0[i]});
        busy1 <= 1'b1;
      end else if (busy1) begin
        t_rng <= ti;
        v_rng <= vi;
        busy2 <= 1'b1;
      end
      if (busy2) begin
        busy2 <= 1'b0;
        dt    <= pt;
        dv    <= pv;
        done  <= 1'b1;
      end
    end
  end
endmodule
