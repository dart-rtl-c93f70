// scan_domain_model: small user clock domain with scan chains, for tests.
//
// CHAINS scan chains of LEN flip-flops, clocked by the domain's test clock.
// With scan_en high the chains shift (scan_in enters position 0,
// scan_out is position LEN-1).  With scan_en low every flip-flop captures
//   n[c][j] = s[c][(j+1) % LEN] ^ s[(c+1) % CHAINS][j].
// The input of flip-flop (0,0) is a slow path: it reaches the flip-flop
// `path_ps` picoseconds after its sources change (transport delay), so a
// capture edge that follows the launching edge by less than path_ps
// captures the old value.  A testbench may change `path_ps` at any time
// to model aging.
`timescale 1ps/1ps
module scan_domain_model #(
  parameter int CHAINS  = 4,
  parameter int LEN     = 24,
  parameter int PATH_PS = 2000
) (
  input  logic              clk,
  input  logic              scan_en,
  input  logic [CHAINS-1:0] scan_in,
  output logic [CHAINS-1:0] scan_out
);
  logic [LEN-1:0] s [CHAINS];
  int             path_ps = PATH_PS;

  initial for (int c = 0; c < CHAINS; c++) s[c] = '0;

  // the slow path: crit only changes on clock edges, so the edge process
  // remembers the value crit had before the previous edge and when that edge
  // was; a capture less than path_ps after a change still sees the old value
  logic crit_pre = 1'b0;
  time  t_edge   = 0;
  logic crit, crit_seen;
  always @(posedge clk) begin
    crit      = s[0][1 % LEN] ^ s[1 % CHAINS][0];
    crit_seen = (crit != crit_pre && ($time - t_edge) < time'(path_ps)) ? crit_pre : crit;
    crit_pre  = crit;
    t_edge    = $time;
    for (int c = 0; c < CHAINS; c++) begin
      for (int j = 0; j < LEN; j++) begin
        if (scan_en)               s[c][j] <= (j == 0) ? scan_in[c] : s[c][j-1];
        else if (c == 0 && j == 0) s[c][j] <= crit_seen;
        else                       s[c][j] <= s[c][(j+1) % LEN] ^ s[(c+1) % CHAINS][j];
      end
    end
  end

  always_comb for (int c = 0; c < CHAINS; c++) scan_out[c] = s[c][LEN-1];
endmodule
