// lbist_tpg: LBIST test pattern generator for one clock domain.
//
// A SEED_W-bit Fibonacci LFSR (x^32 + x^22 + x^2 + x + 1) followed by a
// small XOR phase shifter that gives each of CHAINS scan chains its own
// bit stream: chain c receives lfsr[c] ^ lfsr[2c+11] ^ lfsr[4c+21] (indices
// modulo SEED_W).  The tap spacing differs per chain so neighbouring chains
// are not one-cycle-shifted copies of each other.  On a test-clock edge, `load` writes `seed` into the
// LFSR; otherwise `step` advances it by one.  The scan-in bits are a pure
// function of the current LFSR state, so the bit shifted in at an edge is
// the one present before that edge.  The document names the TPG and its
// seeds; polynomial, width and phase shifter are this design's choices.
`timescale 1ps/1ps
module lbist_tpg #(
  parameter int SEED_W = 32,
  parameter int CHAINS = 4
) (
  input  logic              clk,      // domain test clock
  input  logic              load,
  input  logic              step,
  input  logic [SEED_W-1:0] seed,
  output logic [CHAINS-1:0] scan_in
);
  logic [SEED_W-1:0] lfsr;
  logic              fb;

  assign fb = lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0];

  always_ff @(posedge clk) begin
    if (load)      lfsr <= seed;
    else if (step) lfsr <= {lfsr[SEED_W-2:0], fb};
  end

  always_comb begin
    for (int c = 0; c < CHAINS; c++)
      scan_in[c] = lfsr[c % SEED_W] ^ lfsr[(2 * c + 11) % SEED_W] ^ lfsr[(4 * c + 21) % SEED_W];
  end
endmodule
