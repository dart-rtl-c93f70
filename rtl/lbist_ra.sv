// lbist_ra: LBIST response analyzer (multiple-input signature register).
//
// A SEED_W-bit MISR with the same polynomial as the TPG
// (x^32 + x^22 + x^2 + x + 1).  On a test-clock edge, `clear` zeroes it;
// otherwise, when `step` is high, it shifts one place with feedback and
// XORs scan_out[c] into bit c.  `signature` is the register.  The document
// names the RA and its signatures; the MISR form is this design's choice.
`timescale 1ps/1ps
module lbist_ra #(
  parameter int SEED_W = 32,
  parameter int CHAINS = 4
) (
  input  logic              clk,      // domain test clock
  input  logic              clear,
  input  logic              step,
  input  logic [CHAINS-1:0] scan_out,
  output logic [SEED_W-1:0] signature
);
  logic [SEED_W-1:0] nxt;

  always_comb begin
    nxt = {signature[SEED_W-2:0],
           signature[31] ^ signature[21] ^ signature[1] ^ signature[0]};
    for (int c = 0; c < CHAINS; c++) nxt[c % SEED_W] ^= scan_out[c];
  end

  always_ff @(posedge clk) begin
    if (clear)     signature <= '0;
    else if (step) signature <= nxt;
  end
endmodule
