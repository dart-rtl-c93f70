// tb_lbist_ra: self-checking test of the LBIST response analyzer (MISR).
// Clears the register, compacts random scan-out words and compares the
// signature with an independent model after every edge; checks that step
// low holds the value, that clear returns it to zero and that a single
// flipped response bit changes the final signature.
`timescale 1ps/1ps
module tb_lbist_ra;
  localparam int SEED_W = 32, CHAINS = 4;
  logic clk = 0, clear = 0, step = 0;
  logic [CHAINS-1:0] scan_out = '0;
  logic [SEED_W-1:0] signature;
  logic [31:0] m, good;
  logic [3:0]  stim [300];
  int checks = 0, failures = 0;

  lbist_ra dut (.*);
  always #1666 clk = ~clk;

  function automatic logic [31:0] nxt(input logic [31:0] s, input logic [3:0] d);
    logic [31:0] n = {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
    for (int c = 0; c < 4; c++) n[c] ^= d[c];
    return n;
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input int flip, output logic [31:0] sig);
    @(negedge clk); clear = 1; step = 0;
    @(negedge clk); clear = 0; step = 1; m = '0;
    chk(signature === '0, "clear");
    for (int i = 0; i < 300; i++) begin
      scan_out = stim[i] ^ ((i == flip) ? 4'b0100 : 4'b0000);
      m = nxt(m, scan_out);
      @(negedge clk);
      if (i % 50 == 0) chk(signature === m, $sformatf("signature after %0d steps", i + 1));
    end
    chk(signature === m, "final signature");
    step = 0;
    @(negedge clk); @(negedge clk);
    chk(signature === m, "hold with step low");
    sig = signature;
  endtask

  initial begin
    logic [31:0] bad;
    foreach (stim[i]) stim[i] = 4'($urandom());
    run(-1, good);
    run(123, bad);
    chk(bad !== good, "single-bit error changes the signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
