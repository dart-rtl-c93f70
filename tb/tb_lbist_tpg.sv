// tb_lbist_tpg: self-checking test of the LBIST pattern generator.
// Loads several seeds and steps the LFSR, comparing the LFSR state and the
// four scan-in bits with an independent model after every test-clock edge;
// also checks that an LFSR with step low holds its state and that a
// non-zero seed never reaches the all-zero state within 5000 steps.
`timescale 1ps/1ps
module tb_lbist_tpg;
  localparam int SEED_W = 32, CHAINS = 4;
  logic clk = 0, load = 0, step = 0;
  logic [SEED_W-1:0] seed = '0;
  logic [CHAINS-1:0] scan_in;
  logic [31:0] m;
  int checks = 0, failures = 0;

  lbist_tpg dut (.*);
  always #1666 clk = ~clk;

  function automatic logic [3:0] si_of(input logic [31:0] l);
    for (int c = 0; c < 4; c++) si_of[c] = l[c % 32] ^ l[(2 * c + 11) % 32] ^ l[(4 * c + 21) % 32];
  endfunction
  function automatic logic [31:0] nxt(input logic [31:0] l);
    return {l[30:0], l[31] ^ l[21] ^ l[1] ^ l[0]};
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [31:0] seeds [3] = '{32'h1, 32'hDEADBEEF, 32'h8000_0001};
    foreach (seeds[k]) begin
      @(negedge clk); load = 1; step = 0; seed = seeds[k];
      @(negedge clk); load = 0; step = 1; m = seeds[k];
      chk(scan_in === si_of(m), $sformatf("scan_in after load of %h", seeds[k]));
      for (int i = 0; i < 200; i++) begin
        @(negedge clk); m = nxt(m);
        chk(dut.lfsr === m && scan_in === si_of(m), $sformatf("seed %h step %0d", seeds[k], i));
      end
    end
    @(negedge clk); step = 0; m = nxt(m);
    @(negedge clk); @(negedge clk);
    chk(dut.lfsr === m, "hold with step low");
    step = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (dut.lfsr == '0) begin chk(0, "LFSR reached zero"); break; end
    end
    checks++;
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
