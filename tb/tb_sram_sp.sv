// tb_sram_sp: self-checking test of the single-port memory.
// Writes a random pattern to every word, reads it all back and compares with
// a testbench copy; also checks that read data appears exactly one clock
// after the read is issued and that a write to one word leaves a neighbour
// unchanged.  Default size (2048 x 32 = 8 kB, the DART memory size).
`timescale 1ps/1ps
module tb_sram_sp;
  localparam int WORDS = 2048, DW = 32, AW = 11;
  logic clk = 0, en = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  sram_sp dut (.*);
  always #5000 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    for (int i = 0; i < WORDS; i++) begin
      ref_mem[i] = $urandom();
      @(negedge clk); en = 1; we = 1; addr = AW'(i); wdata = ref_mem[i];
    end
    @(negedge clk); en = 0; we = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); en = 1; addr = AW'(i);
      @(posedge clk); #1;
      chk(rdata === ref_mem[i], $sformatf("word %0d read %h expected %h", i, rdata, ref_mem[i]));
    end
    // latency: data must not be there before the clock edge
    @(negedge clk); en = 1; addr = 5;
    #1 chk(rdata === ref_mem[4 % WORDS] || rdata === ref_mem[WORDS-1], "read data changed before the clock edge");
    @(posedge clk); #1 chk(rdata === ref_mem[5], "one-clock read latency");
    // single write leaves the neighbour alone
    @(negedge clk); en = 1; we = 1; addr = 7; wdata = ~ref_mem[7]; ref_mem[7] = ~ref_mem[7];
    @(negedge clk); we = 0; addr = 8;
    @(posedge clk); #1 chk(rdata === ref_mem[8], "neighbour unchanged");
    @(negedge clk); addr = 7;
    @(posedge clk); #1 chk(rdata === ref_mem[7], "rewritten word");
    @(negedge clk); en = 0;
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
