// tb_dart_full: full-size run of the end-to-end test.  dart_top keeps all of
// its parameters at their defaults (12 domains, 64-tap delay lines, 40 ps
// steps, 5 TVMs); the workload written into the DART memory uses the sizes
// of the document's experiment: scan chains of 300 flops and 64 patterns
// per seed.  Everything else (checks, sessions, watchdog) is tb_dart_top.
`timescale 1ps/1ps
module tb_dart_full;
  tb_dart_top #(.CL(300), .NPAT(64)) u_tb ();
endmodule
