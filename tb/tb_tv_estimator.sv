// tb_tv_estimator: self-checking test of the temperature/voltage estimator.
// The estimator is built with nine distinct precise coefficient sets so
// that choosing the wrong interval pair shows in the result.  For 2000
// random count pairs the testbench computes the rough estimate, the
// intervals and the precise estimate itself and compares dt, dv, t_rng
// and v_rng; it also checks that `done` comes exactly three clocks after
// `start` and lasts one clock.
`timescale 1ps/1ps
module tb_tv_estimator;
  localparam int CNT_W = 16;
  typedef logic signed [15:0] c3_t [3];
  localparam logic signed [15:0] AR [3] = '{-16'sd45, 16'sd12, 16'sd0};
  localparam logic signed [15:0] BR [3] = '{-16'sd10, 16'sd40, 16'sd0};
  localparam logic signed [15:0] AP [9][3] = '{'{-16'sd40, 16'sd1, 16'sd2}, '{-16'sd41, 16'sd3, 16'sd4}, '{-16'sd42, 16'sd5, 16'sd6},
                                               '{-16'sd43, 16'sd7, 16'sd8}, '{-16'sd44, 16'sd9, 16'sd10}, '{-16'sd45, 16'sd11, 16'sd12},
                                               '{-16'sd46, 16'sd13, 16'sd14}, '{-16'sd47, 16'sd15, 16'sd16}, '{-16'sd48, 16'sd17, 16'sd18}};
  localparam logic signed [15:0] BP [9][3] = '{'{-16'sd1, 16'sd30, 16'sd1}, '{-16'sd2, 16'sd31, 16'sd2}, '{-16'sd3, 16'sd32, 16'sd3},
                                               '{-16'sd4, 16'sd33, 16'sd4}, '{-16'sd5, 16'sd34, 16'sd5}, '{-16'sd6, 16'sd35, 16'sd6},
                                               '{-16'sd7, 16'sd36, 16'sd7}, '{-16'sd8, 16'sd37, 16'sd8}, '{-16'sd9, 16'sd38, 16'sd9}};
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [CNT_W-1:0] f [3], f0 [3];
  logic signed [31:0] dt, dv;
  logic [1:0] t_rng, v_rng;
  int checks = 0, failures = 0;

  tv_estimator #(.A_ROUGH(AR), .B_ROUGH(BR), .A_PREC(AP), .B_PREC(BP)) dut (.*);
  always #20000 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int cnt [4] = '{0, 0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int df [3];
      int rt, rv, pt, pv, ti, vi, s, lat;
      for (int i = 0; i < 3; i++) begin
        f0[i] = 16'(1000 + $urandom_range(0, 30));
        df[i] = $urandom_range(0, 800) - 400;
        f[i]  = 16'(int'(f0[i]) + df[i]);
      end
      rt = 0; rv = 0;
      for (int i = 0; i < 3; i++) begin rt += AR[i] * df[i]; rv += BR[i] * df[i]; end
      ti = (rt < -5 * 256) ? 0 : (rt < 55 * 256) ? 1 : 2;
      vi = (rv < -100 * 256) ? 0 : (rv < 0) ? 1 : 2;
      s  = ti * 3 + vi;
      pt = 0; pv = 0;
      for (int i = 0; i < 3; i++) begin pt += AP[s][i] * df[i]; pv += BP[s][i] * df[i]; end
      cnt[ti]++;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      while (!done && lat < 10) begin @(negedge clk); lat++; end
      chk(lat == 3, $sformatf("done %0d clocks after start", lat));
      chk(dt == pt && dv == pv && t_rng == 2'(ti) && v_rng == 2'(vi),
          $sformatf("case %0d: dt %0d/%0d dv %0d/%0d rng %0d%0d/%0d%0d", n, dt, pt, dv, pv, t_rng, v_rng, ti, vi));
      @(negedge clk) chk(!done, "done lasts one clock");
    end
    chk(cnt[0] > 0 && cnt[1] > 0 && cnt[2] > 0, "all temperature intervals exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1s;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
