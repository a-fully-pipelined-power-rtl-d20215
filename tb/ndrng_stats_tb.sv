// ndrng_stats_tb: long-run statistics of one normal random number generator.
//
// The engine is meant to produce up to a million delay samples per arc from
// one LFSR without reusing its bits. This test runs one generator for
// NS = 100,000 samples (9.6 million clocks) with mean 4.0 and sigma 0.25
// (Q8.8: MU = 1024, SIGMA = 64) and checks, against the normal distribution:
//  * sample mean (expected 4.0 + 1 LSB, see below) and standard deviation;
//  * the fractions of samples within 1, 2 and 3 sigma of the mean
//    (0.6827, 0.9545, 0.9973), and nothing beyond 6 sigma, the hard limit of
//    a 12-term central-limit generator;
//  * lag-1 correlation between consecutive samples near zero;
//  * exactly 96 clocks between samples throughout.
`timescale 1ns/1ps
module ndrng_stats_tb;
  import mcssta_pkg::*;

  localparam int   NS  = 100_000;
  localparam lat_t MU  = 1024;
  localparam lat_t SIG = 64;

  logic clk = 1'b0;
  logic rst, seed_en;
  lat_t s;
  logic v;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ndrng #(.MU(MU), .SIGMA(SIG), .SEED(32'h3C6E_F372)) dut
        (.clk, .rst, .seed_en, .sample(s), .valid(v));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (NS * 96 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x, prev, sx, sxx, sxy, mean, sd, r1, f1, f2, f3;
    int  n, in1, in2, in3, beyond6, cyc, last, bad_gap;
    sx = 0; sxx = 0; sxy = 0; prev = 0;
    n = 0; in1 = 0; in2 = 0; in3 = 0; beyond6 = 0; cyc = 0; last = 0; bad_gap = 0;

    rst = 1'b1; seed_en = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0; seed_en = 1'b1;

    while (n < NS) begin
      @(posedge clk); #1;
      cyc++;
      if (v) begin
        real z;
        if (n > 0 && cyc - last != 96) bad_gap++;
        last = cyc;
        x = real'(s) / 256.0;
        z = (x - 4.0) / 0.25;
        if (z < 0) z = -z;
        if (z <= 1.0) in1++;
        if (z <= 2.0) in2++;
        if (z <= 3.0) in3++;
        if (z > 6.0)  beyond6++;
        sx  += x;
        sxx += x * x;
        if (n > 0) sxy += x * prev;
        prev = x;
        n++;
      end
    end

    mean = sx / n;
    sd   = $sqrt(sxx / n - mean * mean);
    r1   = (sxy / (n - 1) - mean * mean) / (sd * sd);
    f1 = real'(in1) / n; f2 = real'(in2) / n; f3 = real'(in3) / n;
    $display("%0d samples: mean %f sd %f  within 1/2/3 sigma %f %f %f  lag-1 corr %f",
             n, mean, sd, f1, f2, f3, r1);
    // X = (u+1)/256 lifts the sum by 6/256 on average and the floor lowers the
    // result by half an LSB: the expected mean is 4.0 + 1/256.
    check(mean > 4.0009 && mean < 4.0069, $sformatf("mean %f", mean));
    check(sd > 0.245 && sd < 0.255, $sformatf("sd %f", sd));
    check(f1 > 0.675 && f1 < 0.690, $sformatf("within 1 sigma %f", f1));
    check(f2 > 0.950 && f2 < 0.959, $sformatf("within 2 sigma %f", f2));
    check(f3 > 0.9955 && f3 < 0.9990, $sformatf("within 3 sigma %f", f3));
    check(beyond6 == 0, "sample beyond 6 sigma");
    check(r1 > -0.02 && r1 < 0.02, $sformatf("lag-1 correlation %f", r1));
    check(bad_gap == 0, $sformatf("%0d sample intervals differ from 96 clocks", bad_gap));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
