// ndrng_tb: self-checking testbench for the central-limit normal generator.
//
// Two instances run from one seed_en: one with the default N(1.0, 0.1)
// (Q8.8: MU = 256, SIGMA = 25) and one with N(0.05, 1.0) whose samples often
// fall below zero and must be clamped to 0. Checks:
// A third instance uses N = 6 words per sample, where the scale factor
// 2*sqrt(3)/sqrt(6) is not 1 and is folded into sigma (SIGMA_EFF = 35 for
// SIGMA = 25). Checks:
//  * every sample equals a reference computed from a separate LFSR model:
//    words are the low 8 bits of the LFSR every 8 clocks, 12 words per sample,
//    sample = clamp(MU + floor(SIGMA * (sum(u+1) - 1536) / 256));
//  * the first sample appears 2 + 11*8 clocks after seed_en is taken and
//    the next ones every 12*8 = 96 clocks, as a single-clock valid pulse;
//  * over the run, mean and standard deviation of the default instance are
//    near 1.0 and 0.1, and the clamp instance clamped at least once.
`timescale 1ns/1ps
module ndrng_tb;
  import mcssta_pkg::*;

  localparam int NS = 300;                  // samples checked
  localparam logic [31:0] SEED1 = 32'h1D87_2B41;
  localparam logic [31:0] SEED2 = 32'h7F4A_7C15;
  localparam lat_t MU1 = 256, SIG1 = 25;
  localparam lat_t MU2 = 13,  SIG2 = 256;

  logic clk = 1'b0;
  logic rst, seed_en;
  lat_t s1, s2, s3;
  logic v1, v2, v3;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ndrng #(.MU(MU1), .SIGMA(SIG1), .SEED(SEED1)) dut1
        (.clk, .rst, .seed_en, .sample(s1), .valid(v1));
  ndrng #(.MU(MU2), .SIGMA(SIG2), .SEED(SEED2)) dut2
        (.clk, .rst, .seed_en, .sample(s2), .valid(v2));
  ndrng #(.MU(MU1), .SIGMA(SIG1), .SEED(SEED2), .N(6)) dut3
        (.clk, .rst, .seed_en, .sample(s3), .valid(v3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] ref32(logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  // Reference sample stream of one generator
  function automatic void ref_samples(input logic [31:0] seed, input int mu, input int sig,
                                      input int nw, output int res [NS], output int nclamp);
    logic [31:0] st = seed;
    nclamp = 0;
    for (int i = 0; i < NS; i++) begin
      longint sum = 0, prod, r;
      for (int w = 0; w < nw; w++) begin
        sum += longint'(st[7:0]) + 1;
        for (int b = 0; b < 8; b++) st = ref32(st);
      end
      prod = (sum - nw * 128) * sig;
      // floor division by 256
      r = (prod >= 0) ? prod / 256 : -((-prod + 255) / 256);
      r = mu + r;
      if (r < 0) begin r = 0; nclamp++; end
      if (r > 65535) r = 65535;
      res[i] = int'(r);
    end
  endfunction

  int exp1 [NS], exp2 [NS], exp3 [NS];
  int n3 = 0, last3 = -1;
  int nclamp2, dummy;
  int cyc = 0;
  int first_seen = -1, last_seen = -1, n1 = 0, n2 = 0;
  real sum_x = 0.0, sum_xx = 0.0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NS * 96 + 500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start_cyc;
    real mean, sd;
    ref_samples(SEED1, MU1, SIG1, 12, exp1, dummy);
    ref_samples(SEED2, MU2, SIG2, 12, exp2, nclamp2);
    // 25 * 2*sqrt(3)/sqrt(6) = 35.36 -> 35
    ref_samples(SEED2, MU1, 35, 6, exp3, dummy);

    rst = 1'b1; seed_en = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);
    #1 check(v1 == 0 && s1 == 0, "quiet before seed_en");
    seed_en = 1'b1;
    @(posedge clk);             // seed_en taken on this edge
    #1 seed_en = 1'b0;
    start_cyc = cyc;

    while (n1 < NS) begin
      @(posedge clk); #1;
      if (v3 && n3 < NS) begin
        check(int'(s3) == exp3[n3], $sformatf("N=6 sample %0d: got %0d expected %0d", n3, s3, exp3[n3]));
        if (n3 > 0) check(cyc - last3 == 48, $sformatf("N=6 interval %0d", cyc - last3));
        last3 = cyc;
        n3++;
      end
      if (v1) begin
        if (n1 == 0) begin
          first_seen = cyc - start_cyc;
          check(first_seen == 2 + 11 * 8,
                $sformatf("first sample after %0d clocks, expected %0d", first_seen, 2 + 11 * 8));
        end else begin
          check(cyc - last_seen == 96,
                $sformatf("sample interval %0d, expected 96", cyc - last_seen));
        end
        last_seen = cyc;
        check(v2 == 1'b1, "both generators deliver together");
        check(int'(s1) == exp1[n1], $sformatf("sample %0d: got %0d expected %0d", n1, s1, exp1[n1]));
        check(int'(s2) == exp2[n1], $sformatf("clamp sample %0d: got %0d expected %0d", n1, s2, exp2[n1]));
        if (s2 == 0) n2++;
        sum_x  += real'(s1) / 256.0;
        sum_xx += (real'(s1) / 256.0) ** 2;
        n1++;
        @(posedge clk); #1;
        check(!v1, "valid lasts one clock");
      end
    end

    mean = sum_x / NS;
    sd   = $sqrt(sum_xx / NS - mean * mean);
    $display("default generator: mean %f sd %f over %0d samples", mean, sd, NS);
    check(mean > 0.98 && mean < 1.02, $sformatf("mean %f", mean));
    check(sd > 0.085 && sd < 0.115, $sformatf("sd %f", sd));
    check(n2 > 0 && n2 == nclamp2, $sformatf("clamped %0d, reference %0d", n2, nclamp2));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
