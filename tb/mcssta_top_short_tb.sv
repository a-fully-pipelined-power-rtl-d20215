// mcssta_top_short_tb: end-to-end test of the Monte Carlo SSTA engine in short
// path mode (MODE = SHORT_PATH: every gate keeps the earliest arrival, add-min,
// as used for hold analysis), plus the stand-alone 12-bit LFSR. Apart from the
// mode, the top runs at its default parameters.
//
// The engine is reset, seeded and run for NSAMP Monte Carlo samples of the
// example netlist (gates A and B feeding gate C). The primary input arrival
// times change at random after every advance. A reference model of the
// whole netlist, written independently of the RTL, regenerates every arc's
// delay samples from a model of its LFSR, keeps its own copy of every
// pipeline register and predicts lat_a, lat_b, lat_out and the winning inputs
// after each advance. It also checks the advance timing (first at 90 clocks
// after seed_en is taken, then every 96), the pipeline fill (lat_out valid
// from the 4th advance on) and prints mean and standard deviation of the
// output LAT samples, the result an MC-SSTA run delivers.
//
// Mechanisms counted, each must occur: advances, LFSR seed loads, valid output
// samples, each input of each gate winning its comparator, the 12-bit LFSR
// being reset to zero, seeded and stepping through the published sequence.
`timescale 1ns/1ps
module mcssta_top_short_tb;
  import mcssta_pkg::*;

  localparam int NSAMP = 400;

  // copies of the top's default parameters for the reference model
  localparam int MU_A [2] = '{256, 307};  localparam int SG_A [2] = '{26, 38};
  localparam int MU_B [3] = '{205, 256, 282}; localparam int SG_B [3] = '{20, 26, 31};
  localparam int MU_C [2] = '{230, 282};  localparam int SG_C [2] = '{26, 26};
  localparam logic [31:0] SEED_A = 32'h6C07_8965;
  localparam logic [31:0] SEED_B = 32'h5851_F42D;
  localparam logic [31:0] SEED_C = 32'h1405_7B7F;

  logic clk = 1'b0;
  logic rst, seed_en, pi_valid;
  lat_t [4:0] pi_lat;
  link_t lat_out, lat_a, lat_b;
  logic [1:0] winner_a, winner_b, winner_c;
  logic advance;
  logic atpg_rst, atpg_seed_en;
  logic [11:0] atpg_seed, atpg_o;
  lfsr_state_e atpg_state;

  always #5 clk = ~clk;

  mcssta_top #(.MODE(SHORT_PATH)) dut (
    .clk, .rst, .seed_en, .pi_lat, .pi_valid,
    .lat_out, .lat_a, .lat_b, .winner_a, .winner_b, .winner_c, .advance,
    .atpg_lfsr_reset   (atpg_rst),
    .atpg_lfsr_seed_en (atpg_seed_en),
    .atpg_lfsr_seed    (atpg_seed),
    .atpg_lfsr_atpg_o  (atpg_o),
    .atpg_lfsr_state   (atpg_state)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- reference model -----------------------------------------------------
  function automatic logic [31:0] ref32(logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  function automatic void ref_samples(input logic [31:0] seed, input int mu, input int sig,
                                      output int res [NSAMP]);
    logic [31:0] st = seed;
    for (int i = 0; i < NSAMP; i++) begin
      longint sum = 0, prod, r;
      for (int w = 0; w < 12; w++) begin
        sum += longint'(st[7:0]) + 1;
        for (int b = 0; b < 8; b++) st = ref32(st);
      end
      prod = (sum - 1536) * sig;
      r = (prod >= 0) ? prod / 256 : -((-prod + 255) / 256);
      r = mu + r;
      if (r < 0) r = 0;
      if (r > 65535) r = 65535;
      res[i] = int'(r);
    end
  endfunction

  function automatic logic [31:0] arc_seed(logic [31:0] base, int k);
    return (base + 32'(k) * 32'h9E37_79B9) | 32'h1;
  endfunction

  function automatic int sadd(int a, int b);
    return (a + b > 65535) ? 65535 : a + b;
  endfunction

  int da [2][NSAMP], db [3][NSAMP], dc [2][NSAMP];

  // model registers: inputs and outputs of each gate (lat, valid)
  int a_in [2], b_in [3], c_in [2], a_out, b_out, c_out;
  bit a_inv [2], b_inv [3], c_inv [2], a_ov, b_ov, c_ov;
  int wins_a [2], wins_b [3], wins_c [2];
  int n_adv = 0, n_valid_out = 0, n_seed_loads = 0, n_atpg_reset = 0, n_atpg_seq = 0;
  real sum_x = 0.0, sum_xx = 0.0;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic drive_pi();
    for (int k = 0; k < 5; k++) pi_lat[k] = lat_t'($urandom_range(0, 160));
  endtask

  initial begin
    repeat (NSAMP * 96 + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [11:0] SEQ12 [9] = '{12'haaa, 12'h555, 12'haab, 12'h556, 12'haac,
                                        12'h559, 12'hab3, 12'h566, 12'hacc};

  // ---- 12-bit LFSR part --------------------------------------------------
  initial begin
    atpg_rst = 1'b1; atpg_seed_en = 1'b1; atpg_seed = 12'haaa;
    repeat (4) @(posedge clk);
    #1;
    check(atpg_o == 12'h000 && atpg_state == IDLE, "12-bit LFSR reset to all-zero");
    if (atpg_o == 0) n_atpg_reset++;
    atpg_rst = 1'b0;
    @(posedge clk); #1 check(atpg_state == ENA, "12-bit LFSR: ENA after reset");
    @(posedge clk); #1 check(atpg_state == START && atpg_o == 12'haaa, "12-bit LFSR: seed loaded");
    for (int i = 1; i < 9; i++) begin
      @(posedge clk); #1;
      check(atpg_o == SEQ12[i], $sformatf("12-bit LFSR step %0d: %h", i, atpg_o));
      if (atpg_o == SEQ12[i]) n_atpg_seq++;
    end
  end

  // ---- engine ------------------------------------------------------------
  initial begin
    int start_cyc, last_adv;
    real mean, sd;
    for (int k = 0; k < 2; k++) ref_samples(arc_seed(SEED_A, k), MU_A[k], SG_A[k], da[k]);
    for (int k = 0; k < 3; k++) ref_samples(arc_seed(SEED_B, k), MU_B[k], SG_B[k], db[k]);
    for (int k = 0; k < 2; k++) ref_samples(arc_seed(SEED_C, k), MU_C[k], SG_C[k], dc[k]);
    for (int k = 0; k < 2; k++) begin a_in[k] = 0; a_inv[k] = 0; c_in[k] = 0; c_inv[k] = 0;
                                      wins_a[k] = 0; wins_c[k] = 0; end
    for (int k = 0; k < 3; k++) begin b_in[k] = 0; b_inv[k] = 0; wins_b[k] = 0; end
    a_out = 0; b_out = 0; c_out = 0; a_ov = 0; b_ov = 0; c_ov = 0;

    rst = 1'b1; seed_en = 1'b0; pi_valid = 1'b1;
    drive_pi();
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(lat_out == '0 && lat_a == '0 && lat_b == '0, "links cleared by reset");
    @(posedge clk); #1;
    seed_en = 1'b1;
    @(posedge clk);
    #1 seed_en = 1'b0;
    start_cyc = cyc;
    // the LFSRs of the gates take the seed_en edge into ENA (seed load)
    if (dut.u_gate_a.g_arc[0].u_ndrng.u_lfsr.state == ENA &&
        dut.u_gate_c.g_arc[1].u_ndrng.u_lfsr.state == ENA) n_seed_loads++;

    for (int i = 0; i < NSAMP; i++) begin
      int n_a_out, n_b_out, n_c_out, ia, ib, ic;
      bit n_a_ov, n_b_ov, n_c_ov;
      do begin
        @(posedge clk); #1;
      end while (!advance);
      if (i == 0) check(cyc - start_cyc == 90, $sformatf("first advance at %0d", cyc - start_cyc));
      else        check(cyc - last_adv == 96, $sformatf("advance interval %0d", cyc - last_adv));
      last_adv = cyc;
      n_adv++;

      // reference: every gate from the old register contents and new delays
      n_a_out = 1 << 20; ia = 0; n_a_ov = 1;
      for (int k = 0; k < 2; k++) begin
        int s;
        s = sadd(a_in[k], da[k][i]);
        n_a_ov &= a_inv[k];
        if (k == 0 || s < n_a_out) begin n_a_out = s; ia = k; end
      end
      n_b_out = 1 << 20; ib = 0; n_b_ov = 1;
      for (int k = 0; k < 3; k++) begin
        int s;
        s = sadd(b_in[k], db[k][i]);
        n_b_ov &= b_inv[k];
        if (k == 0 || s < n_b_out) begin n_b_out = s; ib = k; end
      end
      n_c_out = 1 << 20; ic = 0; n_c_ov = 1;
      for (int k = 0; k < 2; k++) begin
        int s;
        s = sadd(c_in[k], dc[k][i]);
        n_c_ov &= c_inv[k];
        if (k == 0 || s < n_c_out) begin n_c_out = s; ic = k; end
      end
      c_in[0] = a_out; c_inv[0] = a_ov;
      c_in[1] = b_out; c_inv[1] = b_ov;
      for (int k = 0; k < 2; k++) begin a_in[k] = pi_lat[k];     a_inv[k] = pi_valid; end
      for (int k = 0; k < 3; k++) begin b_in[k] = pi_lat[k + 2]; b_inv[k] = pi_valid; end
      a_out = n_a_out; a_ov = n_a_ov;
      b_out = n_b_out; b_ov = n_b_ov;
      c_out = n_c_out; c_ov = n_c_ov;

      @(posedge clk); #1;
      check(int'(lat_a.lat) == a_out && lat_a.valid == a_ov && int'(winner_a) == ia,
            $sformatf("gate A, advance %0d: %0d/%0b/%0d expected %0d/%0b/%0d",
                      i, lat_a.lat, lat_a.valid, winner_a, a_out, a_ov, ia));
      check(int'(lat_b.lat) == b_out && lat_b.valid == b_ov && int'(winner_b) == ib,
            $sformatf("gate B, advance %0d: %0d/%0b/%0d expected %0d/%0b/%0d",
                      i, lat_b.lat, lat_b.valid, winner_b, b_out, b_ov, ib));
      check(int'(lat_out.lat) == c_out && lat_out.valid == c_ov && int'(winner_c) == ic,
            $sformatf("gate C, advance %0d: %0d/%0b/%0d expected %0d/%0b/%0d",
                      i, lat_out.lat, lat_out.valid, winner_c, c_out, c_ov, ic));
      check(lat_out.valid == (i >= 3), $sformatf("output valid at advance %0d", i));
      if (a_ov) wins_a[ia]++;
      if (b_ov) wins_b[ib]++;
      if (c_ov) wins_c[ic]++;
      if (lat_out.valid) begin
        n_valid_out++;
        sum_x  += real'(lat_out.lat) / 256.0;
        sum_xx += (real'(lat_out.lat) / 256.0) ** 2;
      end
      drive_pi();
    end

    mean = sum_x / n_valid_out;
    sd   = $sqrt(sum_xx / n_valid_out - mean * mean);
    $display("output LAT over %0d Monte Carlo samples: mean %f sd %f", n_valid_out, mean, sd);
    $display("wins A %0d %0d  B %0d %0d %0d  C %0d %0d", wins_a[0], wins_a[1],
             wins_b[0], wins_b[1], wins_b[2], wins_c[0], wins_c[1]);
    $display("advances %0d seed loads %0d valid outputs %0d 12-bit: resets %0d sequence steps %0d",
             n_adv, n_seed_loads, n_valid_out, n_atpg_reset, n_atpg_seq);
    check(n_adv == NSAMP, "advances");
    check(n_seed_loads > 0, "seed load never seen");
    check(n_valid_out == NSAMP - 3, "valid output samples");
    for (int k = 0; k < 2; k++) check(wins_a[k] > 0, $sformatf("gate A input %0d never won", k));
    for (int k = 0; k < 3; k++) check(wins_b[k] > 0, $sformatf("gate B input %0d never won", k));
    for (int k = 0; k < 2; k++) check(wins_c[k] > 0, $sformatf("gate C input %0d never won", k));
    check(n_atpg_reset > 0, "12-bit LFSR reset never seen");
    check(n_atpg_seq == 8, "12-bit LFSR sequence");
    // two stages of the earliest arc, roughly 0.8 to 1.0 each
    check(mean > 1.5 && mean < 2.3, $sformatf("output mean %f out of range", mean));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
