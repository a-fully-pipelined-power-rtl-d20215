// dglc_tb: self-checking testbench for one DGLC (gate delay generator and
// LAT calculator).
//
// Two gates are started by one seed_en: a 4-input gate in long path mode
// (add-max) and a 3-input gate in short path mode (add-min). Their input links
// get random arrival times (some near full scale, to reach the saturating
// adders) and random valid bits, changed after every advance. A reference
// model regenerates each arc's delay samples from its own LFSR model and
// seed, keeps its own copy of the input registers, and predicts the output
// LAT, its valid bit and the winning input after every advance. Also checked:
// advance first high 90 clocks after the clock that takes seed_en, then
// every 96 clocks; every
// input wins at least once in both modes; saturation happens at least once.
`timescale 1ns/1ps
module dglc_tb;
  import mcssta_pkg::*;

  localparam int NADV = 200;
  localparam logic [31:0] BASE_L = 32'h0BAD_F00D;
  localparam logic [31:0] BASE_S = 32'h1234_5677;
  localparam lat_t [3:0] MU_L  = {lat_t'(300), lat_t'(230), lat_t'(256), lat_t'(280)};
  localparam lat_t [3:0] SIG_L = {lat_t'(40),  lat_t'(20),  lat_t'(26),  lat_t'(30)};
  localparam lat_t [2:0] MU_S  = {lat_t'(250), lat_t'(270), lat_t'(256)};
  localparam lat_t [2:0] SIG_S = {lat_t'(30),  lat_t'(25),  lat_t'(26)};

  logic clk = 1'b0;
  logic rst, seed_en;
  link_t [3:0] lin_l;
  link_t [2:0] lin_s;
  link_t out_l, out_s;
  logic [2:0] win_l, win_s;
  logic adv_l, adv_s;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dglc #(.K_IN(4), .MODE(LONG_PATH), .MU(MU_L), .SIGMA(SIG_L), .SEED_BASE(BASE_L)) dut_l
       (.clk, .rst, .seed_en, .link_in(lin_l), .link_out(out_l), .winner(win_l), .advance(adv_l));
  dglc #(.K_IN(3), .MODE(SHORT_PATH), .MU(MU_S), .SIGMA(SIG_S), .SEED_BASE(BASE_S)) dut_s
       (.clk, .rst, .seed_en, .link_in(lin_s), .link_out(out_s), .winner(win_s), .advance(adv_s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- reference delay samples ---------------------------------------------
  function automatic logic [31:0] ref32(logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  function automatic void ref_samples(input logic [31:0] seed, input int mu, input int sig,
                                      output int res [NADV]);
    logic [31:0] st = seed;
    for (int i = 0; i < NADV; i++) begin
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

  int dl [4][NADV];
  int ds [3][NADV];

  // ---- reference pipeline state --------------------------------------------
  int  ml_lat [4];  bit ml_v [4];
  int  ms_lat [3];  bit ms_v [3];
  int  win_cnt_l [4], win_cnt_s [3];
  int  sat_cnt = 0;

  function automatic lat_t rand_lat();
    int r = $urandom_range(0, 15);
    if (r == 0) return lat_t'($urandom_range(65000, 65535));   // near full scale
    return lat_t'($urandom_range(0, 1200));
  endfunction

  task automatic drive_inputs();
    for (int k = 0; k < 4; k++) lin_l[k] = '{valid: ($urandom_range(0, 9) != 0), lat: rand_lat()};
    for (int k = 0; k < 3; k++) lin_s[k] = '{valid: ($urandom_range(0, 9) != 0), lat: rand_lat()};
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NADV * 96 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start_cyc, last_adv;
    for (int k = 0; k < 4; k++) ref_samples(arc_seed(BASE_L, k), MU_L[k], SIG_L[k], dl[k]);
    for (int k = 0; k < 3; k++) ref_samples(arc_seed(BASE_S, k), MU_S[k], SIG_S[k], ds[k]);
    for (int k = 0; k < 4; k++) begin ml_lat[k] = 0; ml_v[k] = 0; win_cnt_l[k] = 0; end
    for (int k = 0; k < 3; k++) begin ms_lat[k] = 0; ms_v[k] = 0; win_cnt_s[k] = 0; end

    rst = 1'b1; seed_en = 1'b0;
    drive_inputs();
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(out_l == '0 && out_s == '0, "outputs cleared by reset");
    seed_en = 1'b1;
    @(posedge clk);
    #1 seed_en = 1'b0;
    start_cyc = cyc;
    last_adv  = -1;

    for (int i = 0; i < NADV; i++) begin
      int  e_lat_l, e_idx_l, e_lat_s, e_idx_s;
      bit  e_v_l, e_v_s;
      // wait for the clock in which the gates advance
      do begin
        @(posedge clk); #1;
      end while (!adv_l);
      if (i == 0) check(cyc - start_cyc == 90, $sformatf("first advance at %0d", cyc - start_cyc));
      else        check(cyc - last_adv == 96, $sformatf("advance interval %0d", cyc - last_adv));
      last_adv = cyc;
      check(adv_s == adv_l, "both gates advance together");

      // expected results of this advance
      e_v_l = 1; e_idx_l = 0; e_lat_l = -1;
      for (int k = 0; k < 4; k++) begin
        int a;
        a = ml_lat[k] + dl[k][i];
        if (a > 65535) begin a = 65535; sat_cnt++; end
        e_v_l &= ml_v[k];
        if (k == 0 || a > e_lat_l) begin e_lat_l = a; e_idx_l = k; end
      end
      e_v_s = 1; e_idx_s = 0; e_lat_s = 1 << 20;
      for (int k = 0; k < 3; k++) begin
        int a;
        a = ms_lat[k] + ds[k][i];
        if (a > 65535) begin a = 65535; sat_cnt++; end
        e_v_s &= ms_v[k];
        if (k == 0 || a < e_lat_s) begin e_lat_s = a; e_idx_s = k; end
      end

      @(posedge clk); #1;
      check(int'(out_l.lat) == e_lat_l && out_l.valid == e_v_l && int'(win_l) == e_idx_l,
            $sformatf("long gate, sample %0d: got %0d/%0b/%0d expected %0d/%0b/%0d",
                      i, out_l.lat, out_l.valid, win_l, e_lat_l, e_v_l, e_idx_l));
      check(int'(out_s.lat) == e_lat_s && out_s.valid == e_v_s && int'(win_s) == e_idx_s,
            $sformatf("short gate, sample %0d: got %0d/%0b/%0d expected %0d/%0b/%0d",
                      i, out_s.lat, out_s.valid, win_s, e_lat_s, e_v_s, e_idx_s));
      win_cnt_l[e_idx_l]++;
      win_cnt_s[e_idx_s]++;

      // the input registers took the links at that edge
      for (int k = 0; k < 4; k++) begin ml_lat[k] = lin_l[k].lat; ml_v[k] = lin_l[k].valid; end
      for (int k = 0; k < 3; k++) begin ms_lat[k] = lin_s[k].lat; ms_v[k] = lin_s[k].valid; end
      drive_inputs();
    end

    for (int k = 0; k < 4; k++) check(win_cnt_l[k] > 0, $sformatf("long gate input %0d never won", k));
    for (int k = 0; k < 3; k++) check(win_cnt_s[k] > 0, $sformatf("short gate input %0d never won", k));
    check(sat_cnt > 0, "saturation never happened");
    $display("wins long %0d %0d %0d %0d, short %0d %0d %0d, saturations %0d",
             win_cnt_l[0], win_cnt_l[1], win_cnt_l[2], win_cnt_l[3],
             win_cnt_s[0], win_cnt_s[1], win_cnt_s[2], sat_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
