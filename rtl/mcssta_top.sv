// mcssta_top: Monte Carlo statistical static timing analysis engine for a
// three-gate example netlist, plus a stand-alone 12-bit seeded LFSR.
//
// The circuit under analysis is
//     gate A (2 inputs) --\
//                          gate C (2 inputs) --> output
//     gate B (3 inputs) --/
// with five primary inputs, pi[0..1] on A and pi[2..4] on B. Each gate is a
// DGLC; A and B feed C through links (cascade connections). Every
// N_CLT * N_RNG clocks all DGLCs advance together: A and B compute the arrival
// times of Monte Carlo sample n+1 while C combines their results for sample n.
// After the pipeline has filled (lat_out.valid high), every advance puts
// one new sample of the output's latest (or, with MODE = SHORT_PATH,
// earliest) arrival time on lat_out. Collecting these samples into a
// distribution is left to whatever reads lat_out.
//
// Start-up: hold rst, release it, then raise seed_en; the LFSRs load their
// seeds and `advance` is first high (N_CLT-1)*N_RNG + 2 clocks after the clock
// edge that takes seed_en (90 clocks with the defaults), then every
// N_CLT*N_RNG clocks. The primary input arrival times pi_lat
// are sampled at each advance; pi_valid marks them as real samples.
//
// The second, independent part is the 12-bit seeded LFSR used to demonstrate
// the seed-loading controller (ports atpg_lfsr_*): reset clears it to zero,
// seed_en loads atpg_lfsr_seed, then it shifts left one bit per clock with
// feedback taps 12 and 1.
//
// From the source design: the example netlist's structure (two first-level
// gates of 2 and 3 inputs feeding a 2-input gate), the DGLC cascade, the
// 12-bit LFSR and its port names. This design's choices: the delay
// distributions of the example gates, the 12-bit LFSR taps (chosen so that the
// register reproduces the value sequence of the source's waveform from seed
// 0xAAA), and the seed values.
module mcssta_top
  import mcssta_pkg::*;
#(
  parameter analysis_e MODE = LONG_PATH,
  // Gate A: two arcs, mean 1.0 / 1.2, sigma 0.10 / 0.15 (Q8.8)
  parameter lat_t [1:0] MU_A    = {lat_t'(307), lat_t'(256)},
  parameter lat_t [1:0] SIGMA_A = {lat_t'(38),  lat_t'(26)},
  // Gate B: three arcs, mean 0.8 / 1.0 / 1.1, sigma 0.08 / 0.10 / 0.12
  parameter lat_t [2:0] MU_B    = {lat_t'(282), lat_t'(256), lat_t'(205)},
  parameter lat_t [2:0] SIGMA_B = {lat_t'(31),  lat_t'(26),  lat_t'(20)},
  // Gate C: two arcs (from A, from B), mean 0.9 / 1.1, sigma 0.10 / 0.10
  parameter lat_t [1:0] MU_C    = {lat_t'(282), lat_t'(230)},
  parameter lat_t [1:0] SIGMA_C = {lat_t'(26),  lat_t'(26)},
  parameter logic [W_LFSR-1:0] SEED_A = 32'h6C07_8965,
  parameter logic [W_LFSR-1:0] SEED_B = 32'h5851_F42D,
  parameter logic [W_LFSR-1:0] SEED_C = 32'h1405_7B7F
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              seed_en,
  input  lat_t [4:0]        pi_lat,
  input  logic              pi_valid,
  output link_t             lat_out,
  output link_t             lat_a,
  output link_t             lat_b,
  output logic [1:0]        winner_a,
  output logic [1:0]        winner_b,
  output logic [1:0]        winner_c,
  output logic              advance,
  // 12-bit seeded LFSR
  input  logic              atpg_lfsr_reset,
  input  logic              atpg_lfsr_seed_en,
  input  logic [11:0]       atpg_lfsr_seed,
  output logic [11:0]       atpg_lfsr_atpg_o,
  output lfsr_state_e       atpg_lfsr_state
);

  link_t [4:0] pi_link;
  for (genvar i = 0; i < 5; i++) begin : g_pi
    assign pi_link[i] = '{valid: pi_valid, lat: pi_lat[i]};
  end

  logic adv_a, adv_b, adv_c;

  dglc #(.K_IN(2), .MODE(MODE), .MU(MU_A), .SIGMA(SIGMA_A), .SEED_BASE(SEED_A)) u_gate_a (
    .clk      (clk),
    .rst      (rst),
    .seed_en  (seed_en),
    .link_in  (pi_link[1:0]),
    .link_out (lat_a),
    .winner   (winner_a),
    .advance  (adv_a)
  );

  dglc #(.K_IN(3), .MODE(MODE), .MU(MU_B), .SIGMA(SIGMA_B), .SEED_BASE(SEED_B)) u_gate_b (
    .clk      (clk),
    .rst      (rst),
    .seed_en  (seed_en),
    .link_in  (pi_link[4:2]),
    .link_out (lat_b),
    .winner   (winner_b),
    .advance  (adv_b)
  );

  dglc #(.K_IN(2), .MODE(MODE), .MU(MU_C), .SIGMA(SIGMA_C), .SEED_BASE(SEED_C)) u_gate_c (
    .clk      (clk),
    .rst      (rst),
    .seed_en  (seed_en),
    .link_in  ({lat_b, lat_a}),
    .link_out (lat_out),
    .winner   (winner_c),
    .advance  (adv_c)
  );

  assign advance = adv_c;

  // All gates are started by the same seed_en, so they advance together.
  always_ff @(posedge clk)
    if (!rst)
      a_gates_in_step: assert ((adv_a == adv_c) && (adv_b == adv_c))
        else $error("mcssta_top: gates advance out of step");

  // Stand-alone 12-bit seeded LFSR
  lfsr #(.WIDTH(12), .TAPS(12'h801)) u_atpg_lfsr (
    .clk     (clk),
    .rst     (atpg_lfsr_reset),
    .seed_en (atpg_lfsr_seed_en),
    .seed    (atpg_lfsr_seed),
    .q       (atpg_lfsr_atpg_o),
    .running (),
    .state   (atpg_lfsr_state)
  );

endmodule
