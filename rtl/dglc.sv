// dglc: Delay sample Generator and LAT Calculator for one logic gate.
//
// Every gate of the circuit under analysis becomes one DGLC. Each of its
// K_IN inputs (delay arcs) has an input register, an NDRNG that draws the
// arc's delay from N(MU[k], SIGMA[k]), and an adder that forms
// arrival time = input LAT + delay sample. A comparator keeps the largest sum
// (long path analysis, add-max) or the smallest (short path analysis,
// add-min), and an output register drives the link to the next DGLCs.
//
// Pipelining: all registers move together once per Monte Carlo sample, on the
// clock in which the NDRNGs deliver new delays (`advance`, every
// N_CLT * N_RNG clocks). On that clock the input registers take the incoming
// links and the output register takes the result computed from the previous
// contents of the input registers and the new delays. A gate therefore
// delays a sample by two advances, and consecutive gates of a path work on
// consecutive samples at the same time. The output link's valid bit is the AND
// of the input links' valid bits, so it rises once real samples have
// reached the gate.
//
// Interface: seed_en starts all LFSRs of the gate (they must be started on the
// same clock in all gates so that their advances coincide). `winner` is the
// index of the input that gave the registered output (lowest index on a tie).
//
// From the source design: the per-input register/adder/NDRNG/LFSR structure,
// the comparator selecting max or min, the output register and link, one delay
// sample per arc per Monte Carlo sample. This design's choices: saturating
// adders, the valid bit on links, the tie rule, the per-arc LFSR seeds
// (SEED_BASE + k * 0x9E3779B9, forced odd so never zero) and the advance
// strobe taken from the NDRNGs.
module dglc
  import mcssta_pkg::*;
#(
  parameter int unsigned         K_IN      = 4,
  parameter analysis_e           MODE      = LONG_PATH,
  parameter lat_t [K_IN-1:0]     MU        = {K_IN{lat_t'(1 << N_FR)}},
  parameter lat_t [K_IN-1:0]     SIGMA     = {K_IN{lat_t'((1 << N_FR) / 10)}},
  parameter logic [W_LFSR-1:0]   SEED_BASE = 32'h2545_F491
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 seed_en,
  input  link_t [K_IN-1:0]     link_in,
  output link_t                link_out,
  output logic [$clog2(K_IN+1)-1:0] winner,
  output logic                 advance
);

  localparam int unsigned WI = $clog2(K_IN + 1);

  link_t [K_IN-1:0] in_q;
  lat_t  [K_IN-1:0] delay;
  lat_t  [K_IN-1:0] arrival;
  logic  [K_IN-1:0] dvalid;

  for (genvar k = 0; k < K_IN; k++) begin : g_arc
    localparam logic [W_LFSR-1:0] SEED_K =
      (SEED_BASE + W_LFSR'(k) * 32'h9E37_79B9) | 32'h1;

    ndrng #(.MU(MU[k]), .SIGMA(SIGMA[k]), .SEED(SEED_K)) u_ndrng (
      .clk     (clk),
      .rst     (rst),
      .seed_en (seed_en),
      .sample  (delay[k]),
      .valid   (dvalid[k])
    );

    assign arrival[k] = sat_add(in_q[k].lat, delay[k]);
  end

  assign advance = dvalid[0];

  // Comparator
  lat_t          best;
  logic [WI-1:0] best_idx;
  logic          all_valid;

  always_comb begin
    best      = arrival[0];
    best_idx  = '0;
    all_valid = 1'b1;
    for (int k = 0; k < K_IN; k++) begin
      all_valid = all_valid & in_q[k].valid;
      if (k > 0) begin
        if ((MODE == LONG_PATH)  ? (arrival[k] > best) : (arrival[k] < best)) begin
          best     = arrival[k];
          best_idx = WI'(k);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_q     <= '0;
      link_out <= '0;
      winner   <= '0;
    end else if (advance) begin
      in_q     <= link_in;
      link_out <= '{valid: all_valid, lat: best};
      winner   <= best_idx;
    end
  end

  // All arcs of a gate are started together, so their samples arrive together.
  always_ff @(posedge clk)
    if (!rst)
      a_arcs_in_step: assert ((dvalid == '0) || (dvalid == '1))
        else $error("dglc: delay samples of the arcs out of step");

endmodule
