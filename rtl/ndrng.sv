// ndrng: normal distribution random number generator for one delay arc.
//
// A gate delay sample d ~ N(MU, SIGMA) is made with the central limit theorem:
//     d = SIGMA * 2*sqrt(3)/sqrt(N) * (X_1 + ... + X_N - N/2) + MU
// where the X_i are uniform numbers in (0, 1]. For the default N = 12 the
// scale factor 2*sqrt(3)/sqrt(12) is exactly 1, so only an add chain, one
// subtraction, one multiplication by the constant SIGMA and one add of MU
// remain. The uniform numbers come from this generator's own LFSR, which
// shifts one bit per clock: every N_RNG clocks the low N_RNG bits of the LFSR
// are all new, and are read as the integer u, X = (u + 1) / 2^N_RNG.
// N words make a sample, so one sample costs N * N_RNG clocks.
//
// Fixed point: MU, SIGMA and the sample are unsigned W_LAT-bit words with N_FR
// fractional bits. With S = sum of (u_i + 1),
//     sample = clamp(MU + floor(SIGMA_EFF * (S - N * 2^(N_RNG-1)) / 2^N_RNG))
// clamped to [0, 2^W_LAT - 1]; SIGMA_EFF = round(SIGMA * 2*sqrt(3)/sqrt(N)).
//
// Interface and timing: seed_en starts the LFSR (see lfsr). The LFSR words
// are read on the 1st, (N_RNG+1)th, ... clock in which it runs. `sample`
// changes and `valid` pulses for one clock on the clock after the N-th word
// was read: the first valid comes (N-1)*N_RNG + 1 clocks after the first
// running clock, later ones every N*N_RNG clocks. `sample` holds its value
// between pulses (0 after reset).
//
// From the source design: equation (1), N = 12, the LFSR as the uniform
// source, N_RNG output bits, the N * N_RNG clock cost. This design's choices:
// N_RNG = 8, X = (u+1)/2^N_RNG, floor rounding and clamping of negative or
// overflowing samples.
module ndrng
  import mcssta_pkg::*;
#(
  parameter lat_t              MU    = lat_t'(1 << N_FR),       // 1.0
  parameter lat_t              SIGMA = lat_t'((1 << N_FR) / 10), // about 0.1
  parameter logic [W_LFSR-1:0] SEED  = 32'h1D87_2B41,
  parameter int unsigned       N     = N_CLT,
  parameter int unsigned       NRNG  = N_RNG
) (
  input  logic clk,
  input  logic rst,
  input  logic seed_en,
  output lat_t sample,
  output logic valid
);

  // ---- constants ---------------------------------------------------------
  localparam real         SCALE     = 2.0 * $sqrt(3.0) / $sqrt(real'(N));
  localparam int unsigned SIGMA_EFF = int'($rtoi(real'(SIGMA) * SCALE + 0.5));
  localparam int unsigned WS        = NRNG + $clog2(N) + 1;      // sum width
  localparam int unsigned WP        = W_LAT + WS + 4;            // product width
  localparam int unsigned WC        = (NRNG > 1) ? $clog2(NRNG) : 1;
  localparam int unsigned WW        = (N > 1) ? $clog2(N) : 1;
  localparam logic [WS-1:0] HALF_N  = WS'(N) << (NRNG - 1);      // N/2 in units of 2^-NRNG

  // ---- uniform source ----------------------------------------------------
  logic [W_LFSR-1:0] lfsr_q;
  logic              running;
  lfsr_state_e       lfsr_state;

  lfsr #(.WIDTH(W_LFSR), .TAPS(TAPS32)) u_lfsr (
    .clk     (clk),
    .rst     (rst),
    .seed_en (seed_en),
    .seed    (SEED),
    .q       (lfsr_q),
    .running (running),
    .state   (lfsr_state)
  );

  // ---- CLT accumulator -----------------------------------------------------
  logic [WC-1:0] bit_cnt;    // clocks since the last word was read
  logic [WW-1:0] word_cnt;   // words summed so far in this sample
  logic [WS-1:0] acc;
  logic [WS-1:0] word;       // u + 1
  logic [WS-1:0] sum_all;
  logic          take;

  assign take    = running && (bit_cnt == '0);
  assign word    = WS'(lfsr_q[NRNG-1:0]) + WS'(1);
  assign sum_all = acc + word;

  // ---- scale and shift -------------------------------------------------
  logic signed [WP-1:0] centred, product, scaled, result;
  lat_t                 clamped;

  always_comb begin
    centred = signed'(WP'(sum_all)) - signed'(WP'(HALF_N));
    product = centred * signed'(WP'(SIGMA_EFF));
    scaled  = product >>> NRNG;
    result  = signed'(WP'(MU)) + scaled;
    if (result < 0)
      clamped = '0;
    else if (result > signed'(WP'(LAT_MAX)))
      clamped = LAT_MAX;
    else
      clamped = result[W_LAT-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bit_cnt  <= '0;
      word_cnt <= '0;
      acc      <= '0;
      sample   <= '0;
      valid    <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (running)
        bit_cnt <= (bit_cnt == WC'(NRNG - 1)) ? '0 : bit_cnt + 1'b1;
      if (take) begin
        if (word_cnt == WW'(N - 1)) begin
          word_cnt <= '0;
          acc      <= '0;
          sample   <= clamped;
          valid    <= 1'b1;
        end else begin
          word_cnt <= word_cnt + 1'b1;
          acc      <= sum_all;
        end
      end
    end
  end

endmodule
