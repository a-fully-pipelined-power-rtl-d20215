// mcssta_pkg: types and constants shared by the Monte Carlo SSTA engine.
//
// Arrival times (LATs) and gate delay samples are unsigned fixed-point numbers
// of W_LAT bits with N_FR fractional bits. The normal random numbers are made
// with the central limit theorem from N_CLT uniform words of N_RNG bits, each
// taken from a W_LFSR-bit linear feedback shift register.
//
// From the source design: the CLT order N = 12, the 32-bit LFSR and its taps
// 32, 22, 2, 1, the idea of a fractional-bit count N_fr for LATs, the choice
// of max (long path) or min (short path) in the comparator.
// This design's own choices: W_LAT = 16, N_FR = 8 (a Q8.8 LAT) and N_RNG = 8.
package mcssta_pkg;

  // LAT / delay word
  parameter int unsigned W_LAT  = 16;
  parameter int unsigned N_FR   = 8;
  typedef logic [W_LAT-1:0] lat_t;
  localparam lat_t LAT_MAX = '1;

  // Central limit theorem NDRNG
  parameter int unsigned N_CLT  = 12;   // uniform words summed per normal sample
  parameter int unsigned N_RNG  = 8;    // bits per uniform word

  // Uniform source
  parameter int unsigned W_LFSR = 32;
  // Feedback taps 32, 22, 2, 1 (bit n of the figure is bit n-1 here)
  parameter logic [W_LFSR-1:0] TAPS32 = (32'h1 << 31) | (32'h1 << 21) | (32'h1 << 1) | 32'h1;

  // Comparator mode of a DGLC
  typedef enum logic {
    LONG_PATH  = 1'b0,   // add-max: latest arrival time
    SHORT_PATH = 1'b1    // add-min: earliest arrival time
  } analysis_e;

  // States of the seed-loading LFSR controller (codes as printed in the
  // simulation waveforms of the source design)
  typedef enum logic [1:0] {
    IDLE  = 2'b00,
    ENA   = 2'b01,
    START = 2'b10
  } lfsr_state_e;

  // One cascade connection ("link") between DGLCs: a LAT and whether it
  // already carries a Monte Carlo sample (low while the pipeline fills)
  typedef struct packed {
    logic valid;
    lat_t lat;
  } link_t;

  // Saturating unsigned add of two LAT words
  function automatic lat_t sat_add(lat_t a, lat_t b);
    logic [W_LAT:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[W_LAT] ? LAT_MAX : s[W_LAT-1:0];
  endfunction

endpackage
