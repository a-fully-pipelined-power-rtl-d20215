// lfsr: seeded Fibonacci linear feedback shift register, one bit per clock.
//
// The register shifts to the left every clock; the new bit 0 is the XOR of
// the register bits selected by TAPS (bit n of a tap list counted from 1 is
// TAPS[n-1]). With the default taps 32, 22, 2, 1 the 32-bit register runs
// through all 2^32-1 non-zero states. The all-zero state is a fixed point of
// an XOR LFSR, so reset first clears the register and a small controller then
// loads a non-zero seed before shifting starts:
//   IDLE  : register held at zero (the reset state); seed_en moves on to ENA
//   ENA   : the seed is written into the register, next state START
//   START : the register shifts every clock until the next reset
// The register itself is the output q; callers take the low bits as uniform
// random numbers. `running` is high in START, i.e. on every clock in which
// q holds a new value of the sequence (the first such value is the seed).
//
// Timing: after reset is released with seed_en high, q = 0 for two clocks
// (IDLE, ENA), then q = seed, then one shifted value per clock.
//
// From the source design: 32-bit register, left shift, taps 32/22/2/1, reset to
// the all-zero state followed by loading a seed, the IDLE/ENA/START state
// names and codes, and the port set clock/reset/seed_en/seed/output of its
// 12-bit test version. This design's choices: XOR feedback, synchronous
// active-high reset, and START being left only by reset.
module lfsr
  import mcssta_pkg::*;
#(
  parameter int unsigned       WIDTH = W_LFSR,
  parameter logic [WIDTH-1:0]  TAPS  = WIDTH'(TAPS32)
) (
  input  logic             clk,
  input  logic             rst,       // synchronous, active high: back to IDLE, q = 0
  input  logic             seed_en,   // start request: load seed, then shift
  input  logic [WIDTH-1:0] seed,      // initial state, must be non-zero
  output logic [WIDTH-1:0] q,         // register contents
  output logic             running,   // high in START
  output lfsr_state_e      state
);

  lfsr_state_e p_state, n_state;
  logic [WIDTH-1:0] lfsr_q, n_lfsr;
  logic feedback;

  assign feedback = ^(lfsr_q & TAPS);

  always_comb begin
    n_state = p_state;
    n_lfsr  = lfsr_q;
    unique case (p_state)
      IDLE:    if (seed_en) n_state = ENA;
      ENA:     begin n_lfsr = seed; n_state = START; end
      START:   n_lfsr = {lfsr_q[WIDTH-2:0], feedback};
      default: n_state = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p_state <= IDLE;
      lfsr_q  <= '0;
    end else begin
      p_state <= n_state;
      lfsr_q  <= n_lfsr;
    end
  end

  assign q       = lfsr_q;
  assign running = (p_state == START);
  assign state   = p_state;

  // A zero seed would lock the register in the all-zero state.
  always_ff @(posedge clk)
    if (!rst && p_state == ENA)
      a_seed_nonzero: assert (seed != '0) else $error("lfsr: zero seed loaded");

endmodule
