// stic_rng: random number source of the stochastic converters, P numbers per
// clock.
//
// A W-bit Fibonacci LFSR is extended to a de Bruijn sequence (the all-zero
// state is spliced in after 100...0), so it walks through all 2^W values once
// per period. An exact W-bit value is therefore represented exactly by a
// 2^W-bit stream. For a P-lane core the register is unrolled P steps: lane j
// gives the state j steps ahead of the stored state and the register jumps P
// steps per enabled clock. The P lanes thus carry, in parallel, exactly the
// numbers a one-lane converter would use in P consecutive cycles, so the
// parallel stream equals the serial stream split into P sub-streams.
//
// Interface: 'load' restarts the sequence at SEED (used at the start of every
// new datum so each computation sees the same sequence); 'en' advances it.
// 'load' has priority. 'rnd[j]' is combinational from the state register.
// REVERSE = 1 bit-reverses every output number; a second instance with
// another seed and REVERSE = 1 gives a bit-stream source that is practically
// uncorrelated to the first one.
//
// The use of an LFSR follows the design's description of its RNG. The de
// Bruijn extension, the stride, the unrolling, the seed and the bit reversal
// are this implementation's own choices.
module stic_rng
  import stic_pkg::*;
#(
  parameter int unsigned        W       = 8,
  parameter int unsigned        P       = 4,
  parameter logic [W-1:0]       SEED    = W'(1),
  parameter bit                 REVERSE = 1'b0,
  parameter int unsigned        STRIDE  = (W % 2 == 0) ? W + 1 : W + 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic                  en,
  output logic [P-1:0][W-1:0]   rnd
);

  localparam logic [W-1:0] TAPS = W'(lfsr_taps(W));

  logic [W-1:0] state;
  logic [W-1:0] chain [P*STRIDE+1];

  // One de Bruijn step.
  function automatic logic [W-1:0] step(logic [W-1:0] s);
    logic fb;
    fb = (^(s & TAPS)) ^ (s[W-2:0] == '0);
    return {s[W-2:0], fb};
  endfunction

  function automatic logic [W-1:0] bitrev(logic [W-1:0] v);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = v[W-1-i];
    return r;
  endfunction

  always_comb begin
    chain[0] = state;
    for (int k = 1; k <= P * STRIDE; k++) chain[k] = step(chain[k-1]);
    for (int j = 0; j < P; j++)
      rnd[j] = REVERSE ? bitrev(chain[j*STRIDE]) : chain[j*STRIDE];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= chain[P*STRIDE];
  end

  initial begin
    assert (W >= 3 && W <= 16) else $error("stic_rng: W must be 3..16");
    assert (P >= 1) else $error("stic_rng: P must be at least 1");
    assert (STRIDE % 2 == 1) else $error("stic_rng: STRIDE must be odd for a full period");
  end

endmodule
