// stic_roberts: P-lane stochastic Roberts-cross edge detector.
//
// For a 2x2 pixel window  a b / c d  the Roberts-cross gradient is taken as
// (|a - d| + |b - c|) / 2. With correlated pixel streams (one shared random
// source) each absolute difference is a single XOR gate, and the halved sum
// is a 2:1 multiplexer whose select stream 's' holds the value 0.5 and is
// uncorrelated to the pixels: the output bit is s ? (b XOR c) : (a XOR d).
// Combinational; lane j of every input is bit j of the clock's P-bit chunk.
//
// The operator is one of the stochastic circuits the design evaluates; its
// gate-level form here is assembled from the design's processing-unit
// primitives (XOR absolute subtraction, MUX scaled addition).
module stic_roberts #(
  parameter int unsigned P = 4
) (
  input  logic [P-1:0] a,
  input  logic [P-1:0] b,
  input  logic [P-1:0] c,
  input  logic [P-1:0] d,
  input  logic [P-1:0] s,
  output logic [P-1:0] z
);

  always_comb begin
    for (int j = 0; j < P; j++) z[j] = s[j] ? (b[j] ^ c[j]) : (a[j] ^ d[j]);
  end

endmodule
