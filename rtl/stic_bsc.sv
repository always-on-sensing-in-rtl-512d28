// stic_bsc: P-lane binary-to-stochastic converter (comparator array).
//
// Each lane compares the binary operand 'ref_val' with its own random number
// and emits a '1' when the operand is larger, so the probability of a '1' is
// ref_val / 2^W. With the P random numbers of one stic_rng instance the lanes
// produce P consecutive bits of the operand's stream per clock. Purely
// combinational: the bits are valid in the same cycle as the random numbers.
//
// The comparator rule (Ref > RNG gives logic-1) and the comparator array fed
// by one reference and several random sources follow the design. Lane count
// and width are parameters; their defaults (4 lanes, 8 bits) are the design's
// main configuration.
module stic_bsc #(
  parameter int unsigned W = 8,
  parameter int unsigned P = 4
) (
  input  logic [W-1:0]         ref_val,
  input  logic [P-1:0][W-1:0]  rnd,
  output logic [P-1:0]         bits
);

  always_comb begin
    for (int j = 0; j < P; j++) bits[j] = (ref_val > rnd[j]);
  end

endmodule
