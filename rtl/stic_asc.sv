// stic_asc: behavioural model of the P-lane analog-to-stochastic converter.
// It is a mixed-signal part and is not synthesizable.
//
// The sensor voltage 'vin' goes to the non-inverting input of an analog
// comparator; the inverting input gets a random voltage made by a DAC from a
// random number. Each lane therefore emits a '1' with probability
// vin / VREF (clipped to 0..1). Lane j uses random number rnd[j], so with the
// numbers of one stic_rng instance the P lanes produce P consecutive stream
// bits per clock, exactly as the binary converter stic_bsc does for a digital
// operand. Comparators are ideal and settle at once.
//
// DAC plus comparator fed by an RNG follows the design; the per-lane DAC of
// the parallel version and the ideal comparators are this model's own choice.
module stic_asc #(
  parameter int unsigned W    = 8,
  parameter int unsigned P    = 4,
  parameter real         VREF = 1.0
) (
  input  real                  vin,
  input  logic [P-1:0][W-1:0]  rnd,
  output logic [P-1:0]         bits
);

  real vdac [P];

  for (genvar j = 0; j < P; j++) begin : g_lane
    stic_dac #(.W(W), .VREF(VREF)) u_dac (.code(rnd[j]), .vout(vdac[j]));
    always_comb bits[j] = (vin > vdac[j]);
  end

endmodule
