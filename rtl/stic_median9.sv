// stic_median9: P-lane stochastic 3x3 median filter.
//
// The nine pixel streams of a 3x3 window are correlated (converted with one
// shared random source), so a compare-exchange stage is just an AND gate
// (minimum) and an OR gate (maximum). A 19-stage exchange network that leaves
// the median of nine values in position 4 is applied bit by bit; with
// correlated threshold streams every output bit equals (median > r), so the
// result is the exact median of the window once the whole random sequence
// has been used. Combinational.
//
// The median filter is one of the stochastic circuits the design evaluates;
// the network (the well-known 19-exchange median-of-9 network) is this
// implementation's choice, built from the design's AND-minimum and
// OR-maximum primitives.
module stic_median9 #(
  parameter int unsigned P = 4
) (
  input  logic [8:0][P-1:0] pix,
  output logic [P-1:0]      z
);

  // Exchange pairs (lo, hi): afterwards lo holds the minimum.
  localparam int NCE = 19;
  localparam int LO [NCE] = '{1, 4, 7, 0, 3, 6, 1, 4, 7, 0, 5, 4, 3, 1, 2, 4, 4, 6, 4};
  localparam int HI [NCE] = '{2, 5, 8, 1, 4, 7, 2, 5, 8, 3, 8, 7, 6, 4, 5, 7, 2, 4, 2};

  always_comb begin
    logic [8:0][P-1:0] v;
    logic [P-1:0] mn, mx;
    v = pix;
    for (int k = 0; k < NCE; k++) begin
      mn = v[LO[k]] & v[HI[k]];
      mx = v[LO[k]] | v[HI[k]];
      v[LO[k]] = mn;
      v[HI[k]] = mx;
    end
    z = v[4];
  end

endmodule
