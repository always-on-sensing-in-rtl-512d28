// stic_gamma: P-lane stochastic gamma-correction circuit, y = x^0.45.
//
// The curve is approximated by a Bernstein polynomial of degree DEG,
// y = sum_k b_k C(DEG,k) x^k (1-x)^(DEG-k). In the stochastic domain this is
// a selector. DEG independent streams of the same value x are summed per
// clock and lane. The sum k (0..DEG ones) has exactly the binomial
// probability C(DEG,k) x^k (1-x)^(DEG-k). It picks the bit of coefficient
// stream k, whose probability is b_k. The output stream therefore has
// probability y. The x streams must be mutually independent and independent
// of the coefficient streams; the coefficient streams may share one random
// source, since only one of them is read per bit.
//
// Interface: x[i][j] is lane j of x stream i; coef[k][j] is lane j of
// coefficient stream k; z[j] is the output. Combinational: an adder of DEG
// bits and a (DEG+1)-to-1 multiplexer per lane.
//
// Gamma correction is one of the stochastic circuits the design evaluates,
// but only by name and cost. The Bernstein-polynomial selector, its degree
// (6) and its coefficients (stic_pkg::gamma_coef) are this implementation's
// choice; it follows the standard reconfigurable stochastic circuit for
// polynomials.
module stic_gamma #(
  parameter int unsigned P   = 4,
  parameter int unsigned DEG = 6
) (
  input  logic [DEG-1:0][P-1:0] x,
  input  logic [DEG:0][P-1:0]   coef,
  output logic [P-1:0]          z
);

  localparam int unsigned SW = $clog2(DEG + 1);

  always_comb begin
    for (int j = 0; j < P; j++) begin
      logic [SW-1:0] k;
      k = '0;
      for (int i = 0; i < DEG; i++) k += SW'(x[i][j]);
      z[j] = coef[k][j];
    end
  end

endmodule
