// stic_mac9: P-lane stochastic 3x3 multiply stage of the multiply-accumulate.
//
// Nine input streams x[i] are multiplied by nine weight streams w[i] with one
// AND gate per lane; x and w come from different random sources, so each
// product stream has probability x[i]*w[i]. The 9*P product bits of a clock
// go to the ones counter (stic_counter with 9*P inputs), which accumulates
// them in binary: over an L-bit stream it reaches L * sum_i x[i]*w[i], the
// dot product of the 3x3 window with the kernel. Combinational.
//
// The 3x3 MAC is one of the stochastic circuits the design evaluates and the
// operation its neural-network energy figures are based on. The AND-gate
// multipliers follow the design; accumulating the nine products in a binary
// counter (rather than a stochastic adder) is this implementation's choice.
module stic_mac9 #(
  parameter int unsigned P = 4
) (
  input  logic [8:0][P-1:0] x,
  input  logic [8:0][P-1:0] w,
  output logic [8:0][P-1:0] prod
);

  always_comb begin
    for (int i = 0; i < 9; i++) prod[i] = x[i] & w[i];
  end

endmodule
