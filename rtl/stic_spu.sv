// stic_spu: P-lane stochastic processing unit.
//
// Every lane applies the selected operation to one bit of each input stream:
//   OP_MIN    X AND Y  (X, Y correlated)          -> min(X,Y)
//   OP_MAX    X OR  Y  (X, Y correlated)          -> max(X,Y)
//   OP_ABSSUB X XOR Y  (X, Y correlated)          -> |X-Y|
//   OP_MUL    X AND W  (uncorrelated)             -> X*W
//   OP_ADDAPX X OR  W  (uncorrelated)             -> X+W-X*W, ~X+W when small
//   OP_DIV    Y ? X : last output bit, X <= Y     -> X/Y
//   OP_SCALED W ? Y : X, W held at 0.5            -> (X+Y)/2
//   OP_PASS   X (also for the window codes, which other units handle)
// The lanes carry P consecutive bits of one stream, bit 0 the oldest. The
// division circuit keeps its previous output bit in a D flip-flop; in the
// parallel version the "previous bit" of lane j is lane j-1's output of the
// same clock and only lane P-1's output is stored, so P lanes compute exactly
// what one lane would in P cycles. 'clear' zeroes that flip-flop at the start
// of a new datum, 'en' lets it update. The output is combinational.
//
// The gate per operation follows the design's SPU figure. Which MUX input the
// select picks (W=1 picks Y, Y=1 picks X for division), the flip-flop's reset
// value and the lane chaining are this implementation's choices.
module stic_spu
  import stic_pkg::*;
#(
  parameter int unsigned P = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  spu_op_e       op,
  input  logic [P-1:0]  x,
  input  logic [P-1:0]  y,
  input  logic [P-1:0]  w,
  output logic [P-1:0]  z
);

  logic         div_q;          // D flip-flop of the division circuit
  logic [P-1:0] div_z;          // division output bit of every lane

  always_comb begin
    logic prev;                 // previous division output bit
    prev = div_q;
    for (int j = 0; j < P; j++) begin
      prev     = y[j] ? x[j] : prev;
      div_z[j] = prev;
      unique case (op)
        OP_MIN:    z[j] = x[j] & y[j];
        OP_MAX:    z[j] = x[j] | y[j];
        OP_ABSSUB: z[j] = x[j] ^ y[j];
        OP_MUL:    z[j] = x[j] & w[j];
        OP_ADDAPX: z[j] = x[j] | w[j];
        OP_DIV:    z[j] = div_z[j];
        OP_SCALED: z[j] = w[j] ? y[j] : x[j];
        OP_PASS:   z[j] = x[j];
        default:   z[j] = x[j];
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     div_q <= 1'b0;
    else if (clear) div_q <= 1'b0;
    else if (en)    div_q <= div_z[P-1];
  end

endmodule
