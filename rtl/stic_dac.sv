// stic_dac: behavioural model of the digital-to-analog converter that turns a
// random number into the random reference voltage of the analog-to-stochastic
// converter. It is an analog part and is not synthesizable: the output is a
// real voltage, VREF * code / 2^W, updated without delay.
//
// The DAC's place in the converter follows the design; its transfer function
// (ideal, unipolar, full scale VREF) is this model's own assumption.
module stic_dac #(
  parameter int unsigned W    = 8,
  parameter real         VREF = 1.0
) (
  input  logic [W-1:0] code,
  output real          vout
);

  always_comb vout = VREF * real'(code) / real'(2.0 ** W);

endmodule
