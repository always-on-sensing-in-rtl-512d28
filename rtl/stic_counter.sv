// stic_counter: turns the output stream back into a binary number.
//
// A stream of N bits holding N1 ones stands for N1/N, so the result of a
// computation is the number of ones seen. Each enabled clock the counter adds
// the population count of its NB input bits: the P lanes of a result stream,
// or 9*P product bits when it accumulates a 3x3 multiply-accumulate.
// 'clear' (priority) zeroes it at the start of a new datum. 'count' is the registered total; it is stable
// from the clock after the last enabled cycle until the next clear.
//
// The decoding rule N1/N is the design's; the counter itself (an adder tree
// feeding one accumulator of CW bits) is this implementation's choice.
module stic_counter #(
  parameter int unsigned NB = 4,
  parameter int unsigned CW = 9
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           en,
  input  logic [NB-1:0]  bits,
  output logic [CW-1:0]  count
);

  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int j = 0; j < NB; j++) ones = ones + CW'(bits[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else if (en)    count <= count + ones;
  end

endmodule
