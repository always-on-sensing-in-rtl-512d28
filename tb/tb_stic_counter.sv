// tb_stic_counter: checks the ones counter against a running sum of the
// population counts of random P-bit words, with enable gaps and clears.
module tb_stic_counter;
  localparam int P = 4;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [P-1:0] bits;
  logic [8:0] count;
  int checks = 0, failures = 0;

  stic_counter #(.NB(P), .CW(9)) dut (.clk, .rst_n, .clear, .en, .bits, .count);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      clear = 1; en = 1; bits = '1;
      @(negedge clk);
      clear = 0; sum = 0;
      checks++;
      if (count != 0) begin failures++; $display("FAIL: not cleared"); end
      for (int c = 0; c < 64; c++) begin
        en = ($urandom_range(0, 3) != 0);
        bits = P'($urandom);
        if (en) sum += $countones(bits);
        @(negedge clk);
        checks++;
        if (int'(count) != sum) begin
          failures++;
          $display("FAIL: count %0d expected %0d", count, sum);
        end
      end
      en = 0;
    end
    // Full-scale: 64 clocks of all ones give 256.
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0; en = 1; bits = '1;
    repeat (64) @(negedge clk);
    en = 0;
    checks++;
    if (count != 9'd256) begin failures++; $display("FAIL: full scale %0d", count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
