// tb_stic_rng: checks the P-lane de Bruijn random source against the
// reference sequence: lane j equals the state 9*j steps ahead, one enabled
// clock advances 9*P steps, all 2^8 values appear once per 64 clocks, 'load'
// restarts at the seed, 'en' low holds, and the reversed instance is the
// bit-reversed sequence.
module tb_stic_rng;
  import tb_stic_model_pkg::*;

  localparam int P = 4;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [P-1:0][7:0] rnd, rndr;
  int checks = 0, failures = 0;

  stic_rng #(.W(8), .P(P), .SEED(8'h01)) dut (.clk, .rst_n, .load, .en, .rnd);
  stic_rng #(.W(8), .P(P), .SEED(8'h83), .REVERSE(1'b1)) dutr (
    .clk, .rst_n, .load, .en, .rnd(rndr));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] m, mr;
    bit seen [256];
    int distinct;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m = 8'h01; mr = 8'h83;
    // Two full periods with enable on.
    for (int c = 0; c < 128; c++) begin
      @(negedge clk);
      en = 1;
      for (int j = 0; j < P; j++) begin
        check(rnd[j] == m, $sformatf("cycle %0d lane %0d: %h expected %h", c, j, rnd[j], m));
        check(rndr[j] == rev8(mr), $sformatf("reversed cycle %0d lane %0d", c, j));
        if (c < 64) seen[rnd[j]] = 1;
        m = db8_num(m); mr = db8_num(mr);
      end
    end
    distinct = 0;
    foreach (seen[i]) distinct += int'(seen[i]);
    check(distinct == 256, $sformatf("distinct values in one period: %0d", distinct));
    // Hold with enable low.
    @(negedge clk); en = 0;
    begin
      logic [7:0] held;
      held = rnd[0];
      repeat (3) @(negedge clk);
      check(rnd[0] == held, "state held while en = 0");
    end
    // Load restarts at the seed and has priority over enable.
    en = 1; load = 1;
    @(negedge clk); load = 0; en = 0;
    check(rnd[0] == 8'h01 && rnd[1] == db8_num(8'h01), "load restarts at seed");
    check(rndr[0] == rev8(8'h83), "load restarts reversed source");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
