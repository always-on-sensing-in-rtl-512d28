// tb_stic_median9: checks the stochastic 3x3 median. Part 1: random lane bits
// against the majority rule (with correlated threshold streams the median
// bit is '1' exactly when at least five of the nine bits are '1', which is
// what any correct exchange network must produce for such "sorted" inputs);
// exhaustive over all 512 nine-bit patterns on lane 0. Part 2: nine random
// 8-bit pixels converted over all 256 thresholds must give exactly the
// median (computed by sorting).
module tb_stic_median9;
  import tb_stic_model_pkg::*;
  localparam int P = 4;
  logic [8:0][P-1:0] pix;
  logic [P-1:0] z;
  int checks = 0, failures = 0;

  stic_median9 #(.P(P)) dut (.pix, .z);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pat = 0; pat < 512; pat++) begin
      for (int k = 0; k < 9; k++) pix[k] = {P{pat[k]}};
      #1;
      chk(z[0] == ($countones(9'(pat)) >= 5), $sformatf("pattern %b", 9'(pat)));
    end
    for (int t = 0; t < 100; t++) begin
      int v [9];
      int n;
      foreach (v[k]) v[k] = $urandom_range(0, 255);
      n = 0;
      for (int c = 0; c < 256 / P; c++) begin
        for (int j = 0; j < P; j++)
          for (int k = 0; k < 9; k++) pix[k][j] = v[k] > (c * P + j) * 33 % 256;
        #1;
        for (int j = 0; j < P; j++) n += int'(z[j]);
      end
      chk(n == median9(v), $sformatf("median gave %0d, expected %0d", n, median9(v)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
