// tb_stic_gamma: checks the gamma-correction selector. Bit level: with random
// inputs, each output bit is the coefficient bit picked by the number of ones
// among the six x bits of its lane. Statistics: with independent random x and
// coefficient streams (coefficients 21, 194, 74, 255, 170, 252, 254 out of
// 256) over 4096 bits, the output probability matches the Bernstein
// polynomial, worked out here with binomial weights, within 0.03, and the
// polynomial is within 0.09 of x^0.45 (the fit is worst at x = 0,
// where it gives 21/256).
module tb_stic_gamma;
  localparam int P = 4;
  localparam int DEG = 6;
  logic [DEG-1:0][P-1:0] x;
  logic [DEG:0][P-1:0] coef;
  logic [P-1:0] z;
  int checks = 0, failures = 0;

  stic_gamma #(.P(P), .DEG(DEG)) dut (.x, .coef, .z);

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

  function automatic real binom(int n, int k);
    real r;
    r = 1.0;
    for (int i = 1; i <= k; i++) r = r * real'(n - k + i) / real'(i);
    return r;
  endfunction

  initial begin
    int c8 [7] = '{21, 194, 74, 255, 170, 252, 254};
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < DEG; i++) x[i] = P'($urandom);
      for (int k = 0; k <= DEG; k++) coef[k] = P'($urandom);
      #1;
      for (int j = 0; j < P; j++) begin
        int n;
        n = 0;
        for (int i = 0; i < DEG; i++) n += int'(x[i][j]);
        chk(z[j] == coef[n][j], $sformatf("lane %0d with %0d ones", j, n));
      end
    end
    for (int v = 0; v < 256; v += 15) begin
      real p, poly, got;
      int n;
      p = real'(v) / 256.0;
      poly = 0.0;
      for (int k = 0; k <= DEG; k++)
        poly += real'(c8[k]) / 256.0 * binom(DEG, k) * (p ** k) * ((1.0 - p) ** (DEG - k));
      n = 0;
      for (int c = 0; c < 4096 / P; c++) begin
        for (int j = 0; j < P; j++) begin
          for (int i = 0; i < DEG; i++) x[i][j] = v > $urandom_range(0, 255);
          for (int k = 0; k <= DEG; k++) coef[k][j] = c8[k] > $urandom_range(0, 255);
        end
        #1;
        n += $countones(z);
      end
      got = real'(n) / 4096.0;
      chk(got > poly - 0.03 && got < poly + 0.03,
          $sformatf("x=%0d: output %f, polynomial %f", v, got, poly));
      chk(poly > p ** 0.45 - 0.09 && poly < p ** 0.45 + 0.09,
          $sformatf("x=%0d: polynomial %f, x^0.45 %f", v, poly, p ** 0.45));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
