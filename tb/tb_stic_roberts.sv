// tb_stic_roberts: checks the stochastic Roberts cross. Part 1: random lane
// bits against s ? b^c : a^d. Part 2: correlated pixel streams over all 256
// thresholds with an uncorrelated 0.5 select stream must give close to
// (|a-d| + |b-c|) / 2 ones, and exactly that when b = c or a = d patterns
// make one half vanish.
module tb_stic_roberts;
  localparam int P = 4;
  logic [P-1:0] a, b, c, d, s, z;
  int checks = 0, failures = 0;

  stic_roberts #(.P(P)) dut (.a, .b, .c, .d, .s, .z);

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
    for (int t = 0; t < 1000; t++) begin
      a = P'($urandom); b = P'($urandom); c = P'($urandom); d = P'($urandom);
      s = P'($urandom);
      #1;
      for (int j = 0; j < P; j++)
        chk(z[j] == (s[j] ? (b[j] ^ c[j]) : (a[j] ^ d[j])), "lane function");
    end
    for (int t = 0; t < 60; t++) begin
      int av, bv, cv, dv, n, ideal;
      av = $urandom_range(0, 255); bv = $urandom_range(0, 255);
      cv = $urandom_range(0, 255); dv = $urandom_range(0, 255);
      if (t % 3 == 0) cv = bv;
      n = 0;
      for (int k = 0; k < 256 / P; k++) begin
        for (int j = 0; j < P; j++) begin
          int r, rs;
          r  = (k * P + j) * 73 % 256;
          rs = (k * P + j) * 151 % 256 ^ 8'h5a;
          a[j] = av > r; b[j] = bv > r; c[j] = cv > r; d[j] = dv > r;
          s[j] = 128 > rs;
        end
        #1;
        for (int j = 0; j < P; j++) n += int'(z[j]);
      end
      ideal = ((av > dv ? av - dv : dv - av) + (bv > cv ? bv - cv : cv - bv)) / 2;
      chk(n >= ideal - 16 && n <= ideal + 16,
          $sformatf("roberts %0d %0d %0d %0d: %0d ones, ideal %0d", av, bv, cv, dv, n, ideal));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
