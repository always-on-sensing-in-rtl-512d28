// tb_stic_precision_sel: checks the charging-rate to precision-level mapping
// against the threshold procedure: level 4 above Th4, 3 above Th3, 2 above
// Th2, 1 above Th1, else 0, with rates on, just above and just below every
// threshold as well as random ones.
module tb_stic_precision_sel;
  logic [15:0] rate;
  logic [3:0][15:0] th;
  logic [2:0] level;
  int checks = 0, failures = 0;

  stic_precision_sel #(.RATE_W(16), .NLEV(5)) dut (.rate, .th, .level);

  function automatic int ref_level(int r, int t1, int t2, int t3, int t4);
    if (r > t4) return 4;
    if (r > t3) return 3;
    if (r > t2) return 2;
    if (r > t1) return 1;
    return 0;
  endfunction

  task automatic try_rate(int r);
    int e;
    rate = 16'(r);
    #1;
    e = ref_level(r, th[0], th[1], th[2], th[3]);
    checks++;
    if (int'(level) != e) begin
      failures++;
      $display("FAIL: rate %0d th %0d %0d %0d %0d level %0d expected %0d",
               r, th[0], th[1], th[2], th[3], level, e);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist [5];
    for (int t = 0; t < 200; t++) begin
      int a;
      a = $urandom_range(1, 10000);
      th[0] = 16'(a);
      th[1] = 16'(a + $urandom_range(1, 10000));
      th[2] = 16'(th[1] + $urandom_range(1, 10000));
      th[3] = 16'(th[2] + $urandom_range(1, 10000));
      for (int i = 0; i < 4; i++) begin
        try_rate(th[i]); try_rate(th[i] + 1); try_rate(th[i] - 1);
      end
      for (int k = 0; k < 10; k++) begin
        try_rate($urandom_range(0, 65535));
        hist[level]++;
      end
      try_rate(0); try_rate(65535);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
