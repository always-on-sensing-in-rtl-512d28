// tb_stic_top: end-to-end test of the STIC core at its default size
// (8-bit operands, 4 lanes, stream lengths 16..256 bits).
//
// Each datum is pushed through the valid/ready port while the testbench
// plays a charging-rate profile against thresholds Th1..Th4 = 100, 200, 300,
// 400. The expected stream length is worked out from the profile at the
// check points (4, 8, 16, 32, 64 clocks); the expected number of ones comes
// from a bit-serial model of the converters and the processing unit. With the
// full 256-bit stream, min, max and |x-y| of correlated operands must also be
// exact, and so must the 3x3 median; gamma correction must be near x^0.45.
// Also checked: latency L/4 + 1 clocks, out_value, 'level'.
// Mechanisms that must each occur: every operation (including the Roberts
// cross, median and MAC window circuits and gamma correction), every
// precision level,
// a computation on battery alone (rate below Th1), a precision change in the
// middle of a computation, the analog sensor path and a back-to-back datum.
module tb_stic_top;
  import stic_pkg::*;
  import tb_stic_model_pkg::*;

  localparam int P = 4;
  localparam logic [7:0] SEED1 = 8'd119, SEED2 = 8'd159;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_x_analog = 0;
  spu_op_e in_op = OP_PASS;
  logic [7:0] in_x = 0, in_y = 0, in_w = 0;
  logic [8:0][7:0] in_pix = '0, in_wt = '0;
  int pix_v [9];
  int wt_v [9];
  real sensor_v = 0.0;
  logic [15:0] charge_rate = 0;
  logic [3:0][15:0] th;
  logic [2:0] level, out_idx;
  logic rate_check, out_valid;
  logic [11:0] out_ones;
  logic [7:0] out_value;

  int checks = 0, failures = 0;
  int n_op [12];
  int n_len [5];
  int n_battery = 0, n_midchange = 0, n_analog = 0, n_b2b = 0;

  stic_top dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_op, .in_x_analog, .in_x, .in_y,
    .in_w, .in_pix, .in_wt, .sensor_v, .charge_rate, .th, .level, .rate_check, .out_valid,
    .out_ones, .out_idx, .out_value);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl_of(int r);
    if (r > 400) return 4;
    if (r > 300) return 3;
    if (r > 200) return 2;
    if (r > 100) return 1;
    return 0;
  endfunction

  // One datum. The rate is rate_a for clocks 0..sw-1 after acceptance and
  // rate_b from clock sw on. back2back: offer it in the result clock of the
  // previous datum (caller must call right after a result).
  task automatic run_one(int op, int x, int y, int w, bit analog, real vin,
                         int rate_a, int rate_b, int sw);
    int e, lc, c, expect_ones, lv_first;
    bit got;
    // expected length index from the profile
    e = 4;
    lv_first = lvl_of(rate_a);
    for (int i = 0; i < 5; i++) begin
      int cyc;
      cyc = (16 << i) / P;
      if (i >= lvl_of(cyc < sw ? rate_a : rate_b)) begin e = i; break; end
    end
    lc = (16 << e) / P;
    if (op == 11) expect_ones = gamma_ones(x, 16 << e, SEED1, SEED2, 8'd60, 8'd200);
    else if (op >= 8) expect_ones = window_ones(op, pix_v, wt_v, w, 16 << e, SEED1, SEED2);
    else expect_ones = stream_ones(op, x, y, w, 16 << e, SEED1, SEED2, analog, vin, 1.0);
    for (int k = 0; k < 9; k++) begin in_pix[k] = 8'(pix_v[k]); in_wt[k] = 8'(wt_v[k]); end
    in_op = spu_op_e'(op); in_x = 8'(x); in_y = 8'(y); in_w = 8'(w);
    in_x_analog = analog; sensor_v = vin;
    charge_rate = 16'(rate_a);
    in_valid = 1;
    #1;
    if (in_ready && out_valid) n_b2b++;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);                 // acceptance clock has passed
    in_valid = 0;
    c = 1; got = 0;
    while (!got && c < 100) begin
      charge_rate = 16'(c < sw ? rate_a : rate_b);
      #1;
      chk(int'(level) == lvl_of(int'(charge_rate)), "level output");
      if (out_valid) begin
        got = 1;
        chk(c == lc + 1, $sformatf("op %0d: result after %0d clocks, expected %0d", op, c, lc + 1));
        chk(int'(out_idx) == e, $sformatf("op %0d: length index %0d expected %0d", op, out_idx, e));
        chk(int'(out_ones) == expect_ones,
            $sformatf("op %0d x %0d y %0d w %0d len %0d: %0d ones, model %0d",
                      op, x, y, w, 16 << e, out_ones, expect_ones));
        chk(int'(out_value) == ((expect_ones << (4 - e)) > 255 ? 255 : (expect_ones << (4 - e))),
            "out_value scaling");
        if (e == 4 && !analog) begin
          if (op == 0) chk(int'(out_ones) == (x < y ? x : y), "exact min");
          if (op == 1) chk(int'(out_ones) == (x > y ? x : y), "exact max");
          if (op == 2) chk(int'(out_ones) == (x > y ? x - y : y - x), "exact |x-y|");
          if (op == 7) chk(int'(out_ones) == x, "exact conversion");
          if (op == 3) chk(int'(out_ones) >= x * w / 256 - 12 && int'(out_ones) <= x * w / 256 + 12,
                           $sformatf("product %0d*%0d: %0d ones", x, w, out_ones));
          if (op == 9) chk(int'(out_ones) == median9(pix_v), "exact median");
          if (op == 10) begin
            int ideal;
            ideal = 0;
            foreach (pix_v[k]) ideal += pix_v[k] * wt_v[k];
            ideal = ideal / 256;
            chk(int'(out_ones) >= ideal - 60 && int'(out_ones) <= ideal + 60,
                $sformatf("MAC %0d ones, ideal %0d", out_ones, ideal));
          end
          if (op == 11) begin
            int ideal;
            ideal = int'(256.0 * ((real'(x) / 256.0) ** 0.45));
            chk(int'(out_ones) >= ideal - 30 && int'(out_ones) <= ideal + 30,
                $sformatf("gamma of %0d: %0d ones, ideal %0d", x, out_ones, ideal));
          end
          if (op == 6) chk(int'(out_ones) >= (x + y) / 2 - 12 && int'(out_ones) <= (x + y) / 2 + 12,
                           $sformatf("scaled add %0d,%0d: %0d ones", x, y, out_ones));
        end
        n_op[op]++;
        n_len[e]++;
        if (rate_a <= 100 && rate_b <= 100) n_battery++;
        if (lvl_of(rate_a) != lvl_of(rate_b) && sw > 4 && sw <= lc) n_midchange++;
        if (analog) n_analog++;
      end else begin
        @(negedge clk);
        c++;
      end
    end
    chk(got, "no result");
  endtask

  initial begin
    th[0] = 100; th[1] = 200; th[2] = 300; th[3] = 400;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Every operation at full precision, corner and random operands.
    for (int op = 0; op < 8; op++) begin
      for (int t = 0; t < 6; t++) begin
        int x, y, w;
        x = (t == 0) ? 0 : (t == 1) ? 255 : $urandom_range(0, 255);
        y = (t == 0) ? 255 : (t == 1) ? 0 : $urandom_range(0, 255);
        w = (op == 6) ? 128 : $urandom_range(0, 255);
        if (op == 5 && x > y) begin int tmp; tmp = x; x = y; y = tmp; end
        run_one(op, x, y, w, 0, 0.0, 1000, 1000, 0);
      end
    end
    // 3x3 window circuits at full precision.
    for (int op = 8; op <= 10; op++) begin
      for (int t = 0; t < 5; t++) begin
        foreach (pix_v[k]) begin pix_v[k] = $urandom_range(0, 255); wt_v[k] = $urandom_range(0, 255); end
        run_one(op, 0, 0, 128, 0, 0.0, 1000, 1000, 0);
      end
    end
    // Gamma correction at full precision.
    for (int t = 0; t < 8; t++) begin
      int x;
      x = (t == 0) ? 0 : (t == 1) ? 255 : $urandom_range(0, 255);
      run_one(11, x, 0, 0, 0, 0.0, 1000, 1000, 0);
    end
    // Each precision level from a steady rate, including battery only.
    for (int r = 0; r < 5; r++) begin
      for (int t = 0; t < 4; t++)
        run_one($urandom_range(0, 7), $urandom_range(0, 255), $urandom_range(0, 255),
                $urandom_range(0, 255), 0, 0.0, 50 + 100 * r, 50 + 100 * r, 0);
    end
    run_one(3, 200, 100, 60, 0, 0.0, 0, 0, 0);            // no harvest at all
    // Precision changes during a computation.
    run_one(0, 90, 200, 0, 0, 0.0, 1000, 150, 6);           // drops: ends at 32 bits
    run_one(1, 90, 200, 0, 0, 0.0, 50, 1000, 3);            // rises before first check
    run_one(2, 90, 200, 0, 0, 0.0, 350, 1000, 10);          // rises: 256 bits
    run_one(7, 17, 0, 0, 0, 0.0, 1000, 0, 20);              // drops: ends at 64 bits
    // Analog sensor input.
    for (int t = 0; t < 6; t++)
      run_one(t % 2 == 0 ? 7 : 3, 0, 0, $urandom_range(0, 255), 1,
              real'($urandom_range(0, 1000)) / 1000.0, 1000, 1000, 0);
    // Random traffic, data offered back to back.
    for (int t = 0; t < 30; t++) begin
      foreach (pix_v[k]) begin pix_v[k] = $urandom_range(0, 255); wt_v[k] = $urandom_range(0, 255); end
      run_one($urandom_range(0, 11), $urandom_range(0, 255), $urandom_range(0, 255),
              $urandom_range(0, 255), $urandom_range(0, 1),
              real'($urandom_range(0, 1000)) / 1000.0,
              $urandom_range(0, 500), $urandom_range(0, 500), $urandom_range(0, 70));
    end
    for (int i = 0; i < 12; i++) chk(n_op[i] > 0, $sformatf("operation %0d never ran", i));
    for (int i = 0; i < 5; i++) chk(n_len[i] > 0, $sformatf("length index %0d never used", i));
    chk(n_battery > 0, "battery-only computation never happened");
    chk(n_midchange > 0, "no precision change mid-computation");
    chk(n_analog > 0, "analog path never used");
    chk(n_b2b > 0, "no back-to-back datum");
    $display("ops %0d %0d %0d %0d %0d %0d %0d %0d %0d %0d %0d %0d; lengths %0d %0d %0d %0d %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7],
             n_op[8], n_op[9], n_op[10], n_op[11],
             n_len[0], n_len[1], n_len[2], n_len[3], n_len[4]);
    $display("battery-only %0d, mid-change %0d, analog %0d, back-to-back %0d",
             n_battery, n_midchange, n_analog, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
