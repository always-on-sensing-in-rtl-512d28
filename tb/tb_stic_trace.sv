// tb_stic_trace: charging-trace workload on the core configured for the
// precision set 16, 64, 256 and 1024 bits (W = 10, LEVEL_STEP = 2, three
// thresholds 100, 200, 300). Three synthetic charging-rate traces are played
// clock by clock while data are offered back to back:
//   normal       rate wandering around the middle thresholds,
//   favourable   rate mostly above the top threshold,
//   constrained  low rate with a stretch of no harvest at all.
// The traces are made up for this test (random walks); they only imitate the
// kind of normal / favourable / constrained conditions the core is meant for.
// For every result the testbench replays the charging-rate rule on the rates
// it drove at the check clocks and compares length and latency. It counts
// how often each length is used per trace and requires: no gap in the
// results (the core never stops, also without harvest), only 16-bit streams
// while nothing is harvested, more 1024-bit streams under the favourable
// trace than under the normal one, and more 16-bit streams under the
// constrained trace than under the normal one.
module tb_stic_trace;
  import stic_pkg::*;

  localparam int P = 4;
  localparam int NT = 6000;            // clocks per trace

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, rate_check;
  logic [15:0] charge_rate = 0;
  logic [2:0][15:0] th;
  logic [1:0] level, out_idx;
  logic [13:0] out_ones;
  logic [9:0] out_value;
  logic [8:0][9:0] zero9 = '0;
  int checks = 0, failures = 0;

  stic_top #(.W(10), .P(P), .MIN_LOG2(4), .LEVEL_STEP(2)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_op(OP_MUL), .in_x_analog(1'b0),
    .in_x(10'd700), .in_y(10'd0), .in_w(10'd300), .in_pix(zero9), .in_wt(zero9),
    .sensor_v(0.0), .charge_rate, .th, .level, .rate_check, .out_valid,
    .out_ones, .out_idx, .out_value);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (3 * NT + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl_of(int r);
    if (r > 300) return 3;
    if (r > 200) return 2;
    if (r > 100) return 1;
    return 0;
  endfunction

  initial begin
    string names [3] = '{"normal", "favourable", "constrained"};
    int hist [3][4];
    int rate_hist [NT + 1100];
    th[0] = 100; th[1] = 200; th[2] = 300;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int tr = 0; tr < 3; tr++) begin
      int walk, target, t0, e, last_result, gap_results, gap_long, t;
      bit waiting, last_taken;
      target = (tr == 1) ? 380 : (tr == 2) ? 120 : 230;
      walk = target; last_taken = 0;
      waiting = 0; last_result = 0; gap_results = 0; gap_long = 0; t0 = 0;
      t = 0;
      while (t == 0 || in_valid || waiting) begin
        int r;
        @(negedge clk);
        if (t == 0) in_valid = 1;
        if (last_taken) in_valid = 0;      // the final datum has been taken
        walk += int'($urandom_range(0, 60)) - 30 + (target - walk) / 16;
        if (walk < 0) walk = 0;
        if (walk > 500) walk = 500;
        r = walk + int'($urandom_range(0, 60)) - 30;
        if (r < 0) r = 0;
        if (tr == 2 && t >= 2000 && t < 3500) r = 0;   // no harvest
        charge_rate = 16'(r);
        rate_hist[t] = r;
        #1;
        chk(int'(level) == lvl_of(r), "level output");
        if (out_valid) begin
          // replay the rule on the rates seen at the check clocks
          e = 3;
          for (int i = 0; i < 3; i++)
            if (i >= lvl_of(rate_hist[t0 + (16 << (2 * i)) / P])) begin e = i; break; end
          chk(waiting && t == t0 + (16 << (2 * e)) / P + 1,
              $sformatf("%s: result at clock %0d, accepted at %0d, length %0d",
                        names[tr], t, t0, 16 << (2 * e)));
          chk(int'(out_idx) == e, $sformatf("%s: length index %0d expected %0d",
                                            names[tr], out_idx, e));
          chk(int'(out_ones) <= (16 << (2 * out_idx)), "ones within stream length");
          hist[tr][out_idx]++;
          chk(t - last_result <= 1024 / P + 1 || last_result == 0, "gap between results");
          last_result = t;
          if (tr == 2 && t >= 2000 + 300 && t < 3500) begin
            gap_results++;
            if (out_idx != 0) gap_long++;
          end
          waiting = 0;
        end
        if (in_valid && in_ready) begin
          waiting = 1;
          t0 = t;
          if (t >= NT) last_taken = 1;
        end
        t++;
      end
      in_valid = 0;
      $display("%-12s trace: 16-bit %4d  64-bit %4d  256-bit %4d  1024-bit %4d",
               names[tr], hist[tr][0], hist[tr][1], hist[tr][2], hist[tr][3]);
      if (tr == 2) begin
        chk(gap_results > 0, "no results while nothing was harvested");
        chk(gap_long == 0, "long streams while nothing was harvested");
        $display("results without harvest: %0d (all 16-bit: %0d)", gap_results, gap_long == 0);
      end
    end
    chk(hist[1][3] > hist[0][3], "favourable trace does not use more 1024-bit streams");
    chk(hist[2][0] > hist[0][0], "constrained trace does not use more 16-bit streams");
    for (int i = 0; i < 4; i++)
      chk(hist[0][i] + hist[1][i] + hist[2][i] > 0, $sformatf("length %0d never used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
