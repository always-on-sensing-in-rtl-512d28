// tb_stic_ctrl: checks the controller's loop against the procedure it
// implements. For each datum the testbench picks the precision level that the
// charging-rate check will report at each of the five valid lengths (4, 8,
// 16, 32, 64 clocks with P = 4); between checks the level input is random and
// must be ignored. Expected: the computation ends at the first valid length i
// with i >= level (or at the longest), 'check' pulses exactly at the valid
// lengths reached, and 'out_valid' comes L/P + 1 clocks after acceptance with
// out_idx = i. Data are offered with random gaps and also back to back.
module tb_stic_ctrl;
  localparam int P = 4;
  localparam int NCHK = 5;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready;
  logic [2:0] level = 0, out_idx;
  logic start, run, check, out_valid;
  int checks = 0, failures = 0;

  stic_ctrl #(.P(P), .MAX_LOG2(8), .MIN_LOG2(4), .LEVEL_STEP(1)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .level, .start, .run, .check,
    .out_valid, .out_idx);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int chk_index(int c);   // valid length index of clock c
    for (int i = 0; i < NCHK; i++) if (c == (16 << i) / P) return i;
    return -1;
  endfunction

  initial begin
    bit waiting = 0, busy, taken = 0;
    int c = 0, e = 0, lc = 0, seen_checks = 0, done = 0, b2b = 0;
    int lv [NCHK];
    int idx_hist [NCHK];
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (done < 400) begin
      int ci;
      @(negedge clk);
      if (waiting) c++;
      busy = waiting && c <= lc;           // clocks 1..L/P after acceptance
      ci = busy ? chk_index(c) : -1;
      level = (ci >= 0) ? 3'(lv[ci]) : 3'($urandom_range(0, 7));
      if (taken) in_valid = 0;
      taken = 0;
      if (!in_valid) in_valid = ($urandom_range(0, 2) != 0);
      #1;
      chk(run == busy && in_ready == !busy, $sformatf("run/ready at clock %0d: run %0d ready %0d busy %0d waiting %0d lc %0d", c, run, in_ready, busy, waiting, lc));
      chk(check == (busy && ci >= 0), $sformatf("check pulse at clock %0d", c));
      if (check) seen_checks++;
      if (out_valid) begin
        chk(waiting && c == lc + 1,
            $sformatf("result after %0d clocks, expected %0d", c, lc + 1));
        chk(int'(out_idx) == e, $sformatf("out_idx %0d expected %0d", out_idx, e));
        chk(seen_checks == e + 1, $sformatf("%0d checks expected %0d", seen_checks, e + 1));
        idx_hist[e]++;
        done++;
        waiting = 0;
        if (in_valid) b2b++;
      end else if (waiting && c == lc + 1) begin
        chk(0, "result missing");
        waiting = 0;
      end
      if (in_valid && in_ready) begin
        chk(start && !waiting, "start on acceptance");
        waiting = 1; c = 0; seen_checks = 0;
        for (int i = 0; i < NCHK; i++) lv[i] = $urandom_range(0, 4);
        e = NCHK - 1;
        for (int i = 0; i < NCHK; i++) if (i >= lv[i]) begin e = i; break; end
        lc = (16 << e) / P;
        taken = 1;
      end else begin
        chk(!start, "start without acceptance");
      end
    end
    for (int i = 0; i < NCHK; i++) begin
      $display("length index %0d used %0d times", i, idx_hist[i]);
      chk(idx_hist[i] > 0, $sformatf("length index %0d never used", i));
    end
    chk(b2b > 0, "no back-to-back datum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
