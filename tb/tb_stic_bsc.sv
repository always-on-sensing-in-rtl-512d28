// tb_stic_bsc: checks the comparator array: every lane is '1' exactly when
// the operand exceeds its random number, and sweeping the random numbers over
// all 256 values gives exactly 'ref_val' ones (exact conversion).
module tb_stic_bsc;
  localparam int P = 4;
  logic [7:0] ref_val;
  logic [P-1:0][7:0] rnd;
  logic [P-1:0] bits;
  int checks = 0, failures = 0;

  stic_bsc #(.W(8), .P(P)) dut (.ref_val, .rnd, .bits);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int t = 0; t < 2000; t++) begin
      ref_val = 8'($urandom);
      for (int j = 0; j < P; j++) rnd[j] = 8'($urandom);
      if (t % 7 == 0) rnd[t % P] = ref_val;   // equal: must give 0
      #1;
      for (int j = 0; j < P; j++) begin
        checks++;
        if (bits[j] != (int'(ref_val) > int'(rnd[j]))) begin
          failures++;
          $display("FAIL: ref %0d rnd %0d bit %0d", ref_val, rnd[j], bits[j]);
        end
      end
    end
    for (int v = 0; v < 256; v += 17) begin
      ref_val = 8'(v);
      ones = 0;
      for (int c = 0; c < 256 / P; c++) begin
        for (int j = 0; j < P; j++) rnd[j] = 8'(c * P + j);
        #1;
        for (int j = 0; j < P; j++) ones += int'(bits[j]);
      end
      checks++;
      if (ones != v) begin
        failures++;
        $display("FAIL: full sweep of %0d gave %0d ones", v, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
