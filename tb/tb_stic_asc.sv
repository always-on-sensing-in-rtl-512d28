// tb_stic_asc: checks the analog-to-stochastic converter model: a lane is '1'
// exactly when the sensor voltage exceeds VREF * rnd / 256, and a sweep over
// all 256 random numbers gives ceil(256 * vin / VREF) ones.
module tb_stic_asc;
  localparam int P = 4;
  localparam real VREF = 1.2;
  real vin;
  logic [P-1:0][7:0] rnd;
  logic [P-1:0] bits;
  int checks = 0, failures = 0;

  stic_asc #(.W(8), .P(P), .VREF(VREF)) dut (.vin, .rnd, .bits);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, expect_ones;
    real vr;
    for (int t = 0; t < 2000; t++) begin
      vin = VREF * real'($urandom_range(0, 100000)) / 100000.0;
      for (int j = 0; j < P; j++) rnd[j] = 8'($urandom);
      #1;
      for (int j = 0; j < P; j++) begin
        vr = VREF * real'(rnd[j]) / 256.0;
        checks++;
        if (bits[j] != (vin > vr)) begin
          failures++;
          $display("FAIL: vin %f vdac %f bit %0d", vin, vr, bits[j]);
        end
      end
    end
    for (int k = 0; k < 10; k++) begin
      vin = VREF * (real'(k) * 0.1 + 0.013);
      ones = 0;
      for (int c = 0; c < 256 / P; c++) begin
        for (int j = 0; j < P; j++) rnd[j] = 8'(c * P + j);
        #1;
        for (int j = 0; j < P; j++) ones += int'(bits[j]);
      end
      expect_ones = 0;
      for (int r = 0; r < 256; r++) if (vin > VREF * real'(r) / 256.0) expect_ones++;
      checks++;
      if (ones != expect_ones || ones < int'(vin / VREF * 256.0) - 1) begin
        failures++;
        $display("FAIL: vin %f gave %0d ones, expected %0d", vin, ones, expect_ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
