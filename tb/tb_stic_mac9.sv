// tb_stic_mac9: checks the multiply stage of the 3x3 MAC: every product bit
// is the AND of its input and weight bits, and with uncorrelated full-length
// streams (weights thresholded with independent random numbers) the number
// of product ones is near sum x*w / 256, within about four standard
// deviations.
module tb_stic_mac9;
  localparam int P = 4;
  logic [8:0][P-1:0] x, w, prod;
  int checks = 0, failures = 0;

  stic_mac9 #(.P(P)) dut (.x, .w, .prod);

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
      for (int i = 0; i < 9; i++) begin x[i] = P'($urandom); w[i] = P'($urandom); end
      #1;
      for (int i = 0; i < 9; i++)
        for (int j = 0; j < P; j++)
          chk(prod[i][j] == (x[i][j] & w[i][j]), $sformatf("product %0d lane %0d", i, j));
    end
    for (int t = 0; t < 40; t++) begin
      int xv [9];
      int wv [9];
      int n, ideal;
      foreach (xv[i]) begin xv[i] = $urandom_range(0, 255); wv[i] = $urandom_range(0, 255); end
      n = 0; ideal = 0;
      foreach (xv[i]) ideal += xv[i] * wv[i];
      ideal = ideal / 256;
      for (int c = 0; c < 256 / P; c++) begin
        for (int j = 0; j < P; j++)
          for (int i = 0; i < 9; i++) begin
            x[i][j] = xv[i] > (c * P + j) * 37 % 256;
            w[i][j] = wv[i] > $urandom_range(0, 255);
          end
        #1;
        for (int i = 0; i < 9; i++) n += $countones(prod[i]);
      end
      chk(n >= ideal - 90 && n <= ideal + 90, $sformatf("MAC %0d ones, ideal %0d", n, ideal));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
