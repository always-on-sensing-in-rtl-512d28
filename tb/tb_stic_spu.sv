// tb_stic_spu: checks the P-lane stochastic processing unit.
// Part 1: random lane bits for every operation, compared with a one-bit-at-a-
// time model (the division flip-flop modelled serially across lanes and
// clocks). Part 2: real correlated streams (X = x > r, Y = y > r over all
// 256 values of r) must give exactly min, max and |x-y| ones, and division
// must land near 256*x/y.
module tb_stic_spu;
  import stic_pkg::*;
  import tb_stic_model_pkg::*;

  localparam int P = 4;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  spu_op_e op;
  logic [P-1:0] x, y, w, z;
  int checks = 0, failures = 0;

  stic_spu #(.P(P)) dut (.clk, .rst_n, .clear, .en, .op, .x, .y, .w, .z);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev, e;
    int n, expect_n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Part 1
    for (int o = 0; o < 8; o++) begin
      @(negedge clk);
      op = spu_op_e'(o); clear = 1; en = 0;
      @(negedge clk);
      clear = 0; en = 1; prev = 0;
      for (int c = 0; c < 200; c++) begin
        x = P'($urandom); y = P'($urandom); w = P'($urandom);
        #1;
        for (int j = 0; j < P; j++) begin
          e = op_bit(o, x[j], y[j], w[j], prev);
          if (o == 5) prev = e;
          check(z[j] == e, $sformatf("op %0d cycle %0d lane %0d: %b expected %b", o, c, j, z[j], e));
        end
        @(negedge clk);
      end
    end
    // Part 2
    for (int t = 0; t < 40; t++) begin
      int xv, yv;
      xv = $urandom_range(0, 255); yv = $urandom_range(0, 255);
      for (int o = 0; o <= 5; o++) begin
        if (o == 3 || o == 4) continue;
        if (o == 5 && xv > yv) begin int tmp; tmp = xv; xv = yv; yv = tmp; end
        @(negedge clk);
        op = spu_op_e'(o); clear = 1; en = 0;
        @(negedge clk);
        clear = 0; en = 1; n = 0;
        for (int c = 0; c < 256 / P; c++) begin
          for (int j = 0; j < P; j++) begin
            int r;
            r = (c * P + j) * 97 % 256;         // a permutation of 0..255
            x[j] = xv > r; y[j] = yv > r; w[j] = 0;
          end
          #1;
          for (int j = 0; j < P; j++) n += int'(z[j]);
          @(negedge clk);
        end
        case (o)
          0: expect_n = (xv < yv) ? xv : yv;
          1: expect_n = (xv > yv) ? xv : yv;
          2: expect_n = (xv > yv) ? xv - yv : yv - xv;
          default: expect_n = (yv == 0) ? 0 : 256 * xv / yv;
        endcase
        if (o == 5) begin
          if (yv >= 32)
            check(n >= expect_n - 48 && n <= expect_n + 48,
                  $sformatf("div %0d/%0d gave %0d ones, ideal %0d", xv, yv, n, expect_n));
        end else begin
          check(n == expect_n, $sformatf("op %0d x %0d y %0d gave %0d ones, expected %0d",
                                         o, xv, yv, n, expect_n));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
