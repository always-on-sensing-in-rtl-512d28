// tb_stic_table1: accuracy workload. Runs 2-input multiplication, the 3x3
// MAC, the 3x3 median filter, the Roberts cross and gamma correction on the full-size core
// with random 8-bit data at each stream length the controller offers (16,
// 32, 64, 128 and 256 bits, chosen through the charging rate), and reports
// the mean absolute error against exact arithmetic, in percent of full scale
// (the MAC normalised by its nine terms).
// A second core built with 10-bit operands (stream lengths 16 to 1024 bits,
// seven levels) measures the same circuits with random 10-bit data, for the
// 512- and 1024-bit columns; there the error bounds are checked, not the
// bit-exact model, which is 8-bit.
// Checked: every result equals the bit-serial model, the length used is the
// one the rate asks for, the error at 256 bits is below a bound for each
// circuit and the 256-bit error is below the 16-bit error.
module tb_stic_table1;
  import stic_pkg::*;
  import tb_stic_model_pkg::*;

  localparam int P = 4;
  localparam int TRIALS = 150;
  localparam logic [7:0] SEED1 = 8'd119, SEED2 = 8'd159;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_x_analog = 0;
  spu_op_e in_op = OP_MUL;
  logic [7:0] in_x = 0, in_y = 0, in_w = 0;
  logic [8:0][7:0] in_pix = '0, in_wt = '0;
  logic [15:0] charge_rate = 0;
  logic [3:0][15:0] th;
  logic [2:0] level, out_idx;
  logic rate_check, out_valid;
  logic [11:0] out_ones;
  logic [7:0] out_value;
  int checks = 0, failures = 0;

  // 10-bit core
  logic in_valid10 = 0, in_ready10;
  spu_op_e in_op10 = OP_MUL;
  logic [9:0] in_x10 = 0, in_w10 = 0;
  logic [8:0][9:0] in_pix10 = '0, in_wt10 = '0;
  logic [15:0] charge_rate10 = 0;
  logic [5:0][15:0] th10;
  logic [2:0] level10, out_idx10;
  logic rate_check10, out_valid10;
  logic [13:0] out_ones10;
  logic [9:0] out_value10;
  bit done10 = 0;

  stic_top dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_op, .in_x_analog, .in_x, .in_y,
    .in_w, .in_pix, .in_wt, .sensor_v(0.0), .charge_rate, .th, .level,
    .rate_check, .out_valid, .out_ones, .out_idx, .out_value);

  stic_top #(.W(10)) dut10 (
    .clk, .rst_n, .in_valid(in_valid10), .in_ready(in_ready10), .in_op(in_op10),
    .in_x_analog(1'b0), .in_x(in_x10), .in_y(10'd0), .in_w(in_w10),
    .in_pix(in_pix10), .in_wt(in_wt10), .sensor_v(0.0), .charge_rate(charge_rate10),
    .th(th10), .level(level10), .rate_check(rate_check10), .out_valid(out_valid10),
    .out_ones(out_ones10), .out_idx(out_idx10), .out_value(out_value10));

  always #5 clk = ~clk;

  initial begin : long_streams
    int ops [5] = '{3, 10, 9, 11, 8};
    string names [5] = '{"2-input multiplication", "3x3 MAC", "3x3 median filter",
                         "gamma correction", "Roberts edge detection"};
    real bound [5] = '{0.8, 1.5, 0.5, 3.0, 1.5};
    for (int i = 0; i < 6; i++) th10[i] = 16'(100 * (i + 1));
    wait (rst_n);
    @(negedge clk);
    for (int o = 0; o < 5; o++) begin
      real mae [7];
      for (int lv = 5; lv < 7; lv++) begin
        real err_sum;
        int len;
        err_sum = 0.0;
        len = 16 << lv;
        charge_rate10 = 16'(50 + 100 * lv);
        for (int t = 0; t < 60; t++) begin
          int pix [9];
          int wt [9];
          int x, w;
          real got, ideal;
          foreach (pix[k]) begin pix[k] = $urandom_range(0, 1023); wt[k] = $urandom_range(0, 1023); end
          x = $urandom_range(0, 1023); w = (ops[o] == 8) ? 512 : $urandom_range(0, 1023);
          in_op10 = spu_op_e'(ops[o]); in_x10 = 10'(x); in_w10 = 10'(w);
          for (int k = 0; k < 9; k++) begin in_pix10[k] = 10'(pix[k]); in_wt10[k] = 10'(wt[k]); end
          in_valid10 = 1;
          @(negedge clk);
          in_valid10 = 0;
          while (!out_valid10) @(negedge clk);
          chk(int'(out_idx10) == lv, "10-bit core: length chosen from the charging rate");
          got = real'(out_ones10) / real'(len);
          case (ops[o])
            3: ideal = real'(x) * real'(w) / 1048576.0;
            10: begin
              ideal = 0.0;
              foreach (pix[k]) ideal += real'(pix[k]) * real'(wt[k]) / 1048576.0;
              ideal = ideal / 9.0; got = got / 9.0;
            end
            9: ideal = real'(median9(pix)) / 1024.0;
            11: ideal = (real'(x) / 1024.0) ** 0.45;
            default: ideal = real'((pix[0] > pix[4] ? pix[0] - pix[4] : pix[4] - pix[0]) +
                                   (pix[1] > pix[3] ? pix[1] - pix[3] : pix[3] - pix[1])) / 2048.0;
          endcase
          err_sum += (got > ideal) ? got - ideal : ideal - got;
        end
        mae[lv] = 100.0 * err_sum / 60.0;
      end
      $display("MAE %%: %-24s N=512 %6.2f  1024 %6.2f  (10-bit core)", names[o], mae[5], mae[6]);
      chk(mae[6] < bound[o], $sformatf("%s: MAE %f at 1024 bits", names[o], mae[6]));
    end
    done10 = 1;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ops [5] = '{3, 10, 9, 11, 8};
    string names [5] = '{"2-input multiplication", "3x3 MAC", "3x3 median filter",
                         "gamma correction", "Roberts edge detection"};
    real bound [5] = '{1.5, 2.5, 0.5, 3.0, 2.5};
    real mae [5][5];
    th[0] = 100; th[1] = 200; th[2] = 300; th[3] = 400;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int o = 0; o < 5; o++) begin
      for (int lv = 0; lv < 5; lv++) begin
        real err_sum;
        err_sum = 0.0;
        charge_rate = 16'(50 + 100 * lv);
        for (int t = 0; t < TRIALS; t++) begin
          int pix [9];
          int wt [9];
          int x, w, len, model;
          real got, ideal;
          foreach (pix[k]) begin pix[k] = $urandom_range(0, 255); wt[k] = $urandom_range(0, 255); end
          x = $urandom_range(0, 255); w = $urandom_range(0, 255);
          if (ops[o] == 8) w = 128;
          len = 16 << lv;
          model = (ops[o] == 11) ? gamma_ones(x, len, SEED1, SEED2, 8'd60, 8'd200) :
                  (ops[o] >= 8) ? window_ones(ops[o], pix, wt, w, len, SEED1, SEED2)
                                : stream_ones(ops[o], x, 0, w, len, SEED1, SEED2);
          in_op = spu_op_e'(ops[o]); in_x = 8'(x); in_w = 8'(w);
          for (int k = 0; k < 9; k++) begin in_pix[k] = 8'(pix[k]); in_wt[k] = 8'(wt[k]); end
          in_valid = 1;
          @(negedge clk);
          in_valid = 0;
          while (!out_valid) @(negedge clk);
          chk(int'(out_idx) == lv, "length chosen from the charging rate");
          chk(int'(out_ones) == model, $sformatf("%s len %0d: %0d ones, model %0d",
                                                 names[o], len, out_ones, model));
          got = real'(out_ones) / real'(len);
          case (ops[o])
            3: ideal = real'(x * w) / 65536.0;
            10: begin
              ideal = 0.0;
              foreach (pix[k]) ideal += real'(pix[k] * wt[k]) / 65536.0;
              ideal = ideal / 9.0; got = got / 9.0;
            end
            9: ideal = real'(median9(pix)) / 256.0;
            11: ideal = (real'(x) / 256.0) ** 0.45;
            default: ideal = real'((pix[0] > pix[4] ? pix[0] - pix[4] : pix[4] - pix[0]) +
                                   (pix[1] > pix[3] ? pix[1] - pix[3] : pix[3] - pix[1])) / 512.0;
          endcase
          err_sum += (got > ideal) ? got - ideal : ideal - got;
        end
        mae[o][lv] = 100.0 * err_sum / real'(TRIALS);
      end
      $display("MAE %%: %-24s N=16 %6.2f  32 %6.2f  64 %6.2f  128 %6.2f  256 %6.2f",
               names[o], mae[o][0], mae[o][1], mae[o][2], mae[o][3], mae[o][4]);
      chk(mae[o][4] < bound[o], $sformatf("%s: MAE %f at 256 bits", names[o], mae[o][4]));
      chk(mae[o][4] < mae[o][0], $sformatf("%s: no gain from 16 to 256 bits", names[o]));
    end
    wait (done10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
