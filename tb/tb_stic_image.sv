// tb_stic_image: image workload. A 12x12 8-bit test image (a horizontal
// ramp with a bright square) is corrupted with salt-and-pepper noise, then
// every interior pixel is run through the full-size core twice: once as a
// 3x3 median filter (noise removal) and once as a Roberts cross (edge
// detection). This is repeated at each stream length the controller offers,
// 16 to 256 bits, chosen through the charging rate, i.e. at 1/16 to all of
// the full run time per pixel.
// For each length the mean absolute error against the exactly filtered image
// is printed, next to the error of a conventional processor that had the same
// fraction of the full run time: it finishes that fraction of the pixels
// exactly and leaves the rest unwritten (zero).
// Checked: each result equals the bit-serial model, the stream length is the
// one the rate asks for, the error falls from the shortest to the longest
// stream and stays small at 256 bits, and at every budget below the full run
// time the stochastic image is closer to the exact one than the partial
// conventional image.
module tb_stic_image;
  import stic_pkg::*;
  import tb_stic_model_pkg::*;

  localparam int DIM = 12;
  localparam logic [7:0] SEED1 = 8'd119, SEED2 = 8'd159;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_x_analog = 0;
  spu_op_e in_op = OP_MEDIAN;
  logic [7:0] in_x = 0, in_y = 0, in_w = 0;
  logic [8:0][7:0] in_pix = '0, in_wt = '0;
  logic [15:0] charge_rate = 0;
  logic [3:0][15:0] th;
  logic [2:0] level, out_idx;
  logic rate_check, out_valid;
  logic [11:0] out_ones;
  logic [7:0] out_value;
  int checks = 0, failures = 0;

  int img [DIM][DIM];

  stic_top dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_op, .in_x_analog, .in_x, .in_y,
    .in_w, .in_pix, .in_wt, .sensor_v(0.0), .charge_rate, .th, .level,
    .rate_check, .out_valid, .out_ones, .out_idx, .out_value);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exact filter output in [0,1] of full scale
  function automatic real exact_out(int op, int pix [9]);
    int a, b;
    if (op == 9) return real'(median9(pix)) / 256.0;
    a = (pix[0] > pix[4]) ? pix[0] - pix[4] : pix[4] - pix[0];
    b = (pix[1] > pix[3]) ? pix[1] - pix[3] : pix[3] - pix[1];
    return real'(a + b) / 512.0;
  endfunction

  initial begin
    int ops [2] = '{9, 8};
    string names [2] = '{"median noise removal", "Roberts edge detection"};
    real bound [2] = '{1.0, 2.5};
    int npix;
    npix = (DIM - 2) * (DIM - 2);
    // test image: ramp, bright square, 10% salt-and-pepper noise
    for (int r = 0; r < DIM; r++)
      for (int c = 0; c < DIM; c++) begin
        int v;
        v = 30 + 12 * c;
        if (r >= 3 && r <= 7 && c >= 4 && c <= 8) v = 220;
        if ($urandom_range(0, 99) < 10) v = ($urandom_range(0, 1) != 0) ? 255 : 0;
        img[r][c] = v;
      end
    th[0] = 100; th[1] = 200; th[2] = 300; th[3] = 400;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int o = 0; o < 2; o++) begin
      real mae [5];
      real conv [5];
      real exact_sum;
      exact_sum = 0.0;
      for (int lv = 0; lv < 5; lv++) begin
        real err_sum;
        int len, done;
        err_sum = 0.0;
        len = 16 << lv;
        charge_rate = 16'(50 + 100 * lv);
        // 3x3 window around each interior pixel, pix[k] at row k/3, col k%3
        for (int r = 1; r < DIM - 1; r++)
          for (int c = 1; c < DIM - 1; c++) begin
            int pix [9];
            int wt [9];
            int model;
            real got, ideal;
            for (int k = 0; k < 9; k++) begin
              pix[k] = img[r - 1 + k / 3][c - 1 + k % 3];
              wt[k] = 0;
            end
            // the Roberts cross uses the 2x2 block pix[0], pix[1], pix[3], pix[4]
            model = window_ones(ops[o], pix, wt, 128, len, SEED1, SEED2);
            in_op = spu_op_e'(ops[o]); in_w = 8'd128;
            for (int k = 0; k < 9; k++) begin in_pix[k] = 8'(pix[k]); in_wt[k] = 8'd0; end
            in_valid = 1;
            @(negedge clk);
            in_valid = 0;
            while (!out_valid) @(negedge clk);
            chk(int'(out_idx) == lv, "length chosen from the charging rate");
            chk(int'(out_ones) == model, $sformatf("%s (%0d,%0d) len %0d: %0d ones, model %0d",
                                                   names[o], r, c, len, out_ones, model));
            got = real'(out_ones) / real'(len);
            ideal = exact_out(ops[o], pix);
            err_sum += (got > ideal) ? got - ideal : ideal - got;
            if (lv == 0) exact_sum += ideal;
          end
        mae[lv] = 100.0 * err_sum / real'(npix);
        // conventional processor with run time len/256 of the full one: it has
        // finished that share of the pixels, exactly, and the rest read zero
        done = (npix * len) / 256;
        conv[lv] = 100.0 * exact_sum * real'(npix - done) / real'(npix) / real'(npix);
      end
      $display("%-24s run time    6%%     12%%     25%%     50%%    100%%", names[o]);
      $display("  stochastic MAE %%         %6.2f  %6.2f  %6.2f  %6.2f  %6.2f",
               mae[0], mae[1], mae[2], mae[3], mae[4]);
      $display("  partial exact MAE %%      %6.2f  %6.2f  %6.2f  %6.2f  %6.2f",
               conv[0], conv[1], conv[2], conv[3], conv[4]);
      chk(mae[4] < bound[o], $sformatf("%s: MAE %f at 256 bits", names[o], mae[4]));
      chk(mae[4] < mae[0], $sformatf("%s: no gain from 16 to 256 bits", names[o]));
      for (int lv = 0; lv < 4; lv++)
        chk(mae[lv] < conv[lv], $sformatf("%s: at %0d bits %f not below partial %f",
                                          names[o], 16 << lv, mae[lv], conv[lv]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
