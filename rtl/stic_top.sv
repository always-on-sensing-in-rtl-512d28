// stic_top: computation core of a stochastic intermittent computing (STIC)
// sensor node.
//
// An energy-harvesting node normally survives power loss by checkpointing to
// non-volatile memory. This core avoids that: it computes with stochastic
// bit-streams, whose precision grows with their length, and it stops every
// computation at the longest stream the harvested charging rate can pay for.
// It is therefore always on, giving a rougher result when energy is scarce.
//
// Datapath (P lanes, P stream bits per clock):
//   RNG1 (stic_rng) -> X converter and Y converter: X and Y are correlated.
//   RNG2 (stic_rng, other seed, bit-reversed) -> W converter: W is not
//                      correlated to X or Y.
//   X comes from the analog converter (stic_asc, sensor voltage 'sensor_v')
//   when 'in_x_analog' is set, else from a binary converter (stic_bsc).
//   stic_spu applies 'in_op' to the X, Y, W streams.
//   Nine pixel streams (RNG1) and nine weight streams (RNG2) feed the 3x3
//   window circuits: Roberts cross (stic_roberts, select stream W), median
//   (stic_median9) and multiply-accumulate (stic_mac9).
//   Gamma correction (stic_gamma): six X streams from RNG1, RNG3, RNG4 and
//                      their bit-reversed numbers select among seven
//                      coefficient streams from RNG2.
//   stic_counter counts the ones of the selected result stream (for the MAC,
//   of all nine product streams).
// Control: stic_precision_sel maps 'charge_rate' against thresholds 'th'
// onto a precision level; stic_ctrl runs the datapath for L/P clocks per
// datum, L the valid length chosen at the rate checks.
//
// Interface and timing: a datum (in_op, in_x_analog, in_x, in_y, in_w) is
// taken when in_valid and in_ready are both high and held in registers.
// L/P + 1 clocks later out_valid is high for one clock with out_ones (ones in
// the L-bit result stream), out_idx (L = 2^(MIN_LOG2 + out_idx*LEVEL_STEP))
// and out_value = out_ones * 2^W / L, saturated to W bits, the result as a
// W-bit binary fraction (for OP_MAC out_ones / L is the dot product, up to
// 9). 'level' shows the precision level of the present charging rate. The
// maximum stream length is 2^W, the period of the random sources, so a W-bit
// operand converted over the full length is exact.
// OP_GAMMA works on the binary in_x only. OP_SCALED and OP_ROBERTS need
// in_w = 2^(W-1) (a 0.5 select stream).
//
// Defaults follow the design's main configuration: 8-bit operands, p = 4
// lanes, valid lengths 16, 32, 64, 128 and 256 bits. The harvester, battery,
// sensors, radio and host microcontroller around the core are outside it;
// the charging rate arrives as a number on 'charge_rate'.
module stic_top
  import stic_pkg::*;
#(
  parameter int unsigned W          = 8,
  parameter int unsigned P          = 4,
  parameter int unsigned MIN_LOG2   = 4,
  parameter int unsigned LEVEL_STEP = 1,
  parameter int unsigned RATE_W     = 16,
  parameter real         VREF       = 1.0,
  localparam int unsigned NLEV      = num_levels(W, MIN_LOG2, LEVEL_STEP),
  localparam int unsigned LW        = $clog2(NLEV)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // new datum
  input  logic                        in_valid,
  output logic                        in_ready,
  input  spu_op_e                     in_op,
  input  logic                        in_x_analog,
  input  logic [W-1:0]                in_x,
  input  logic [W-1:0]                in_y,
  input  logic [W-1:0]                in_w,
  input  logic [8:0][W-1:0]           in_pix,
  input  logic [8:0][W-1:0]           in_wt,
  input  real                         sensor_v,
  // power management
  input  logic [RATE_W-1:0]           charge_rate,
  input  logic [NLEV-2:0][RATE_W-1:0] th,
  output logic [LW-1:0]               level,
  output logic                        rate_check,
  // result
  output logic                        out_valid,
  output logic [W+3:0]                out_ones,
  output logic [LW-1:0]               out_idx,
  output logic [W-1:0]                out_value
);

  logic                start, run;
  spu_op_e             op_q;
  logic                x_analog_q;
  logic [W-1:0]        x_q, y_q, w_q;
  logic [P-1:0][W-1:0] rnd1, rnd2;
  logic [P-1:0]        xs_bin, xs_ana, xs, ys, ws, zs;
  logic [8:0][W-1:0]   pix_q, wt_q;
  logic [8:0][P-1:0]   pix_s, wt_s, prod;
  logic [P-1:0]        rob_z, med_z;
  logic [9*P-1:0]      cnt_bits;
  localparam int unsigned GAMMA_DEG = 6;   // degree of stic_pkg::gamma_coef

  logic [P-1:0][W-1:0] rnd3, rnd4;
  logic [GAMMA_DEG-1:0][P-1:0][W-1:0] gam_rnd;
  logic [GAMMA_DEG-1:0][P-1:0]        gam_x;
  logic [GAMMA_DEG:0][P-1:0]          gam_c;
  logic [P-1:0]                       gam_z;

  // Operand registers, loaded when a datum is accepted.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q       <= OP_PASS;
      x_analog_q <= 1'b0;
      x_q        <= '0;
      y_q        <= '0;
      w_q        <= '0;
      pix_q      <= '0;
      wt_q       <= '0;
    end else if (start) begin
      op_q       <= in_op;
      x_analog_q <= in_x_analog;
      x_q        <= in_x;
      y_q        <= in_y;
      w_q        <= in_w;
      pix_q      <= in_pix;
      wt_q       <= in_wt;
    end
  end

  stic_rng #(.W(W), .P(P), .SEED(W'(119)), .REVERSE(1'b0)) u_rng1 (
    .clk, .rst_n, .load(start), .en(run), .rnd(rnd1));

  stic_rng #(.W(W), .P(P), .SEED(W'(159)), .REVERSE(1'b1)) u_rng2 (
    .clk, .rst_n, .load(start), .en(run), .rnd(rnd2));

  // Two more sources for the gamma circuit's independent X streams.
  stic_rng #(.W(W), .P(P), .SEED(W'(60)), .REVERSE(1'b0)) u_rng3 (
    .clk, .rst_n, .load(start), .en(run), .rnd(rnd3));

  stic_rng #(.W(W), .P(P), .SEED(W'(200)), .REVERSE(1'b0)) u_rng4 (
    .clk, .rst_n, .load(start), .en(run), .rnd(rnd4));

  stic_asc #(.W(W), .P(P), .VREF(VREF)) u_asc_x (
    .vin(sensor_v), .rnd(rnd1), .bits(xs_ana));

  stic_bsc #(.W(W), .P(P)) u_bsc_x (.ref_val(x_q), .rnd(rnd1), .bits(xs_bin));
  stic_bsc #(.W(W), .P(P)) u_bsc_y (.ref_val(y_q), .rnd(rnd1), .bits(ys));
  stic_bsc #(.W(W), .P(P)) u_bsc_w (.ref_val(w_q), .rnd(rnd2), .bits(ws));

  assign xs = x_analog_q ? xs_ana : xs_bin;

  stic_spu #(.P(P)) u_spu (
    .clk, .rst_n, .clear(start), .en(run), .op(op_q),
    .x(xs), .y(ys), .w(ws), .z(zs));

  // 3x3 window circuits.
  for (genvar i = 0; i < 9; i++) begin : g_win
    stic_bsc #(.W(W), .P(P)) u_bsc_pix (.ref_val(pix_q[i]), .rnd(rnd1), .bits(pix_s[i]));
    stic_bsc #(.W(W), .P(P)) u_bsc_wt  (.ref_val(wt_q[i]),  .rnd(rnd2), .bits(wt_s[i]));
  end

  stic_roberts #(.P(P)) u_roberts (
    .a(pix_s[0]), .b(pix_s[1]), .c(pix_s[3]), .d(pix_s[4]), .s(ws), .z(rob_z));

  stic_median9 #(.P(P)) u_median (.pix(pix_s), .z(med_z));

  stic_mac9 #(.P(P)) u_mac (.x(pix_s), .w(wt_s), .prod(prod));

  // Gamma correction: six X streams from RNG1, RNG3, RNG4 and their
  // bit-reversed numbers; coefficient streams from RNG2.
  always_comb begin
    for (int j = 0; j < P; j++) begin
      for (int b = 0; b < W; b++) begin
        gam_rnd[0][j][b] = rnd1[j][b];
        gam_rnd[1][j][b] = rnd1[j][W-1-b];
        gam_rnd[2][j][b] = rnd3[j][b];
        gam_rnd[3][j][b] = rnd3[j][W-1-b];
        gam_rnd[4][j][b] = rnd4[j][b];
        gam_rnd[5][j][b] = rnd4[j][W-1-b];
      end
    end
  end

  for (genvar i = 0; i < GAMMA_DEG; i++) begin : g_gam_x
    stic_bsc #(.W(W), .P(P)) u_bsc (.ref_val(x_q), .rnd(gam_rnd[i]), .bits(gam_x[i]));
  end

  for (genvar k = 0; k <= GAMMA_DEG; k++) begin : g_gam_c
    stic_bsc #(.W(W), .P(P)) u_bsc (
      .ref_val(W'(gamma_coef(k, W))), .rnd(rnd2), .bits(gam_c[k]));
  end

  stic_gamma #(.P(P), .DEG(GAMMA_DEG)) u_gamma (.x(gam_x), .coef(gam_c), .z(gam_z));

  always_comb begin
    unique case (op_q)
      OP_ROBERTS: cnt_bits = {(8*P)'(0), rob_z};
      OP_MEDIAN:  cnt_bits = {(8*P)'(0), med_z};
      OP_MAC:     cnt_bits = prod;
      OP_GAMMA:   cnt_bits = {(8*P)'(0), gam_z};
      default:    cnt_bits = {(8*P)'(0), zs};
    endcase
  end

  stic_counter #(.NB(9 * P), .CW(W + 4)) u_cnt (
    .clk, .rst_n, .clear(start), .en(run), .bits(cnt_bits), .count(out_ones));

  stic_precision_sel #(.RATE_W(RATE_W), .NLEV(NLEV)) u_sel (
    .rate(charge_rate), .th(th), .level(level));

  stic_ctrl #(.P(P), .MAX_LOG2(W), .MIN_LOG2(MIN_LOG2),
              .LEVEL_STEP(LEVEL_STEP)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .level, .start, .run,
    .check(rate_check), .out_valid, .out_idx);

  // Result as a W-bit fraction: ones * 2^W / L = ones << (W - log2 L).
  always_comb begin
    logic [2*W+4:0] scaled;
    scaled = (2*W+5)'(out_ones) << (W - (MIN_LOG2 + out_idx * LEVEL_STEP));
    out_value = (scaled > (2*W+5)'(2 ** W - 1)) ? W'(2 ** W - 1) : scaled[W-1:0];
  end

endmodule
