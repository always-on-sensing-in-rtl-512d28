// tb_stic_model_pkg: reference models used by the STIC testbenches.
//
// Written from the definitions, not from the RTL: the 8-bit random source is
// the maximal LFSR x^8 + x^6 + x^5 + x^4 + 1 (new bit shifted in at the
// bottom) with the all-zero state inserted after 1000_0000, which visits all
// 256 values; one random number is used every 9 steps. stream_ones() plays a whole computation bit by bit, one stream
// bit at a time, as a single-lane stochastic circuit would.
package tb_stic_model_pkg;

  function automatic logic [7:0] db8_next(logic [7:0] s);
    logic fb;
    fb = s[7] ^ s[5] ^ s[4] ^ s[3];
    if (s[6:0] == 7'd0) fb = ~fb;
    return {s[6:0], fb};
  endfunction

  // Next random number: nine steps on.
  function automatic logic [7:0] db8_num(logic [7:0] s);
    for (int k = 0; k < 9; k++) s = db8_next(s);
    return s;
  endfunction

  function automatic logic [7:0] rev8(logic [7:0] v);
    return {v[0], v[1], v[2], v[3], v[4], v[5], v[6], v[7]};
  endfunction

  // One output bit of an operation code (see the processing unit's table).
  // 'prev' is the division circuit's previous output.
  function automatic logic op_bit(int op, logic x, logic y, logic w, logic prev);
    case (op)
      0: return x & y;
      1: return x | y;
      2: return x ^ y;
      3: return x & w;
      4: return x | w;
      5: return y ? x : prev;
      6: return w ? y : x;
      default: return x;
    endcase
  endfunction

  // Ones in the 'len'-bit result stream of one computation with 8-bit
  // operands; X from the analog path when 'analog' (probability vin/vref).
  function automatic int stream_ones(int op, int x, int y, int w, int len,
                                     logic [7:0] seed1, logic [7:0] seed2,
                                     bit analog = 0, real vin = 0.0,
                                     real vref = 1.0);
    logic [7:0] r1, r2;
    logic xb, yb, wb, z, prev;
    int n;
    r1 = seed1; r2 = seed2; prev = 0; n = 0;
    for (int i = 0; i < len; i++) begin
      xb = analog ? (vin > vref * real'(r1) / 256.0) : (x > int'(r1));
      yb = (y > int'(r1));
      wb = (w > int'(rev8(r2)));
      z  = op_bit(op, xb, yb, wb, prev);
      if (op == 5) prev = z;
      n += int'(z);
      r1 = db8_num(r1);
      r2 = db8_num(r2);
    end
    return n;
  endfunction

  // Median of nine values, by sorting a copy.
  function automatic int median9(int v [9]);
    int a [9];
    a = v;
    a.sort();
    return a[4];
  endfunction

  // Ones counted for a 3x3-window operation (8 Roberts, 9 median, 10 MAC)
  // over a 'len'-bit stream: pixels from the first source, weights and the
  // Roberts select (w) from the second.
  function automatic int window_ones(int op, int pix [9], int wt [9], int w,
                                     int len, logic [7:0] seed1,
                                     logic [7:0] seed2);
    logic [7:0] r1, r2;
    logic pb [9];
    logic wb [9];
    logic sb;
    int n;
    r1 = seed1; r2 = seed2; n = 0;
    for (int i = 0; i < len; i++) begin
      int cnt1;
      for (int k = 0; k < 9; k++) begin
        pb[k] = pix[k] > int'(r1);
        wb[k] = wt[k] > int'(rev8(r2));
      end
      sb = w > int'(rev8(r2));
      case (op)
        8: n += int'(sb ? (pb[1] ^ pb[3]) : (pb[0] ^ pb[4]));
        9: begin
          cnt1 = 0;                       // median bit: at least 5 of 9 ones
          for (int k = 0; k < 9; k++) cnt1 += int'(pb[k]);
          n += int'(cnt1 >= 5);
        end
        default: for (int k = 0; k < 9; k++) n += int'(pb[k] & wb[k]);
      endcase
      r1 = db8_num(r1);
      r2 = db8_num(r2);
    end
    return n;
  endfunction

  // Gamma coefficients b_k * 256 (least-squares Bernstein fit to x^0.45).
  function automatic int gamma_c8(int k);
    int c [7] = '{21, 194, 74, 255, 170, 252, 254};
    return c[k];
  endfunction

  // Ones in the 'len'-bit output of the gamma circuit for 8-bit x: six x
  // streams against sources 1, 3 and 4 and their bit reversals, coefficient
  // k selected by the number of ones, compared against source 2.
  function automatic int gamma_ones(int x, int len, logic [7:0] seed1,
                                    logic [7:0] seed2, logic [7:0] seed3,
                                    logic [7:0] seed4);
    logic [7:0] r1, r2, r3, r4;
    int n;
    r1 = seed1; r2 = seed2; r3 = seed3; r4 = seed4; n = 0;
    for (int i = 0; i < len; i++) begin
      int k;
      k = int'(x > int'(r1)) + int'(x > int'(rev8(r1))) +
          int'(x > int'(r3)) + int'(x > int'(rev8(r3))) +
          int'(x > int'(r4)) + int'(x > int'(rev8(r4)));
      n += int'(gamma_c8(k) > int'(rev8(r2)));
      r1 = db8_num(r1);
      r2 = db8_num(r2);
      r3 = db8_num(r3);
      r4 = db8_num(r4);
    end
    return n;
  endfunction

endpackage
