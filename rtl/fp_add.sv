// fp_add -- IEEE-754 floating-point adder / subtractor, combinational.
//
// y = a + b (sub = 0) or y = a - b (sub = 1). EW/MW select the format:
// 8/23 is binary32, used throughout the measurement chain and the motor
// model; 11/52 is binary64, used by the torque low-pass filter.
//
// How it works: the operand of larger magnitude is kept, the other one is
// aligned to it with three extra bits (guard, round, sticky); equal signs add,
// unlike signs subtract (never negative, as the larger magnitude is first);
// the result is renormalised by a carry shift or a leading-zero shift and
// rounded to nearest, ties to even. Simplifications chosen for this design:
// subnormal inputs are read as zero and results below the normal range flush
// to zero; x + (-x) gives +0; every NaN result is the positive quiet NaN.
// Timing: purely combinational; the instantiating datapath registers it.
module fp_add #(
  parameter int EW = 8,
  parameter int MW = 23
) (
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  input  logic           sub,
  output logic [EW+MW:0] y
);
  localparam int N    = EW + MW + 1;
  localparam int W    = MW + 4;              // hidden bit, fraction, G, R, S
  localparam int EMAX = (1 << EW) - 1;

  logic          sa, sb;
  logic [EW-1:0] ea, eb;
  logic [MW-1:0] fa, fb;
  logic          a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

  always_comb begin
    sa = a[N-1];
    sb = b[N-1] ^ sub;
    ea = a[N-2:MW];
    eb = b[N-2:MW];
    fa = a[MW-1:0];
    fb = b[MW-1:0];
    a_nan  = (int'(ea) == EMAX) && (fa != '0);
    b_nan  = (int'(eb) == EMAX) && (fb != '0);
    a_inf  = (int'(ea) == EMAX) && (fa == '0);
    b_inf  = (int'(eb) == EMAX) && (fb == '0);
    a_zero = (ea == '0);
    b_zero = (eb == '0);
  end

  // general case: both operands finite and normal
  logic          s_big;
  logic [EW-1:0] e_big, e_small;
  logic [MW-1:0] f_big, f_small;
  logic [W-1:0]  big_x, small_x, small_sh, norm;
  logic [W:0]    sum;
  logic [MW+1:0] mant_r;
  logic          sticky, round_up;
  int            d, lz, e_res;
  logic [N-1:0]  y_gen;

  always_comb begin
    if ({ea, fa} >= {eb, fb}) begin
      s_big = sa; e_big = ea; f_big = fa; e_small = eb; f_small = fb;
    end else begin
      s_big = sb; e_big = eb; f_big = fb; e_small = ea; f_small = fa;
    end
    d       = int'(e_big) - int'(e_small);
    big_x   = {1'b1, f_big, 3'b000};
    small_x = {1'b1, f_small, 3'b000};
    if (d >= W) begin
      small_sh = '0;
      sticky   = 1'b1;
    end else begin
      small_sh = small_x >> d;
      sticky   = |(small_x & ~({W{1'b1}} << d));
    end
    small_sh[0] = small_sh[0] | sticky;

    e_res = int'(e_big);
    lz    = 0;
    if (sa == sb) begin
      sum = {1'b0, big_x} + {1'b0, small_sh};
      if (sum[W]) begin
        norm    = sum[W:1];
        norm[0] = norm[0] | sum[0];
        e_res   = e_res + 1;
      end else begin
        norm = sum[W-1:0];
      end
    end else begin
      sum = {1'b0, big_x} - {1'b0, small_sh};
      for (int i = 0; i < W; i++) begin
        if (sum[i]) lz = W - 1 - i;
      end
      norm  = sum[W-1:0] << lz;
      e_res = e_res - lz;
    end

    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    mant_r   = {1'b0, norm[W-1:3]} + {{(MW+1){1'b0}}, round_up};
    if (mant_r[MW+1]) e_res = e_res + 1;

    if (sum == '0 || e_res <= 0) begin
      y_gen = '0;
    end else if (e_res >= EMAX) begin
      y_gen = {s_big, {EW{1'b1}}, {MW{1'b0}}};
    end else begin
      y_gen = {s_big, e_res[EW-1:0], (mant_r[MW+1] ? {MW{1'b0}} : mant_r[MW-1:0])};
    end
  end

  always_comb begin
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = {1'b0, {EW{1'b1}}, 1'b1, {(MW-1){1'b0}}};
    else if (a_inf)
      y = {sa, {EW{1'b1}}, {MW{1'b0}}};
    else if (b_inf)
      y = {sb, {EW{1'b1}}, {MW{1'b0}}};
    else if (a_zero && b_zero)
      y = {sa & sb, {(N-1){1'b0}}};
    else if (a_zero)
      y = {sb, b[N-2:0]};
    else if (b_zero)
      y = a;
    else
      y = y_gen;
  end
endmodule
