// fp_div -- IEEE-754 floating-point divider, combinational.
//
// y = a / b in the format given by EW/MW (binary32 by default; the ADC
// scaling of the measurement chain divides by 32767 with it). The dividend
// significand, shifted left by MW+3 places, is divided by the divisor
// significand as integers: the quotient holds MW+3 or MW+4 significant bits,
// enough for the kept significand and a guard bit, and the remainder together
// with the last quotient bit forms the sticky bit. Rounding is to nearest,
// ties to even. Subnormal inputs count as zero and tiny results flush to zero;
// x/0 gives a signed infinity, 0/0, inf/inf and NaN operands the positive
// quiet NaN.
// Timing: purely combinational; the instantiating datapath registers it.
module fp_div #(
  parameter int EW = 8,
  parameter int MW = 23
) (
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  output logic [EW+MW:0] y
);
  localparam int N    = EW + MW + 1;
  localparam int QW   = 2 * MW + 4;
  localparam int EMAX = (1 << EW) - 1;
  localparam int BIAS = (1 << (EW - 1)) - 1;

  logic              s;
  logic [EW-1:0]     ea, eb;
  logic [MW-1:0]     fa, fb;
  logic              a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [QW-1:0]     num, den, q, r;
  logic [MW:0]       mant;
  logic [MW+1:0]     mant_r;
  logic              g, st;
  int                e;

  always_comb begin
    s  = a[N-1] ^ b[N-1];
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

    num = {1'b1, fa, {(MW+3){1'b0}}};
    den = {{(MW+3){1'b0}}, 1'b1, fb};
    q   = num / den;
    r   = num % den;
    e   = int'(ea) - int'(eb) + BIAS;
    if (q[MW+3]) begin
      mant = q[MW+3:3];
      g    = q[2];
      st   = (|q[1:0]) | (r != '0);
    end else begin
      mant = q[MW+2:2];
      g    = q[1];
      st   = q[0] | (r != '0);
      e    = e - 1;
    end
    mant_r = {1'b0, mant} + {{(MW+1){1'b0}}, g & (st | mant[0])};
    if (mant_r[MW+1]) e = e + 1;

    if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf))
      y = {1'b0, {EW{1'b1}}, 1'b1, {(MW-1){1'b0}}};
    else if (a_inf || b_zero)
      y = {s, {EW{1'b1}}, {MW{1'b0}}};
    else if (a_zero || b_inf || e <= 0)
      y = {s, {(N-1){1'b0}}};
    else if (e >= EMAX)
      y = {s, {EW{1'b1}}, {MW{1'b0}}};
    else
      y = {s, e[EW-1:0], (mant_r[MW+1] ? {MW{1'b0}} : mant_r[MW-1:0])};
  end
endmodule
