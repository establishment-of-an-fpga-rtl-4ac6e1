// fp_mul -- IEEE-754 floating-point multiplier, combinational.
//
// y = a * b in the format given by EW/MW (8/23 binary32, 11/52 binary64).
// The significands, hidden bits included, are multiplied in full; the product
// is normalised by at most one position, the bits below the kept significand
// give the guard and sticky bits, and the result is rounded to nearest, ties
// to even. Subnormal inputs count as zero and results below the normal range
// flush to signed zero; overflow gives a signed infinity; 0 * inf and NaN
// operands give the positive quiet NaN.
// Timing: purely combinational; the instantiating datapath registers it.
module fp_mul #(
  parameter int EW = 8,
  parameter int MW = 23
) (
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  output logic [EW+MW:0] y
);
  localparam int N    = EW + MW + 1;
  localparam int EMAX = (1 << EW) - 1;
  localparam int BIAS = (1 << (EW - 1)) - 1;

  logic              s;
  logic [EW-1:0]     ea, eb;
  logic [MW-1:0]     fa, fb;
  logic              a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [2*MW+1:0]   prod;
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

    prod = {{(MW+1){1'b0}}, 1'b1, fa} * {{(MW+1){1'b0}}, 1'b1, fb};
    e    = int'(ea) + int'(eb) - BIAS;
    if (prod[2*MW+1]) begin
      mant = prod[2*MW+1:MW+1];
      g    = prod[MW];
      st   = |prod[MW-1:0];
      e    = e + 1;
    end else begin
      mant = prod[2*MW:MW];
      g    = prod[MW-1];
      st   = |prod[MW-2:0];
    end
    mant_r = {1'b0, mant} + {{(MW+1){1'b0}}, g & (st | mant[0])};
    if (mant_r[MW+1]) e = e + 1;

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = {1'b0, {EW{1'b1}}, 1'b1, {(MW-1){1'b0}}};
    else if (a_inf || b_inf)
      y = {s, {EW{1'b1}}, {MW{1'b0}}};
    else if (a_zero || b_zero || e <= 0)
      y = {s, {(N-1){1'b0}}};
    else if (e >= EMAX)
      y = {s, {EW{1'b1}}, {MW{1'b0}}};
    else
      y = {s, e[EW-1:0], (mant_r[MW+1] ? {MW{1'b0}} : mant_r[MW-1:0])};
  end
endmodule
