// fp_resize -- converts an IEEE-754 value between two formats, combinational.
//
// Used to carry the single-precision torque sample into the double-precision
// low-pass filter (EW1/MW1 = 8/23 to EW2/MW2 = 11/52, exact) and to bring the
// filtered torque back to single precision for the motor model (11/52 to
// 8/23, rounded to nearest, ties to even). The exponent is rebiased; a result
// outside the target's normal range flushes to zero or becomes infinity.
// Zero, infinity and NaN keep their meaning.
// Timing: purely combinational.
module fp_resize #(
  parameter int EW1 = 8,
  parameter int MW1 = 23,
  parameter int EW2 = 11,
  parameter int MW2 = 52
) (
  input  logic [EW1+MW1:0] a,
  output logic [EW2+MW2:0] y
);
  localparam int L     = MW1 + MW2 + 3;
  localparam int EMAX1 = (1 << EW1) - 1;
  localparam int EMAX2 = (1 << EW2) - 1;
  localparam int BIAS1 = (1 << (EW1 - 1)) - 1;
  localparam int BIAS2 = (1 << (EW2 - 1)) - 1;

  logic           s;
  logic [EW1-1:0] ea;
  logic [MW1-1:0] fa;
  logic [L-1:0]   ext;
  logic [MW2:0]   mant;
  logic [MW2+1:0] mant_r;
  logic           g, st;
  int             e;

  always_comb begin
    s      = a[EW1+MW1];
    ea     = a[EW1+MW1-1:MW1];
    fa     = a[MW1-1:0];
    ext    = {1'b1, fa, {(MW2+2){1'b0}}};
    mant   = ext[L-1 -: MW2+1];
    g      = ext[MW1+1];
    st     = |ext[MW1:0];
    mant_r = {1'b0, mant} + {{(MW2+1){1'b0}}, g & (st | mant[0])};
    e      = int'(ea) - BIAS1 + BIAS2 + (mant_r[MW2+1] ? 1 : 0);
    if (int'(ea) == EMAX1)
      y = (fa != '0) ? {1'b0, {EW2{1'b1}}, 1'b1, {(MW2-1){1'b0}}}
                     : {s, {EW2{1'b1}}, {MW2{1'b0}}};
    else if (ea == '0 || e <= 0)
      y = {s, {(EW2+MW2){1'b0}}};
    else if (e >= EMAX2)
      y = {s, {EW2{1'b1}}, {MW2{1'b0}}};
    else
      y = {s, e[EW2-1:0], (mant_r[MW2+1] ? {MW2{1'b0}} : mant_r[MW2-1:0])};
  end
endmodule
