// int_to_fp -- signed two's-complement integer to IEEE-754 float,
// combinational.
//
// Converts an IW-bit signed integer (a 16-bit ADC code, or the encoder pulse
// count) into the EW/MW format (binary32 by default). The magnitude is
// normalised so that its leading one becomes the hidden bit; bits that do not
// fit the significand are rounded to nearest, ties to even (never needed for
// 16-bit inputs into binary32, which convert exactly).
// Timing: purely combinational.
module int_to_fp #(
  parameter int IW = 16,
  parameter int EW = 8,
  parameter int MW = 23
) (
  input  logic signed [IW-1:0] x,
  output logic [EW+MW:0]       y
);
  localparam int L    = IW + MW + 2;
  localparam int BIAS = (1 << (EW - 1)) - 1;

  logic          s;
  logic [IW-1:0] mag;
  logic [L-1:0]  ext;
  logic [MW:0]   mant;
  logic [MW+1:0] mant_r;
  logic          g, st;
  int            pos, e;

  always_comb begin
    s   = x[IW-1];
    mag = s ? (~x + 1'b1) : x;
    pos = 0;
    for (int i = 0; i < IW; i++) begin
      if (mag[i]) pos = i;
    end
    ext    = {mag, {(MW+2){1'b0}}} << (IW - 1 - pos);
    mant   = ext[L-1 -: MW+1];
    g      = ext[IW];
    st     = |ext[IW-1:0];
    mant_r = {1'b0, mant} + {{(MW+1){1'b0}}, g & (st | mant[0])};
    e      = BIAS + pos + (mant_r[MW+1] ? 1 : 0);
    if (mag == '0)
      y = '0;
    else
      y = {s, e[EW-1:0], (mant_r[MW+1] ? {MW{1'b0}} : mant_r[MW-1:0])};
  end
endmodule
