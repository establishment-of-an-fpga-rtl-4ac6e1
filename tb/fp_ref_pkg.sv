// fp_ref_pkg -- reference arithmetic for the testbenches.
//
// Works out expected IEEE-754 results with the simulator's own `real`
// (binary64) arithmetic, independently of the RTL. A binary32 result is the
// binary64 result rounded once more to binary32 (to nearest even); for +, -,
// * and / of binary32 operands this double rounding is known to be exact, so
// the RTL can be compared bit for bit. Like the RTL, values below the normal
// range are taken as zero.
package fp_ref_pkg;

  function automatic real rabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  function automatic real f32_to_real(logic [31:0] f);
    logic [63:0] b;
    if (f[30:23] == 8'd0) return 0.0;
    b = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(b);
  endfunction

  function automatic logic [31:0] r2f32(real r);
    return fp_pkg::real_to_f32(r);
  endfunction

  function automatic logic [31:0] add32(logic [31:0] a, logic [31:0] b);
    return r2f32(f32_to_real(a) + f32_to_real(b));
  endfunction

  function automatic logic [31:0] sub32(logic [31:0] a, logic [31:0] b);
    return r2f32(f32_to_real(a) - f32_to_real(b));
  endfunction

  function automatic logic [31:0] mul32(logic [31:0] a, logic [31:0] b);
    return r2f32(f32_to_real(a) * f32_to_real(b));
  endfunction

  function automatic logic [31:0] div32(logic [31:0] a, logic [31:0] b);
    return r2f32(f32_to_real(a) / f32_to_real(b));
  endfunction

  // random normal binary32 value with a biased exponent in [elo, ehi]
  function automatic logic [31:0] rand32(int elo, int ehi);
    int e;
    e = elo + int'($urandom_range(ehi - elo));
    return {1'($urandom), e[7:0], 23'($urandom)};
  endfunction

  // random normal binary64 value with a biased exponent in [elo, ehi]
  function automatic logic [63:0] rand64(int elo, int ehi);
    int e;
    e = elo + int'($urandom_range(ehi - elo));
    return {1'($urandom), e[10:0], 20'($urandom), 32'($urandom)};
  endfunction

endpackage
