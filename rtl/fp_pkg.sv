// fp_pkg -- floating-point types and elaboration-time helpers shared by the
// measurement chain and the motor model.
//
// Every arithmetic result in the design is an IEEE-754 bit pattern. The
// measurement chain and the motor model use binary32 (single precision); the
// torque low-pass filter uses binary64 (double precision), as the setup
// prescribes. The helpers below turn `real` constants, worked out while the
// design is elaborated (model coefficients, scale factors, filter taps), into
// binary32 / binary64 words with round-to-nearest-even. They are only meant
// for normal numbers, which is all a constant here ever is.
package fp_pkg;

  localparam int F32_EW = 8;
  localparam int F32_MW = 23;
  localparam int F64_EW = 11;
  localparam int F64_MW = 52;

  typedef logic [31:0] f32_t;
  typedef logic [63:0] f64_t;

  localparam f32_t F32_ZERO = 32'h0000_0000;
  localparam f64_t F64_ZERO = 64'h0;

  localparam real PI = 3.14159265358979323846;

  // binary64 pattern of a real: exact by definition
  function automatic f64_t real_to_f64(real r);
    return $realtobits(r);
  endfunction

  // binary32 pattern of a real, rounded to nearest even; zero stays zero,
  // magnitudes below the normal range flush to zero, above it become infinity
  function automatic f32_t real_to_f32(real r);
    logic [63:0] b;
    logic [51:0] m;
    logic [24:0] mm;
    logic        up;
    int          e;
    b  = $realtobits(r);
    m  = b[51:0];
    if (b[62:52] == 11'd0) return {b[63], 31'd0};
    e  = int'(b[62:52]) - 1023 + 127;
    up = m[28] & ((|m[27:0]) | m[29]);
    mm = {1'b1, m[51:28]} >> 1;
    mm = mm + {24'd0, up};
    if (mm[24]) begin
      mm = mm >> 1;
      e  = e + 1;
    end
    if (e <= 0)   return {b[63], 31'd0};
    if (e >= 255) return {b[63], 8'hff, 23'd0};
    return {b[63], e[7:0], mm[22:0]};
  endfunction

endpackage
