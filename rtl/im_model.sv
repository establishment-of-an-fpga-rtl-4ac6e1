// im_model -- discretised rotor-flux model of the induction motor in the
// stator-fixed alpha-beta frame, in single precision.
//
// State x = [i_sa, i_sb, phi_ra, phi_rb, w_m] (stator currents, rotor flux
// linkages, mechanical speed in rad/s); input u = [v_sa, v_sb]; the measured
// load torque t_L enters as a disturbance. One step advances the state by the
// sample time T (forward Euler):
//   i_sa'   = a1 i_sa + a2 phi_ra + a3 w phi_rb + a9 v_sa
//   i_sb'   = a1 i_sb - a3 w phi_ra + a2 phi_rb + a9 v_sb
//   phi_ra' = a4 i_sa + a5 phi_ra - a6 w phi_rb
//   phi_rb' = a4 i_sb + a6 w phi_ra + a5 phi_rb
//   w'      = a7 (phi_ra i_sb - phi_rb i_sa) + a8 w - a10,  a10 = t_L T / J_T
// with L_sigma = sigma L_s, sigma = 1 - L_m^2 / (L_s L_r) and
//   a1 = 1 - (R_s / L_sigma + L_m^2 R_r / (L_sigma L_r^2)) T
//   a2 = L_m R_r T / (L_sigma L_r^2)     a3 = L_m p T / (L_sigma L_r)
//   a4 = R_r L_m T / L_r                 a5 = 1 - R_r T / L_r
//   a6 = p T                             a7 = 1.5 p L_m T / (L_r J_T)
//   a8 = 1 - beta_T T / J_T              a9 = T / L_sigma
// The coefficients are worked out at elaboration from the motor parameters
// (defaults: the 2.2 kW, 3-pole-pair test motor) and T = 15 us.
//
// How it works: the 23 multiplications and 13 additions of a step are laid
// out over four registered levels, all of one level computed in parallel:
// (1) the coefficient products and a3 w, a6 w, a7 phi, t_L T / J_T;
// (2) the speed-dependent cross products, and the first partial sums;
// (3) the flux updates and further partial sums; (4) the current and speed
// updates. A fifth stage gives the model speed in rpm, n_m = w 60 / (2 pi).
//
// Interface: a `start` pulse registers v_sa, v_sb, t_L; six cycles later
// `done` pulses and the outputs hold the new state until the next step. `start`
// while a step runs is ignored. Reset puts the motor at rest, unmagnetised.
// The equations and the motor data are the setup's; the schedule, the
// latency and the reset state are this design's choices.
module im_model #(
  parameter real T_S  = 15.0e-6,   // sample time [s]
  parameter real R_S  = 3.03,      // stator resistance [ohm]
  parameter real R_R  = 2.53,      // rotor resistance, stator side [ohm]
  parameter real L_S  = 0.1466,    // stator inductance [H]
  parameter real L_R  = 0.1524,    // rotor inductance [H]
  parameter real L_M  = 0.135,     // magnetising inductance [H]
  parameter real J_T  = 0.055,     // total inertia [kg m^2]
  parameter real B_T  = 0.0019,    // viscous friction [N m s/rad]
  parameter real P_P  = 3.0        // pole pairs
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  fp_pkg::f32_t v_sa,
  input  fp_pkg::f32_t v_sb,
  input  fp_pkg::f32_t t_l,
  output logic         done,
  output logic         busy,
  output fp_pkg::f32_t i_sa,
  output fp_pkg::f32_t i_sb,
  output fp_pkg::f32_t phi_ra,
  output fp_pkg::f32_t phi_rb,
  output fp_pkg::f32_t w_m,
  output fp_pkg::f32_t n_m
);
  import fp_pkg::*;

  localparam real SIGMA = 1.0 - L_M * L_M / (L_S * L_R);
  localparam real L_SIG = SIGMA * L_S;

  localparam f32_t A1  = real_to_f32(1.0 - (R_S / L_SIG + L_M * L_M * R_R / (L_SIG * L_R * L_R)) * T_S);
  localparam f32_t A2  = real_to_f32(L_M * R_R * T_S / (L_SIG * L_R * L_R));
  localparam f32_t A3  = real_to_f32(L_M * P_P * T_S / (L_SIG * L_R));
  localparam f32_t A4  = real_to_f32(R_R * L_M * T_S / L_R);
  localparam f32_t A5  = real_to_f32(1.0 - R_R * T_S / L_R);
  localparam f32_t A6  = real_to_f32(P_P * T_S);
  localparam f32_t A7  = real_to_f32(1.5 * P_P * L_M * T_S / (L_R * J_T));
  localparam f32_t A8  = real_to_f32(1.0 - B_T * T_S / J_T);
  localparam f32_t A9  = real_to_f32(T_S / L_SIG);
  localparam f32_t K10 = real_to_f32(T_S / J_T);
  localparam f32_t KRPM = real_to_f32(60.0 / (2.0 * PI));

  // level 1 products
  typedef struct packed {
    f32_t a3w, a6w, a7b, a7a, tl, a1ia, a1ib, a2fa, a2fb, a9va, a9vb, a4ia, a4ib, a5fa, a5fb, a8w;
  } lvl1_t;
  // level 2 cross products and partial sums
  typedef struct packed {
    f32_t p1, p2, p3, p4, p5, p6, s1, s2, s3, s4, s5, a9va, a9vb;
  } lvl2_t;
  // level 3 partial sums and the new fluxes
  typedef struct packed {
    f32_t u1, u2, u5, fa, fb, s1, s2, s5;
  } lvl3_t;

  lvl1_t l1_c, l1_q;
  lvl2_t l2_c, l2_q;
  lvl3_t l3_c, l3_q;
  f32_t  ia_c, ib_c, w_c, n_c;
  logic [5:0] stage;
  f32_t  va_q, vb_q, tl_q;

  // level 1
  fp_mul m01 (.a(A3),  .b(w_m),    .y(l1_c.a3w));
  fp_mul m02 (.a(A6),  .b(w_m),    .y(l1_c.a6w));
  fp_mul m03 (.a(A7),  .b(phi_rb), .y(l1_c.a7b));
  fp_mul m04 (.a(A7),  .b(phi_ra), .y(l1_c.a7a));
  fp_mul m05 (.a(K10), .b(tl_q),   .y(l1_c.tl));
  fp_mul m06 (.a(A1),  .b(i_sa),   .y(l1_c.a1ia));
  fp_mul m07 (.a(A1),  .b(i_sb),   .y(l1_c.a1ib));
  fp_mul m08 (.a(A2),  .b(phi_ra), .y(l1_c.a2fa));
  fp_mul m09 (.a(A2),  .b(phi_rb), .y(l1_c.a2fb));
  fp_mul m10 (.a(A9),  .b(va_q),   .y(l1_c.a9va));
  fp_mul m11 (.a(A9),  .b(vb_q),   .y(l1_c.a9vb));
  fp_mul m12 (.a(A4),  .b(i_sa),   .y(l1_c.a4ia));
  fp_mul m13 (.a(A4),  .b(i_sb),   .y(l1_c.a4ib));
  fp_mul m14 (.a(A5),  .b(phi_ra), .y(l1_c.a5fa));
  fp_mul m15 (.a(A5),  .b(phi_rb), .y(l1_c.a5fb));
  fp_mul m16 (.a(A8),  .b(w_m),    .y(l1_c.a8w));

  // level 2
  fp_mul m17 (.a(l1_q.a3w), .b(phi_rb), .y(l2_c.p1));
  fp_mul m18 (.a(l1_q.a3w), .b(phi_ra), .y(l2_c.p2));
  fp_mul m19 (.a(l1_q.a6w), .b(phi_rb), .y(l2_c.p3));
  fp_mul m20 (.a(l1_q.a6w), .b(phi_ra), .y(l2_c.p4));
  fp_mul m21 (.a(l1_q.a7b), .b(i_sa),   .y(l2_c.p5));
  fp_mul m22 (.a(l1_q.a7a), .b(i_sb),   .y(l2_c.p6));
  fp_add s01 (.a(l1_q.a1ia), .b(l1_q.a2fa), .sub(1'b0), .y(l2_c.s1));
  fp_add s02 (.a(l1_q.a1ib), .b(l1_q.a2fb), .sub(1'b0), .y(l2_c.s2));
  fp_add s03 (.a(l1_q.a4ia), .b(l1_q.a5fa), .sub(1'b0), .y(l2_c.s3));
  fp_add s04 (.a(l1_q.a4ib), .b(l1_q.a5fb), .sub(1'b0), .y(l2_c.s4));
  fp_add s05 (.a(l1_q.a8w),  .b(l1_q.tl),   .sub(1'b1), .y(l2_c.s5));
  assign l2_c.a9va = l1_q.a9va;
  assign l2_c.a9vb = l1_q.a9vb;

  // level 3
  fp_add s06 (.a(l2_q.p1),   .b(l2_q.a9va), .sub(1'b0), .y(l3_c.u1));
  fp_add s07 (.a(l2_q.a9vb), .b(l2_q.p2),   .sub(1'b1), .y(l3_c.u2));
  fp_add s08 (.a(l2_q.p6),   .b(l2_q.p5),   .sub(1'b1), .y(l3_c.u5));
  fp_add s09 (.a(l2_q.s3),   .b(l2_q.p3),   .sub(1'b1), .y(l3_c.fa));
  fp_add s10 (.a(l2_q.s4),   .b(l2_q.p4),   .sub(1'b0), .y(l3_c.fb));
  assign l3_c.s1 = l2_q.s1;
  assign l3_c.s2 = l2_q.s2;
  assign l3_c.s5 = l2_q.s5;

  // level 4
  fp_add s11 (.a(l3_q.s1), .b(l3_q.u1), .sub(1'b0), .y(ia_c));
  fp_add s12 (.a(l3_q.s2), .b(l3_q.u2), .sub(1'b0), .y(ib_c));
  fp_add s13 (.a(l3_q.s5), .b(l3_q.u5), .sub(1'b0), .y(w_c));

  // speed in rpm
  fp_mul m23 (.a(w_m), .b(KRPM), .y(n_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage  <= '0;
      va_q   <= '0;
      vb_q   <= '0;
      tl_q   <= '0;
      l1_q   <= '0;
      l2_q   <= '0;
      l3_q   <= '0;
      i_sa   <= '0;
      i_sb   <= '0;
      phi_ra <= '0;
      phi_rb <= '0;
      w_m    <= '0;
      n_m    <= '0;
    end else begin
      stage <= {stage[4:0], start & ~busy};
      if (start && !busy) begin
        va_q <= v_sa;
        vb_q <= v_sb;
        tl_q <= t_l;
      end
      if (stage[0]) l1_q <= l1_c;
      if (stage[1]) l2_q <= l2_c;
      if (stage[2]) l3_q <= l3_c;
      if (stage[3]) begin
        i_sa   <= ia_c;
        i_sb   <= ib_c;
        phi_ra <= l3_q.fa;
        phi_rb <= l3_q.fb;
        w_m    <= w_c;
      end
      if (stage[4]) n_m <= n_c;
    end
  end

  assign busy = |stage[4:0];
  assign done = stage[5];
endmodule
