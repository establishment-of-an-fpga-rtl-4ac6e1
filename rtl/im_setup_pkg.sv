// im_setup_pkg -- the record the real-time setup produces once per sample.
//
// Each sample period yields one record with the measured machine quantities
// and the motor model's state, all binary32. It is what the setup hands to
// the link towards the host computer.
package im_setup_pkg;

  typedef struct packed {
    fp_pkg::f32_t v_sa;        // measured stator voltage, alpha [V]
    fp_pkg::f32_t v_sb;        // measured stator voltage, beta  [V]
    fp_pkg::f32_t i_sa;        // measured stator current, alpha [A]
    fp_pkg::f32_t i_sb;        // measured stator current, beta  [A]
    fp_pkg::f32_t t_l;         // filtered load torque [N m]
    fp_pkg::f32_t n_m;         // measured rotor speed [rpm]
    fp_pkg::f32_t i_sa_hat;    // model stator current, alpha [A]
    fp_pkg::f32_t i_sb_hat;    // model stator current, beta  [A]
    fp_pkg::f32_t phi_ra_hat;  // model rotor flux, alpha [V s]
    fp_pkg::f32_t phi_rb_hat;  // model rotor flux, beta  [V s]
    fp_pkg::f32_t n_m_hat;     // model rotor speed [rpm]
  } record_t;

endpackage
