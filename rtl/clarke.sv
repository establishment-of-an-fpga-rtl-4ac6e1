// clarke -- amplitude-invariant Clarke transformation in single precision.
//
// Maps three phase quantities (a, b, c) onto the stationary alpha-beta frame
// used by the motor model:
//     alpha = (2/3) a - (1/3)(b + c)
//     beta  = (b - c) / sqrt(3)
// All three phases are used, so a zero-sequence part is removed rather than
// assumed absent. The same block serves the stator voltages and the stator
// currents.
//
// Interface: `in_valid` qualifies a, b, c; alpha and beta appear with
// `out_valid` three cycles later and stay until the next result; a new
// sample can enter every cycle. Stage 1 forms b + c, b - c and (2/3) a;
// stage 2 forms (1/3)(b + c) and beta; stage 3 subtracts.
module clarke (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  fp_pkg::f32_t a,
  input  fp_pkg::f32_t b,
  input  fp_pkg::f32_t c,
  output logic         out_valid,
  output fp_pkg::f32_t alpha,
  output fp_pkg::f32_t beta
);
  import fp_pkg::*;

  localparam f32_t K_2_3   = real_to_f32(2.0 / 3.0);
  localparam f32_t K_1_3   = real_to_f32(1.0 / 3.0);
  localparam f32_t K_1_RT3 = real_to_f32(1.0 / 1.7320508075688772);

  f32_t bc_sum, bc_diff, a23, bc13, beta_c, alpha_c;
  f32_t bc_sum_q, bc_diff_q, a23_q, a23_qq, bc13_q, beta_q;
  logic [2:0] vld;

  fp_add u_sum  (.a(b), .b(c), .sub(1'b0), .y(bc_sum));
  fp_add u_diff (.a(b), .b(c), .sub(1'b1), .y(bc_diff));
  fp_mul u_a23  (.a(a), .b(K_2_3), .y(a23));
  fp_mul u_bc13 (.a(bc_sum_q), .b(K_1_3), .y(bc13));
  fp_mul u_beta (.a(bc_diff_q), .b(K_1_RT3), .y(beta_c));
  fp_add u_alph (.a(a23_qq), .b(bc13_q), .sub(1'b1), .y(alpha_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      {bc_sum_q, bc_diff_q, a23_q, a23_qq, bc13_q, beta_q, alpha, beta} <= '0;
    end else begin
      vld <= {vld[1:0], in_valid};
      if (in_valid) begin
        bc_sum_q  <= bc_sum;
        bc_diff_q <= bc_diff;
        a23_q     <= a23;
      end
      if (vld[0]) begin
        bc13_q <= bc13;
        beta_q <= beta_c;
        a23_qq <= a23_q;
      end
      if (vld[1]) begin
        alpha <= alpha_c;
        beta  <= beta_q;
      end
    end
  end

  assign out_valid = vld[2];
endmodule
