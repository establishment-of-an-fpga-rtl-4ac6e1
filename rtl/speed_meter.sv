// speed_meter -- rotor speed from the incremental encoder, single precision.
//
// The quadrature decoder turns each edge of the encoder's A/B tracks into an
// up or down count (4 counts per line, 4 * LINES per revolution). The counts
// are summed over a fixed gate of GATE_CYC clock cycles; at the end of each
// gate the signed sum c gives
//     n_m     = c * 60 / (4 * LINES * T_gate)   [rpm]
//     omega_m = n_m * 2 pi / 60                  [rad/s]
// with T_gate = GATE_CYC / CLK_HZ. The sum is converted to binary32 and the
// two constants, worked out at elaboration, are applied with two
// floating-point multiplications. The speed sign follows the sense of
// rotation (A leading B counts up).
//
// Interface: `valid` pulses when n_m and omega_m are new (once per gate, four
// cycles after the gate closes); they hold until the next update. `glitch`
// pulses for an encoder step that skipped a state.
// The 5000-line encoder is the setup's; the frequency-counting method, the
// 1 ms gate and its resolution (3 rpm at the defaults) are this design's.
module speed_meter #(
  parameter real CLK_HZ   = 100.0e6,
  parameter int  LINES    = 5000,
  parameter int  GATE_CYC = 100000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enc_a,
  input  logic         enc_b,
  output logic         valid,
  output fp_pkg::f32_t n_m,
  output fp_pkg::f32_t omega_m,
  output logic         glitch
);
  import fp_pkg::*;

  localparam real  T_GATE = real'(GATE_CYC) / CLK_HZ;
  localparam f32_t K_RPM  = real_to_f32(60.0 / (4.0 * real'(LINES) * T_GATE));
  localparam f32_t K_RAD  = real_to_f32(2.0 * PI / 60.0);

  logic               step, dir;
  logic [31:0]        gate_cnt;
  logic signed [31:0] acc, latched;
  logic [3:0]         vld;
  f32_t               cnt_f, rpm_c, rad_c, cnt_q;

  quad_decoder u_dec (.clk, .rst_n, .enc_a, .enc_b, .step, .dir, .glitch);

  int_to_fp #(.IW(32)) u_cvt (.x(latched), .y(cnt_f));
  fp_mul u_rpm (.a(cnt_q), .b(K_RPM), .y(rpm_c));
  fp_mul u_rad (.a(n_m),   .b(K_RAD), .y(rad_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_cnt <= '0;
      acc      <= '0;
      latched  <= '0;
      vld      <= '0;
      cnt_q    <= '0;
      n_m      <= '0;
      omega_m  <= '0;
    end else begin
      vld <= {vld[2:0], 1'b0};
      if (int'(gate_cnt) == GATE_CYC - 1) begin
        gate_cnt <= '0;
        latched  <= acc + (step ? (dir ? 32'sd1 : -32'sd1) : 32'sd0);
        acc      <= '0;
        vld[0]   <= 1'b1;
      end else begin
        gate_cnt <= gate_cnt + 32'd1;
        if (step) acc <= dir ? acc + 32'sd1 : acc - 32'sd1;
      end
      if (vld[0]) cnt_q   <= cnt_f;
      if (vld[1]) n_m     <= rpm_c;
      if (vld[2]) omega_m <= rad_c;
    end
  end

  assign valid = vld[3];
endmodule
