// adc_scaler -- turns one 16-bit ADC code into a single-precision value.
//
// The code is converted to binary32 and scaled with the ADC's quantisation
// rule for the +/-10 V input range,
//     volts = code * 10 / 32767,
// using a floating-point multiplier and a floating-point divider, as the
// setup does. A third multiplication by GAIN turns the transducer output
// voltage into the measured quantity (volts, amperes or newton-metres).
// GAIN is a property of the transducer and its burden resistor; the defaults
// of the top level are this design's assumptions.
//
// Interface: `in_valid` qualifies `code`; `volts` and `value` appear with
// `out_valid` three cycles later and stay until the next result. The three
// stages (convert and x10, /32767, xGAIN) are registered, so a new code can
// enter every cycle.
module adc_scaler #(
  parameter real FULL_SCALE_V = 10.0,     // ADC input range +/-10 V
  parameter real CODE_MAX     = 32767.0,  // largest positive code
  parameter real GAIN         = 1.0       // measured unit per transducer volt
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [15:0] code,
  output logic               out_valid,
  output fp_pkg::f32_t       volts,
  output fp_pkg::f32_t       value
);
  import fp_pkg::*;

  localparam f32_t K_FS   = real_to_f32(FULL_SCALE_V);
  localparam f32_t K_MAX  = real_to_f32(CODE_MAX);
  localparam f32_t K_GAIN = real_to_f32(GAIN);

  f32_t code_f, times_fs, quot, scaled;
  f32_t s1_q, s2_q;
  logic [2:0] vld;

  int_to_fp #(.IW(16)) u_cvt (.x(code), .y(code_f));
  fp_mul u_mul_fs   (.a(code_f), .b(K_FS),   .y(times_fs));
  fp_div u_div_max  (.a(s1_q),   .b(K_MAX),  .y(quot));
  fp_mul u_mul_gain (.a(s2_q),   .b(K_GAIN), .y(scaled));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld   <= '0;
      s1_q  <= '0;
      s2_q  <= '0;
      volts <= '0;
      value <= '0;
    end else begin
      vld <= {vld[1:0], in_valid};
      if (in_valid) s1_q <= times_fs;
      if (vld[0])   s2_q <= quot;
      if (vld[1]) begin
        volts <= s2_q;
        value <= scaled;
      end
    end
  end

  assign out_valid = vld[2];
endmodule
