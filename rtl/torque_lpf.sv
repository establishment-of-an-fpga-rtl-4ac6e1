// torque_lpf -- fourth-order low-pass filter for the load-torque signal,
// computed in double precision.
//
// The torque transducer signal is noisy, so it is filtered before it drives
// the motor model. The filter is a fourth-order Butterworth low-pass with
// cutoff FC_HZ at sample rate FS_HZ, realised in direct form I:
//     y[n] = sum_{i=0..4} B[i] x[n-i] - sum_{i=1..4} A[i] y[n-i]
// Because the cutoff is far below the sample rate the poles lie close to 1,
// and the direct form needs the precision of binary64, which is used for all
// of its arithmetic. The coefficients are worked out at elaboration: with
// K = tan(pi FC_HZ / FS_HZ), each of the two bilinear-transformed sections
// with quality factor Q = 1 / (2 cos((2k-1) pi / 8)), k = 1, 2, has
//     b = K^2 [1 2 1] / d,   a = [1, 2(K^2 - 1) / d, (1 - K/Q + K^2) / d],
//     d = 1 + K/Q + K^2,
// and B, A are the products of the two sections' polynomials.
//
// How it works: one binary64 multiplier and one binary64 adder are shared
// over the nine taps. A tap's product is registered and added to the
// accumulator on the next cycle, so a sample takes 11 cycles from `in_valid`
// to `out_valid`; then the input and output histories shift. The input
// arrives in single precision and is widened exactly; the output is given in
// both precisions (the single-precision copy is rounded to nearest even).
// A sample that arrives while the filter is busy is ignored (`overrun` pulses).
// Order, cutoff and the use of binary64 follow the measurement setup; the
// Butterworth shape, the cutoff value and the direct form are this design's
// choices.
module torque_lpf #(
  parameter real FS_HZ = 66666.666666666667,  // 1 / 15 us
  parameter real FC_HZ = 100.0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  fp_pkg::f32_t x,
  output logic         out_valid,
  output fp_pkg::f64_t y64,
  output fp_pkg::f32_t y32,
  output logic         overrun
);
  import fp_pkg::*;

  // tap n in the order B0..B4, -A1..-A4. With the two sections' scale g_s
  // = K^2 / d_s and denominators [1 p1 p2], [1 q1 q2]: B = g_0 g_1 [1 4 6 4 1],
  // A = [1, p1+q1, p2+q2+p1 q1, p1 q2+p2 q1, p2 q2].
  function automatic real butter4(real fs, real fc, int n);
    real k, q0, q1, d0, d1, g, p1, p2, r1, r2;
    k  = $tan(PI * fc / fs);
    q0 = 1.0 / (2.0 * $cos(PI / 8.0));
    q1 = 1.0 / (2.0 * $cos(3.0 * PI / 8.0));
    d0 = 1.0 + k / q0 + k * k;
    d1 = 1.0 + k / q1 + k * k;
    g  = (k * k / d0) * (k * k / d1);
    p1 = 2.0 * (k * k - 1.0) / d0;
    p2 = (1.0 - k / q0 + k * k) / d0;
    r1 = 2.0 * (k * k - 1.0) / d1;
    r2 = (1.0 - k / q1 + k * k) / d1;
    case (n)
      0, 4:    return g;
      1, 3:    return 4.0 * g;
      2:       return 6.0 * g;
      5:       return -(p1 + r1);
      6:       return -(p2 + r2 + p1 * r1);
      7:       return -(p1 * r2 + p2 * r1);
      default: return -(p2 * r2);
    endcase
  endfunction

  localparam f64_t C0 = real_to_f64(butter4(FS_HZ, FC_HZ, 0));
  localparam f64_t C1 = real_to_f64(butter4(FS_HZ, FC_HZ, 1));
  localparam f64_t C2 = real_to_f64(butter4(FS_HZ, FC_HZ, 2));
  localparam f64_t C3 = real_to_f64(butter4(FS_HZ, FC_HZ, 3));
  localparam f64_t C4 = real_to_f64(butter4(FS_HZ, FC_HZ, 4));
  localparam f64_t C5 = real_to_f64(butter4(FS_HZ, FC_HZ, 5));
  localparam f64_t C6 = real_to_f64(butter4(FS_HZ, FC_HZ, 6));
  localparam f64_t C7 = real_to_f64(butter4(FS_HZ, FC_HZ, 7));
  localparam f64_t C8 = real_to_f64(butter4(FS_HZ, FC_HZ, 8));

  f64_t coef [9];
  assign coef = '{C0, C1, C2, C3, C4, C5, C6, C7, C8};

  f64_t xh [5];   // x[n] .. x[n-4]
  f64_t yh [4];   // y[n-1] .. y[n-4]
  f64_t x64, tap, prod, prod_q, acc, acc_next;
  logic [3:0] idx;
  logic       run, acc_en;

  fp_resize #(.EW1(8), .MW1(23), .EW2(11), .MW2(52)) u_widen (.a(x), .y(x64));
  fp_resize #(.EW1(11), .MW1(52), .EW2(8), .MW2(23)) u_narrow (.a(y64), .y(y32));
  fp_mul #(.EW(11), .MW(52)) u_mul (.a(coef[idx]), .b(tap), .y(prod));
  fp_add #(.EW(11), .MW(52)) u_add (.a(acc), .b(prod_q), .sub(1'b0), .y(acc_next));

  logic [1:0] yidx;   // position in the output history
  always_comb begin
    yidx = 2'(idx - 4'd5);
    tap  = (idx < 4'd5) ? xh[idx[2:0]] : yh[yidx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xh        <= '{default: '0};
      yh        <= '{default: '0};
      idx       <= '0;
      run       <= 1'b0;
      acc_en    <= 1'b0;
      acc       <= '0;
      prod_q    <= '0;
      y64       <= '0;
      out_valid <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      overrun   <= in_valid && run;
      if (in_valid && !run) begin
        xh[0] <= x64;
        for (int i = 1; i < 5; i++) xh[i] <= xh[i-1];
        acc    <= '0;
        idx    <= '0;
        run    <= 1'b1;
        acc_en <= 1'b0;
      end else if (run) begin
        // the product of tap idx is registered; the accumulator adds the
        // previous one
        if (idx < 4'd9) begin
          prod_q <= prod;
          idx    <= idx + 4'd1;
        end
        acc_en <= (idx < 4'd9);
        if (acc_en) acc <= acc_next;
        if (idx == 4'd9 && !acc_en) begin
          run       <= 1'b0;
          y64       <= acc;
          yh[0]     <= acc;
          for (int i = 1; i < 4; i++) yh[i] <= yh[i-1];
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
