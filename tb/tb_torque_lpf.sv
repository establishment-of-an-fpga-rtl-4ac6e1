// tb_torque_lpf -- checks the fourth-order low-pass filter against a
// reference direct-form-I filter whose coefficients the testbench derives on
// its own, by expanding the bilinear transform of the normalised Butterworth
// polynomial s^4 + 2.6131 s^3 + 3.4142 s^2 + 2.6131 s + 1. It checks every
// output (error 1e-6 relative to |y| + 1), the DC gain after a step, the attenuation of
// a tone a decade above the cutoff (> 75 dB expected from 80 dB/decade), the
// 11-cycle computation time and the overrun flag.
module tb_torque_lpf;
  import fp_ref_pkg::*;
  localparam real FS = 66666.666666666667;
  localparam real FC = 100.0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, overrun;
  logic [31:0] x, y32;
  logic [63:0] y64;
  int checks = 0, failures = 0;
  real bc [5], ac [5], xr [5], yr [5];

  always #5 clk = ~clk;

  torque_lpf dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y64, .y32, .overrun);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // (1 - u)^i (1 + u)^(4 - i) expanded in u = z^-1
  function automatic real term(int i, int p);
    real c [5];
    real n [5];
    for (int j = 0; j < 5; j++) c[j] = (j == 0) ? 1.0 : 0.0;
    for (int f = 0; f < 4; f++) begin
      real sg;
      sg = (f < i) ? -1.0 : 1.0;
      for (int j = 0; j < 5; j++) n[j] = c[j] + ((j > 0) ? sg * c[j-1] : 0.0);
      c = n;
    end
    return c[p];
  endfunction

  task automatic make_coefs();
    real poly [5];
    real k, a0;
    poly = '{1.0, 2.613125929752753, 3.414213562373095, 2.613125929752753, 1.0};
    k = $tan(fp_pkg::PI * FC / FS);
    for (int p = 0; p < 5; p++) begin
      ac[p] = 0.0;
      for (int i = 0; i < 5; i++) ac[p] += poly[i] * term(i, p) / (k ** i);
      bc[p] = term(0, p);
    end
    a0 = ac[0];
    for (int p = 0; p < 5; p++) begin
      ac[p] = ac[p] / a0;
      bc[p] = bc[p] / a0;
    end
  endtask

  // one sample through dut and reference; returns dut output
  task automatic step(real xin, bit check_it, output real yout);
    int lat;
    real yref;
    x = r2f32(xin);
    for (int i = 4; i > 0; i--) xr[i] = xr[i-1];
    xr[0] = f32_to_real(x);
    yref = 0.0;
    for (int i = 0; i < 5; i++) yref += bc[i] * xr[i];
    for (int i = 1; i < 5; i++) yref -= ac[i] * yr[i-1];
    for (int i = 3; i > 0; i--) yr[i] = yr[i-1];
    yr[0] = yref;
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    yout = $bitstoreal(y64);
    if (check_it) begin
      checks++;
      if (rabs(yout - yref) > 1e-6 * (rabs(yref) + 1.0)) begin
        failures++;
        if (failures < 10) $display("FAIL y %g exp %g diff %g", yout, yref, yout - yref);
      end
      checks++;
      // lat counts from the edge before the accepting one
      if (lat - 1 != 11) begin failures++; if (failures < 10) $display("FAIL latency %0d", lat - 1); end
      checks++;
      if (y32 !== r2f32(yout)) begin failures++; if (failures < 10) $display("FAIL y32"); end
    end
  endtask

  initial begin
    real y, peak;
    for (int i = 0; i < 5; i++) begin xr[i] = 0.0; yr[i] = 0.0; end
    x = '0;
    make_coefs();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // step of 20 N.m: tracks the reference, then settles at 20
    for (int n = 0; n < 3000; n++) step(20.0, 1'b1, y);
    checks++;
    if (rabs(y - 20.0) > 1e-3) begin failures++; $display("FAIL DC gain: %g", y); end
    // noisy input tracks the reference
    for (int n = 0; n < 500; n++) step(20.0 + 4.0 * ($itor($urandom_range(1000)) / 1000.0 - 0.5), 1'b1, y);
    // 1 kHz tone, ten times the cutoff
    peak = 0.0;
    for (int n = 0; n < 8000; n++) begin
      step(10.0 * $sin(2.0 * fp_pkg::PI * 1000.0 * real'(n) / FS), 1'b0, y);
      if (n > 6000 && rabs(y) > peak) peak = rabs(y);
    end
    checks++;
    if (peak > 10.0 * 10.0 ** (-75.0 / 20.0)) begin failures++; $display("FAIL stop band: peak %g", peak); end
    // a sample while busy is dropped and flagged
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!overrun) begin failures++; $display("FAIL overrun not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
