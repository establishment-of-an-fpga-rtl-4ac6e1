// tb_im_scenario -- the 30-second test run of the experimental setup, replayed
// on the motor model alone at the real 15 us sample time (2 million steps).
//
// The AC drive is represented by a voltage vector whose frequency ramps at
// 50 Hz/s between +50 Hz and -50 Hz, with amplitude proportional to frequency
// (310 V peak at 50 Hz, 20 V boost at standstill). The load follows the
// run: 19 N.m while running forward, steps of 5, 10 and 20 N.m, unloaded
// reversal to -1000 rpm, -18.5 N.m in reverse, back to forward under
// 18.5 N.m and finally unloaded. At each plateau the model speed must match
// what the setup measured on the motor: about 952 rpm under 19 N.m, about
// -1000 rpm unloaded in reverse, about -953 rpm under -18.5 N.m, about
// 952 rpm under 18.5 N.m and about 1000 rpm unloaded (tolerance 15 rpm; the
// unloaded cases within 1 %). The step count and timing are checked too.
module tb_im_scenario;
  import fp_ref_pkg::*;
  localparam real T = 15.0e-6;
  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic [31:0] v_sa, v_sb, t_l, i_sa, i_sb, phi_ra, phi_rb, w_m, n_m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  im_model dut (.clk, .rst_n, .start, .v_sa, .v_sb, .t_l, .done, .busy,
                .i_sa, .i_sb, .phi_ra, .phi_rb, .w_m, .n_m);

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scenario: frequency set point and load at time t
  function automatic real f_set(real t);
    if (t < 9.5)  return 50.0;
    if (t < 21.0) return -50.0;
    return 50.0;
  endfunction
  function automatic real load(real t);
    if (t < 3.0)  return 19.0;
    if (t < 5.0)  return 19.0;
    if (t < 6.5)  return 5.0;
    if (t < 7.5)  return 10.0;
    if (t < 8.5)  return 20.0;
    if (t < 9.5)  return 19.0;
    if (t < 15.5) return 0.0;
    if (t < 19.5) return -18.5;
    if (t < 21.0) return 0.0;
    if (t < 26.0) return 18.5;
    return 0.0;
  endfunction

  task automatic expect_rpm(real t, real rpm, real tol);
    real got;
    got = f32_to_real(n_m);
    checks++;
    if (rabs(got - rpm) > tol) begin
      failures++;
      $display("FAIL at %5.2f s: %8.2f rpm, expected %8.2f +/- %4.1f", t, got, rpm, tol);
    end else
      $display("at %5.2f s: %8.2f rpm (expected about %8.2f)", t, got, rpm);
  endtask

  initial begin
    real t, f, th, amp, next_check;
    int nsteps, k, lat, bad_lat;
    f = 50.0; th = 0.0; bad_lat = 0;
    v_sa = '0; v_sb = '0; t_l = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    nsteps = int'(30.0 / T);
    for (k = 0; k < nsteps; k++) begin
      t = real'(k) * T;
      // drive ramps its frequency towards the set point at 50 Hz/s
      if (f < f_set(t)) f = (f + 50.0 * T > f_set(t)) ? f_set(t) : f + 50.0 * T;
      if (f > f_set(t)) f = (f - 50.0 * T < f_set(t)) ? f_set(t) : f - 50.0 * T;
      th  = th + 2.0 * fp_pkg::PI * f * T;
      amp = 20.0 + 290.0 * rabs(f) / 50.0;
      v_sa = r2f32(amp * $cos(th));
      v_sb = r2f32(amp * $sin(th));
      t_l  = r2f32(load(t));
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      if (lat != 6) bad_lat++;
      case (k)
        int'(4.9 / T):  expect_rpm(t, 952.0, 15.0);
        int'(6.4 / T):  expect_rpm(t, 988.0, 15.0);    // 5 N.m
        int'(8.4 / T):  expect_rpm(t, 951.0, 15.0);    // 20 N.m
        int'(15.4 / T): expect_rpm(t, -1000.0, 10.0);
        int'(19.4 / T): expect_rpm(t, -953.0, 15.0);
        int'(25.9 / T): expect_rpm(t, 952.0, 15.0);
        int'(29.9 / T): expect_rpm(t, 1000.0, 10.0);
        default: ;
      endcase
    end
    checks++;
    if (bad_lat != 0) begin failures++; $display("FAIL %0d steps with wrong latency", bad_lat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
