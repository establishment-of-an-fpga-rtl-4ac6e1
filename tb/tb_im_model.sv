// tb_im_model -- runs the motor model for one second of motor time: started
// direct on line with a 50 Hz, 310 V peak voltage vector, unloaded for 0.6 s,
// then loaded with 20 N.m. Every step is compared bit for bit with a
// reference model in the testbench that evaluates the same equations with
// real arithmetic rounded to binary32 after each operation; its coefficients
// are worked out here from the motor data. Physical checks: the unloaded
// motor reaches synchronous speed (1000 rpm for 3 pole pairs at 50 Hz) and
// slows to 900..990 rpm under 20 N.m (the test motor runs at about 952 rpm
// under 19 N.m). Also checked: the six-cycle step latency.
module tb_im_model;
  import fp_ref_pkg::*;
  localparam real T = 15.0e-6;
  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic [31:0] v_sa, v_sb, t_l, i_sa, i_sb, phi_ra, phi_rb, w_m, n_m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  im_model dut (.clk, .rst_n, .start, .v_sa, .v_sb, .t_l, .done, .busy,
                .i_sa, .i_sb, .phi_ra, .phi_rb, .w_m, .n_m);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic [31:0] x [5];
  logic [31:0] c [11];

  task automatic make_coefs();
    real rs, rr, ls, lr, lm, jt, bt, pp, sg, lsg;
    rs = 3.03; rr = 2.53; ls = 0.1466; lr = 0.1524; lm = 0.135; jt = 0.055; bt = 0.0019; pp = 3.0;
    sg  = 1.0 - lm * lm / (ls * lr);
    lsg = sg * ls;
    c[1]  = r2f32(1.0 - (rs / lsg + lm * lm * rr / (lsg * lr * lr)) * T);
    c[2]  = r2f32(lm * rr / (lsg * lr * lr) * T);
    c[3]  = r2f32(lm * pp / (lsg * lr) * T);
    c[4]  = r2f32(rr * lm / lr * T);
    c[5]  = r2f32(1.0 - rr / lr * T);
    c[6]  = r2f32(pp * T);
    c[7]  = r2f32(1.5 * pp * lm / (lr * jt) * T);
    c[8]  = r2f32(1.0 - bt / jt * T);
    c[9]  = r2f32(T / lsg);
    c[10] = r2f32(T / jt);
    c[0]  = r2f32(60.0 / (2.0 * fp_pkg::PI));
  endtask

  task automatic ref_step(logic [31:0] va, logic [31:0] vb, logic [31:0] tl);
    logic [31:0] ia, ib, fa, fb, w;
    ia = x[0]; ib = x[1]; fa = x[2]; fb = x[3]; w = x[4];
    x[0] = add32(add32(mul32(c[1], ia), mul32(c[2], fa)),
                 add32(mul32(mul32(c[3], w), fb), mul32(c[9], va)));
    x[1] = add32(add32(mul32(c[1], ib), mul32(c[2], fb)),
                 sub32(mul32(c[9], vb), mul32(mul32(c[3], w), fa)));
    x[2] = sub32(add32(mul32(c[4], ia), mul32(c[5], fa)), mul32(mul32(c[6], w), fb));
    x[3] = add32(add32(mul32(c[4], ib), mul32(c[5], fb)), mul32(mul32(c[6], w), fa));
    x[4] = add32(sub32(mul32(c[8], w), mul32(c[10], tl)),
                 sub32(mul32(mul32(c[7], fa), ib), mul32(mul32(c[7], fb), ia)));
  endtask

  initial begin
    int nsteps, lat, mism;
    real th, rpm_noload, rpm_load;
    make_coefs();
    for (int i = 0; i < 5; i++) x[i] = '0;
    v_sa = '0; v_sb = '0; t_l = '0;
    mism = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    nsteps = int'(1.0 / T);
    for (int k = 0; k < nsteps; k++) begin
      th   = 2.0 * fp_pkg::PI * 50.0 * T * real'(k);
      v_sa = r2f32(310.0 * $cos(th));
      v_sb = r2f32(310.0 * $sin(th));
      t_l  = (k < int'(0.6 / T)) ? r2f32(0.0) : r2f32(20.0);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      ref_step(v_sa, v_sb, t_l);
      checks++;
      if ({i_sa, i_sb, phi_ra, phi_rb, w_m} !== {x[0], x[1], x[2], x[3], x[4]}
          || n_m !== mul32(x[4], c[0])) begin
        failures++;
        if (mism++ < 5) $display("FAIL step %0d: dut %h %h %h %h %h ref %h %h %h %h %h", k,
                                 i_sa, i_sb, phi_ra, phi_rb, w_m, x[0], x[1], x[2], x[3], x[4]);
      end
      if (k == 0) begin
        checks++;
        if (lat != 6) begin failures++; $display("FAIL step latency %0d", lat); end
      end
      if (k == int'(0.6 / T) - 1) rpm_noload = f32_to_real(n_m);
    end
    rpm_load = f32_to_real(n_m);
    $display("speed: %f rpm unloaded, %f rpm at 20 N.m", rpm_noload, rpm_load);
    checks++;
    if (rpm_noload < 985.0 || rpm_noload > 1001.0) begin failures++; $display("FAIL no-load speed"); end
    checks++;
    if (rpm_load < 900.0 || rpm_load > 990.0) begin failures++; $display("FAIL loaded speed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
