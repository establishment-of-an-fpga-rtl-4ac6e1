// im_setup_checker -- reference model of the whole measurement and model
// chain, for the top-level testbenches.
//
// At every record it recomputes, from the codes the ADC model converted for
// that sample, what the record must hold: the scaled channels
// (code * 10 / 32767 * gain, binary32 after each operation), both Clarke
// transformations and, from the record's own voltages and torque, one step
// of the motor model. These are compared bit for bit. The filtered torque is
// compared with a double-precision Butterworth filter derived here
// independently (tolerance 1e-4 N.m plus 1e-6 relative) and the measured
// speed with the encoder's set speed, within one count of the gate once the
// speed has been steady for two gates (`speed_settled`). It also checks that
// each record leaves within the sample period.
module im_setup_checker #(
  parameter real T_S     = 15.0e-6,
  parameter real V_GAIN  = 100.0,
  parameter real I_GAIN  = 2.0,
  parameter real TQ_GAIN = 10.0,
  parameter real FC_HZ   = 100.0,
  parameter real RPM_RES = 3.0,
  parameter int  MAX_LAT = 1500
) (
  input  logic                  clk,
  input  logic                  rec_valid,
  input  im_setup_pkg::record_t rec,
  input  logic [15:0]           latency_cyc,
  input  logic [7:0][15:0]      sampled,
  input  real                   enc_rpm,
  input  logic                  speed_settled,
  output int                    checks,
  output int                    failures,
  output int                    records
);
  import fp_ref_pkg::*;

  logic [31:0] mx [5];
  logic [31:0] c [11];
  real bc [5], ac [5], xr [5], yr [5];
  int  lat_min, lat_max;

  function automatic real term(int i, int p);
    real cc [5];
    real n [5];
    for (int j = 0; j < 5; j++) cc[j] = (j == 0) ? 1.0 : 0.0;
    for (int f = 0; f < 4; f++) begin
      real sg;
      sg = (f < i) ? -1.0 : 1.0;
      for (int j = 0; j < 5; j++) n[j] = cc[j] + ((j > 0) ? sg * cc[j-1] : 0.0);
      cc = n;
    end
    return cc[p];
  endfunction

  initial begin
    real rs, rr, ls, lr, lm, jt, bt, pp, sg, lsg, k, a0;
    real poly [5];
    checks = 0; failures = 0; records = 0; lat_min = 1 << 30; lat_max = 0;
    for (int i = 0; i < 5; i++) begin mx[i] = '0; xr[i] = 0.0; yr[i] = 0.0; end
    rs = 3.03; rr = 2.53; ls = 0.1466; lr = 0.1524; lm = 0.135; jt = 0.055; bt = 0.0019; pp = 3.0;
    sg  = 1.0 - lm * lm / (ls * lr);
    lsg = sg * ls;
    c[1]  = r2f32(1.0 - (rs / lsg + lm * lm * rr / (lsg * lr * lr)) * T_S);
    c[2]  = r2f32(lm * rr / (lsg * lr * lr) * T_S);
    c[3]  = r2f32(lm * pp / (lsg * lr) * T_S);
    c[4]  = r2f32(rr * lm / lr * T_S);
    c[5]  = r2f32(1.0 - rr / lr * T_S);
    c[6]  = r2f32(pp * T_S);
    c[7]  = r2f32(1.5 * pp * lm / (lr * jt) * T_S);
    c[8]  = r2f32(1.0 - bt / jt * T_S);
    c[9]  = r2f32(T_S / lsg);
    c[10] = r2f32(T_S / jt);
    c[0]  = r2f32(60.0 / (2.0 * fp_pkg::PI));
    poly = '{1.0, 2.613125929752753, 3.414213562373095, 2.613125929752753, 1.0};
    k = $tan(fp_pkg::PI * FC_HZ * T_S);
    for (int p = 0; p < 5; p++) begin
      ac[p] = 0.0;
      for (int i = 0; i < 5; i++) ac[p] += poly[i] * term(i, p) / (k ** i);
      bc[p] = term(0, p);
    end
    a0 = ac[0];
    for (int p = 0; p < 5; p++) begin ac[p] = ac[p] / a0; bc[p] = bc[p] / a0; end
  end

  function automatic logic [31:0] scale(logic [15:0] code, real gain);
    return mul32(div32(mul32(r2f32(real'($signed(code))), r2f32(10.0)), r2f32(32767.0)), r2f32(gain));
  endfunction

  task automatic cmp(logic [31:0] got, logic [31:0] exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL record %0d %s: got %h exp %h", records, what, got, exp_v);
    end
  endtask

  always @(posedge clk) begin
    if (rec_valid) begin
      logic [31:0] s [7];
      logic [31:0] ea, eb, ia, ib, fa, fb, w;
      real tq, yref;
      for (int ch = 0; ch < 7; ch++)
        s[ch] = scale(sampled[ch], (ch < 3) ? V_GAIN : (ch < 6) ? I_GAIN : TQ_GAIN);
      ea = sub32(mul32(s[0], r2f32(2.0 / 3.0)), mul32(add32(s[1], s[2]), r2f32(1.0 / 3.0)));
      eb = mul32(sub32(s[1], s[2]), r2f32(1.0 / 1.7320508075688772));
      cmp(rec.v_sa, ea, "v_sa");
      cmp(rec.v_sb, eb, "v_sb");
      ea = sub32(mul32(s[3], r2f32(2.0 / 3.0)), mul32(add32(s[4], s[5]), r2f32(1.0 / 3.0)));
      eb = mul32(sub32(s[4], s[5]), r2f32(1.0 / 1.7320508075688772));
      cmp(rec.i_sa, ea, "i_sa");
      cmp(rec.i_sb, eb, "i_sb");
      // torque filter
      for (int i = 4; i > 0; i--) xr[i] = xr[i-1];
      xr[0] = f32_to_real(s[6]);
      yref = 0.0;
      for (int i = 0; i < 5; i++) yref += bc[i] * xr[i];
      for (int i = 1; i < 5; i++) yref -= ac[i] * yr[i-1];
      for (int i = 3; i > 0; i--) yr[i] = yr[i-1];
      yr[0] = yref;
      tq = f32_to_real(rec.t_l);
      checks++;
      if (rabs(tq - yref) > 1e-4 + 1e-6 * rabs(yref)) begin
        failures++;
        if (failures < 10) $display("FAIL record %0d torque %g exp %g", records, tq, yref);
      end
      // motor model, driven by the record's own inputs
      ia = mx[0]; ib = mx[1]; fa = mx[2]; fb = mx[3]; w = mx[4];
      mx[0] = add32(add32(mul32(c[1], ia), mul32(c[2], fa)),
                    add32(mul32(mul32(c[3], w), fb), mul32(c[9], rec.v_sa)));
      mx[1] = add32(add32(mul32(c[1], ib), mul32(c[2], fb)),
                    sub32(mul32(c[9], rec.v_sb), mul32(mul32(c[3], w), fa)));
      mx[2] = sub32(add32(mul32(c[4], ia), mul32(c[5], fa)), mul32(mul32(c[6], w), fb));
      mx[3] = add32(add32(mul32(c[4], ib), mul32(c[5], fb)), mul32(mul32(c[6], w), fa));
      mx[4] = add32(sub32(mul32(c[8], w), mul32(c[10], rec.t_l)),
                    sub32(mul32(mul32(c[7], fa), ib), mul32(mul32(c[7], fb), ia)));
      cmp(rec.i_sa_hat, mx[0], "model i_sa");
      cmp(rec.i_sb_hat, mx[1], "model i_sb");
      cmp(rec.phi_ra_hat, mx[2], "model phi_ra");
      cmp(rec.phi_rb_hat, mx[3], "model phi_rb");
      cmp(rec.n_m_hat, mul32(mx[4], c[0]), "model n_m");
      // measured speed
      if (speed_settled) begin
        checks++;
        if (rabs(f32_to_real(rec.n_m) - enc_rpm) > 1.01 * RPM_RES) begin
          failures++;
          if (failures < 10) $display("FAIL record %0d speed %g exp %g", records, f32_to_real(rec.n_m), enc_rpm);
        end
      end
      checks++;
      if (int'(latency_cyc) >= MAX_LAT) begin
        failures++;
        $display("FAIL record %0d latency %0d", records, latency_cyc);
      end
      if (int'(latency_cyc) < lat_min) lat_min = int'(latency_cyc);
      if (int'(latency_cyc) > lat_max) lat_max = int'(latency_cyc);
      records++;
    end
  end

  function automatic int latency_min();
    return lat_min;
  endfunction
  function automatic int latency_max();
    return lat_max;
  endfunction
endmodule
