// im_setup_top -- FPGA side of a real-time induction-motor test setup: the
// simultaneous measurement unit and the on-line motor model.
//
// Every sample period (SAMPLE_CYC clock cycles, 15 us at 100 MHz) the
// sequencer starts one ADC acquisition. The eight simultaneously sampled
// codes are scaled in parallel to physical units (adc_scaler): the three
// phase voltages, the three phase currents and the torque transducer output.
// Two Clarke transformations give v_sa, v_sb and i_sa, i_sb; the torque is
// low-pass filtered in double precision (torque_lpf). When the filtered torque
// is ready the motor model (im_model) takes one step driven by the measured
// voltages and torque, and a record with the measured and modelled quantities
// is emitted (`rec` with `rec_valid`). The rotor speed is measured from the
// incremental encoder independently of the sample period (speed_meter); each
// record carries its latest value. eth_record_framer turns each record into
// one 60-byte raw Ethernet frame and streams it, a byte at a time, to an
// Ethernet MAC core (not part of this RTL), which sends it to the host.
//
// ADC channel use (this design's choice): A0, A1, B0 = phase voltages a, b,
// c; B1, C0, C1 = phase currents a, b, c; D0 = torque; D1 is unused.
// Transducer gains (measured unit per transducer volt) are parameters.
//
// Timing at the defaults, for an ADC that converts in 1.7 us: the
// acquisition takes 317 cycles, scaling 3, the filter 11 and the model 6. A
// record follows 338 cycles (3.38 us) after the start of its sample, well
// inside the 15 us period. `latency_cyc` reports that time for each record.
// Its frame follows the next cycle, and takes 60 cycles when the MAC takes a
// byte every cycle.
// Status: `adc_timeout` pulses when the ADC did not answer (no record for
// that sample); `sample_overrun` pulses when a sample period ends before the
// previous sample's record was out (that sample is skipped); `enc_glitch`
// pulses for an encoder step that skipped a state; `eth_drop` pulses when a
// record arrives while the previous frame is still waiting for the MAC (that
// record is not sent; the frame sequence numbers show the gap).
//
// Some outputs of the sub-blocks are left unused here: the valid strobes of
// the Clarke units and of the speed meter (the model start and the record
// timing already cover them), the framer's busy flag, the scalers' raw
// volts, the filter's binary64 output, the model's rad/s speed and ADC
// channel D1. The reset also gates
// the assertions, which is why it shows up as a synchronous use in lint.
module im_setup_top #(
  parameter real CLK_HZ     = 100.0e6,
  parameter int  SAMPLE_CYC = 1500,      // sample period T in clock cycles
  parameter real V_GAIN     = 100.0,     // volts per transducer volt
  parameter real I_GAIN     = 2.0,       // amperes per transducer volt
  parameter real TQ_GAIN    = 10.0,      // newton-metres per transducer volt
  parameter real LPF_FC_HZ  = 100.0,     // torque filter cutoff
  parameter int  ENC_LINES  = 5000,
  parameter int  GATE_CYC   = 100000,    // speed measurement gate
  parameter logic [47:0] ETH_DST_MAC = 48'hFF_FF_FF_FF_FF_FF,  // host (broadcast)
  parameter logic [47:0] ETH_SRC_MAC = 48'h02_00_00_00_00_01,  // this board
  parameter logic [15:0] ETH_TYPE    = 16'h88B5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  // ADS8568 serial interface
  output logic                  adc_convst,
  input  logic                  adc_busy,
  output logic                  adc_fs_n,
  output logic                  adc_sclk,
  input  logic [3:0]            adc_sdo,
  // incremental encoder, after level shifting
  input  logic                  enc_a,
  input  logic                  enc_b,
  // one record per sample
  output logic                  rec_valid,
  output im_setup_pkg::record_t rec,
  output logic [15:0]           latency_cyc,
  // record frames towards the Ethernet MAC core
  output logic [7:0]            eth_tx_data,
  output logic                  eth_tx_valid,
  output logic                  eth_tx_last,
  input  logic                  eth_tx_ready,
  // status
  output logic                  adc_timeout,
  output logic                  sample_overrun,
  output logic                  enc_glitch,
  output logic                  eth_drop
);
  import fp_pkg::*;

  localparam real T_S = real'(SAMPLE_CYC) / CLK_HZ;

  // ---------------------------------------------------------------- sequencer
  logic [31:0] tick_cnt;
  logic        tick, in_flight, adc_start;
  logic [15:0] age;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tick_cnt <= '0;
    else if (!enable || int'(tick_cnt) == SAMPLE_CYC - 1) tick_cnt <= '0;
    else tick_cnt <= tick_cnt + 32'd1;
  end
  assign tick = enable && (int'(tick_cnt) == SAMPLE_CYC - 1);

  // ---------------------------------------------------------------- ADC
  logic             adc_done, adc_to, adc_active;
  logic [7:0][15:0] codes;

  adc_spi_master u_adc (
    .clk, .rst_n, .start(adc_start),
    .convst(adc_convst), .busy(adc_busy), .fs_n(adc_fs_n), .sclk(adc_sclk), .sdo(adc_sdo),
    .codes, .done(adc_done), .timeout(adc_to), .active(adc_active)
  );

  // ---------------------------------------------------------------- scaling
  localparam int NCH = 7;
  logic [NCH-1:0] sc_valid;
  f32_t           sc_value [NCH];
  f32_t           sc_volts [NCH];

  for (genvar ch = 0; ch < NCH; ch++) begin : g_scale
    localparam real GAIN = (ch < 3) ? V_GAIN : (ch < 6) ? I_GAIN : TQ_GAIN;
    adc_scaler #(.GAIN(GAIN)) u_sc (
      .clk, .rst_n, .in_valid(adc_done && !adc_to), .code(codes[ch]),
      .out_valid(sc_valid[ch]), .volts(sc_volts[ch]), .value(sc_value[ch])
    );
  end

  // ---------------------------------------------------------------- Clarke
  logic v_ab_valid, i_ab_valid;
  f32_t v_sa, v_sb, i_sa, i_sb;

  clarke u_clarke_v (
    .clk, .rst_n, .in_valid(sc_valid[0]), .a(sc_value[0]), .b(sc_value[1]), .c(sc_value[2]),
    .out_valid(v_ab_valid), .alpha(v_sa), .beta(v_sb)
  );
  clarke u_clarke_i (
    .clk, .rst_n, .in_valid(sc_valid[3]), .a(sc_value[3]), .b(sc_value[4]), .c(sc_value[5]),
    .out_valid(i_ab_valid), .alpha(i_sa), .beta(i_sb)
  );

  // ---------------------------------------------------------------- torque
  logic lpf_valid, lpf_overrun;
  f64_t t_l64;
  f32_t t_l;

  torque_lpf #(.FS_HZ(CLK_HZ / real'(SAMPLE_CYC)), .FC_HZ(LPF_FC_HZ)) u_lpf (
    .clk, .rst_n, .in_valid(sc_valid[6]), .x(sc_value[6]),
    .out_valid(lpf_valid), .y64(t_l64), .y32(t_l), .overrun(lpf_overrun)
  );

  // ---------------------------------------------------------------- speed
  logic spd_valid;
  f32_t n_meas, w_meas;

  speed_meter #(.CLK_HZ(CLK_HZ), .LINES(ENC_LINES), .GATE_CYC(GATE_CYC)) u_speed (
    .clk, .rst_n, .enc_a, .enc_b, .valid(spd_valid), .n_m(n_meas), .omega_m(w_meas),
    .glitch(enc_glitch)
  );

  // ---------------------------------------------------------------- model
  logic model_done, model_busy;
  f32_t m_isa, m_isb, m_fa, m_fb, m_w, m_n;

  im_model #(.T_S(T_S)) u_model (
    .clk, .rst_n, .start(lpf_valid), .v_sa, .v_sb, .t_l,
    .done(model_done), .busy(model_busy),
    .i_sa(m_isa), .i_sb(m_isb), .phi_ra(m_fa), .phi_rb(m_fb), .w_m(m_w), .n_m(m_n)
  );

  // ---------------------------------------------------------------- record
  // a sample is in flight from its tick until its record (or its timeout)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_flight      <= 1'b0;
      adc_start      <= 1'b0;
      age            <= '0;
      rec_valid      <= 1'b0;
      rec            <= '0;
      latency_cyc    <= '0;
      adc_timeout    <= 1'b0;
      sample_overrun <= 1'b0;
    end else begin
      adc_start      <= 1'b0;
      rec_valid      <= 1'b0;
      adc_timeout    <= adc_done && adc_to;
      sample_overrun <= tick && in_flight;
      if (in_flight && age != 16'hffff) age <= age + 16'd1;
      if (tick && !in_flight) begin
        in_flight <= 1'b1;
        adc_start <= 1'b1;
        age       <= 16'd1;
      end
      if (adc_done && adc_to) in_flight <= 1'b0;
      if (model_done) begin
        in_flight      <= 1'b0;
        rec_valid      <= 1'b1;
        latency_cyc    <= age;
        rec.v_sa       <= v_sa;
        rec.v_sb       <= v_sb;
        rec.i_sa       <= i_sa;
        rec.i_sb       <= i_sb;
        rec.t_l        <= t_l;
        rec.n_m        <= n_meas;
        rec.i_sa_hat   <= m_isa;
        rec.i_sb_hat   <= m_isb;
        rec.phi_ra_hat <= m_fa;
        rec.phi_rb_hat <= m_fb;
        rec.n_m_hat    <= m_n;
      end
    end
  end

  // ---------------------------------------------------------------- Ethernet
  logic eth_busy;

  eth_record_framer #(.DST_MAC(ETH_DST_MAC), .SRC_MAC(ETH_SRC_MAC), .ETHERTYPE(ETH_TYPE)) u_eth (
    .clk, .rst_n, .rec_valid, .rec,
    .tx_data(eth_tx_data), .tx_valid(eth_tx_valid), .tx_last(eth_tx_last), .tx_ready(eth_tx_ready),
    .busy(eth_busy), .drop(eth_drop)
  );

  // the chain is strictly one sample at a time
  a_one_sample: assert property (@(posedge clk) disable iff (!rst_n) adc_start |-> !adc_active);
  a_lpf_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !lpf_overrun);
  a_model_free: assert property (@(posedge clk) disable iff (!rst_n) lpf_valid |-> !model_busy);
endmodule
