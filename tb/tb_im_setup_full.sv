// tb_im_setup_full -- the top level with every parameter at its default
// (15 us sample period, 1 ms speed gate, 100 Hz torque filter) run through
// one complete operation: 100 ms of the motor rig at 1000 rpm under 19 N.m
// (6667 samples), every record checked against the reference chain in
// im_setup_checker, the measured speed checked once two full gates have
// passed, followed by three samples with an ADC that does not answer.
// Every record must also leave as one Ethernet frame with the MAC always
// ready, none dropped. Reports the record latency against the 15 us period.
module tb_im_setup_full;
  localparam int SAMPLES = 6667;

  logic clk = 0, rst_n = 0, enable = 0;
  logic convst, busy, fs_n, sclk, enc_a, enc_b, rec_valid, adc_timeout, sample_overrun, enc_glitch;
  logic [3:0] sdo;
  logic [7:0][15:0] vin, sampled;
  logic [15:0] latency_cyc;
  im_setup_pkg::record_t rec;
  logic [7:0] eth_tx_data;
  logic eth_tx_valid, eth_tx_last, eth_tx_ready, eth_drop;
  int e_checks, e_failures, e_frames, e_drops, e_records;
  logic respond = 1, glitch = 0, settled = 0;
  int t_conv = 1700;
  real rpm = 1000.0, torque = 19.0, i_amp = 5.0;
  int violations, conversions, checks, failures, records;
  int n_timeout = 0, n_overrun = 0, n_glitch = 0;
  assign eth_tx_ready = 1'b1;

  always #5 clk = ~clk;

  im_setup_top dut (
    .clk, .rst_n, .enable,
    .adc_convst(convst), .adc_busy(busy), .adc_fs_n(fs_n), .adc_sclk(sclk), .adc_sdo(sdo),
    .enc_a, .enc_b, .rec_valid, .rec, .latency_cyc,
    .eth_tx_data, .eth_tx_valid, .eth_tx_last, .eth_tx_ready,
    .adc_timeout, .sample_overrun, .enc_glitch, .eth_drop
  );
  ads8568_model adc (.convst, .fs_n, .sclk, .busy, .sdo, .vin, .respond, .t_conv, .sampled,
                     .violations, .conversions);
  im_rig_stim rig (.rpm, .torque, .i_amp, .glitch, .vin, .enc_a, .enc_b);
  im_setup_checker chk (
    .clk, .rec_valid(rec_valid && rst_n), .rec, .latency_cyc, .sampled, .enc_rpm(rpm), .speed_settled(settled),
    .checks, .failures, .records
  );

  eth_frame_monitor eth (
    .clk, .rst_n, .rec_valid, .rec, .tx_data(eth_tx_data), .tx_valid(eth_tx_valid),
    .tx_last(eth_tx_last), .tx_ready(eth_tx_ready), .drop(eth_drop),
    .checks(e_checks), .failures(e_failures), .frames(e_frames), .drops(e_drops), .records(e_records)
  );

  always @(posedge clk) begin
    if (rst_n && adc_timeout) n_timeout++;
    if (rst_n && sample_overrun) n_overrun++;
    if (rst_n && enc_glitch) n_glitch++;
  end

  task automatic report();
    int f;
    f = failures;
    if (n_timeout != 3)        begin f++; $display("FAIL timeouts: %0d", n_timeout); end
    if (n_overrun != 0)        begin f++; $display("FAIL overruns: %0d", n_overrun); end
    if (n_glitch != 0)         begin f++; $display("FAIL encoder glitches: %0d", n_glitch); end
    if (violations != 0)       begin f++; $display("FAIL %0d ADC timing violations", violations); end
    if (records < SAMPLES - 2) begin f++; $display("FAIL only %0d records", records); end
    f += e_failures;
    if (e_drops != 0)          begin f++; $display("FAIL %0d records dropped before the MAC", e_drops); end
    if (e_frames + int'(eth_tx_valid) != e_records) begin
      f++; $display("FAIL %0d frames for %0d records", e_frames, e_records);
    end
    $display("records %0d, latency %0d..%0d cycles of a 1500-cycle period, last speed %f rpm, model %f rpm",
             records, chk.latency_min(), chk.latency_max(),
             fp_ref_pkg::f32_to_real(rec.n_m), fp_ref_pkg::f32_to_real(rec.n_m_hat));
    $display("frames %0d", e_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks + e_checks + 7, f);
  endtask

  initial begin
    repeat (1600 * (SAMPLES + 100)) @(posedge clk);
    failures++;
    report();
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    enable = 1;
    repeat (1500 * SAMPLES) @(posedge clk);
    respond = 0;
    repeat (1500 * 3) @(posedge clk);
    report();
    $finish;
  end

  // speed is checked from the third gate on (gate = 100000 cycles)
  initial begin
    repeat (2 * 100000 + 1000) @(posedge clk);
    settled = 1;
  end
endmodule
