// tb_im_setup_top -- end-to-end test of the real-time setup at a shortened
// sample period (4 us) and speed gate (200 us). The ADC model and a stand-in
// for the motor rig feed the top level; every record is checked against the
// reference chain in im_setup_checker. The scenario walks through the
// setup's mechanisms and counts each one, failing if one never happened:
// forward running under load, reversal (negative speed measured), an ADC
// that stops answering (timeouts, skipped samples), a conversion that runs
// past the sample period (sample overruns), an Ethernet MAC that stops
// taking bytes (records dropped before the link) and an encoder glitch.
// Every record must leave as a frame or be counted as dropped.
module tb_im_setup_top;
  localparam int  SAMPLE = 400;
  localparam int  GATE   = 20000;
  localparam real T_S    = real'(SAMPLE) * 10.0e-9;
  localparam real RES    = 60.0 / (20000.0 * real'(GATE) * 10.0e-9);

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
  logic eth_hold = 0;
  int n_timeout = 0, n_overrun = 0, n_glitch = 0, n_reverse = 0, n_forward = 0, cyc = 0;

  always #5 clk = ~clk;

  im_setup_top #(.SAMPLE_CYC(SAMPLE), .GATE_CYC(GATE)) dut (
    .clk, .rst_n, .enable,
    .adc_convst(convst), .adc_busy(busy), .adc_fs_n(fs_n), .adc_sclk(sclk), .adc_sdo(sdo),
    .enc_a, .enc_b, .rec_valid, .rec, .latency_cyc,
    .eth_tx_data, .eth_tx_valid, .eth_tx_last, .eth_tx_ready,
    .adc_timeout, .sample_overrun, .enc_glitch, .eth_drop
  );
  ads8568_model adc (.convst, .fs_n, .sclk, .busy, .sdo, .vin, .respond, .t_conv, .sampled,
                     .violations, .conversions);
  im_rig_stim rig (.rpm, .torque, .i_amp, .glitch, .vin, .enc_a, .enc_b);
  im_setup_checker #(.T_S(T_S), .RPM_RES(RES), .MAX_LAT(2 * SAMPLE)) chk (
    .clk, .rec_valid(rec_valid && rst_n), .rec, .latency_cyc, .sampled, .enc_rpm(rpm), .speed_settled(settled),
    .checks, .failures, .records
  );

  eth_frame_monitor eth (
    .clk, .rst_n, .rec_valid, .rec, .tx_data(eth_tx_data), .tx_valid(eth_tx_valid),
    .tx_last(eth_tx_last), .tx_ready(eth_tx_ready), .drop(eth_drop),
    .checks(e_checks), .failures(e_failures), .frames(e_frames), .drops(e_drops), .records(e_records)
  );

  // the MAC takes a byte on about 70 % of the cycles, none while eth_hold
  always @(posedge clk) eth_tx_ready <= !eth_hold && ($urandom_range(0, 9) < 7);

  always @(posedge clk) begin
    cyc++;
    if (rst_n && adc_timeout) n_timeout++;
    if (rst_n && sample_overrun) n_overrun++;
    if (rst_n && enc_glitch) n_glitch++;
    if (rec_valid && settled && $bitstoreal({rec.n_m[31], 11'(int'(rec.n_m[30:23]) - 127 + 1023), rec.n_m[22:0], 29'd0}) < -900.0) n_reverse++;
    if (rec_valid && settled && rec.n_m[31] == 1'b0 && rec.n_m[30:23] != 8'd0) n_forward++;
  end

  task automatic report();
    int f;
    f = failures;
    if (n_forward == 0)  begin f++; $display("FAIL never ran forward"); end
    if (n_reverse == 0)  begin f++; $display("FAIL never ran in reverse"); end
    if (n_timeout == 0)  begin f++; $display("FAIL no ADC timeout"); end
    if (n_overrun == 0)  begin f++; $display("FAIL no sample overrun"); end
    if (n_glitch != 1)   begin f++; $display("FAIL encoder glitches: %0d", n_glitch); end
    if (violations != 0) begin f++; $display("FAIL %0d ADC timing violations", violations); end
    if (records < 400)   begin f++; $display("FAIL only %0d records", records); end
    f += e_failures;
    if (e_drops == 0)    begin f++; $display("FAIL no record dropped before the MAC"); end
    if (e_frames + e_drops + int'(eth_tx_valid) != e_records) begin
      f++; $display("FAIL %0d frames + %0d drops for %0d records", e_frames, e_drops, e_records);
    end
    $display("records %0d, forward %0d, reverse %0d, timeouts %0d, overruns %0d, glitches %0d, latency %0d..%0d cycles",
             records, n_forward, n_reverse, n_timeout, n_overrun, n_glitch, chk.latency_min(), chk.latency_max());
    $display("frames %0d, frame drops %0d", e_frames, e_drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks + e_checks + 9, f);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    report();
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    enable = 1;
    // forward, loaded
    repeat (2 * GATE + 100) @(posedge clk);
    settled = 1;
    repeat (2 * GATE) @(posedge clk);
    // reversal
    settled = 0;
    rpm = -1000.0; torque = -18.5;
    repeat (2 * GATE + 100) @(posedge clk);
    settled = 1;
    repeat (2 * GATE) @(posedge clk);
    // ADC stops answering for a while
    respond = 0;
    repeat (5 * SAMPLE) @(posedge clk);
    respond = 1;
    repeat (5 * SAMPLE) @(posedge clk);
    // conversions too slow for the sample period
    t_conv = 2600;
    repeat (6 * SAMPLE) @(posedge clk);
    t_conv = 1700;
    repeat (5 * SAMPLE) @(posedge clk);
    // the MAC stops taking bytes for a while
    eth_hold = 1;
    repeat (3 * SAMPLE) @(posedge clk);
    eth_hold = 0;
    repeat (2 * SAMPLE) @(posedge clk);
    // encoder glitch
    settled = 0;
    glitch = 1;
    repeat (3 * SAMPLE) @(posedge clk);
    report();
    $finish;
  end
endmodule
