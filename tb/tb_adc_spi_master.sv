// tb_adc_spi_master -- runs adc_spi_master against the ADC model: random
// codes on all eight channels must arrive unchanged and in channel order,
// the ADC's timing rules must hold, one acquisition must take the expected
// number of cycles, and an ADC that never answers must end in a timeout.
module tb_adc_spi_master;
  logic clk = 0, rst_n = 0, start = 0;
  logic convst, busy, fs_n, sclk, done, timeout, active;
  logic [3:0] sdo;
  logic [7:0][15:0] codes, vin;
  logic respond = 1;
  int violations, conversions;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  adc_spi_master dut (.clk, .rst_n, .start, .convst, .busy, .fs_n, .sclk, .sdo,
                      .codes, .done, .timeout, .active);
  ads8568_model adc (.convst, .fs_n, .sclk, .busy, .sdo, .vin, .respond,
                     .t_conv(1700), .sampled(), .violations, .conversions);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic acquire(output int cycles);
    int c0;
    @(posedge clk);
    start <= 1'b1;
    c0 = cyc;
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    cycles = cyc - c0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    vin = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 12; n++) begin
      for (int ch = 0; ch < 8; ch++) vin[ch] = 16'($urandom);
      if (n == 0) vin = {16'h8000, 16'h7fff, 16'h0001, 16'hffff, 16'h0000, 16'h5555, 16'haaaa, 16'h1234};
      acquire(cycles);
      for (int ch = 0; ch < 8; ch++)
        check(codes[ch] == vin[ch], $sformatf("acq %0d ch %0d got %h exp %h", n, ch, codes[ch], vin[ch]));
      check(!timeout, "unexpected timeout");
      // 1.7 us conversion + about 1.5 us of control and read-out, as a
      // count of 10 ns cycles (the ADC read takes about 3.28 us in the setup)
      check(cycles >= 300 && cycles <= 340, $sformatf("acquisition took %0d cycles", cycles));
      if (n == 0) $display("one acquisition: %0d cycles", cycles);
      repeat ($urandom_range(40)) @(posedge clk);
    end
    check(violations == 0, $sformatf("%0d ADC timing violations", violations));
    check(conversions == 12, "conversion count");
    // an ADC that never raises BUSY
    respond = 0;
    vin = '1;
    acquire(cycles);
    check(timeout, "missing timeout");
    check(codes[0] != 16'hffff, "codes overwritten by a failed acquisition");
    respond = 1;
    acquire(cycles);
    check(!timeout && codes[7] == 16'hffff, "recovery after timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
