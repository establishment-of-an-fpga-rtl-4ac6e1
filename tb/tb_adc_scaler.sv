// tb_adc_scaler -- feeds a code every cycle and checks volts = code*10/32767
// and value = volts*GAIN bit for bit against real arithmetic rounded to
// binary32 after each operation, plus the three-cycle latency.
module tb_adc_scaler;
  import fp_ref_pkg::*;
  localparam real GAIN = 100.0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [15:0] code;
  logic [31:0] volts, value;
  int checks = 0, failures = 0;
  logic signed [15:0] hist [$];

  always #5 clk = ~clk;

  adc_scaler #(.GAIN(GAIN)) dut (.clk, .rst_n, .in_valid, .code, .out_valid, .volts, .value);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected values, in the order the codes went in
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic signed [15:0] c;
      logic [31:0] ev, eg;
      c  = hist.pop_front();
      ev = div32(mul32(r2f32(real'(c)), r2f32(10.0)), r2f32(32767.0));
      eg = mul32(ev, r2f32(GAIN));
      checks++;
      if (volts !== ev || value !== eg) begin
        failures++;
        $display("FAIL code %0d: volts %h exp %h, value %h exp %h", c, volts, ev, value, eg);
      end
    end
  end

  initial begin
    int sent = 0, lat = 0;
    code = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency of a single code
    @(negedge clk); in_valid = 1; code = 16'sd32767; hist.push_back(code);
    @(negedge clk); in_valid = 0;
    while (!out_valid) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("FAIL latency %0d", lat + 1); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = 1;
      code = 16'($urandom);
      if (i == 0) code = -16'sd32768;
      if (i == 1) code = 16'sd0;
      if (i == 2) code = 16'sd1;
      hist.push_back(code);
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (hist.size() != 0) begin failures++; $display("FAIL %0d results missing", hist.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
