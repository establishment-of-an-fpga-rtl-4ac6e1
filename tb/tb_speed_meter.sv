// tb_speed_meter -- drives speed_meter with quadrature signals of a 5000-line
// encoder turning at set speeds, forwards and backwards, and checks n_m to
// within one count of the gate, the sign, omega_m = n_m * 2 pi / 60 bit for
// bit, the update period and the glitch flag. The gate is shortened to
// 100 us (the module default is 1 ms) to keep the run short.
module tb_speed_meter;
  import fp_ref_pkg::*;
  localparam int GATE = 10000;                    // cycles of 10 ns
  localparam real K_RPM = 60.0 / (4.0 * 5000.0 * real'(GATE) * 10.0e-9);
  logic clk = 0, rst_n = 0;
  logic enc_a = 0, enc_b = 0, valid, glitch;
  logic [31:0] n_m, omega_m;
  int checks = 0, failures = 0, cyc = 0, glitches = 0;
  real rpm = 0.0;
  int phase = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && glitch) glitches++;
  end

  speed_meter #(.GATE_CYC(GATE)) dut (.clk, .rst_n, .enc_a, .enc_b, .valid, .n_m, .omega_m, .glitch);

  // encoder: one quadrature step every 60e9 / (rpm * 20000) ns
  initial begin
    forever begin
      if (rpm == 0.0) #100;
      else begin
        #(60.0e9 / (rpm_abs() * 20000.0));
        phase = (rpm > 0.0) ? (phase + 1) % 4 : (phase + 3) % 4;
        {enc_b, enc_a} = (phase == 0) ? 2'b00 : (phase == 1) ? 2'b01 : (phase == 2) ? 2'b11 : 2'b10;
      end
    end
  end

  function automatic real rpm_abs();
    return rpm < 0.0 ? -rpm : rpm;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(real set_rpm);
    int last;
    rpm = set_rpm;
    // skip the gate in progress and the first full one
    repeat (2) begin @(posedge clk); while (!valid) @(posedge clk); end
    last = cyc;
    for (int g = 0; g < 4; g++) begin
      real got, cnt;
      @(posedge clk);
      while (!valid) @(posedge clk);
      got = f32_to_real(n_m);
      cnt = got / K_RPM;
      checks++;
      if (rabs(got - set_rpm) > 1.01 * K_RPM || rabs(cnt - $rtoi(cnt + (cnt < 0 ? -0.5 : 0.5))) > 1e-3) begin
        failures++;
        $display("FAIL at %f rpm: n_m = %f", set_rpm, got);
      end
      checks++;
      if (omega_m !== mul32(n_m, r2f32(2.0 * fp_pkg::PI / 60.0))) begin
        failures++;
        $display("FAIL omega %h for n_m %h", omega_m, n_m);
      end
      checks++;
      if (cyc - last != GATE) begin failures++; $display("FAIL update period %0d", cyc - last); end
      last = cyc;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(1000.0);
    measure(-1000.0);
    measure(952.0);
    measure(3000.0);
    measure(0.0);
    checks++;
    if (glitches != 0) begin failures++; $display("FAIL spurious glitch"); end
    // both tracks change at once
    @(negedge clk); {enc_b, enc_a} = ~{enc_b, enc_a};
    repeat (5) @(posedge clk);
    checks++;
    if (glitches != 1) begin failures++; $display("FAIL glitch not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
