// tb_clarke -- checks the Clarke transformation bit for bit against real
// arithmetic rounded to binary32 after each operation, in the block's order
// of operations, and against the textbook result for balanced three-phase
// sets (alpha = amplitude*cos, beta = amplitude*sin, within 1e-5).
module tb_clarke;
  import fp_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] a, b, c, alpha, beta;
  int checks = 0, failures = 0;
  logic [95:0] hist [$];
  real ph [$];

  always #5 clk = ~clk;

  clarke dut (.clk, .rst_n, .in_valid, .a, .b, .c, .out_valid, .alpha, .beta);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [95:0] h;
      logic [31:0] ea, eb;
      real th;
      h  = hist.pop_front();
      th = ph.pop_front();
      ea = sub32(mul32(h[95:64], r2f32(2.0 / 3.0)), mul32(add32(h[63:32], h[31:0]), r2f32(1.0 / 3.0)));
      eb = mul32(sub32(h[63:32], h[31:0]), r2f32(1.0 / 1.7320508075688772));
      checks++;
      if (alpha !== ea || beta !== eb) begin
        failures++;
        $display("FAIL alpha %h exp %h beta %h exp %h", alpha, ea, beta, eb);
      end
      if (th >= 0.0) begin
        checks++;
        if ((f32_to_real(alpha) - 310.0 * $cos(th)) ** 2 + (f32_to_real(beta) - 310.0 * $sin(th)) ** 2 > (310.0e-5) ** 2) begin
          failures++;
          $display("FAIL balanced set at %f rad", th);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      real th;
      @(negedge clk);
      in_valid = 1;
      if (i % 2 == 0) begin
        th = 2.0 * fp_pkg::PI * real'(i) / 1500.0;
        a = r2f32(310.0 * $cos(th));
        b = r2f32(310.0 * $cos(th - 2.0 * fp_pkg::PI / 3.0));
        c = r2f32(310.0 * $cos(th + 2.0 * fp_pkg::PI / 3.0));
      end else begin
        th = -1.0;
        a = rand32(110, 140); b = rand32(110, 140); c = rand32(110, 140);
      end
      hist.push_back({a, b, c});
      ph.push_back(th);
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (hist.size() != 0) begin failures++; $display("FAIL %0d results missing", hist.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
