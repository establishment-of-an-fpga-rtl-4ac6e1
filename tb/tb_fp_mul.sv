// tb_fp_mul -- random and directed checks of fp_mul in binary32 and binary64
// against the simulator's real arithmetic (bit exact).
module tb_fp_mul;
  import fp_ref_pkg::*;
  logic [31:0] a32, b32, y32;
  logic [63:0] a64, b64, y64;
  int checks = 0, failures = 0;

  fp_mul #(.EW(8),  .MW(23)) u32 (.a(a32), .b(b32), .y(y32));
  fp_mul #(.EW(11), .MW(52)) u64 (.a(a64), .b(b64), .y(y64));

  task automatic check32(logic [31:0] a, logic [31:0] b);
    logic [31:0] exp_y;
    a32 = a; b32 = b;
    #1;
    exp_y = mul32(a, b);
    checks++;
    if (y32 !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL f32 %h * %h: got %h exp %h", a, b, y32, exp_y);
    end
  endtask

  task automatic check64(logic [63:0] a, logic [63:0] b);
    logic [63:0] exp_y;
    a64 = a; b64 = b;
    #1;
    exp_y = $realtobits($bitstoreal(a) * $bitstoreal(b));
    checks++;
    if (y64 !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL f64 %h * %h: got %h exp %h", a, b, y64, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32(32'h3f800000, 32'h40490fdb);
    check32(32'h3fc00000, 32'h3fc00000);          // 1.5 * 1.5 carries into a new exponent
    check32(32'h00000000, 32'hc0490fdb);
    check32(32'h3f800001, 32'h3f7fffff);
    for (int i = 0; i < 4000; i++) check32(rand32(70, 180), rand32(70, 180));
    for (int i = 0; i < 4000; i++) check64(rand64(600, 1400), rand64(600, 1400));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
