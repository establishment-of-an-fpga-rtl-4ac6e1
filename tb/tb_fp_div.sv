// tb_fp_div -- random and directed checks of the binary32 fp_div against the
// simulator's real arithmetic (bit exact), including the ADC scaling divisor
// 32767.
module tb_fp_div;
  import fp_ref_pkg::*;
  logic [31:0] a32, b32, y32;
  int checks = 0, failures = 0;

  fp_div u32 (.a(a32), .b(b32), .y(y32));

  task automatic check32(logic [31:0] a, logic [31:0] b);
    logic [31:0] exp_y;
    a32 = a; b32 = b;
    #1;
    exp_y = div32(a, b);
    checks++;
    if (y32 !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL f32 %h / %h: got %h exp %h", a, b, y32, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32(32'h3f800000, 32'h40400000);          // 1/3
    check32(32'h40400000, 32'h40400000);          // exact 1
    check32(32'h00000000, 32'h40400000);
    check32(r2f32(327670.0), r2f32(32767.0));     // exactly 10
    for (int i = 0; i < 300; i++) check32(r2f32(10.0 * real'($urandom_range(65535)) - 327680.0), r2f32(32767.0));
    for (int i = 0; i < 4000; i++) check32(rand32(70, 180), rand32(70, 180));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
