// tb_fp_add -- random and directed checks of fp_add in binary32 and binary64
// against the simulator's real arithmetic (bit exact).
module tb_fp_add;
  import fp_ref_pkg::*;
  logic [31:0] a32, b32, y32;
  logic [63:0] a64, b64, y64;
  logic        sub32_i, sub64_i;
  int checks = 0, failures = 0;

  fp_add #(.EW(8),  .MW(23)) u32 (.a(a32), .b(b32), .sub(sub32_i), .y(y32));
  fp_add #(.EW(11), .MW(52)) u64 (.a(a64), .b(b64), .sub(sub64_i), .y(y64));

  task automatic check32(logic [31:0] a, logic [31:0] b, logic s);
    logic [31:0] exp_y;
    a32 = a; b32 = b; sub32_i = s;
    #1;
    exp_y = s ? sub32(a, b) : add32(a, b);
    checks++;
    if (y32 !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL f32 %h %s %h: got %h exp %h", a, s ? "-" : "+", b, y32, exp_y);
    end
  endtask

  task automatic check64(logic [63:0] a, logic [63:0] b, logic s);
    logic [63:0] exp_y;
    a64 = a; b64 = b; sub64_i = s;
    #1;
    exp_y = s ? $realtobits($bitstoreal(a) - $bitstoreal(b)) : $realtobits($bitstoreal(a) + $bitstoreal(b));
    checks++;
    if (y64 !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL f64 %h %s %h: got %h exp %h", a, s ? "-" : "+", b, y64, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: exact cancellation, carry-out, rounding ties, zero operands
    check32(32'h3f800000, 32'h3f800000, 1'b1);
    check32(32'h3f800000, 32'h3f800000, 1'b0);
    check32(32'h3f800000, 32'h33800000, 1'b0);   // 1 + 2^-24: tie to even
    check32(32'h3f800001, 32'h33800000, 1'b0);   // tie rounds up
    check32(32'h00000000, 32'hc0490fdb, 1'b0);
    check32(32'h40490fdb, 32'h00000000, 1'b1);
    check32(32'h4b000000, 32'h3f000001, 1'b1);
    for (int i = 0; i < 3000; i++) begin
      // close exponents stress cancellation, wide ones the alignment
      if (i % 2 == 0) check32(rand32(120, 130), rand32(120, 130), 1'($urandom));
      else            check32(rand32(90, 160), rand32(90, 160), 1'($urandom));
    end
    for (int i = 0; i < 3000; i++) begin
      if (i % 2 == 0) check64(rand64(1015, 1030), rand64(1015, 1030), 1'($urandom));
      else            check64(rand64(900, 1100), rand64(900, 1100), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
