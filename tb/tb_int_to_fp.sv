// tb_int_to_fp -- checks int_to_fp for 16-bit codes into binary32 (all
// codes, exact) and for 32-bit integers into binary32 (rounded).
module tb_int_to_fp;
  import fp_ref_pkg::*;
  logic signed [15:0] x16;
  logic signed [31:0] x32;
  logic [31:0] y16, y32;
  int checks = 0, failures = 0;

  int_to_fp #(.IW(16)) u16 (.x(x16), .y(y16));
  int_to_fp #(.IW(32)) u32 (.x(x32), .y(y32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -32768; i < 32768; i++) begin
      x16 = 16'(i);
      #1;
      checks++;
      if (y16 !== r2f32(real'(i))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: got %h exp %h", i, y16, r2f32(real'(i)));
      end
    end
    for (int i = 0; i < 3000; i++) begin
      x32 = (i % 3 == 0) ? 32'($urandom) : (32'($urandom) >>> $urandom_range(31));
      if (i == 0) x32 = 32'h8000_0000;
      if (i == 1) x32 = 32'h7fff_ffff;
      if (i == 2) x32 = 32'h0100_0001;           // tie, rounds to even
      #1;
      checks++;
      if (y32 !== r2f32(real'(x32))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: got %h exp %h", x32, y32, r2f32(real'(x32)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
