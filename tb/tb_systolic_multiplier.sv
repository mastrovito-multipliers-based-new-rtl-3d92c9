// tb_systolic_multiplier: exhaustive check of the 8 x 8 array multiplier,
// all 65536 operand pairs, against the integer product.
module tb_systolic_multiplier;
  logic [7:0] x, y;
  logic [15:0] z;
  int checks = 0, failures = 0;

  systolic_multiplier dut (.x(x), .y(y), .z(z));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int k = 0; k < 256; k++) begin
        x = 8'(i); y = 8'(k);
        #1;
        checks++;
        if (int'(z) != i * k) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d * %0d = %0d", i, k, z);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
