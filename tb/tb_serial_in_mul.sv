// tb_serial_in_mul: feeds random operands X bit-serially, most significant
// bit first, into the MSB-first serial-in multiplier over GF(2^163), with
// random idle cycles between bits, and compares the accumulator with the
// reference product X*C after the last bit.
module tb_serial_in_mul;
  import tb_gf_pkg::*;
  localparam int M = 163;
  localparam logic [M:0] POLY = gf2m_pkg::POLY163;
  logic clk = 0, rst_n = 0, load = 0, bit_valid = 0, bit_in = 0;
  logic [M-1:0] c, z;
  int checks = 0, failures = 0;

  serial_in_mul #(.M(M), .POLY(POLY)) dut (.clk(clk), .rst_n(rst_n), .load(load), .c(c),
      .bit_valid(bit_valid), .bit_in(bit_in), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] xv, cv, ref_p;
    c = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 50; r++) begin
      xv = (r == 0) ? W'(1) : rand_elem(M);
      cv = (r == 1) ? W'({M{1'b1}}) : rand_elem(M);
      ref_p = gf_mul(M, (W+1)'(POLY), xv, cv);
      @(negedge clk);
      load = 1; c = M'(cv);
      @(negedge clk);
      load = 0; c = '0;
      for (int k = M-1; k >= 0; k--) begin
        while ($urandom_range(0, 3) == 0) begin
          bit_valid = 0; bit_in = $urandom_range(0, 1);
          @(negedge clk);
        end
        bit_valid = 1; bit_in = xv[k];
        @(negedge clk);
      end
      bit_valid = 0;
      checks++;
      if (z != M'(ref_p)) begin
        failures++;
        $display("FAIL: product %0d", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
