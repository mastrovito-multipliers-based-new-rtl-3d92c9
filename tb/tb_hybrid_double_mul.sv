// tb_hybrid_double_mul: double products A*B*C over GF(2^163) with the
// general n-nomial first stage (the default), and over GF(2^233) with the
// trinomial first stage, compared with two reference multiplications. It
// also checks the serial A*B stream bit by bit, that done comes M+1 cycles
// after start, and runs operations back to back (start in the done cycle).
module tb_hybrid_double_mul;
  import tb_gf_pkg::*;
  localparam int M1 = 163;
  localparam logic [M1:0] P1 = gf2m_pkg::POLY163;
  localparam int M2 = 233;
  localparam logic [M2:0] P2 = ((M2+1)'(1) << M2) | ((M2+1)'(1) << 74) | (M2+1)'(1);

  logic clk = 0, rst_n = 0;
  logic st1 = 0, st2 = 0;
  logic [M1-1:0] a1, b1, c1, z1;
  logic [M2-1:0] a2, b2, c2, z2;
  logic busy1, v1, bit1, done1, busy2, v2, bit2, done2;
  logic [7:0] idx1, idx2;
  int checks = 0, failures = 0;

  hybrid_double_mul dut1 (.clk(clk), .rst_n(rst_n), .start(st1), .a(a1), .b(b1), .c(c1),
      .busy(busy1), .ab_valid(v1), .ab_bit(bit1), .ab_idx(idx1), .done(done1), .z(z1));

  hybrid_double_mul #(.M(M2), .POLY(P2), .TRINOMIAL(1'b1), .T(74)) dut2 (.clk(clk),
      .rst_n(rst_n), .start(st2), .a(a2), .b(b2), .c(c2), .busy(busy2), .ab_valid(v2),
      .ab_bit(bit2), .ab_idx(idx2), .done(done2), .z(z2));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] av, bv, cv, ab, abc;
    a1 = '0; b1 = '0; c1 = '0; a2 = '0; b2 = '0; c2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < 30; r++) begin
      av = rand_elem(M1); bv = rand_elem(M1); cv = rand_elem(M1);
      ab = gf_mul(M1, (W+1)'(P1), av, bv);
      abc = gf_mul(M1, (W+1)'(P1), ab, cv);
      a1 = M1'(av); b1 = M1'(bv); c1 = M1'(cv); st1 = 1;
      @(negedge clk);
      st1 = 0; a1 = '0; b1 = '0; c1 = '0;
      for (int k = M1-1; k >= 0; k--) begin
        check(v1 && idx1 == 8'(k) && bit1 == ab[k], "GF(2^163) A*B stream");
        @(negedge clk);
      end
      check(done1 && !busy1, "GF(2^163) done at M+1");
      check(z1 == M1'(abc), $sformatf("GF(2^163) A*B*C %0d", r));
    end
    for (int r = 0; r < 30; r++) begin
      av = rand_elem(M2); bv = rand_elem(M2); cv = rand_elem(M2);
      ab = gf_mul(M2, (W+1)'(P2), av, bv);
      abc = gf_mul(M2, (W+1)'(P2), ab, cv);
      a2 = M2'(av); b2 = M2'(bv); c2 = M2'(cv); st2 = 1;
      @(negedge clk);
      st2 = 0; a2 = '0; b2 = '0; c2 = '0;
      for (int k = M2-1; k >= 0; k--) begin
        check(v2 && idx2 == 8'(k) && bit2 == ab[k], "GF(2^233) A*B stream");
        @(negedge clk);
      end
      check(done2 && !busy2, "GF(2^233) done at M+1");
      check(z2 == M2'(abc), $sformatf("GF(2^233) A*B*C %0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
