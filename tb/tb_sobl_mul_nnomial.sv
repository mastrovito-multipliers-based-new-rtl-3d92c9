// tb_sobl_mul_nnomial: runs the general serial-out multiplier over
// GF(2^163) with the pentanomial x^163+x^7+x^6+x^3+1 on corner and random
// operands, and a small GF(2^7) instance exhaustively over a and b. Each
// product bit is compared as it comes out with the reference product;
// the bit order (MSB first), the first-bit latency (one cycle after start)
// and the done cycle (M+1 after start) are checked as well.
module tb_sobl_mul_nnomial;
  import tb_gf_pkg::*;
  localparam int M = 163;
  localparam logic [M:0] POLY = gf2m_pkg::POLY163;
  localparam int JW = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [M-1:0] a, b;
  logic busy, c_valid, c_bit, done;
  logic [JW-1:0] c_idx;
  int checks = 0, failures = 0;

  sobl_mul_nnomial dut (
      .clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b), .busy(busy),
      .c_valid(c_valid), .c_bit(c_bit), .c_idx(c_idx), .done(done));

  // A second, small instance with a trinomial shows the same code serves
  // other field polynomials: GF(2^7), x^7 + x + 1.
  localparam int M2 = 7;
  localparam logic [M2:0] POLY2 = 8'h83;
  logic s2_start = 0, s2_busy, s2_valid, s2_bit, s2_done;
  logic [2:0] s2_idx;
  logic [M2-1:0] s2_a, s2_b;
  sobl_mul_nnomial #(.M(M2), .POLY(POLY2)) dut2 (.clk(clk), .rst_n(rst_n), .start(s2_start),
      .a(s2_a), .b(s2_b), .busy(s2_busy), .c_valid(s2_valid), .c_bit(s2_bit), .c_idx(s2_idx),
      .done(s2_done));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // One multiplication on the large instance; the start is issued in the
  // current (negedge) cycle and the routine returns at the done cycle.
  task automatic run_big(logic [M-1:0] av, logic [M-1:0] bv);
    logic [W-1:0] ref_p;
    ref_p = gf_mul(M, (W+1)'(POLY), W'(av), W'(bv));
    a = av; b = bv; start = 1;
    @(negedge clk);
    start = 0;
    a = '0; b = '0;   // operands must have been captured
    for (int k = M-1; k >= 0; k--) begin
      check(c_valid && c_idx == JW'(k), "bit valid with index M-1 .. 0");
      check(c_bit == ref_p[k], $sformatf("product bit %0d", k));
      check(!done, "no done during the bits");
      @(negedge clk);
    end
    check(done && !c_valid, "done M+1 cycles after start");
  endtask

  task automatic run_small(logic [M2-1:0] av, logic [M2-1:0] bv);
    logic [W-1:0] ref_p;
    ref_p = gf_mul(M2, (W+1)'(POLY2), W'(av), W'(bv));
    s2_a = av; s2_b = bv; s2_start = 1;
    @(negedge clk);
    s2_start = 0;
    for (int k = M2-1; k >= 0; k--) begin
      check(s2_valid && s2_idx == 3'(k) && s2_bit == ref_p[k],
            $sformatf("small product %h*%h bit %0d", av, bv, k));
      @(negedge clk);
    end
    check(s2_done, "small done");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; s2_a = '0; s2_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run_big('0, M'(rand_elem(M)));
    run_big(M'(1), M'(1));
    run_big(M'(1) << (M-1), M'(1) << (M-1));
    run_big('1, '1);
    for (int r = 0; r < 40; r++) run_big(M'(rand_elem(M)), M'(rand_elem(M)));
    for (int x = 0; x < (1 << M2); x++)
      for (int y = 0; y < (1 << M2); y++)
        run_small(M2'(x), M2'(y));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
