// tb_hybrid_mul: end-to-end test of the top level at its default sizes.
// The GF(2^163) and GF(2^233) hybrid-double units and the 8-bit array
// multiplier are driven at the same time by three independent processes.
// Each GF process runs double products A*B*C back to back, with and
// without idle gaps, compares the serial A*B stream and the result with
// reference arithmetic, checks the M+1 cycle latency, and raises enable
// during a run to show it is ignored. Mechanisms counted (each must occur):
// back-to-back start, start ignored while busy, idle gap, trinomial
// reduction terms switched on (i >= T) and off, product bits 0/1, and
// array products with a carry out of the low byte.
module tb_hybrid_mul;
  import tb_gf_pkg::*;
  localparam logic [163:0] P1 = gf2m_pkg::POLY163;
  localparam logic [233:0] P2 = (234'(1) << 233) | (234'(1) << 74) | 234'(1);

  logic clk = 0, rst_n = 0;
  logic en1 = 0, en2 = 0;
  logic [162:0] a1 = '0, b1 = '0, c1 = '0, z1;
  logic [232:0] a2 = '0, b2 = '0, c2 = '0, z2;
  logic busy1, v1, bit1, done1, busy2, v2, bit2, done2;
  logic [7:0] idx1, idx2;
  logic [7:0] x = '0, y = '0;
  logic [15:0] z;
  int checks = 0, failures = 0;
  int n_b2b = 0, n_ignored = 0, n_gap = 0, n_tri_on = 0, n_tri_off = 0;
  int n_ones = 0, n_zeros = 0, n_sys_hi = 0, n_ops = 0;
  bit gf1_done = 0, gf2_done = 0, sys_done = 0;

  hybrid_mul dut (
    .clk(clk), .rst_n(rst_n),
    .enable163(en1), .a163(a1), .b163(b1), .c163(c1),
    .busy163(busy1), .ab_valid163(v1), .ab_bit163(bit1), .ab_idx163(idx1),
    .done163(done1), .z163(z1),
    .enable233(en2), .a233(a2), .b233(b2), .c233(c2),
    .busy233(busy2), .ab_valid233(v2), .ab_bit233(bit2), .ab_idx233(idx2),
    .done233(done2), .z233(z2),
    .x(x), .y(y), .z(z)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // GF(2^163) unit, general n-nomial first stage.
  initial begin
    logic [W-1:0] av, bv, cv, ab, abc;
    wait (rst_n);
    @(negedge clk);
    for (int r = 0; r < 12; r++) begin
      av = rand_elem(163); bv = rand_elem(163); cv = rand_elem(163);
      ab = gf_mul(163, 257'(P1), av, bv);
      abc = gf_mul(163, 257'(P1), ab, cv);
      if (r % 3 == 2) begin
        n_gap++;
        repeat ($urandom_range(1, 4)) @(negedge clk);
      end else if (r > 0) n_b2b++;
      check(!busy1, "163: idle when starting");
      a1 = 163'(av); b1 = 163'(bv); c1 = 163'(cv); en1 = 1;
      @(negedge clk);
      en1 = (r % 2 == 1);   // held high into the run: must be ignored
      a1 = '0; b1 = '0; c1 = '0;
      for (int k = 162; k >= 0; k--) begin
        if (en1) n_ignored++;
        check(v1 && busy1 && idx1 == 8'(k) && bit1 == ab[k], "163: A*B stream");
        if (ab[k]) n_ones++; else n_zeros++;
        @(negedge clk);
        en1 = 0;
      end
      check(done1 && !busy1, "163: done M+1 cycles after start");
      check(z1 == 163'(abc), $sformatf("163: A*B*C op %0d", r));
      n_ops++;
    end
    gf1_done = 1;
  end

  // GF(2^233) unit, trinomial first stage.
  initial begin
    logic [W-1:0] av, bv, cv, ab, abc;
    wait (rst_n);
    repeat (3) @(negedge clk);
    for (int r = 0; r < 10; r++) begin
      av = rand_elem(233); bv = rand_elem(233); cv = rand_elem(233);
      ab = gf_mul(233, 257'(P2), av, bv);
      abc = gf_mul(233, 257'(P2), ab, cv);
      if (r % 4 == 3) begin
        n_gap++;
        repeat ($urandom_range(1, 4)) @(negedge clk);
      end else if (r > 0) n_b2b++;
      a2 = 233'(av); b2 = 233'(bv); c2 = 233'(cv); en2 = 1;
      @(negedge clk);
      en2 = (r % 2 == 0);
      a2 = '0; b2 = '0; c2 = '0;
      for (int k = 232; k >= 0; k--) begin
        if (en2) n_ignored++;
        if (k >= 74) n_tri_on++; else n_tri_off++;
        check(v2 && busy2 && idx2 == 8'(k) && bit2 == ab[k], "233: A*B stream");
        @(negedge clk);
        en2 = 0;
      end
      check(done2 && !busy2, "233: done M+1 cycles after start");
      check(z2 == 233'(abc), $sformatf("233: A*B*C op %0d", r));
      n_ops++;
    end
    gf2_done = 1;
  end

  // 8-bit array multiplier.
  initial begin
    wait (rst_n);
    for (int r = 0; r < 2000; r++) begin
      @(negedge clk);
      x = 8'($urandom); y = 8'($urandom);
      if (r == 0) begin x = 8'hff; y = 8'hff; end
      #1;
      check(int'(z) == int'(x) * int'(y), "array multiplier product");
      if (z[15:8] != 0) n_sys_hi++;
    end
    sys_done = 1;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (gf1_done && gf2_done && sys_done);
    $display("ops=%0d back_to_back=%0d ignored_enable_cycles=%0d gaps=%0d tri_on=%0d tri_off=%0d ones=%0d zeros=%0d sys_high=%0d",
             n_ops, n_b2b, n_ignored, n_gap, n_tri_on, n_tri_off, n_ones, n_zeros, n_sys_hi);
    check(n_b2b > 0, "back-to-back start happened");
    check(n_ignored > 0, "enable during a run happened");
    check(n_gap > 0, "idle gap happened");
    check(n_tri_on > 0 && n_tri_off > 0, "trinomial control both ways");
    check(n_ones > 0 && n_zeros > 0, "product bits of both values");
    check(n_sys_hi > 0, "array products into the high byte");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
