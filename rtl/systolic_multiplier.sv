// systolic_multiplier: N x N unsigned array multiplier, z = x * y.
//
// The product is formed by a regular array of AND gates (the partial
// products x_c & y_r) and full-adder cells, in three sections:
//   top    - row 1: N full adders add partial-product row 1 to row 0;
//   middle - rows 2 .. N-1: each row of N full adders adds one more
//            partial-product row to the running sum, in carry-save form
//            (each cell's carry goes to the cell of the same column in the
//            next row, which has the same weight);
//   lower  - N full adders in a ripple-carry chain that merge the last
//            row's sum and carry vectors into the upper N product bits.
// Product bit r (r < N) is the sum output of column 0 of row r. All
// sections work on the data at the same time: the array is combinational,
// with no clock, as in the block symbol with ports x, y and z.
//
// The 8-bit size, the ports x[7:0], y[7:0], z[15:0], the three sections
// of eight full adders each and the AND-gate/full-adder cells follow the
// text; the carry-save wiring of the rows is this design's choice.
module systolic_multiplier #(
  parameter int N = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] z
);

  logic [N-1:0] pp [N];   // pp[r][c] = x[c] & y[r], weight r + c
  logic [N-1:0] s  [N];   // sum of row r, column c, weight r + c
  logic [N-1:0] cy [N];   // carry of row r, column c, weight r + c + 1
  logic [N:0]   rc;       // ripple carry of the lower section; rc[N] is
                          // always 0 because x*y < 2^(2N), so it is not used

  for (genvar r = 0; r < N; r++) begin : g_pp
    assign pp[r] = x & {N{y[r]}};
  end

  assign s[0]  = pp[0];
  assign cy[0] = '0;
  assign z[0]  = s[0][0];

  // Top (r = 1) and middle (r = 2 .. N-1) sections.
  for (genvar r = 1; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_cell
      logic sin;
      if (c < N-1) begin : g_in
        assign sin = s[r-1][c+1];
      end else begin : g_top
        assign sin = 1'b0;
      end
      full_adder u_fa (
        .a (pp[r][c]),
        .b (sin),
        .ci(cy[r-1][c]),
        .s (s[r][c]),
        .co(cy[r][c])
      );
    end
    assign z[r] = s[r][0];
  end

  // Lower section: ripple-carry merge, product bits N .. 2N-1.
  assign rc[0] = 1'b0;
  for (genvar k = 0; k < N; k++) begin : g_low
    logic sin;
    if (k < N-1) begin : g_in
      assign sin = s[N-1][k+1];
    end else begin : g_top
      assign sin = 1'b0;
    end
    full_adder u_fa (
      .a (sin),
      .b (cy[N-1][k]),
      .ci(rc[k]),
      .s (z[N+k]),
      .co(rc[k+1])
    );
  end

endmodule
