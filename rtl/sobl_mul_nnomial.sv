// sobl_mul_nnomial: serial-out bit-level (SOBL) Mastrovito multiplier over
// GF(2^M) for any irreducible field polynomial POLY (trinomial,
// pentanomial, ... "n-nomial").
//
// The product C = A*B mod F is delivered one coordinate per clock cycle,
// most significant first: c_(M-1), c_(M-2), ..., c_0. Each coordinate is a
// row of the Mastrovito matrix applied to B, i.e. the polynomial
// multiplication and the reduction done in one step. This design writes
// that row as a sum of coefficients of the unreduced product D = A*B:
//   c_i = XOR over offsets delta of  mask_delta[i] * d_(i+delta),
//   d_n = XOR_k a_k * b_(n-k),
// where mask_delta[i] is coordinate i of x^(i+delta) mod F. Only offsets
// with a non-zero mask get hardware; the masks are worked out at
// elaboration from POLY (gf2m_pkg::offset_mask), so the same code serves
// every field polynomial. Each offset is one AND-XOR inner product of A
// with a window of the register P, which holds B and shifts up by one
// place per cycle, so that the window for d_(i+delta) moves with i. The
// per-cycle selection mask_delta[i] is the extra control the counter j
// (i = M-1-j) provides.
//
// Interface: start is accepted while idle (busy low); a and b are
// captured on that edge. In the following M cycles c_valid is high and
// c_bit is coordinate c_idx of the product (c_idx = M-1 down to 0). done
// pulses in the cycle after the last bit. First bit one cycle after start,
// one bit per cycle, a new start can follow done immediately.
//
// The serial-out, MSB-first, one-bit-per-cycle behaviour and the
// counter-based control follow the text; the offset decomposition of the
// Mastrovito rows and the handshake are this design's own.
module sobl_mul_nnomial #(
  parameter int          M    = gf2m_pkg::M163,
  parameter logic [M:0]  POLY = gf2m_pkg::POLY163,
  localparam int JW = gf2m_pkg::count_bits(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [M-1:0]  a,
  input  logic [M-1:0]  b,
  output logic          busy,
  output logic          c_valid,
  output logic          c_bit,
  output logic [JW-1:0] c_idx,
  output logic          done
);

  localparam int PW = 2*M - 1;   // B shifted up by at most M-1 places
  localparam int ND = 2*M - 1;   // offsets 0 .. 2M-2

  logic          load, run;
  logic [JW-1:0] j;
  logic [M-1:0]  a_r;
  logic [PW-1:0] p_r;
  logic [ND-1:0] term;

  sobl_ctrl #(.M(M)) u_ctrl (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start),
    .load (load),
    .run  (run),
    .last (),
    .done (done),
    .j    (j)
  );

  // Operand registers. In cycle with counter j (output index i = M-1-j),
  // p_r[q] = b_(q - j), so b_(n-k) with n = i + delta sits at
  // p_r[M-1+delta-k].
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r <= '0;
      p_r <= '0;
    end else if (load) begin
      a_r <= a;
      p_r <= PW'(b);
    end else if (run) begin
      p_r <= p_r << 1;
    end
  end

  assign c_idx = JW'(M-1) - j;

  for (genvar d = 0; d < ND; d++) begin : g_off
    localparam logic [gf2m_pkg::MAXM-1:0] MASK =
        gf2m_pkg::offset_mask(M, (gf2m_pkg::MAXM+1)'(POLY), d);
    if (MASK[M-1:0] != '0) begin : g_used
      logic [M-1:0] win;
      always_comb begin
        for (int k = 0; k < M; k++)
          win[k] = (M-1+d-k < PW) ? p_r[M-1+d-k] : 1'b0;
      end
      assign term[d] = MASK[c_idx] & (^(a_r & win));
    end else begin : g_unused
      assign term[d] = 1'b0;
    end
  end

  assign c_bit   = ^term;
  assign c_valid = run;
  assign busy    = run;

  initial begin
    assert (M <= gf2m_pkg::MAXM && POLY[M] && POLY[0])
      else $error("sobl_mul_nnomial: POLY must have degree M <= MAXM and a constant term");
  end

endmodule
