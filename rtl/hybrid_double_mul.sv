// hybrid_double_mul: hybrid-double multiplier, Z = A * B * C over GF(2^M).
//
// Two multiplications are chained without waiting for the first to
// finish. A serial-out bit-level Mastrovito multiplier computes A*B and
// emits its coordinates most significant first, one per cycle; each bit
// goes straight into an MSB-first serial-in multiplier that accumulates
// (A*B)*C by Horner's rule. Both run under the same M-cycle count, so the
// double product is ready M+1 cycles after start, where two multipliers
// used one after the other would need about 2M cycles.
//
// TRINOMIAL selects the first stage: 1 uses the trinomial-specialised
// multiplier for F = x^M + x^T + 1, 0 the general n-nomial one for POLY.
// POLY must describe the same field in both cases.
//
// Interface: start is accepted while busy is low; a, b and c are captured
// on that edge. ab_valid/ab_bit/ab_idx expose the serial A*B stream.
// done pulses for one cycle M+1 cycles after the accepted start; z holds
// A*B*C from then until the next start.
//
// The text names the hybrid-double architecture built from the proposed
// serial-out multipliers; the pairing with an MSB-first serial-in stage is
// this design's reading of it.
module hybrid_double_mul #(
  parameter int         M         = gf2m_pkg::M163,
  parameter logic [M:0] POLY      = gf2m_pkg::POLY163,
  parameter bit         TRINOMIAL = 1'b0,
  parameter int         T         = 1,
  localparam int JW = gf2m_pkg::count_bits(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [M-1:0]  a,
  input  logic [M-1:0]  b,
  input  logic [M-1:0]  c,
  output logic          busy,
  output logic          ab_valid,
  output logic          ab_bit,
  output logic [JW-1:0] ab_idx,
  output logic          done,
  output logic [M-1:0]  z
);

  logic load;

  assign load = start && !busy;

  if (TRINOMIAL) begin : g_tri
    sobl_mul_trinomial #(.M(M), .T(T)) u_sobl (
      .clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
      .busy(busy), .c_valid(ab_valid), .c_bit(ab_bit), .c_idx(ab_idx), .done(done)
    );
  end else begin : g_nnom
    sobl_mul_nnomial #(.M(M), .POLY(POLY)) u_sobl (
      .clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
      .busy(busy), .c_valid(ab_valid), .c_bit(ab_bit), .c_idx(ab_idx), .done(done)
    );
  end

  serial_in_mul #(.M(M), .POLY(POLY)) u_sin (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (load),
    .c        (c),
    .bit_valid(ab_valid),
    .bit_in   (ab_bit),
    .z        (z)
  );

endmodule
