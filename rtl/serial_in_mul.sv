// serial_in_mul: MSB-first bit-serial-in multiplier over GF(2^M).
//
// It multiplies a parallel operand C, captured on load, by an operand X
// whose coordinates arrive one per cycle, most significant first. Each
// valid bit does one step of Horner's rule:
//   Z <- (x * Z mod F) ^ (x_bit ? C : 0)
// so after the M bits x_(M-1) .. x_0 the register holds Z = X*C mod F.
// Multiplying by x is a one-place shift with the outgoing top bit folded
// back by the field polynomial POLY.
//
// Interface: load clears Z and captures c (load and bit_valid are never
// high together in this design; load wins). bit_valid/bit_in feed one
// coordinate per cycle; z is the registered accumulator.
//
// The MSB-first bit-level scheme is one of the two classic schemes the
// text names; using it as the second stage of the hybrid-double
// multiplier is this design's reading of that architecture.
module serial_in_mul #(
  parameter int         M    = gf2m_pkg::M163,
  parameter logic [M:0] POLY = gf2m_pkg::POLY163
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] c,
  input  logic         bit_valid,
  input  logic         bit_in,
  output logic [M-1:0] z
);

  logic [M-1:0] c_r;
  logic [M-1:0] z_x;   // x * Z mod F

  assign z_x = (z << 1) ^ (z[M-1] ? POLY[M-1:0] : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_r <= '0;
      z   <= '0;
    end else if (load) begin
      c_r <= c;
      z   <= '0;
    end else if (bit_valid) begin
      z   <= z_x ^ (bit_in ? c_r : '0);
    end
  end

endmodule
