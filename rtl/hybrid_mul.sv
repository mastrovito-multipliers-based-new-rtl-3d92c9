// hybrid_mul: top level. Three independent units side by side:
//   u_hd163 - hybrid-double multiplier Z = A*B*C over GF(2^163), first
//             stage the general n-nomial serial-out Mastrovito multiplier
//             with the pentanomial x^163 + x^7 + x^6 + x^3 + 1;
//   u_hd233 - hybrid-double multiplier over GF(2^233), first stage the
//             trinomial-specialised multiplier for x^233 + x^74 + 1;
//   u_sys   - the 8 x 8 unsigned array ("systolic") multiplier.
// Each GF unit has its own start (an "enable" request, accepted while the
// unit is idle), operands, serial A*B stream, done pulse and result; see
// hybrid_double_mul for the timing (result M+1 cycles after start). The
// array multiplier is combinational. The two fields and the three units
// follow the text; the reduction polynomials and the handshake are this
// design's choices. All units share one clock and active-low reset.
module hybrid_mul (
  input  logic         clk,
  input  logic         rst_n,
  // GF(2^163)
  input  logic         enable163,
  input  logic [162:0] a163,
  input  logic [162:0] b163,
  input  logic [162:0] c163,
  output logic         busy163,
  output logic         ab_valid163,
  output logic         ab_bit163,
  output logic [7:0]   ab_idx163,
  output logic         done163,
  output logic [162:0] z163,
  // GF(2^233)
  input  logic         enable233,
  input  logic [232:0] a233,
  input  logic [232:0] b233,
  input  logic [232:0] c233,
  output logic         busy233,
  output logic         ab_valid233,
  output logic         ab_bit233,
  output logic [7:0]   ab_idx233,
  output logic         done233,
  output logic [232:0] z233,
  // 8-bit array multiplier
  input  logic [7:0]   x,
  input  logic [7:0]   y,
  output logic [15:0]  z
);

  import gf2m_pkg::*;

  localparam logic [M233:0] POLY233 =
      ((M233+1)'(1) << M233) | ((M233+1)'(1) << T233) | (M233+1)'(1);

  hybrid_double_mul #(.M(M163), .POLY(POLY163), .TRINOMIAL(1'b0)) u_hd163 (
    .clk(clk), .rst_n(rst_n), .start(enable163),
    .a(a163), .b(b163), .c(c163),
    .busy(busy163), .ab_valid(ab_valid163), .ab_bit(ab_bit163), .ab_idx(ab_idx163),
    .done(done163), .z(z163)
  );

  hybrid_double_mul #(.M(M233), .POLY(POLY233), .TRINOMIAL(1'b1), .T(T233)) u_hd233 (
    .clk(clk), .rst_n(rst_n), .start(enable233),
    .a(a233), .b(b233), .c(c233),
    .busy(busy233), .ab_valid(ab_valid233), .ab_bit(ab_bit233), .ab_idx(ab_idx233),
    .done(done233), .z(z233)
  );

  systolic_multiplier #(.N(8)) u_sys (
    .x(x),
    .y(y),
    .z(z)
  );

endmodule
