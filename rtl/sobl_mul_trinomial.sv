// sobl_mul_trinomial: serial-out bit-level (SOBL) Mastrovito multiplier
// over GF(2^M) specialised to an irreducible trinomial F = x^M + x^T + 1.
//
// The product C = A*B mod F is delivered one coordinate per clock cycle,
// most significant first. With a trinomial the Mastrovito row of every
// coordinate reduces to at most five coefficients of the unreduced product
// D = A*B (valid for 1 <= T <= (M+1)/2):
//   c_i = d_i ^ d_(i+M) ^ d_(i+2M-T) ^ [i >= T] (d_(i+M-T) ^ d_(i+2M-2T))
// Terms whose index passes 2M-2 are zero by themselves (the window of B
// runs past its top), so the only control the datapath needs besides the
// counter is the single comparison i >= T, i.e. j <= M-1-T. Each d_n is an
// AND-XOR inner product of A with a window of the shift register P that
// holds B and moves up one place per cycle. Compared with the general
// n-nomial multiplier this uses five fixed inner products and one compare
// instead of per-offset mask tables.
//
// Interface and timing as sobl_mul_nnomial: start accepted while idle, a
// and b captured on that edge, then M cycles of c_valid with c_bit =
// coordinate c_idx (M-1 down to 0), then a one-cycle done pulse.
//
// The serial-out MSB-first scheme, the trinomial specialisation and the
// counter-generated control follow the text; the five-term formula above
// is this design's derivation, and T = 74 for M = 233 is the NIST
// trinomial.
module sobl_mul_trinomial #(
  parameter int M = gf2m_pkg::M233,
  parameter int T = gf2m_pkg::T233,
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

  localparam int PW = 2*M - 1;
  localparam int NT = 5;
  localparam int OFF [NT] = '{0, M, 2*M-T, M-T, 2*M-2*T};

  logic          load, run;
  logic [JW-1:0] j;
  logic [M-1:0]  a_r;
  logic [PW-1:0] p_r;
  logic [NT-1:0] d;
  logic          i_ge_t;

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

  // d[t] = coefficient (i + OFF[t]) of A*B; b_(n-k) sits at p_r[M-1+OFF-k].
  for (genvar t = 0; t < NT; t++) begin : g_term
    logic [M-1:0] win;
    always_comb begin
      for (int k = 0; k < M; k++)
        win[k] = (M-1+OFF[t]-k < PW) ? p_r[M-1+OFF[t]-k] : 1'b0;
    end
    assign d[t] = ^(a_r & win);
  end

  assign c_idx   = JW'(M-1) - j;
  assign i_ge_t  = (j <= JW'(M-1-T));
  assign c_bit   = d[0] ^ d[1] ^ d[2] ^ (i_ge_t & (d[3] ^ d[4]));
  assign c_valid = run;
  assign busy    = run;

  initial begin
    assert (T >= 1 && 2*T <= M+1)
      else $error("sobl_mul_trinomial: needs 1 <= T <= (M+1)/2");
  end

endmodule
