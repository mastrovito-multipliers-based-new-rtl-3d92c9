// chain_counter: chain-carry (serial-carry) synchronous binary up-counter.
//
// Every bit is a toggle register clocked by the common clock. Bit 0
// toggles on every enabled cycle; bit k toggles when all lower bits are 1.
// The toggle enables are formed by a chain of two-input AND gates,
// t_(k+1) = t_k & q_k: each bit k from 1 to W-2 has one gate forming the
// carry into the next bit, the first bit needs none (its carry is q_0
// itself) and the last bit needs none (no carry out), so the chain holds
// W-2 gates, as the text describes. The carry ripples through
// the chain, so the settling time of the enables grows with the width;
// this is the counter the text describes for the multiplier's controller.
//
// Ports: clr clears the count synchronously (it wins over en); en lets the
// count advance by one at the clock edge. rst_n is an asynchronous,
// active-low reset to zero. q is the current count, wrapping at 2^W.
module chain_counter #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] q
);

  logic [W-1:0] t;   // toggle enable of each bit

  assign t[0] = 1'b1;
  for (genvar k = 1; k < W; k++) begin : g_chain
    if (k == 1) begin : g_first
      assign t[k] = q[0];
    end else begin : g_and
      assign t[k] = t[k-1] & q[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= q ^ t;
  end

endmodule
