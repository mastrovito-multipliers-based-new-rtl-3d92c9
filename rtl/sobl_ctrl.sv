// sobl_ctrl: control unit of the serial-out bit-level multipliers.
//
// It sequences one multiplication of M clock cycles. A start request seen
// while idle produces the one-cycle load strobe (the datapath captures its
// operands on that edge), clears the clock counter j and sets run. While
// run is high j counts 0, 1, ..., M-1 on the chain-carry counter, one
// product bit per cycle; last marks j = M-1. The cycle after the last one
// done is high for one cycle and the unit is idle again, so a new start
// can be accepted in that same cycle.
//
// Timing: start at cycle 0 (idle) -> run in cycles 1..M -> done in cycle
// M+1. The counter and the load/run/done signals follow the text; the
// start/done handshake is this design's choice.
module sobl_ctrl #(
  parameter int M = 163,
  localparam int JW = gf2m_pkg::count_bits(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          load,
  output logic          run,
  output logic          last,
  output logic          done,
  output logic [JW-1:0] j
);

  logic cnt_clr;

  assign load    = start && !run;
  assign last    = run && (j == JW'(M-1));
  assign cnt_clr = load;

  chain_counter #(.W(JW)) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (cnt_clr),
    .en   (run),
    .q    (j)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= last;
      if (load)      run <= 1'b1;
      else if (last) run <= 1'b0;
    end
  end

  // A load can only happen while idle, and a run lasts exactly M cycles.
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) load |-> !run);
  a_done_after_last: assert property (@(posedge clk) disable iff (!rst_n) last |=> done);

endmodule
