// tb_chain_counter: checks the chain-carry counter against a plain integer
// count over two full wraps, with random enable gaps and clears.
module tb_chain_counter;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [W-1:0] q;
  int checks = 0, failures = 0;
  int unsigned model = 0;

  chain_counter #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 1200; cyc++) begin
      @(negedge clk);
      if (q !== W'(model)) begin
        failures++;
        $display("count mismatch at cycle %0d: q=%0d expected %0d", cyc, q, model);
      end
      checks++;
      clr = (cyc == 700);
      en  = (cyc < 600) ? 1'b1 : ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
      if (clr)     model = 0;
      else if (en) model = (model + 1) % (1 << W);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
