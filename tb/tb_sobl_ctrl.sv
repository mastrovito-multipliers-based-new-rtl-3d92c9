// tb_sobl_ctrl: checks the control sequence of one multiplication: load on
// an idle start, run for exactly M cycles with j counting 0..M-1, last on
// j = M-1, done one cycle later, starts during a run ignored, and a start
// in the done cycle accepted (back-to-back operation).
module tb_sobl_ctrl;
  localparam int M = 163;
  localparam int JW = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic load, run, last, done;
  logic [JW-1:0] j;
  int checks = 0, failures = 0;

  sobl_ctrl #(.M(M)) dut (.clk(clk), .rst_n(rst_n), .start(start), .load(load),
                          .run(run), .last(last), .done(done), .j(j));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (j=%0d)", what, j); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!run && !done && !load, "idle after reset");
    for (int op = 0; op < 3; op++) begin
      start = 1;
      #1;
      check(load, "load on idle start");
      @(negedge clk);
      // hold start high during the first run (op 0) to show it is ignored
      start = (op == 0);
      for (int c = 0; c < M; c++) begin
        check(run, "run high during operation");
        check(j == JW'(c), "counter value");
        check(!load, "no load while running");
        check(last == (c == M-1), "last only on j = M-1");
        check(!done, "no done while running");
        @(negedge clk);
        start = 0;
      end
      check(done && !run, "done one cycle after last");
    end
    @(negedge clk);
    check(!done && !run, "idle after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
