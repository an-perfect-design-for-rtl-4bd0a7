// tb_completion_detector: checks the dual-rail completion detector.
// done must rise only when every bit has one rail high, fall only when every
// rail is low, and hold through partial words in either direction.  Words
// fill and empty bit by bit in random order; rst_h clears the output.
`timescale 1ns/1ps
module tb_completion_detector;
  localparam int N = 8;
  logic [N-1:0] rail0, rail1;
  logic rst_h, done;
  int checks = 0, failures = 0;

  completion_detector #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [N];
    logic [N-1:0] val;
    rail0 = '0; rail1 = '0; rst_h = 1;
    #1 rst_h = 0; #1;
    check(done == 0, "reset");
    for (int r = 0; r < 20; r++) begin
      val = N'($urandom());
      foreach (order[i]) order[i] = i;
      order.shuffle();
      // fill one bit at a time
      for (int i = 0; i < N; i++) begin
        if (val[order[i]]) rail1[order[i]] = 1; else rail0[order[i]] = 1;
        #1;
        check(done == (i == N - 1), $sformatf("fill %0d/%0d", i + 1, N));
      end
      order.shuffle();
      // empty one bit at a time
      for (int i = 0; i < N; i++) begin
        rail0[order[i]] = 0; rail1[order[i]] = 0;
        #1;
        check(done == (i != N - 1), $sformatf("empty %0d/%0d", i + 1, N));
      end
    end
    rail1 = '1; #1 check(done == 1, "complete");
    rst_h = 1; #1 check(done == 0, "rst_h clears"); rst_h = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
