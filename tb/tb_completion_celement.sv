// tb_completion_celement: checks the resettable C-element with inverted
// output against a reference model: sleep = ~c, c follows the inputs when
// they agree and holds when they differ; rst_h forces sleep = 1 and wins
// over rst_l, which forces sleep = 0.
`timescale 1ns/1ps
module tb_completion_celement;
  logic a, b, rst_h, rst_l, sleep;
  logic c_model;
  int checks = 0, failures = 0;

  completion_celement dut (.*);

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
    a = 0; b = 0; rst_l = 0; rst_h = 1;
    #1 check(sleep == 1, "rst_h sleeps");
    rst_h = 0; a = 1; #1 check(sleep == 1, "inputs differ: hold");
    b = 1; #1 check(sleep == 0, "both 1: wake");
    a = 0; #1 check(sleep == 0, "differ: hold awake");
    b = 0; #1 check(sleep == 1, "both 0: sleep");
    rst_l = 1; #1 check(sleep == 0, "rst_l wakes");
    rst_h = 1; #1 check(sleep == 1, "rst_h wins");
    rst_h = 0; rst_l = 0; #1;
    c_model = ~sleep;
    for (int i = 0; i < 400; i++) begin
      {a, b, rst_h, rst_l} = 4'($urandom());
      if ($urandom_range(0, 3) != 0) {rst_h, rst_l} = 2'b00;
      #1;
      if (rst_h) c_model = 0;
      else if (rst_l) c_model = 1;
      else if (a == b) c_model = a;
      check(sleep == ~c_model, $sformatf("random step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
