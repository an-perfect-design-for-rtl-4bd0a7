// tb_scl_register: checks one rail of the SCL register in both modes.
// Normal mode: a 1 on d sets the output, which then holds when d returns to
// 0; sleep clears it and blocks setting.  Test mode: the output copies
// scan_d (0 or 1) only while ci_l is high and ignores d; sleep still clears.
// Expected values come from a small reference model kept in the testbench,
// driven with random stimulus after the directed steps.
`timescale 1ns/1ps
module tb_scl_register;
  logic d, s, m, scan_d, ci_l, q;
  int checks = 0, failures = 0;
  logic model;

  scl_register dut (.*);

  task automatic expect_q(input logic e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL: %s: q=%b want %b", what, q, e);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0; m = 0; scan_d = 0; ci_l = 0; s = 1;
    #1 expect_q(0, "sleep clears");
    s = 0; #1 expect_q(0, "awake, no data");
    d = 1; #1 expect_q(1, "set by data");
    d = 0; #1 expect_q(1, "holds after data leaves");
    s = 1; #1 expect_q(0, "cleared by sleep");
    d = 1; #1 expect_q(0, "sleep blocks set");
    s = 0; #1 expect_q(1, "set on wake");
    // test mode
    m = 1; d = 0; s = 1; #1 expect_q(0, "test mode sleep clears");
    s = 0; scan_d = 1; #1 expect_q(0, "no strobe, no load");
    ci_l = 1; #1 expect_q(1, "strobe loads 1");
    scan_d = 0; #1 expect_q(0, "transparent while strobe high");
    ci_l = 0; scan_d = 1; #1 expect_q(0, "holds 0 after strobe");
    d = 1; #1 expect_q(0, "d ignored in test mode");
    ci_l = 1; #1 ci_l = 0; #1 expect_q(1, "loaded 1");
    scan_d = 0; s = 1; #1 expect_q(0, "sleep clears loaded 1");
    // random run against a reference model
    s = 1; #1 model = 0; s = 0;
    for (int i = 0; i < 300; i++) begin
      {d, s, m, scan_d, ci_l} = 5'($urandom());
      #1;
      if (s) model = 0;
      else if (m && ci_l) model = scan_d;
      else if (!m && d) model = 1;
      expect_q(model, $sformatf("random step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
