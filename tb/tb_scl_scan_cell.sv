// tb_scl_scan_cell: checks the level-sensitive scan cell.
// A chain of four cells is built here.  Test mode: values shifted in with
// the two scan clocks (pulse l, then pulse ci_l) must come out of the last
// cell four shifts later, with 0s and 1s alike; sleep clears the registers
// but not the master latches.  Normal mode: each cell is an SCL register on
// din (set and hold, cleared by sleep).
`timescale 1ns/1ps
module tb_scl_scan_cell;
  localparam int N = 4;
  logic [N-1:0] din, dout;
  logic [N:0] chain;
  logic m, l, ci_l, s;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < N; k++) begin : g_c
    scl_scan_cell u (.din(din[k]), .sin(chain[k]), .m(m), .l(l), .ci_l(ci_l),
                     .s(s), .dout(dout[k]));
    assign chain[k+1] = dout[k];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic shift1(input logic b);
    chain[0] = b;
    #1 l = 1; #1 l = 0; #1 ci_l = 1; #1 ci_l = 0; #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] stream;
    logic [N-1:0] v;
    din = '0; m = 1; l = 0; ci_l = 0; s = 1; chain[0] = 0;
    #1 s = 0;
    check(dout == '0, "registers cleared");
    // shift a random stream through; output lags input by N shifts
    stream = {$urandom(), $urandom()};
    for (int i = 0; i < 64; i++) begin
      shift1(stream[i]);
      if (i >= N - 1) check(dout[N-1] == stream[i-N+1], $sformatf("shift %0d", i));
    end
    // parallel view: last N bits shifted sit in the chain, newest in cell 0
    for (int k = 0; k < N; k++) v[k] = stream[63-k];
    check(dout == v, "chain contents");
    // sleep clears registers; the master latches keep their value
    s = 1; #1 s = 0; #1;
    check(dout == '0, "sleep clears all registers in test mode");
    #1 ci_l = 1; #1 ci_l = 0; #1;
    check(dout[N-1:1] == v[N-2:0], "master latches kept across sleep");
    // normal mode: SCL register behaviour on din
    m = 0; s = 1; #1 s = 0; #1;
    din = 4'b1010; #1 din = 4'b0000; #1;
    check(dout == 4'b1010, "normal mode set and hold");
    din = 4'b0101; #1;
    check(dout == 4'b1111, "normal mode only sets");
    l = 1; chain[0] = 0; #1 l = 0; #1;
    check(dout == 4'b1111, "scan clock ignored in normal mode");
    s = 1; #1;
    check(dout == 4'b0000, "normal mode sleep clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
