// tb_scl_fault_coverage: stuck-at fault injection on the SCL S-box and the
// three-step scan test that detects the faults.
//
// Fault list (each injected alone by forcing the net):
//   - every register sleep fork (32 cells), stuck-at-0 and stuck-at-1;
//   - every register data input, i.e. every F1/F2 output rail, stuck-at-0
//     and stuck-at-1;
//   - the completion detector outputs CD0..CD2 and the completion
//     C-element outputs sleep1, sleep2, stuck-at-0 and stuck-at-1;
//   - the sleep input of each combinational block, stuck-at-0 and
//     stuck-at-1.  Stuck-at-0 there only leaves the block awake while its
//     register sleeps: a power fault with no logic effect, expected to stay
//     undetected.
// Test program applied to each fault:
//   1. test mode: a pattern and its complement are shifted through the
//      chain and must come back unchanged;
//   2. sleep-fork test: all 1s shifted in, rst_h pulsed between periods of
//      rst_l, the shifted-out sequence must be all 0s (a 1 marks a fork
//      stuck at 0);
//   3. normal mode: two bytes are taken through complete DATA/NULL
//      handshakes; a handshake that hangs or a wrong result is a detection;
//   4. with sleep disabled (rst_l) the combinational blocks are plain
//      Boolean logic: patterns are scanned into R1 (for F2) or applied at the
//      primary inputs (for F1), captured in one pulse of normal mode and
//      shifted out.
// Finally four forks are held at 0 together: the sleep-fork test must return
// exactly four 1s, at their positions.
// The fault-free circuit must pass every step; every listed fault must be
// caught by at least one step, except the two power-only faults.  The coverage is printed.
`timescale 1ns/1ps
module tb_scl_fault_coverage;

  logic [7:0] in0, in1, out0, out1;
  logic ko, ki, rst_h, rst_l, m, l, ci_l, sin, sout;

  scl_sbox_top dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- reference S-box halves ----------------------------------------------
  function automatic logic [7:0] ref_mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction
  function automatic logic [7:0] ref_inv(input logic [7:0] a);
    if (a == 0) return 8'h00;
    for (int y = 1; y < 256; y++) if (ref_mul(a, 8'(y)) == 8'h01) return 8'(y);
    return 8'h00;
  endfunction
  function automatic logic [7:0] rotl(input logic [7:0] x, input int n);
    return (x << n) | (x >> (8 - n));
  endfunction
  function automatic logic [7:0] ref_aff(input logic [7:0] x);
    return x ^ rotl(x, 1) ^ rotl(x, 2) ^ rotl(x, 3) ^ rotl(x, 4) ^ 8'h63;
  endfunction
  function automatic logic [31:0] pack_regs(input logic [7:0] r1, input logic [7:0] r1_n,
                                            input logic [7:0] r2, input logic [7:0] r2_n);
    logic [31:0] v;
    for (int b = 0; b < 8; b++) begin
      v[2*b] = r1_n[b];     v[2*b+1] = r1[b];
      v[16+2*b] = r2_n[b];  v[16+2*b+1] = r2[b];
    end
    return v;
  endfunction

  // ---- fault injection -------------------------------------------------------
  logic [31:0] f_s0, f_s1, f_d0, f_d1;   // sleep forks / data inputs
  logic [4:0]  f_c0, f_c1;               // done0, done1, done2, sleep1, sleep2
  logic [1:0]  f_g0, f_g1;               // sleep inputs of F1, F2

  for (genvar k = 0; k < 32; k++) begin : g_inj
    always @(f_s0[k] or f_s1[k])
      if (f_s0[k]) force dut.cell_s[k] = 1'b0;
      else if (f_s1[k]) force dut.cell_s[k] = 1'b1;
      else release dut.cell_s[k];
    always @(f_d0[k] or f_d1[k])
      if (f_d0[k]) force dut.cell_din[k] = 1'b0;
      else if (f_d1[k]) force dut.cell_din[k] = 1'b1;
      else release dut.cell_din[k];
  end
  always @(f_c0[0] or f_c1[0])
    if (f_c0[0]) force dut.done0 = 1'b0; else if (f_c1[0]) force dut.done0 = 1'b1; else release dut.done0;
  always @(f_c0[1] or f_c1[1])
    if (f_c0[1]) force dut.done1 = 1'b0; else if (f_c1[1]) force dut.done1 = 1'b1; else release dut.done1;
  always @(f_c0[2] or f_c1[2])
    if (f_c0[2]) force dut.done2 = 1'b0; else if (f_c1[2]) force dut.done2 = 1'b1; else release dut.done2;
  always @(f_c0[3] or f_c1[3])
    if (f_c0[3]) force dut.sleep1 = 1'b0; else if (f_c1[3]) force dut.sleep1 = 1'b1; else release dut.sleep1;
  always @(f_c0[4] or f_c1[4])
    if (f_c0[4]) force dut.sleep2 = 1'b0; else if (f_c1[4]) force dut.sleep2 = 1'b1; else release dut.sleep2;

  always @(f_g0[0] or f_g1[0])
    if (f_g0[0]) force dut.u_f1.sleep = 1'b0; else if (f_g1[0]) force dut.u_f1.sleep = 1'b1; else release dut.u_f1.sleep;
  always @(f_g0[1] or f_g1[1])
    if (f_g0[1]) force dut.u_f2.sleep = 1'b0; else if (f_g1[1]) force dut.u_f2.sleep = 1'b1; else release dut.u_f2.sleep;

  // ---- test program ------------------------------------------------------------
  task automatic shift(input logic [31:0] vin, output logic [31:0] vout);
    for (int i = 31; i >= 0; i--) begin
      vout[i] = sout;
      sin = vin[i];
      #1 l = 1; #1 l = 0; #1 ci_l = 1; #1 ci_l = 0; #1;
    end
  endtask

  // waits up to 100 ns for cond; returns 1 on time-out
  task automatic wait_ko(input logic want, output bit timed_out);
    int n = 0;
    while (ko !== want && n < 100) begin #1; n++; end
    timed_out = (ko !== want);
  endtask
  task automatic wait_out(input logic [7:0] want_or, output bit timed_out);
    int n = 0;
    while ((out0 | out1) !== want_or && n < 100) begin #1; n++; end
    timed_out = ((out0 | out1) !== want_or);
  endtask

  localparam logic [7:0] F2_PAT [8] = '{8'h00, 8'hff, 8'h0f, 8'hf0, 8'h55, 8'haa, 8'h33, 8'hcc};
  localparam logic [7:0] F1_PAT [8] = '{8'h00, 8'h01, 8'h53, 8'hac, 8'hff, 8'h80, 8'h3c, 8'he7};
  localparam logic [7:0] NORMAL_PAT [2] = '{8'h53, 8'hac};

  // returns a bit per step that saw a difference
  task automatic run_tests(output logic [3:0] seen);
    logic [31:0] got, pat;
    bit to;
    logic [7:0] e;
    seen = '0;
    // step 1: chain integrity
    rst_l = 0; m = 1; rst_h = 1; #2 rst_h = 0; rst_l = 1; #2;
    for (int r = 0; r < 2; r++) begin
      pat = (r == 0) ? 32'ha5c3_5a3c : ~32'ha5c3_5a3c;
      shift(pat, got);
      shift(32'h0, got);
      if (got !== pat) seen[0] = 1;
    end
    // step 2: sleep forks stuck-at-0
    shift('1, got);
    rst_l = 0; rst_h = 1; #2 rst_h = 0; rst_l = 1; #2;
    shift('0, got);
    if (got !== 32'h0) seen[1] = 1;
    // step 3: normal mode, full handshakes
    m = 0; rst_l = 0; rst_h = 1; #2 rst_h = 0; #2;
    ki = 1;
    foreach (NORMAL_PAT[i]) begin
      e = ref_aff(ref_inv(NORMAL_PAT[i]));
      in1 = NORMAL_PAT[i]; in0 = ~NORMAL_PAT[i];
      wait_ko(1'b0, to);         if (to) seen[2] = 1;
      wait_out(8'hff, to);       if (to) seen[2] = 1;
      #1 if (out1 !== e || out0 !== ~e) seen[2] = 1;
      in1 = '0; in0 = '0;
      wait_ko(1'b1, to);         if (to) seen[2] = 1;
      ki = 0;
      wait_out(8'h00, to);       if (to) seen[2] = 1;
      ki = 1;
      #2;
    end
    // step 4: combinational patterns with sleep disabled
    rst_h = 1; #2 rst_h = 0; rst_l = 1; m = 1; in0 = '0; in1 = '0; #2;
    foreach (F2_PAT[i]) begin
      e = F2_PAT[i];
      shift(pack_regs(e, ~e, 8'h00, 8'h00), got);
      m = 0; #2 m = 1; #1;
      shift('0, got);
      if (got !== pack_regs(e, ~e, ref_aff(e), ~ref_aff(e))) seen[3] = 1;
    end
    foreach (F1_PAT[i]) begin
      shift('0, got);
      in1 = F1_PAT[i]; in0 = ~F1_PAT[i];
      m = 0; #2 m = 1; #1;
      in0 = '0; in1 = '0;
      shift('0, got);
      if (got[15:0] !== pack_regs(ref_inv(F1_PAT[i]), ~ref_inv(F1_PAT[i]), 8'h00, 8'h00) & 32'hffff)
        seen[3] = 1;
    end
    rst_l = 0; m = 0;
  endtask

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_faults = 0, n_detected = 0;
  int by_step [4] = '{0, 0, 0, 0};

  task automatic one_fault(input string name, input bit expect_detect = 1);
    logic [3:0] seen;
    #1;
    run_tests(seen);
    n_faults++;
    if (seen != 0) n_detected++;
    for (int s = 0; s < 4; s++) if (seen[s]) by_step[s]++;
    if (expect_detect) check(seen != 0, $sformatf("fault %s not detected", name));
    else begin
      check(seen == 0, $sformatf("fault %s unexpectedly changed the behaviour", name));
      $display("not detected (no logic effect): %s", name);
    end
    f_s0 = '0; f_s1 = '0; f_d0 = '0; f_d1 = '0; f_c0 = '0; f_c1 = '0; f_g0 = '0; f_g1 = '0;
    #1;
  endtask

  initial begin
    logic [3:0] seen;
    in0 = '0; in1 = '0; ki = 1; m = 0; l = 0; ci_l = 0; sin = 0;
    f_s0 = '0; f_s1 = '0; f_d0 = '0; f_d1 = '0; f_c0 = '0; f_c1 = '0; f_g0 = '0; f_g1 = '0;
    rst_l = 0; rst_h = 1; #5 rst_h = 0; #2;

    // fault-free circuit passes every step
    run_tests(seen);
    check(seen == 0, $sformatf("fault-free circuit flagged by steps %b", seen));

    for (int k = 0; k < 32; k++) begin
      f_s0[k] = 1; one_fault($sformatf("sleep fork %0d sa0", k));
      f_s1[k] = 1; one_fault($sformatf("sleep fork %0d sa1", k));
      f_d0[k] = 1; one_fault($sformatf("data input %0d sa0", k));
      f_d1[k] = 1; one_fault($sformatf("data input %0d sa1", k));
    end
    for (int k = 0; k < 5; k++) begin
      f_c0[k] = 1; one_fault($sformatf("control net %0d sa0", k));
      f_c1[k] = 1; one_fault($sformatf("control net %0d sa1", k));
    end

    // sleep fork of a combinational block: stuck-at-1 holds the block at NULL;
    // stuck-at-0 only keeps the block awake (its register is still slept),
    // which costs power but changes no value, so no logic test can see it
    for (int k = 0; k < 2; k++) begin
      f_g1[k] = 1; one_fault($sformatf("F%0d sleep input sa1", k + 1));
      f_g0[k] = 1; one_fault($sformatf("F%0d sleep input sa0", k + 1), 0);
    end

    // several forks stuck at 0 at once: the number of 1s shifted out is the
    // number of faulty forks
    begin
      logic [31:0] got, faulty;
      faulty = 32'h8001_0410;
      f_s0 = faulty;
      #1;
      rst_l = 0; m = 1; rst_h = 1; #2 rst_h = 0; rst_l = 1; #2;
      shift('1, got);
      rst_l = 0; rst_h = 1; #2 rst_h = 0; rst_l = 1; #2;
      shift('0, got);
      check(got == faulty && $countones(got) == 4,
            $sformatf("four forks stuck at 0: read %h", got));
      f_s0 = '0;
      rst_l = 0; m = 0;
      #1;
    end

    $display("fault coverage: %0d of %0d detected; by step: chain=%0d fork=%0d handshake=%0d patterns=%0d",
             n_detected, n_faults, by_step[0], by_step[1], by_step[2], by_step[3]);
    check(by_step[1] > 0, "sleep-fork test detected a fault");
    check(by_step[2] > 0, "handshake test detected a fault");
    check(by_step[3] > 0, "pattern test detected a fault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
