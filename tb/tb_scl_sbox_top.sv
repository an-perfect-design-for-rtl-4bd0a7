// tb_scl_sbox_top: end-to-end test of the SCL dual-rail AES S-box with scan.
//
// Normal mode: a sender and a receiver process run the four-phase
// DATA/NULL handshake on the two channels with random gaps; all 256 byte
// values go through and every result is compared with an S-box computed here
// by brute-force inversion and the rotate form of the affine map.  A slow
// receiver stalls the next byte at the input: stage 1 may not wake while
// stage 2 still holds DATA.
// Test mode, with the scan controls:
//   - chain integrity: a random 32-bit pattern is shifted in and back out;
//   - sleep-fork test: all 1s shifted in, rst_h pulsed, all 0s expected out;
//     then one cell's sleep fork is forced stuck-at-0 and exactly that 1 must
//     appear in the output sequence;
//   - capture: with sleep disabled (rst_l) the registers capture F1 and F2
//     outputs in one pulse of normal mode, then the result is shifted out.
// In normal mode a monitor checks that no dual-rail word ever has both rails
// of a bit high.
// Each mechanism is counted; one that never happened is a failure.
`timescale 1ns/1ps
module tb_scl_sbox_top;

  logic [7:0] in0, in1, out0, out1;
  logic ko, ki, rst_h, rst_l, m, l, ci_l, sin, sout;

  scl_sbox_top dut (.*);

  localparam int FAULT_POS [4] = '{3, 12, 17, 30};

  int checks = 0, failures = 0;
  int n_bytes = 0, n_stall = 0, n_sleep1 = 0, n_sleep2 = 0;
  int n_scan = 0, n_fork = 0, n_fork_fault = 0, n_capture = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- reference S-box ----------------------------------------------------
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

  // ---- watchdog -------------------------------------------------------------
  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism monitors ---------------------------------------------------
  // dual-rail rule in normal mode: no bit may have both rails high, in the
  // registers or at the outputs of the combinational blocks
  always @(dut.r1_0 or dut.r1_1 or dut.f2_0 or dut.f2_1 or out0 or out1)
    if (!m && !rst_l)
      check(((dut.r1_0 & dut.r1_1) | (dut.f2_0 & dut.f2_1) | (out0 & out1)) == 0,
            "dual-rail word with both rails high");

  always @(posedge dut.sleep1) n_sleep1++;
  always @(posedge dut.sleep2) n_sleep2++;

  // ---- scan helpers ---------------------------------------------------------
  task automatic shift(input logic [31:0] vin, output logic [31:0] vout);
    for (int i = 31; i >= 0; i--) begin
      vout[i] = sout;
      sin = vin[i];
      #1 l = 1; #1 l = 0; #1 ci_l = 1; #1 ci_l = 0; #1;
    end
  endtask

  function automatic logic [31:0] pack_regs(input logic [7:0] r1_1, input logic [7:0] r1_0,
                                            input logic [7:0] r2_1, input logic [7:0] r2_0);
    logic [31:0] v;
    for (int b = 0; b < 8; b++) begin
      v[2*b] = r1_0[b];      v[2*b+1] = r1_1[b];
      v[16+2*b] = r2_0[b];   v[16+2*b+1] = r2_1[b];
    end
    return v;
  endfunction

  // ---- normal-mode channel processes ---------------------------------------
  logic [7:0] sent_q [$];
  bit sender_done;

  task automatic sender();
    for (int v = 0; v < 256; v++) begin
      #($urandom_range(0, 3));
      in1 = 8'(v); in0 = ~8'(v);
      sent_q.push_back(8'(v));
      while (!(ko == 1'b0)) #1;
      #($urandom_range(0, 3));
      in1 = '0; in0 = '0;
      while (!(ko == 1'b1)) #1;
    end
    sender_done = 1;
  endtask

  task automatic receiver();
    logic [7:0] exp;
    for (int v = 0; v < 256; v++) begin
      while (!((out0 | out1) == 8'hff)) #1;
      #1;
      exp = ref_aff(ref_inv(sent_q.pop_front()));
      check(out1 == exp && out0 == ~exp,
            $sformatf("byte %0d: got %h/%h want %h", v, out1, out0, exp));
      n_bytes++;
      // every fourth byte the receiver is slow, so the next byte stalls
      #((v % 4 == 0) ? 20 : $urandom_range(0, 3));
      // stall: the next byte waits at the input while R1 stays asleep,
      // because R2 still holds the byte the receiver has not acknowledged
      if (dut.done0 && !dut.done1 && dut.done2 && dut.sleep1) n_stall++;
      ki = 0;
      while (!((out0 | out1) == 8'h00)) #1;
      #($urandom_range(0, 3));
      ki = 1;
    end
  endtask

  initial begin
    logic [31:0] pat, got;
    int ones, k;
    in0 = '0; in1 = '0; ki = 1; m = 0; l = 0; ci_l = 0; sin = 0;
    rst_h = 1; rst_l = 0;
    #5 rst_h = 0;
    #2;
    check(out0 == 0 && out1 == 0 && ko == 1, "after reset: outputs NULL, ko = 1");

    // ---- normal operation ----
    fork
      sender();
      receiver();
    join
    check(n_bytes == 256, "all 256 bytes received");

    // ---- test mode: chain integrity ----
    rst_h = 1; #2 rst_h = 0; rst_l = 1; m = 1; #2;
    for (int r = 0; r < 3; r++) begin
      pat = $urandom();
      shift(pat, got);
      shift(32'h0, got);
      check(got == pat, $sformatf("scan round trip %h -> %h", pat, got));
      n_scan++;
    end

    // ---- sleep-fork stuck-at-0 test, fault free ----
    shift('1, got);
    rst_l = 0; rst_h = 1; #2 rst_h = 0; rst_l = 1; #2;
    shift('0, got);
    check(got == 32'h0, $sformatf("sleep-fork test fault free: %h", got));
    n_fork++;

    // ---- sleep-fork test with injected stuck-at-0 faults ----
    for (int r = 0; r < 4; r++) begin
      k = FAULT_POS[r];
      case (r)
        0: force dut.cell_s[3]  = 1'b0;
        1: force dut.cell_s[12] = 1'b0;
        2: force dut.cell_s[17] = 1'b0;
        default: force dut.cell_s[30] = 1'b0;
      endcase
      shift('1, got);
      rst_l = 0; rst_h = 1; #2 rst_h = 0; rst_l = 1; #2;
      shift('0, got);
      case (r)
        0: release dut.cell_s[3];
        1: release dut.cell_s[12];
        2: release dut.cell_s[17];
        default: release dut.cell_s[30];
      endcase
      ones = $countones(got);
      check(ones == 1 && got[k], $sformatf("fork %0d stuck-at-0: read %h", k, got));
      n_fork_fault++;
    end

    // ---- capture: F2 response to a scanned-in R1 value ----
    for (int r = 0; r < 8; r++) begin
      logic [7:0] x;
      x = 8'($urandom());
      in0 = '0; in1 = '0;
      shift(pack_regs(x, ~x, 8'h00, 8'h00), got);
      m = 0; #2 m = 1; #1;
      shift('0, got);
      check(got == pack_regs(x, ~x, ref_aff(x), ~ref_aff(x)),
            $sformatf("capture F2(%h): read %h", x, got));
      n_capture++;
    end
    // ---- capture: F1 response to primary inputs ----
    for (int r = 0; r < 8; r++) begin
      logic [7:0] y;
      y = 8'($urandom());
      shift('0, got);
      in1 = y; in0 = ~y;
      m = 0; #2 m = 1; #1;
      in0 = '0; in1 = '0;
      shift('0, got);
      check(got[15:0] == pack_regs(ref_inv(y), ~ref_inv(y), 8'h00, 8'h00) & 32'hffff,
            $sformatf("capture F1(%h): read %h", y, got));
      n_capture++;
    end

    // ---- back to normal mode: one more byte after a flush ----
    m = 0; rst_l = 0; rst_h = 1; #2 rst_h = 0; #2;
    check(out0 == 0 && out1 == 0 && ko == 1, "flushed by rst_h");
    in1 = 8'h53; in0 = ~8'h53;
    while (!(ko == 0)) #1; in1 = 0; in0 = 0;
    while (!((out0 | out1) == 8'hff)) #1; #1;
    check(out1 == 8'hed, $sformatf("S(53) = %h, want ed", out1));

    $display("mechanisms: bytes=%0d stall=%0d sleep1=%0d sleep2=%0d scan=%0d fork=%0d fork_fault=%0d capture=%0d",
             n_bytes, n_stall, n_sleep1, n_sleep2, n_scan, n_fork, n_fork_fault, n_capture);
    check(n_stall > 0, "input stalled behind an unacknowledged output");
    check(n_sleep1 > 0 && n_sleep2 > 0, "both stages slept");
    check(n_scan > 0 && n_fork > 0 && n_fork_fault > 0 && n_capture > 0, "all test procedures ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
