// tb_sbox_affine_dr: checks the dual-rail AES affine map for all 256 inputs
// against the rotate form x ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 0x63, plus
// NULL propagation, partial-input behaviour (each output bit depends on
// five input bits, so dropping one input bit must null exactly the outputs
// that use it) and sleep.
`timescale 1ns/1ps
module tb_sbox_affine_dr;
  logic [7:0] a0, a1, z0, z1;
  logic sleep;
  int checks = 0, failures = 0;

  sbox_affine_dr dut (.*);

  function automatic logic [7:0] rotl(input logic [7:0] x, input int n);
    return (x << n) | (x >> (8 - n));
  endfunction
  function automatic logic [7:0] ref_aff(input logic [7:0] x);
    return x ^ rotl(x, 1) ^ rotl(x, 2) ^ rotl(x, 3) ^ rotl(x, 4) ^ 8'h63;
  endfunction

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
    logic [7:0] e, users;
    int k;
    sleep = 0; a0 = '0; a1 = '0;
    #1 check(z0 == 0 && z1 == 0, "NULL in, NULL out");
    for (int v = 0; v < 256; v++) begin
      e = ref_aff(8'(v));
      a1 = 8'(v); a0 = ~8'(v);
      #1 check(z1 == e && z0 == ~e, $sformatf("aff(%h) = %h/%h want %h", v, z1, z0, e));
      k = $urandom_range(0, 7);
      // output bit i uses input bits i, i+4 .. i+7 (mod 8), i.e. bits k, k-4 .. k-7 use k
      users = rotl(8'h01, k) | rotl(8'h01, (k + 4) % 8) | rotl(8'h01, (k + 3) % 8)
            | rotl(8'h01, (k + 2) % 8) | rotl(8'h01, (k + 1) % 8);
      a1[k] = 0; a0[k] = 0;
      #1 check(((z0 | z1) & users) == 0 && ((z0 | z1) | users) == 8'hff,
               $sformatf("partial input %h bit %0d: %h/%h", v, k, z1, z0));
      a1 = 8'(v); a0 = ~8'(v);
      sleep = 1;
      #1 check(z0 == 0 && z1 == 0, "sleep forces NULL");
      sleep = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
