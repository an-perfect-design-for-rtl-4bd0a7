// tb_sbox_inv_dr: checks the dual-rail GF(2^8) inverse for all 256 inputs
// against an inverse found here by brute-force search (x*y = 1), plus the
// dual-rail rules: NULL in gives NULL out, a partial input gives no output
// rail at all (input completeness), and sleep forces NULL.
`timescale 1ns/1ps
module tb_sbox_inv_dr;
  logic [7:0] a0, a1, z0, z1;
  logic sleep;
  int checks = 0, failures = 0;

  sbox_inv_dr dut (.*);

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
    logic [7:0] e;
    int k;
    sleep = 0; a0 = '0; a1 = '0;
    #1 check(z0 == 0 && z1 == 0, "NULL in, NULL out");
    for (int v = 0; v < 256; v++) begin
      e = ref_inv(8'(v));
      a1 = 8'(v); a0 = ~8'(v);
      #1 check(z1 == e && z0 == ~e, $sformatf("inv(%h) = %h/%h want %h", v, z1, z0, e));
      // drop one bit back to NULL: no output rail may stay high
      k = $urandom_range(0, 7);
      a1[k] = 0; a0[k] = 0;
      #1 check(z0 == 0 && z1 == 0, $sformatf("partial input %h", v));
      a1 = 8'(v); a0 = ~8'(v);
      sleep = 1;
      #1 check(z0 == 0 && z1 == 0, "sleep forces NULL");
      sleep = 0;
    end
    check(ref_inv(8'h53) == 8'hca, "reference: inv(53) = ca");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
