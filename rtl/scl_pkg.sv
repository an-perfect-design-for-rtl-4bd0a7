// scl_pkg: constants and elaboration-time functions shared by the dual-rail
// Sleep Convention Logic (SCL) AES S-box.
//
// A dual-rail bit is carried on two wires, rail0 (DATA0) and rail1 (DATA1):
// 00 is NULL, 01 on {rail1,rail0} is DATA0, 10 is DATA1, 11 never occurs.
// The functions below are evaluated only while the design is elaborated, to
// decide which minterm gate feeds which output rail of the inverse block.
// The field polynomial x^8+x^4+x^3+x+1 and the affine constant 0x63 are the
// AES (FIPS-197) ones.
package scl_pkg;

  localparam logic [7:0] AFFINE_C = 8'h63;

  // Multiplication in GF(2^8) modulo x^8+x^4+x^3+x+1 (shift-and-add).
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    logic [7:0] x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
    end
    return p;
  endfunction

  // Multiplicative inverse as x^254 (square-and-multiply); 0 maps to 0.
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] r;
    logic [7:0] sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // exponent 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

endpackage
