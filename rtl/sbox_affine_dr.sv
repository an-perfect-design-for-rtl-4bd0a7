// sbox_affine_dr: dual-rail SCL block computing the AES affine
// transformation (second half of the S-box):
//   b[i] = a[i] ^ a[(i+4)%8] ^ a[(i+5)%8] ^ a[(i+6)%8] ^ a[(i+7)%8] ^ c[i],
// with c = 8'h63.
//
// Each XOR is a dual-rail XOR gate, built from two SCL threshold gates:
//   z1 = a1&b0 | a0&b1,   z0 = a0&b0 | a1&b1,
// each forced low by sleep.  A NULL input gives a NULL output, a complete
// input a complete output, so the XOR tree is input-complete.  XOR with a
// constant 1 costs no gate: the two rails are swapped.
// The matrix and constant are the AES ones; the gate form is this design's
// choice.  Purely combinational.
module sbox_affine_dr
  import scl_pkg::*;
(
  input  logic [7:0] a0,
  input  logic [7:0] a1,
  input  logic       sleep,
  output logic [7:0] z0,
  output logic [7:0] z1
);

  // One dual-rail XOR gate pair with sleep; returns {rail1, rail0}.
  function automatic logic [1:0] dr_xor(input logic x1, input logic x0,
                                        input logic y1, input logic y0,
                                        input logic slp);
    return {~slp & ((x1 & y0) | (x0 & y1)),
            ~slp & ((x0 & y0) | (x1 & y1))};
  endfunction

  always_comb begin
    logic [1:0] t;
    for (int i = 0; i < 8; i++) begin
      t = {a1[i], a0[i]};
      for (int k = 4; k < 8; k++)
        t = dr_xor(t[1], t[0], a1[(i + k) % 8], a0[(i + k) % 8], sleep);
      if (AFFINE_C[i]) t = {t[0], t[1]};
      z1[i] = t[1];
      z0[i] = t[0];
    end
  end

endmodule
