// sbox_inv_dr: dual-rail SCL block computing the GF(2^8) multiplicative
// inverse of a byte (the first half of the AES S-box; 0 maps to 0).
//
// Structure: 256 minterm gates, one per input value v, each an 8-input AND
// of rail1[j] (where v has a 1) or rail0[j] (where v has a 0).  Exactly one
// minterm fires for a complete DATA input and none for NULL or a partial
// input, so the block is input-complete: no output rail rises before every
// input bit has arrived.  Output rail1[k] is the OR of the minterms whose
// inverse has bit k set, rail0[k] the OR of the others.  Which minterm
// feeds which OR is fixed at elaboration from scl_pkg::gf_inv.
// Every gate is an SCL gate: sleep forces its output low, so sleep = 1
// drives all outputs to NULL at once, without waiting for NULL inputs.
// The inverse-then-affine split is the AES definition; the minterm form is
// this design's choice.  Purely combinational.
module sbox_inv_dr
  import scl_pkg::*;
(
  input  logic [7:0] a0,
  input  logic [7:0] a1,
  input  logic       sleep,
  output logic [7:0] z0,
  output logic [7:0] z1
);

  logic [255:0] mt;          // minterm gates
  logic [7:0]   sel1 [256];  // minterm v routed to the rail1 ORs
  logic [7:0]   sel0 [256];  // minterm v routed to the rail0 ORs

  for (genvar v = 0; v < 256; v++) begin : g_mt
    localparam logic [7:0] V   = 8'(v);
    localparam logic [7:0] INV = gf_inv(V);
    assign mt[v]   = ~sleep & (&((a1 & V) | (a0 & ~V)));
    assign sel1[v] = INV & {8{mt[v]}};
    assign sel0[v] = ~INV & {8{mt[v]}};
  end

  always_comb begin
    logic [7:0] o1, o0;
    o1 = '0;
    o0 = '0;
    for (int v = 0; v < 256; v++) begin
      o1 = o1 | sel1[v];
      o0 = o0 | sel0[v];
    end
    z1 = o1 & {8{~sleep}};
    z0 = o0 & {8{~sleep}};
  end

endmodule
