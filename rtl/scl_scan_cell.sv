// scl_scan_cell: level-sensitive scan cell for one rail of an SCL register.
//
// The cell holds two storage elements.  A master latch, transparent while
// the scan clock l is high, samples the scan input sin.  The modified SCL
// register (scl_register) is the slave: in test mode (m = 1) it copies the
// master latch while ci_l is high; in normal mode (m = 0) it is an ordinary
// SCL register fed by din.  dout is both the functional output and the scan
// output that drives the next cell's sin.
//
// Shifting one position along a chain is: pulse l (every master latch takes
// its predecessor's register value), then pulse ci_l (every register takes
// its own master).  l and ci_l must never be high together, as in any
// two-clock level-sensitive scan design.  The sleep input s clears the
// register in both modes; the master latch is not slept.
// The master/slave arrangement follows the scan cell drawing (Sin, L, Ci_L,
// M, Din, S, Dout); the exact latch phases are this design's choice.
module scl_scan_cell (
  input  logic din,
  input  logic sin,
  input  logic m,
  input  logic l,
  input  logic ci_l,
  input  logic s,
  output logic dout
);

  logic master_q;

  // Master latch of the scan path.
  always_latch begin
    if (l) master_q = sin;
  end

  scl_register u_reg (
    .d      (din),
    .s      (s),
    .m      (m),
    .scan_d (master_q),
    .ci_l   (ci_l),
    .q      (dout)
  );

endmodule
