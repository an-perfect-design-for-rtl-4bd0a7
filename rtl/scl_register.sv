// scl_register: one rail of a Sleep Convention Logic register, with the
// test-mode modification used inside the scan cell.
//
// Normal mode (m = 0): while the sleep input s is low, a 1 on d sets the
// output and the output then holds, whatever d does; while s is high the
// output is cleared to 0 (NULL).  This is the set / hold / sleep-reset
// behaviour of the single-rail SCL register; the transistor netlist itself
// is not reproduced, only its logic function.
// Test mode (m = 1): the register becomes a plain level-sensitive latch that
// copies scan_d while the scan slave strobe ci_l is high, so that both 0s
// and 1s can be shifted through the scan chain.  Sleep clears it in both
// modes; this is what lets a scan test see a stuck sleep fork.  How the
// register is modified for test mode is this design's own choice.
//
// Timing: no clock.  The output follows its set/load condition at once and
// is a storage node otherwise; yosys maps it to a latch with reset.  The
// latch is intended.
module scl_register (
  input  logic d,       // data rail from the combinational block (Din)
  input  logic s,       // sleep: 1 clears the register
  input  logic m,       // test mode
  input  logic scan_d,  // value of the scan master latch
  input  logic ci_l,    // scan slave strobe
  output logic q
);

  logic load;   // any condition that writes the storage node
  logic nxt;    // value written

  always_comb begin
    load = s | (m & ci_l) | (~m & d);
    nxt  = ~s & (m ? scan_d : 1'b1);
  end

  always_latch begin
    if (load) q = nxt;
  end

endmodule
