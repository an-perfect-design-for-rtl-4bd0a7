// completion_detector: completion detector (CD) of an N-bit dual-rail word.
//
// Each bit is "present" when either of its rails is high.  done rises once
// every bit is DATA and falls once every bit is NULL; in between it holds
// (an N-input C-element, the hysteresis of an NCL THnn gate).  Holding is
// what makes the detector safe to use for a register that fills or empties
// one bit at a time.  rst_h clears it.
// The detector's role comes from the SCL stage description (Fi, CDi, Ri,
// Ci); the OR-then-C-element structure is the usual NCL one and this
// design's choice.  It is a storage node without a clock: a latch.
module completion_detector #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] rail0,
  input  logic [N-1:0] rail1,
  input  logic         rst_h,
  output logic         done
);

  logic [N-1:0] present;

  always_comb present = rail0 | rail1;

  always_latch begin
    if (rst_h)
      done = 1'b0;
    else if (&present)
      done = 1'b1;
    else if (present == '0)
      done = 1'b0;
  end

endmodule
