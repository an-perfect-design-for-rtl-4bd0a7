// completion_celement: resettable two-input C-element with inverted output,
// the completion C-element Ci of an SCL pipeline stage.
//
// The C-element output c goes to 1 when both inputs are 1, to 0 when both
// are 0, and holds otherwise.  The module drives sleep = ~c, which sleeps
// the stage's combinational block and register.  Input a is the previous
// stage's completion (1 = its register holds DATA); input b is the next
// stage's Ko (1 = ready for DATA, i.e. its register is empty).  So a stage
// wakes when new DATA waits upstream and the next register is empty, and
// sleeps once the next register has captured and the upstream register has
// been emptied.
// Two resets: rst_h forces sleep = 1 (pipeline flushed to NULL), rst_l
// forces sleep = 0 (every register awake, the test-mode setting); rst_h wins.
// The inverted output and the two resets follow the SCL description; which
// signals feed the inputs is this design's choice.  No clock: a latch.
// In the pipeline its output reaches its own inputs through the stage's
// register and completion detectors; tools report that as a combinational
// loop through c.  That loop is the asynchronous handshake, and it settles
// because the C-element holds while its inputs disagree.
module completion_celement (
  input  logic a,
  input  logic b,
  input  logic rst_h,
  input  logic rst_l,
  output logic sleep
);

  logic c;

  always_latch begin
    if (rst_h)
      c = 1'b0;
    else if (rst_l)
      c = 1'b1;
    else if (a == b)
      c = a;
  end

  assign sleep = ~c;

endmodule
