// scl_sbox_top: asynchronous dual-rail AES S-box in Sleep Convention Logic
// (SCL), with full level-sensitive scan of its registers.
//
// Pipeline (no clock, four-phase DATA/NULL handshake):
//   input rails -> CD0
//   stage 1: F1 = sbox_inv_dr (GF(2^8) inverse) -> R1 -> CD1, C1
//   stage 2: F2 = sbox_affine_dr (affine map)    -> R2 -> CD2, C2 -> output
// Each stage i has a combinational block Fi, a register Ri, a completion
// detector CDi on Ri's outputs and a completion C-element Ci whose inverted
// output is the stage's sleep signal, shared by Fi and Ri.
//   sleep1 = ~C(CD0, Ko2),  Ko2 = ~CD2
//   sleep2 = ~C(CD1, ki)
//   ko     = ~CD1
// A sender puts DATA on in0/in1 (exactly one rail per bit high) and waits
// for ko = 0, then puts NULL (all rails low) and waits for ko = 1.  A
// receiver reads out0/out1 when all bits are DATA, answers ki = 0, and
// raises ki again once the outputs are NULL.  As in any four-phase
// DATA/NULL pipeline, DATA waves are separated by NULL: stage 1 may take the
// next byte only once stage 2 has been emptied, so a slow receiver stalls
// the sender through ko.
//
// Test access.  Every rail of R1 and R2 is a scl_scan_cell; the 32 cells
// form one chain from sin to sout, in the order R1 bit0 rail0, R1 bit0
// rail1, R1 bit1 rail0, ..., R2 bit7 rail1 (sout).  m = 1 selects test mode
// (registers load from the scan path), l and ci_l are the two
// non-overlapping scan clocks, one shift = pulse l then pulse ci_l.
// rst_h forces every sleep signal high (all registers and gates cleared);
// rst_l forces every sleep signal low (all awake, the test-mode setting, in
// which F1 and F2 become ordinary Boolean logic).  rst_h is also the
// power-on reset.  The test procedures using these controls (sleep-fork
// test, one-pattern handshake test, combinational patterns) follow the SCL
// scan methodology; the number of stages, the chain order and the handshake
// wiring are this design's choices.
// The completion C-elements, detectors and registers are latches by design,
// and the handshake closes loops through them (Ci -> sleep -> Ri -> CDi ->
// C(i-1), C(i+1)): tools report these as combinational loops.  They are the
// asynchronous control itself; each loop passes through a latch that holds
// while its inputs disagree, so the circuit settles after every input
// change.
module scl_sbox_top (
  // input channel
  input  logic [7:0] in0,
  input  logic [7:0] in1,
  output logic       ko,
  // output channel
  output logic [7:0] out0,
  output logic [7:0] out1,
  input  logic       ki,
  // resets / test controls
  input  logic       rst_h,
  input  logic       rst_l,
  input  logic       m,
  input  logic       l,
  input  logic       ci_l,
  input  logic       sin,
  output logic       sout
);

  localparam int unsigned NCELLS = 32;

  logic done0, done1, done2;
  logic sleep1, sleep2;
  logic [7:0] f1_0, f1_1, f2_0, f2_1;   // combinational outputs
  logic [7:0] r1_0, r1_1, r2_0, r2_1;   // register outputs
  logic [NCELLS-1:0] cell_din, cell_dout, cell_s;
  logic [NCELLS:0]   chain;

  // ---- completion detection and completion C-elements -------------------
  completion_detector #(.N(8)) u_cd0 (.rail0(in0),  .rail1(in1),  .rst_h(rst_h), .done(done0));
  completion_detector #(.N(8)) u_cd1 (.rail0(r1_0), .rail1(r1_1), .rst_h(rst_h), .done(done1));
  completion_detector #(.N(8)) u_cd2 (.rail0(r2_0), .rail1(r2_1), .rst_h(rst_h), .done(done2));

  completion_celement u_c1 (.a(done0), .b(~done2), .rst_h(rst_h), .rst_l(rst_l), .sleep(sleep1));
  completion_celement u_c2 (.a(done1), .b(ki),     .rst_h(rst_h), .rst_l(rst_l), .sleep(sleep2));

  assign ko = ~done1;

  // ---- combinational blocks ---------------------------------------------
  sbox_inv_dr    u_f1 (.a0(in0),  .a1(in1),  .sleep(sleep1), .z0(f1_0), .z1(f1_1));
  sbox_affine_dr u_f2 (.a0(r1_0), .a1(r1_1), .sleep(sleep2), .z0(f2_0), .z1(f2_1));

  // ---- registers as one scan chain ---------------------------------------
  // cell 2*b+r belongs to R1 bit b rail r, cell 16+2*b+r to R2 bit b rail r.
  for (genvar b = 0; b < 8; b++) begin : g_map
    assign cell_din[2*b]        = f1_0[b];
    assign cell_din[2*b+1]      = f1_1[b];
    assign cell_din[16+2*b]     = f2_0[b];
    assign cell_din[16+2*b+1]   = f2_1[b];
    assign cell_s[2*b]          = sleep1;
    assign cell_s[2*b+1]        = sleep1;
    assign cell_s[16+2*b]       = sleep2;
    assign cell_s[16+2*b+1]     = sleep2;
    assign r1_0[b] = cell_dout[2*b];
    assign r1_1[b] = cell_dout[2*b+1];
    assign r2_0[b] = cell_dout[16+2*b];
    assign r2_1[b] = cell_dout[16+2*b+1];
  end

  assign chain[0] = sin;

  for (genvar k = 0; k < NCELLS; k++) begin : g_cell
    scl_scan_cell u_cell (
      .din  (cell_din[k]),
      .sin  (chain[k]),
      .m    (m),
      .l    (l),
      .ci_l (ci_l),
      .s    (cell_s[k]),
      .dout (cell_dout[k])
    );
    assign chain[k+1] = cell_dout[k];
  end

  assign sout = chain[NCELLS];
  assign out0 = r2_0;
  assign out1 = r2_1;

endmodule
