// sc_rotator: self-checking 4-bit rotator protected by a Berger code.
//
// A rotate left/right register is checked concurrently, while it works,
// with a Berger code. Rotation only moves bits around, so the number of 1s
// in the word - its Berger check symbol - must be the same before and after
// any rotation. The design therefore:
//   1. loads a word serially (rl=rr=1) into rotator_reg;
//   2. lets berger_csg count its 1s and stores the inverted count in
//      csb_ref_register (sel1=sel2=1 for one clock);
//   3. rotates the word left or right any number of times;
//   4. continuously regenerates the count from the register outputs and
//      hands (new count, stored inverted count) to two_rail_checker.
// While the counts agree the checker answers (f,g) = 01 or 10. A
// unidirectional error in the register (any number of 1s turning into 0s,
// or of 0s into 1s) changes the count, a pair of the checker stops being
// complementary, (f,g) becomes 00 or 11 and error goes high.
//
// Interface: clk; rl/rr select clear, rotate right, rotate left or serial
// load (see rotator_reg); din is the serial input; sel1/sel2 store the
// reference (see csb_ref_register). q is the register word (q[0] = Q1, the
// end where din enters), csb the live check symbol, ref_csb the stored
// inverted symbol, f/g the checker's two-rail result and error the alert
// (f == g).
//
// The block structure, the 4-bit width, the 3-bit reference register, the
// inverted reference and the F/G outputs follow the design. The error
// output is the "error alert" of the checking procedure, decoded here as
// f == g; the timing of the select lines is the user's to drive.
//
// Timing: q and ref_csb change on the rising clock edge; csb, f, g and
// error follow them combinationally in the same cycle.
module sc_rotator #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned CW    = sc_rotator_pkg::berger_width(WIDTH)
) (
  input  logic             clk,
  input  logic             rl,
  input  logic             rr,
  input  logic             din,
  input  logic             sel1,
  input  logic             sel2,
  output logic [WIDTH-1:0] q,
  output logic [CW-1:0]    csb,
  output logic [CW-1:0]    ref_csb,
  output logic             f,
  output logic             g,
  output logic             error
);

  rotator_reg #(.WIDTH(WIDTH)) u_rot (
    .clk(clk), .rl(rl), .rr(rr), .din(din), .q(q)
  );

  berger_csg #(.WIDTH(WIDTH), .CW(CW)) u_csg (
    .data(q), .k(csb)
  );

  csb_ref_register #(.CW(CW)) u_ref (
    .clk(clk), .sel1(sel1), .sel2(sel2), .k(csb), .ref_csb(ref_csb)
  );

  two_rail_checker #(.NPAIRS(CW)) u_trc (
    .x(csb), .y(ref_csb), .f(f), .g(g)
  );

  assign error = ~(f ^ g);

endmodule
