// two_rail_checker: totally self-checking two-rail checker (TRC).
//
// Compares NPAIRS two-rail pairs (x[i], y[i]). In fault-free operation
// every y[i] is the complement of x[i]; the checker then answers with a
// complementary pair (f,g) = 01 or 10. If any pair is 00 or 11 the answer
// is 00 or 11, which the surrounding logic reads as an error. Because the
// "good" answer is itself a two-rail code, a stuck-at fault on f or g
// shows up as an error too instead of hiding behind a single "ok" wire.
//
// The checker is a chain of trc_cell blocks (for the 3 pairs of a 4-bit
// Berger symbol, two cells). The design gives the checker's function and
// its outputs F and G; the cell chain is the standard construction chosen
// here.
//
// Timing: purely combinational.
module two_rail_checker #(
  parameter int unsigned NPAIRS = 3
) (
  input  logic [NPAIRS-1:0] x,  // first rail of each pair
  input  logic [NPAIRS-1:0] y,  // second rail, expected ~x
  output logic              f,
  output logic              g
);

  logic [NPAIRS-1:0] cf, cg;  // running pair after folding in pairs 0..i

  assign cf[0] = x[0];
  assign cg[0] = y[0];

  for (genvar i = 1; i < NPAIRS; i++) begin : g_chain
    trc_cell u_cell (
      .a1(cf[i-1]), .a0(cg[i-1]),
      .b1(x[i]),    .b0(y[i]),
      .f (cf[i]),   .g (cg[i])
    );
  end

  assign f = cf[NPAIRS-1];
  assign g = cg[NPAIRS-1];

endmodule
