// trc_cell: one two-input two-rail checker cell.
//
// Takes two two-rail pairs (a1,a0) and (b1,b0), each valid when its rails
// are complementary, and folds them into one pair (f,g):
//   f = a1&b1 | a0&b0,   g = a1&b0 | a0&b1.
// (f,g) is complementary exactly when both input pairs are, so a tree of
// these cells reduces any number of pairs to one. This is the textbook
// totally self-checking cell; the design names the two-rail checker but
// does not draw its gates. Purely combinational.
module trc_cell (
  input  logic a1, a0,  // first pair
  input  logic b1, b0,  // second pair
  output logic f, g     // combined pair
);

  assign f = (a1 & b1) | (a0 & b0);
  assign g = (a1 & b0) | (a0 & b1);

endmodule
