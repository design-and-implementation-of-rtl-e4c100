// berger_csg: Berger code check symbol generator (CSG).
//
// Produces the check symbol of a WIDTH-bit information word: the number of
// 1s in the word, as an unsigned binary number of berger_width(WIDTH) bits
// (3 bits for the 4-bit word, k = 0..4). The design uses the plain count of
// ones at this output; the complement that a classic Berger code appends is
// formed later, where the symbol is stored as a reference.
//
// What the block computes follows the design description and its CSG
// truth table; the description gives no gate structure, so the count is
// written as a simple adder chain that synthesis maps as it likes.
//
// Timing: purely combinational.
module berger_csg #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned CW    = sc_rotator_pkg::berger_width(WIDTH)
) (
  input  logic [WIDTH-1:0] data,  // information word
  output logic [CW-1:0]    k      // number of 1s in data
);

  always_comb begin
    k = '0;
    for (int i = 0; i < WIDTH; i++) begin
      k = k + CW'(data[i]);
    end
  end

endmodule
