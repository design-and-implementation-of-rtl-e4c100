// csb_ref_register: reference store for the inverted Berger check symbol.
//
// Right after a word has been loaded into the rotator, its check symbol
// k is inverted and kept in a small parallel-in/parallel-out register.
// Rotation does not change how many 1s a word holds, so this stored
// complement stays the correct partner of every later check symbol, and the
// two-rail checker compares against it.
//
// In the original design the inverted symbol reaches the register through
// three tri-state buffers, enabled by a select line (sel1), and the
// register takes it in under a second select line (sel2). Here the bus is
// modelled without high impedance: the register loads ~k at a rising clock
// edge when both sel1 (bus driven) and sel2 (register load) are high, and
// holds its value otherwise. The inversion, the register width and the two
// select lines follow the design; this split of roles between sel1 and
// sel2 and the clock edge are this implementation's own reading. There is
// no reset: the register is meaningful only after its first load.
//
// Timing: ref_csb changes one clock after the load.
module csb_ref_register #(
  parameter int unsigned CW = 3
) (
  input  logic          clk,
  input  logic          sel1,     // drive the inverted symbol onto the bus
  input  logic          sel2,     // load the register from the bus
  input  logic [CW-1:0] k,        // check symbol from the generator
  output logic [CW-1:0] ref_csb   // stored ~k
);

  logic [CW-1:0] bus;   // outputs of the inverting buffers
  logic          load;

  assign bus  = ~k;
  assign load = sel1 & sel2;

  always_ff @(posedge clk) begin
    if (load) ref_csb <= bus;
  end

endmodule
