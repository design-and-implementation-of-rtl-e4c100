// rotator_reg: N-bit rotate left/right register with serial load.
//
// A row of WIDTH D flip-flops. Position 1 (q[0], Q1) is the left end, where
// the serial input din enters; position WIDTH (q[WIDTH-1], Q4 for the 4-bit
// design) is the right end. In front of every flip-flop sits a three-way
// AND-OR selector, one AND term per operation, exactly as in the design's
// gate-level schematic (three AND gates and one OR per stage). The two
// control lines rl and rr pick the operation:
//
//   rl rr  operation      next value
//   0  0   clear          all bits 0 (no AND term is enabled)
//   0  1   rotate right   q[i] <= q[i-1], q[0] <= q[WIDTH-1]
//   1  0   rotate left    q[i] <= q[i+1], q[WIDTH-1] <= q[0]
//   1  1   serial load    q[i] <= q[i-1], q[0] <= din
//
// Serial load shifts to the right, so the first bit entered reaches the
// right end after WIDTH clocks. The operation table, the stage structure
// and the direction of the load follow the design description; the choice
// of the rising clock edge and the bit ordering of the q vector are this
// implementation's own. There is no reset pin: the clear operation is the
// register's reset, as in the original design.
//
// Timing: every operation takes effect at the next rising edge of clk.
module rotator_reg #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rl,    // control line RL
  input  logic             rr,    // control line RR
  input  logic             din,   // serial data input
  output logic [WIDTH-1:0] q      // q[0] = Q1 (left end) ... q[WIDTH-1] = right end
);
  import sc_rotator_pkg::*;

  logic             en_load, en_rotr, en_rotl;  // one-hot operation selects
  logic [WIDTH-1:0] left_nb;   // value arriving from the left neighbour
  logic [WIDTH-1:0] load_nb;   // value arriving from the left during load
  logic [WIDTH-1:0] right_nb;  // value arriving from the right neighbour
  logic [WIDTH-1:0] q_next;

  rot_op_e op;
  assign op = rot_op_e'({rl, rr});

  // Decode the control lines into the enables of the three AND terms.
  always_comb begin
    en_load = (op == OP_LOAD);
    en_rotr = (op == OP_ROT_R);
    en_rotl = (op == OP_ROT_L);
  end

  // Neighbour wiring of the ring, and the AND-OR selector of each stage.
  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      left_nb[i]  = (i == 0)         ? q[WIDTH-1] : q[(i + WIDTH - 1) % WIDTH];
      load_nb[i]  = (i == 0)         ? din        : q[(i + WIDTH - 1) % WIDTH];
      right_nb[i] = (i == WIDTH - 1) ? q[0]       : q[(i + 1) % WIDTH];
      q_next[i]   = (en_load & load_nb[i])
                  | (en_rotr & left_nb[i])
                  | (en_rotl & right_nb[i]);
    end
  end

  always_ff @(posedge clk) begin
    q <= q_next;
  end

endmodule
