// sc_rotator_pkg: shared types and constants of the self-checking rotator.
//
// The rotator register is steered by two control lines, RL and RR. Their
// four combinations select clear, rotate right, rotate left and serial
// load; rot_op_e gives those codes a name, with {RL,RR} as the encoding
// (RL is the upper bit). The encoding is the one of the design's control
// table. berger_width() gives the width of a Berger check symbol, which
// must be able to count from 0 to N ones: ceil(log2(N+1)) bits, so 3 bits
// for the 4-bit word.
package sc_rotator_pkg;

  typedef enum logic [1:0] {
    OP_CLEAR = 2'b00,  // RL=0 RR=0: clear the register
    OP_ROT_R = 2'b01,  // RL=0 RR=1: rotate right
    OP_ROT_L = 2'b10,  // RL=1 RR=0: rotate left
    OP_LOAD  = 2'b11   // RL=1 RR=1: shift the serial input in
  } rot_op_e;

  // Bits needed to hold a count of 0..n ones.
  function automatic int unsigned berger_width(int unsigned n);
    return $clog2(n + 1);
  endfunction

endpackage
