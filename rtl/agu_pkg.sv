// agu_pkg: types shared by the address generators and the two DSP kernels.
//
// The address generators all build the next address the same way: the
// current offset plus or minus a correction, with the carry running either
// from LSB to MSB (forward) or from MSB to LSB (bit-reversed).  The two
// control bits of that adder/subtractor keep the names of the schematics:
// Bf_Br_bar (1 = forward, 0 = bit-reversed) and Add_bar_Sub (0 = add,
// 1 = subtract).
package agu_pkg;

  // Carry direction of the address adder.
  typedef enum logic {
    CARRY_BITREV  = 1'b0,
    CARRY_FORWARD = 1'b1
  } carry_dir_e;

  // Operation of the address adder.
  typedef enum logic {
    OP_ADD = 1'b0,
    OP_SUB = 1'b1
  } addsub_op_e;

endpackage
