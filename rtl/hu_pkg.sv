// hu_pkg: op-codes shared by the circuit-level hash unit.
//
// w_op_e is the CPU-side op-code (W2,W1); c_op_e is the atomic hash-table
// operation (C2,C1) that the control signals unit drives.  The encodings are
// the ones of the hash unit's op-code table.
package hu_pkg;

  typedef enum logic [1:0] {
    W_NOP    = 2'b00,
    W_LOOKUP = 2'b01,
    W_DELETE = 2'b10,
    W_INSERT = 2'b11
  } w_op_e;

  typedef enum logic [1:0] {
    C_NOP    = 2'b00,
    C_LOOKUP = 2'b01,
    C_DELETE = 2'b10,
    C_INSERT = 2'b11
  } c_op_e;

endpackage
