// fpga_hu_pkg: op-codes and stream records of the hash-unit coprocessor.
//
// opcode_e follows the coprocessor's op-code table (3 bits).  A request is an
// op-code and a key; a result echoes the op-code with the Exist and Full
// flags of the table search.
package fpga_hu_pkg;

  typedef enum logic [2:0] {
    OP_NOP     = 3'b000,
    OP_LOOKUP  = 3'b001,
    OP_DELETE  = 3'b010,
    OP_INSERT  = 3'b011,
    OP_REPLACE = 3'b100
  } opcode_e;

  typedef struct packed {
    opcode_e opcode;
    logic    exist;
    logic    full;
  } result_t;

endpackage
