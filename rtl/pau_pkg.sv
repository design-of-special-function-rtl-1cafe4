// pau_pkg: types shared by the programmable arithmetic unit and its ring NoC.
//
// A flit carries one DATA_W-bit word around the ring NoC.  Its address is
// split into the number of the horizontal ring (row) and the position of the
// insertion/extraction station on that ring (col); junction stations route
// on row, stations on both.  Besides the data word the payload holds the
// sender's endpoint number, a register tag and an operand-select bit, which
// the controller and the tiles use to pair operands and results.
// Endpoint e sits at row e / NCOLS, col e % NCOLS; endpoint 0 is the
// controller, endpoint i+1 is tile i.
package pau_pkg;

  localparam int unsigned DATA_W = 32;  // operand width
  localparam int unsigned ROW_W  = 4;   // up to 16 horizontal rings
  localparam int unsigned COL_W  = 4;   // up to 16 stations per ring
  localparam int unsigned EP_W   = ROW_W + COL_W;
  localparam int unsigned TAG_W  = 8;   // controller register number

  typedef struct packed {
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
  } addr_t;

  typedef struct packed {
    logic              valid;
    addr_t             dst;
    logic [EP_W-1:0]   src;     // endpoint number of the sender
    logic [TAG_W-1:0]  tag;     // destination register of the result
    logic              is_b;    // operand B (1) or operand A / result (0)
    logic [DATA_W-1:0] data;
  } flit_t;

  typedef enum logic [1:0] {
    TILE_ADD = 2'd0,
    TILE_SUB = 2'd1,
    TILE_MUL = 2'd2,
    TILE_CMP = 2'd3
  } tile_op_e;

  // One controller instruction: send regs[src_a] and regs[src_b] to a tile,
  // write its result into regs[dst].
  typedef struct packed {
    logic [EP_W-1:0]  tile;   // tile number (endpoint - 1)
    logic [TAG_W-1:0] src_a;
    logic [TAG_W-1:0] src_b;
    logic [TAG_W-1:0] dst;
  } instr_t;

  function automatic addr_t ep_addr(input int unsigned ep, input int unsigned ncols);
    addr_t a;
    a.row = ROW_W'(ep / ncols);
    a.col = COL_W'(ep % ncols);
    return a;
  endfunction

endpackage
