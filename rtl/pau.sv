// pau: programmable arithmetic unit.
//
// A set of arithmetic tiles (multipliers, adders, subtractors, comparators)
// and a programmable controller exchange operands and results over a ring
// network-on-chip.  The controller (endpoint 0) and the tiles (endpoints
// 1..NTILES) are spread NCOLS to a horizontal ring, row after row, each
// through an insertion/extraction station.  Every horizontal ring also has a
// junction station, and the junction stations of all rows are joined by one
// vertical ring, with NRPT repeater stations between neighbouring
// junctions.  A flit for another row leaves its horizontal ring at the
// junction, travels the vertical ring to the junction of its row and enters
// that row's ring; every station and repeater is one cycle.  Rings are
// unidirectional and hold one flit per station; a flit that cannot be taken
// where it is going simply goes round again.
//
// Default configuration: 5 multipliers and 7 adders (12 tiles) with 32-bit
// data on a 4 x 4 station grid.  Tile i is a multiplier for
// i < NMUL, then adders, subtractors and comparators.
//
// Host interface: the controller's (see pau_fc).  stall and recirculate
// report controller stalls and flits that had to circle again.
//
// Follows the document: the three parts, tile kinds and counts, the station
// types and their routing rule.  Own choices: one clock for ring and tiles
// (the document runs the ring about twenty times faster than the tiles from
// a resonant ring clock), one vertical ring, and the controller's
// instruction-memory form.
module pau
  import pau_pkg::*;
#(
  parameter int unsigned NMUL       = 5,
  parameter int unsigned NADD       = 7,
  parameter int unsigned NSUB       = 0,
  parameter int unsigned NCMP       = 0,
  parameter int unsigned NROWS      = 4,
  parameter int unsigned NCOLS      = 4,
  parameter int unsigned NRPT       = 1,
  parameter int unsigned PROG_DEPTH = 256,
  parameter int unsigned NREGS      = 256,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0]   prog_addr,
  input  instr_t                          prog_instr,
  input  logic                            reg_we,
  input  logic [TAG_W-1:0]                reg_addr,
  input  logic [DATA_W-1:0]               reg_wdata,
  input  logic [TAG_W-1:0]                rd_addr,
  output logic [DATA_W-1:0]               rd_data,
  input  logic                            start,
  input  logic [$clog2(PROG_DEPTH+1)-1:0] prog_len,
  output logic                            busy,
  output logic                            done,
  output logic                            stall,
  output logic                            recirculate
);

  localparam int unsigned NTILES = NMUL + NADD + NSUB + NCMP;
  localparam int unsigned NEP    = NTILES + 1;

  // The grid must hold every endpoint.
  if (NEP > NROWS * NCOLS) begin : g_check
    $error("pau: %0d endpoints do not fit a %0d x %0d grid", NEP, NROWS, NCOLS);
  end

  function automatic tile_op_e tile_kind(input int unsigned i);
    if (i < NMUL)               return TILE_MUL;
    if (i < NMUL + NADD)        return TILE_ADD;
    if (i < NMUL + NADD + NSUB) return TILE_SUB;
    return TILE_CMP;
  endfunction

  function automatic int unsigned row_count(input int unsigned r);
    if (NEP <= r * NCOLS)       return 0;
    if (NEP - r * NCOLS > NCOLS) return NCOLS;
    return NEP - r * NCOLS;
  endfunction

  // Endpoint side of every station.
  logic  ep_rx_valid [NEP];
  logic  ep_rx_ready [NEP];
  flit_t ep_rx_flit  [NEP];
  logic  ep_tx_valid [NEP];
  logic  ep_tx_ready [NEP];
  flit_t ep_tx_flit  [NEP];
  logic [NEP-1:0] recirc;

  // Vertical ring: junction r drives vseg[r][0]; the repeaters of segment r
  // carry it to vseg[r][NRPT], which feeds junction (r+1) mod NROWS.
  flit_t vseg [NROWS][NRPT+1];

  for (genvar r = 0; r < NROWS; r++) begin : g_row
    localparam int unsigned CNT = row_count(r);
    // h[k] is the input of station k; stations 0..CNT-1 are IES, CNT is JS.
    flit_t h [CNT+1];

    for (genvar k = 0; k < CNT; k++) begin : g_ies
      ring_ies #(.MY_ROW(r), .MY_COL(k), .FIFO_DEPTH(FIFO_DEPTH)) u_ies (
        .clk, .rst_n,
        .flit_in (h[k]),
        .flit_out(h[k+1]),
        .rx_valid(ep_rx_valid[r*NCOLS+k]),
        .rx_ready(ep_rx_ready[r*NCOLS+k]),
        .rx_flit (ep_rx_flit[r*NCOLS+k]),
        .tx_valid(ep_tx_valid[r*NCOLS+k]),
        .tx_ready(ep_tx_ready[r*NCOLS+k]),
        .tx_flit (ep_tx_flit[r*NCOLS+k]),
        .recirculate(recirc[r*NCOLS+k])
      );
    end

    ring_js #(.MY_ROW(r), .FIFO_DEPTH(FIFO_DEPTH)) u_js (
      .clk, .rst_n,
      .h_in (h[CNT]),
      .h_out(h[0]),
      .v_in (vseg[(r + NROWS - 1) % NROWS][NRPT]),
      .v_out(vseg[r][0])
    );

    for (genvar k = 0; k < NRPT; k++) begin : g_rpt
      ring_rpt u_rpt (
        .clk, .rst_n, .flit_in(vseg[r][k]), .flit_out(vseg[r][k+1])
      );
    end
  end

  pau_fc #(
    .NTILES(NTILES), .NCOLS(NCOLS), .PROG_DEPTH(PROG_DEPTH), .NREGS(NREGS)
  ) u_fc (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_instr,
    .reg_we, .reg_addr, .reg_wdata, .rd_addr, .rd_data,
    .start, .prog_len, .busy, .done, .stall,
    .rx_valid(ep_rx_valid[0]), .rx_ready(ep_rx_ready[0]), .rx_flit(ep_rx_flit[0]),
    .tx_valid(ep_tx_valid[0]), .tx_ready(ep_tx_ready[0]), .tx_flit(ep_tx_flit[0])
  );

  for (genvar i = 0; i < NTILES; i++) begin : g_tile
    pau_tile #(.OP(tile_kind(i)), .MY_EP(i + 1), .NCOLS(NCOLS)) u_tile (
      .clk, .rst_n,
      .rx_valid(ep_rx_valid[i+1]), .rx_ready(ep_rx_ready[i+1]), .rx_flit(ep_rx_flit[i+1]),
      .tx_valid(ep_tx_valid[i+1]), .tx_ready(ep_tx_ready[i+1]), .tx_flit(ep_tx_flit[i+1])
    );
  end

  assign recirculate = |recirc;

endmodule
