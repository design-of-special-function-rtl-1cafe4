// ring_ies: insertion/extraction station of the ring NoC.
//
// Sits on a unidirectional ring and connects one endpoint (a tile or the
// controller).  Each ring-clock cycle the station looks at the incoming slot:
//   - a valid flit addressed to this station is extracted into the Din FIFO,
//     from which the endpoint reads it; if the Din FIFO is full the flit is
//     left on the ring and comes round again;
//   - any other flit is forwarded;
//   - if the slot leaves empty (nothing came, or it was extracted) and the
//     endpoint has queued a flit in the out FIFO, that flit is inserted.
// The outgoing slot is registered, so each station is one cycle of the ring.
//
// Interface: rx_* is the Din FIFO's read side, tx_* the out FIFO's write
// side (ready/valid).  Follows the document's station; own choices: one
// clock for ring and endpoints (synchronous FIFOs), and a single out FIFO
// holding address and data together instead of separate address and data
// FIFOs.
module ring_ies
  import pau_pkg::*;
#(
  parameter int unsigned MY_ROW     = 0,
  parameter int unsigned MY_COL     = 0,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t flit_in,
  output flit_t flit_out,
  output logic  rx_valid,
  input  logic  rx_ready,
  output flit_t rx_flit,
  input  logic  tx_valid,
  output logic  tx_ready,
  input  flit_t tx_flit,
  output logic  recirculate  // addressed here but Din FIFO full this cycle
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic  for_me, extract, din_ready, out_valid, insert;
  flit_t out_head, next_slot;
  logic [CW-1:0] din_count, out_count;

  assign for_me      = flit_in.valid && flit_in.dst.row == ROW_W'(MY_ROW)
                                     && flit_in.dst.col == COL_W'(MY_COL);
  assign extract     = for_me && din_ready;
  assign recirculate = for_me && !din_ready;
  assign insert      = (!flit_in.valid || extract) && out_valid;

  sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(FIFO_DEPTH)) u_din (
    .clk, .rst_n,
    .in_valid (extract),  .in_ready (din_ready), .in_data (flit_in),
    .out_valid(rx_valid), .out_ready(rx_ready),  .out_data(rx_flit),
    .count    (din_count)
  );

  sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n,
    .in_valid (tx_valid),  .in_ready (tx_ready), .in_data (tx_flit),
    .out_valid(out_valid), .out_ready(insert),   .out_data(out_head),
    .count    (out_count)
  );

  always_comb begin
    if (insert) begin
      next_slot       = out_head;
      next_slot.valid = 1'b1;
    end else if (extract) begin
      next_slot = '0;
    end else begin
      next_slot = flit_in;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) flit_out <= '0;
    else        flit_out <= next_slot;
  end

endmodule
