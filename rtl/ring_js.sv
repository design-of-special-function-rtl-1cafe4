// ring_js: junction station between a horizontal ring and the vertical ring.
//
// The station belongs to horizontal ring MY_ROW.  Each cycle:
//   - a flit arriving on the horizontal ring whose row differs from MY_ROW
//     is moved into the Ver FIFO, to be put on the vertical ring; a flit for
//     this row stays on the horizontal ring;
//   - a flit arriving on the vertical ring whose row equals MY_ROW is moved
//     into the Hor FIFO, to be put on the horizontal ring; others stay on
//     the vertical ring;
//   - each ring's outgoing slot, if left empty, takes the head of the FIFO
//     that feeds it.
// A flit that must change ring while the FIFO is full stays on its ring and
// comes round again.  Both outgoing slots are registered.
//
// Follows the document's junction (row compare, Hor and Ver FIFOs).  Own
// choices: synchronous FIFOs and their depth.
module ring_js
  import pau_pkg::*;
#(
  parameter int unsigned MY_ROW     = 0,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t h_in,
  output flit_t h_out,
  input  flit_t v_in,
  output flit_t v_out
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic  h_leave, v_leave;      // flit wants to change ring
  logic  to_ver, to_hor;        // ... and the FIFO takes it
  logic  ver_ready, hor_ready;
  logic  ver_valid, hor_valid;
  logic  ver_pop, hor_pop;
  flit_t ver_head, hor_head, h_next, v_next;
  logic [CW-1:0] ver_count, hor_count;

  assign h_leave = h_in.valid && h_in.dst.row != ROW_W'(MY_ROW);
  assign v_leave = v_in.valid && v_in.dst.row == ROW_W'(MY_ROW);
  assign to_ver  = h_leave && ver_ready;
  assign to_hor  = v_leave && hor_ready;

  assign hor_pop = hor_valid && (!h_in.valid || to_ver);
  assign ver_pop = ver_valid && (!v_in.valid || to_hor);

  sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(FIFO_DEPTH)) u_ver (
    .clk, .rst_n,
    .in_valid (to_ver),    .in_ready (ver_ready), .in_data (h_in),
    .out_valid(ver_valid), .out_ready(ver_pop),   .out_data(ver_head),
    .count    (ver_count)
  );

  sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(FIFO_DEPTH)) u_hor (
    .clk, .rst_n,
    .in_valid (to_hor),    .in_ready (hor_ready), .in_data (v_in),
    .out_valid(hor_valid), .out_ready(hor_pop),   .out_data(hor_head),
    .count    (hor_count)
  );

  always_comb begin
    if (hor_pop)     h_next = hor_head;
    else if (to_ver) h_next = '0;
    else             h_next = h_in;
    if (ver_pop)     v_next = ver_head;
    else if (to_hor) v_next = '0;
    else             v_next = v_in;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h_out <= '0;
      v_out <= '0;
    end else begin
      h_out <= h_next;
      v_out <= v_next;
    end
  end

endmodule
