// ring_rpt: repeater station of the ring NoC.
//
// One register stage on a ring segment, clocked by the ring clock.  Placing
// repeaters on the vertical ring keeps the distance between adjacent
// stations the same as on the horizontal rings, so every hop takes one
// cycle.  Interface/timing: flit_out is flit_in delayed by one cycle; reset
// empties the slot.  Follows the document's repeater; the single-register
// form is this design's choice.
module ring_rpt
  import pau_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t flit_in,
  output flit_t flit_out
);

  always_ff @(posedge clk) begin
    if (!rst_n) flit_out <= '0;
    else        flit_out <= flit_in;
  end

endmodule
