// pau_tile: arithmetic tile of the programmable arithmetic unit.
//
// A two-operand arithmetic block (adder, subtractor, multiplier or
// comparator, chosen by OP) attached to the ring through its station.
// Operand flits arrive on rx_*; the is_b bit says which operand a flit holds,
// so the two may arrive in either order.  The A flit also carries the
// register tag for the result and the endpoint to reply to.  Once both
// operands are held the tile computes in one cycle and queues a result flit
// (tag echoed, src = MY_EP) addressed to the sender of operand A.
//   ADD: a + b   SUB: a - b   MUL: low DATA_W bits of a * b
//   CMP: 1 if a < b (signed), else 0
// A second operand of a kind already held is refused (rx_ready low) until
// the operation completes.
//
// Timing: result flit valid the cycle after the second operand is taken,
// held until tx_ready.  Follows the document's tile kinds; the operand
// protocol and the comparator's output format are this design's choices.
module pau_tile
  import pau_pkg::*;
#(
  parameter tile_op_e    OP    = TILE_ADD,
  parameter int unsigned MY_EP = 1,
  parameter int unsigned NCOLS = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rx_valid,
  output logic  rx_ready,
  input  flit_t rx_flit,
  output logic  tx_valid,
  input  logic  tx_ready,
  output flit_t tx_flit
);

  logic [DATA_W-1:0] a_q, b_q, res;
  logic              a_v, b_v;
  logic [TAG_W-1:0]  tag_q;
  logic [EP_W-1:0]   ret_q;
  logic              fire;

  assign rx_ready = rx_flit.is_b ? !b_v : !a_v;
  assign fire     = a_v && b_v && !tx_valid;

  always_comb begin
    unique case (OP)
      TILE_ADD: res = a_q + b_q;
      TILE_SUB: res = a_q - b_q;
      TILE_MUL: res = a_q * b_q;
      TILE_CMP: res = DATA_W'($signed(a_q) < $signed(b_q));
      default:  res = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_v      <= 1'b0;
      b_v      <= 1'b0;
      tx_valid <= 1'b0;
      tx_flit  <= '0;
      a_q      <= '0;
      b_q      <= '0;
      tag_q    <= '0;
      ret_q    <= '0;
    end else begin
      if (rx_valid && rx_ready) begin
        if (rx_flit.is_b) begin
          b_q <= rx_flit.data;
          b_v <= 1'b1;
        end else begin
          a_q   <= rx_flit.data;
          tag_q <= rx_flit.tag;
          ret_q <= rx_flit.src;
          a_v   <= 1'b1;
        end
      end
      if (tx_valid && tx_ready) tx_valid <= 1'b0;
      if (fire) begin
        a_v           <= 1'b0;
        b_v           <= 1'b0;
        tx_valid      <= 1'b1;
        tx_flit.valid <= 1'b1;
        tx_flit.dst   <= ep_addr(int'(ret_q), NCOLS);
        tx_flit.src   <= EP_W'(MY_EP);
        tx_flit.tag   <= tag_q;
        tx_flit.is_b  <= 1'b0;
        tx_flit.data  <= res;
      end
    end
  end

endmodule
