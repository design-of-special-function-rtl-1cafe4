// tb_pau_tile: one tile of each kind (add, subtract, multiply, compare).
// Operands A and B arrive in random order with random gaps; the result flit
// must carry the right value, the tag of operand A, the tile's own endpoint
// number and the address of the sender, one cycle after the second operand,
// and be held while the station is not ready.
module tb_pau_tile;
  import pau_pkg::*;
  localparam int NCOLS = 4;
  logic clk = 0, rst_n = 0;
  logic  rx_valid [4], rx_ready [4], tx_valid [4], tx_ready [4];
  flit_t rx_flit [4], tx_flit [4];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 4; i++) begin : g
    pau_tile #(.OP(tile_op_e'(i)), .MY_EP(3 + i), .NCOLS(NCOLS)) dut (
      .clk, .rst_n,
      .rx_valid(rx_valid[i]), .rx_ready(rx_ready[i]), .rx_flit(rx_flit[i]),
      .tx_valid(tx_valid[i]), .tx_ready(tx_ready[i]), .tx_flit(tx_flit[i])
    );
  end
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] ref_op(input int k, input logic [31:0] a, input logic [31:0] b);
    case (k)
      0: return a + b;
      1: return a - b;
      2: return a * b;
      default: return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
    endcase
  endfunction

  task automatic send(input int k, input flit_t f);
    @(negedge clk); rx_valid[k] = 1; rx_flit[k] = f; #1;
    chk(rx_ready[k], "operand accepted");
    @(negedge clk); rx_valid[k] = 0;
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin rx_valid[k] = 0; rx_flit[k] = '0; tx_ready[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      automatic int k = n % 4;
      automatic logic [31:0] a = (n % 8 < 4) ? $urandom : $urandom_range(0, 20) - 10;
      automatic logic [31:0] b = (n % 8 < 4) ? $urandom : $urandom_range(0, 20) - 10;
      automatic flit_t fa = '0, fb = '0;
      automatic int src = $urandom_range(0, 15);
      automatic logic [7:0] tag = 8'($urandom);
      fa.valid = 1; fa.src = 8'(src); fa.tag = tag; fa.is_b = 0; fa.data = a;
      fb.valid = 1; fb.src = 8'(src); fb.tag = 8'hff; fb.is_b = 1; fb.data = b;
      if ($urandom_range(0, 1)) begin send(k, fa); send(k, fb); end
      else begin send(k, fb); send(k, fa); end
      // The second operand was taken at the last edge; the result is
      // computed from the held operands and registered at the next edge.
      chk(!tx_valid[k], "no result before the operands are held");
      @(negedge clk);
      chk(tx_valid[k], "result one cycle after the second operand");
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        chk(tx_valid[k], "result held while not ready");
      end
      chk(tx_flit[k].data == ref_op(k, a, b), "result value");
      chk(tx_flit[k].tag == tag && tx_flit[k].is_b == 0, "result tag");
      chk(tx_flit[k].src == 8'(3 + k), "result src");
      chk(tx_flit[k].dst.row == 4'(src / NCOLS) && tx_flit[k].dst.col == 4'(src % NCOLS), "result dst");
      tx_ready[k] = 1;
      @(negedge clk); tx_ready[k] = 0;
      chk(!tx_valid[k], "result taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
