// tb_pau_fc: the controller with a behavioural stand-in for ring and tiles.
//
// The stand-in takes the operand flits the controller sends, pairs A and B
// per tile and, after a random delay of 1..12 cycles, returns the result
// (tiles 0..3 multiply, 4..7 add).  The test program computes dot products
// y_j = sum_i h_i * x_(i+j) as a chain of multiplies and adds, which makes
// later instructions wait for earlier results and for busy tiles.  Checks
// the results read back, that done comes only at the end, and that stalls
// occurred.
module tb_pau_fc;
  import pau_pkg::*;
  localparam int NT = 8, NCOLS = 4, TAPS = 4, OUTS = 4;
  logic clk = 0, rst_n = 0;
  logic prog_we = 0, reg_we = 0, start = 0, busy, done, stall;
  logic [7:0] prog_addr = 0;
  instr_t prog_instr = '0;
  logic [7:0] reg_addr = 0, rd_addr = 0;
  logic [31:0] reg_wdata = 0, rd_data;
  logic [8:0] prog_len = 0;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready = 1;
  flit_t rx_flit = '0, tx_flit;
  int checks = 0, failures = 0, n_stall = 0;

  pau_fc #(.NTILES(NT), .NCOLS(NCOLS), .PROG_DEPTH(256), .NREGS(256)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- behavioural ring + tiles
  logic [31:0] ta [NT], tb_ [NT];
  logic [7:0]  ttag [NT];
  bit          hasa [NT], hasb [NT];
  int          due [NT];
  int          cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (stall) n_stall++;
    if (tx_valid && tx_ready) begin
      automatic int t = int'(tx_flit.dst.row) * NCOLS + int'(tx_flit.dst.col) - 1;
      chk(t >= 0 && t < NT, "operand addressed to a tile");
      if (tx_flit.is_b) begin tb_[t] = tx_flit.data; hasb[t] = 1; end
      else begin ta[t] = tx_flit.data; ttag[t] = tx_flit.tag; hasa[t] = 1; end
      if (hasa[t] && hasb[t]) due[t] = cyc + $urandom_range(1, 12);
    end
  end
  always @(negedge clk) begin
    rx_valid = 0;
    for (int t = 0; t < NT; t++) if (hasa[t] && hasb[t] && cyc >= due[t]) begin
      rx_valid = 1;
      rx_flit = '0; rx_flit.valid = 1; rx_flit.src = 8'(t + 1); rx_flit.tag = ttag[t];
      rx_flit.data = (t < 4) ? ta[t] * tb_[t] : ta[t] + tb_[t];
      hasa[t] = 0; hasb[t] = 0;
      break;
    end
    tx_ready = ($urandom_range(0, 4) != 0);
  end

  // ---- program: registers 0..3 h, 8..15 x, 32.. products, 64.. y
  task automatic wr_reg(input int a, input logic [31:0] v);
    @(negedge clk); reg_we = 1; reg_addr = 8'(a); reg_wdata = v;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic wr_ins(input int pc, input int tile, input int sa, input int sb, input int d);
    @(negedge clk); prog_we = 1; prog_addr = 8'(pc);
    prog_instr = '{tile: 8'(tile), src_a: 8'(sa), src_b: 8'(sb), dst: 8'(d)};
    @(negedge clk); prog_we = 0;
  endtask

  logic [31:0] h [TAPS], x [TAPS + OUTS];
  initial begin
    automatic int pc = 0;
    for (int t = 0; t < NT; t++) begin hasa[t] = 0; hasb[t] = 0; due[t] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < TAPS; i++) begin h[i] = $urandom_range(0, 99); wr_reg(i, h[i]); end
    for (int i = 0; i < TAPS + OUTS; i++) begin x[i] = $urandom_range(0, 99); wr_reg(8 + i, x[i]); end
    for (int j = 0; j < OUTS; j++) begin
      for (int i = 0; i < TAPS; i++) begin wr_ins(pc, (j * TAPS + i) % 4, i, 8 + i + j, 32 + j * TAPS + i); pc++; end
      wr_ins(pc, 4 + j % 4, 32 + j * TAPS, 32 + j * TAPS + 1, 64 + j); pc++;
      for (int i = 2; i < TAPS; i++) begin wr_ins(pc, 4 + j % 4, 64 + j, 32 + j * TAPS + i, 64 + j); pc++; end
    end
    @(negedge clk); start = 1; prog_len = 9'(pc);
    @(negedge clk); start = 0;
    chk(busy && !done, "running");
    while (!done) @(negedge clk);
    chk(!busy, "idle after done");
    for (int j = 0; j < OUTS; j++) begin
      automatic logic [31:0] y = 0;
      for (int i = 0; i < TAPS; i++) y += h[i] * x[i + j];
      rd_addr = 8'(64 + j); #1;
      chk(rd_data == y, "dot product");
      if (rd_data != y) $display("  y%0d got %0d exp %0d", j, rd_data, y);
    end
    $display("stall cycles=%0d", n_stall);
    chk(n_stall > 0, "controller stalled on a dependency or busy tile");
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
