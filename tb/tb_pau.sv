// tb_pau: FIR filter on the programmable arithmetic unit.
//
// Programs the controller with y_j = sum_i h_i * x_(i+j) (TAPS taps, OUTS
// outputs): the products are spread over the multiplier tiles, the sums are
// chained on the adder tiles.  All operands and results travel over the
// ring network, between rows through the junction stations and the vertical
// ring.  Checks every y_j.  Then checks ring latency: a single-instruction
// program takes the same time for every tile of the controller's row (one
// trip round that ring) and longer for a tile in another row.  Counts
// controller stalls, flits crossing between rings and flits that had to go
// round again; all must occur.  FIFO_DEPTH is set to 1 so that stations run
// out of buffer space.
module tb_pau;
  import pau_pkg::*;
  localparam int TAPS = 8, OUTS = 6;
  logic clk = 0, rst_n = 0;
  logic prog_we = 0, reg_we = 0, start = 0, busy, done, stall, recirculate;
  logic [7:0] prog_addr = 0;
  instr_t prog_instr = '0;
  logic [7:0] reg_addr = 0, rd_addr = 0;
  logic [31:0] reg_wdata = 0, rd_data;
  logic [8:0] prog_len = 0;
  int checks = 0, failures = 0, n_stall = 0, n_recirc = 0, n_cross = 0;

  pau #(.FIFO_DEPTH(1)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (stall) n_stall++;
    if (recirculate) n_recirc++;
    if (dut.g_row[0].u_js.to_ver || dut.g_row[1].u_js.to_ver ||
        dut.g_row[2].u_js.to_ver || dut.g_row[3].u_js.to_ver) n_cross++;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic wr_reg(input int a, input logic [31:0] v);
    @(negedge clk); reg_we = 1; reg_addr = 8'(a); reg_wdata = v;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic wr_ins(input int pc, input int tile, input int sa, input int sb, input int d);
    @(negedge clk); prog_we = 1; prog_addr = 8'(pc);
    prog_instr = '{tile: 8'(tile), src_a: 8'(sa), src_b: 8'(sb), dst: 8'(d)};
    @(negedge clk); prog_we = 0;
  endtask
  task automatic run(input int len, output int cycles);
    @(negedge clk); start = 1; prog_len = 9'(len);
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  logic [31:0] h [TAPS], x [TAPS + OUTS];
  initial begin
    automatic int pc = 0, cyc;
    automatic int lat [12];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < TAPS; i++) begin h[i] = $urandom_range(0, 1000); wr_reg(i, h[i]); end
    for (int i = 0; i < TAPS + OUTS; i++) begin x[i] = $urandom_range(0, 1000); wr_reg(16 + i, x[i]); end
    for (int j = 0; j < OUTS; j++) begin
      for (int i = 0; i < TAPS; i++) begin
        wr_ins(pc, (j * TAPS + i) % 5, i, 16 + i + j, 64 + j * TAPS + i); pc++;
      end
      wr_ins(pc, 5 + j % 7, 64 + j * TAPS, 64 + j * TAPS + 1, 192 + j); pc++;
      for (int i = 2; i < TAPS; i++) begin
        wr_ins(pc, 5 + (j + i) % 7, 192 + j, 64 + j * TAPS + i, 192 + j); pc++;
      end
    end
    run(pc, cyc);
    $display("FIR %0d taps x %0d outputs: %0d instructions in %0d cycles", TAPS, OUTS, pc, cyc);
    for (int j = 0; j < OUTS; j++) begin
      automatic logic [31:0] y = 0;
      for (int i = 0; i < TAPS; i++) y += h[i] * x[i + j];
      rd_addr = 8'(192 + j); #1;
      chk(rd_data == y, "FIR output");
    end
    // Latency of one instruction on each tile.
    for (int t = 0; t < 12; t++) begin
      wr_ins(0, t, 0, 1, 250);
      run(1, lat[t]);
      rd_addr = 250; #1;
      chk(rd_data == (t < 5 ? h[0] * h[1] : h[0] + h[1]), "single op result");
    end
    $display("single-op cycles per tile: %p", lat);
    chk(lat[0] == lat[1] && lat[1] == lat[2], "same latency round the controller's ring");
    chk(lat[11] > lat[0], "other rows further away");
    $display("stall=%0d cross=%0d recirculate=%0d", n_stall, n_cross, n_recirc);
    chk(n_stall > 0, "controller stall seen");
    chk(n_cross > 0, "junction crossing seen");
    chk(n_recirc > 0, "recirculation seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
