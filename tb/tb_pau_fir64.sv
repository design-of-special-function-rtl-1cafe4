// tb_pau_fir64: 64-tap FIR filter with 16-bit data on the programmable
// arithmetic unit at its default configuration (5 multipliers, 7 adders,
// 4 x 4 station grid, 256-entry program, 256 registers).
//
// Register map: coefficients h_0..h_63 in r0..r63, samples x_0..x_64 in
// r64..r128, products in r130..r193 (reused by each output), outputs in
// r200+j.  Each output y_j = sum_i h_i * x_(i+j) takes 64 multiplications,
// spread round-robin over the multipliers, and 63 additions, chained on the
// adders: 127 instructions, so two outputs fill 254 of the 256 program
// entries.  The result is compared with the same sum computed here, modulo
// 2^32 like the tiles.  Reports the cycle count and counts stalls and
// junction crossings, both of which must occur.
module tb_pau_fir64;
  import pau_pkg::*;
  localparam int TAPS = 64, OUTS = 2;
  logic clk = 0, rst_n = 0;
  logic prog_we = 0, reg_we = 0, start = 0, busy, done, stall, recirculate;
  logic [7:0] prog_addr = 0;
  instr_t prog_instr = '0;
  logic [7:0] reg_addr = 0, rd_addr = 0;
  logic [31:0] reg_wdata = 0, rd_data;
  logic [8:0] prog_len = 0;
  int checks = 0, failures = 0, n_stall = 0, n_cross = 0;

  pau dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (stall) n_stall++;
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

  logic [31:0] h [TAPS], x [TAPS + OUTS - 1];
  initial begin
    automatic int pc = 0, cyc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < TAPS; i++) begin h[i] = $urandom_range(0, 65535); wr_reg(i, h[i]); end
    for (int i = 0; i < TAPS + OUTS - 1; i++) begin
      x[i] = $urandom_range(0, 65535); wr_reg(64 + i, x[i]);
    end
    for (int j = 0; j < OUTS; j++) begin
      for (int i = 0; i < TAPS; i++) begin
        wr_ins(pc, i % 5, i, 64 + i + j, 130 + i); pc++;
      end
      wr_ins(pc, 5, 130, 131, 200 + j); pc++;
      for (int i = 2; i < TAPS; i++) begin
        wr_ins(pc, 5 + i % 7, 200 + j, 130 + i, 200 + j); pc++;
      end
    end
    chk(pc == 254, "program length");
    @(negedge clk); start = 1; prog_len = 9'(pc);
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    $display("FIR %0d taps x %0d outputs: %0d instructions in %0d cycles", TAPS, OUTS, pc, cyc);
    for (int j = 0; j < OUTS; j++) begin
      automatic logic [31:0] y = 0;
      for (int i = 0; i < TAPS; i++) y += h[i] * x[i + j];
      rd_addr = 8'(200 + j); #1;
      chk(rd_data == y, "FIR output");
    end
    chk(cyc >= 2 * pc, "at most one instruction issued every two cycles");
    $display("stall=%0d cross=%0d", n_stall, n_cross);
    chk(n_stall > 0, "controller stall seen");
    chk(n_cross > 0, "junction crossing seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
