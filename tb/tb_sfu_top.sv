// tb_sfu_top: end-to-end test of all three units at their default sizes.
//
// Hash unit (1024 bins x 16 entries, 32-bit keys and values): loads a Q
// matrix, finds 17 keys of one bin with an H3 model, inserts them (the 17th
// finds the bin full), looks them up, deletes some, re-inserts into the freed
// rows, and runs random traffic on other keys.
// Coprocessor (1024 bins x 32 entries, 128-bit keys): loads a Q matrix,
// sends a burst that fills one bin past full, deletes, replaces and looks
// up, reading results back in order and waiting for Done.
// Arithmetic unit (5 multipliers, 7 adders, 4 x 4 ring grid): an 8-tap FIR
// filter with 4 outputs.
// Counts every mechanism (hit, miss, insert, delete, full bin, burst done,
// replace, controller stall, ring junction crossing) and fails if one never
// happened.  Flits going round again cannot happen at these sizes (the
// controller drains its station every cycle and sends one operation per
// tile), so they are only reported.
module tb_sfu_top;
  import hu_pkg::*;
  import fpga_hu_pkg::*;
  import pau_pkg::*;

  logic clk = 0, rst_n = 0;
  // hash unit
  logic hu_en = 0, hu_q_we = 0, hu_exist_n, hu_bin_full;
  w_op_e hu_w = W_NOP;
  logic [31:0] hu_key = 0, hu_value_in = 0, hu_value_out;
  logic [4:0] hu_q_row = 0;
  logic [9:0] hu_q_data = 0;
  // coprocessor
  logic cp_start = 0, cp_req_valid = 0, cp_req_ready, cp_rsp_valid, cp_rsp_ready = 1, cp_done;
  logic [31:0] cp_no_entries = 0;
  opcode_e cp_req_opcode = OP_NOP;
  logic [127:0] cp_req_key = 0;
  result_t cp_rsp;
  logic cp_q_we = 0;
  logic [6:0] cp_q_row = 0;
  logic [9:0] cp_q_data = 0;
  // arithmetic unit
  logic pau_prog_we = 0, pau_reg_we = 0, pau_start = 0, pau_busy, pau_done, pau_stall, pau_recirculate;
  logic [7:0] pau_prog_addr = 0;
  instr_t pau_prog_instr = '0;
  logic [7:0] pau_reg_addr = 0, pau_rd_addr = 0;
  logic [31:0] pau_reg_wdata = 0, pau_rd_data;
  logic [8:0] pau_prog_len = 0;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_ins = 0, n_del = 0, n_full = 0;
  int n_cp_done = 0, n_cp_rep = 0, n_cp_full = 0, n_cp_exist = 0, n_cp_del = 0;
  int n_stall = 0, n_cross = 0, n_recirc = 0;

  sfu_top dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (pau_stall) n_stall++;
    if (pau_recirculate) n_recirc++;
    if (dut.u_pau.g_row[0].u_js.to_ver || dut.u_pau.g_row[1].u_js.to_ver ||
        dut.u_pau.g_row[2].u_js.to_ver || dut.u_pau.g_row[3].u_js.to_ver) n_cross++;
  end

  // ------------------------------------------------------------ hash unit
  logic [9:0] hq [32];
  function automatic int hu_bin(input logic [31:0] k);
    logic [9:0] h = '0;
    for (int i = 0; i < 32; i++) if (k[i]) h ^= hq[i];
    return int'(h);
  endfunction

  // Associative model: key -> value; per-bin occupancy.
  logic [31:0] hv [logic [31:0]];
  int          hocc [int];

  task automatic hu_op(input w_op_e op, input logic [31:0] k, input logic [31:0] v);
    automatic int b = hu_bin(k);
    automatic bit present = hv.exists(k);
    automatic int occ = hocc.exists(b) ? hocc[b] : 0;
    @(negedge clk); hu_en = 1; hu_w = op; hu_key = k; hu_value_in = v; #1;
    chk(hu_exist_n == !present, "hu exist_n");
    if (present) chk(hu_value_out == hv[k], "hu value_out");
    chk(hu_bin_full == (occ == 16), "hu bin_full");
    if (present) n_hit++; else n_miss++;
    if (occ == 16) n_full++;
    if (op == W_INSERT || op == W_DELETE) begin
      @(negedge clk); hu_w = W_NOP;
      if (op == W_INSERT && !present && occ < 16) begin hv[k] = v; hocc[b] = occ + 1; n_ins++; end
      if (op == W_DELETE && present) begin hv.delete(k); hocc[b] = occ - 1; n_del++; end
    end
  endtask

  task automatic test_hu();
    logic [31:0] same [$];
    logic [31:0] k;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); hq[i] = 10'($urandom); hu_q_we = 1; hu_q_row = 5'(i); hu_q_data = hq[i];
    end
    @(negedge clk); hu_q_we = 0;
    // 17 keys of the bin of key 0x1234.
    k = 32'h1234;
    while (same.size() < 17) begin
      if (hu_bin(k) == hu_bin(32'h1234)) same.push_back(k);
      k = k * 32'd1664525 + 32'd1013904223;
    end
    foreach (same[i]) hu_op(W_INSERT, same[i], 32'h5000 + i);
    foreach (same[i]) hu_op(W_LOOKUP, same[i], 0);
    for (int i = 0; i < 17; i += 3) hu_op(W_DELETE, same[i], 0);
    foreach (same[i]) hu_op(W_INSERT, same[i], 32'h6000 + i);
    foreach (same[i]) hu_op(W_LOOKUP, same[i], 0);
    for (int n = 0; n < 300; n++)
      hu_op(w_op_e'($urandom_range(1, 3)), $urandom_range(0, 200), $urandom);
    @(negedge clk); hu_en = 0;
  endtask

  // ---------------------------------------------------------- coprocessor
  logic [9:0] cq [128];
  function automatic int cp_bin(input logic [127:0] k);
    logic [9:0] h = '0;
    for (int i = 0; i < 128; i++) if (k[i]) h ^= cq[i];
    return int'(h);
  endfunction
  bit          cset [logic [127:0]];
  int          cocc [int];
  result_t     cexp [$];
  logic [127:0] cbin_keys [int][$];   // model of each bin's valid keys

  function automatic void cp_model(input opcode_e op, input logic [127:0] k);
    int b = cp_bin(k);
    int occ = cocc.exists(b) ? cocc[b] : 0;
    result_t r;
    r.opcode = op; r.exist = cset.exists(k); r.full = (occ == 32);
    cexp.push_back(r);
    if (r.full) n_cp_full++;
    if (r.exist) n_cp_exist++;
    case (op)
      OP_INSERT: if (!r.exist && !r.full) begin cset[k] = 1; cocc[b] = occ + 1; end
      OP_DELETE: if (r.exist) begin cset.delete(k); cocc[b] = occ - 1; n_cp_del++; end
      OP_REPLACE: begin
        // Every key of this bin leaves the table; k becomes its only entry.
        foreach (cset[kk]) if (cp_bin(kk) == b) cset.delete(kk);
        cset[k] = 1; cocc[b] = 1; n_cp_rep++;
      end
      default: ;
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst_n && cp_rsp_valid && cp_rsp_ready) begin
      chk(cexp.size() > 0, "cp unexpected result");
      if (cexp.size() > 0) begin
        automatic result_t e = cexp.pop_front();
        chk(cp_rsp == e, "cp result");
      end
    end
  end

  task automatic cp_burst(input opcode_e ops [$], input logic [127:0] keys [$]);
    @(negedge clk); cp_start = 1; cp_no_entries = ops.size();
    @(negedge clk); cp_start = 0;
    foreach (ops[i]) begin
      cp_req_valid = 1; cp_req_opcode = ops[i]; cp_req_key = keys[i];
      @(posedge clk);
      while (!cp_req_ready) @(posedge clk);
      cp_model(ops[i], keys[i]);
      @(negedge clk);
    end
    cp_req_valid = 0;
    while (!cp_done) @(negedge clk);
    n_cp_done++;
    while (cexp.size() > 0) @(negedge clk);
  endtask

  task automatic test_cp();
    logic [127:0] same [$];
    opcode_e ops [$];
    logic [127:0] keys [$];
    logic [127:0] k;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); cq[i] = 10'($urandom); cp_q_we = 1; cp_q_row = 7'(i); cp_q_data = cq[i];
    end
    @(negedge clk); cp_q_we = 0;
    k = {$urandom, $urandom, $urandom, $urandom};
    while (same.size() < 34) begin
      if (cp_bin(k) == 5) same.push_back(k);
      k = {k[126:0], k[127] ^ k[125] ^ k[100] ^ k[98]} + 128'd7;
    end
    // Burst 1: 34 inserts into one bin (2 find it full), then lookups.
    foreach (same[i]) begin ops.push_back(OP_INSERT); keys.push_back(same[i]); end
    foreach (same[i]) begin ops.push_back(OP_LOOKUP); keys.push_back(same[i]); end
    cp_burst(ops, keys);
    // Burst 2: delete a few, replace the bin with the missing key, look up.
    ops.delete(); keys.delete();
    for (int i = 0; i < 4; i++) begin ops.push_back(OP_DELETE); keys.push_back(same[i]); end
    ops.push_back(OP_REPLACE); keys.push_back(same[33]);
    foreach (same[i]) begin ops.push_back(OP_LOOKUP); keys.push_back(same[i]); end
    for (int i = 0; i < 5; i++) begin ops.push_back(OP_INSERT); keys.push_back(same[i]); end
    cp_burst(ops, keys);
  endtask

  // -------------------------------------------------------- arithmetic unit
  task automatic pau_reg(input int a, input logic [31:0] v);
    @(negedge clk); pau_reg_we = 1; pau_reg_addr = 8'(a); pau_reg_wdata = v;
    @(negedge clk); pau_reg_we = 0;
  endtask
  task automatic pau_ins(input int pc, input int tile, input int sa, input int sb, input int d);
    @(negedge clk); pau_prog_we = 1; pau_prog_addr = 8'(pc);
    pau_prog_instr = '{tile: 8'(tile), src_a: 8'(sa), src_b: 8'(sb), dst: 8'(d)};
    @(negedge clk); pau_prog_we = 0;
  endtask

  task automatic test_pau();
    localparam int TAPS = 8, OUTS = 4;
    logic [31:0] h [TAPS], x [TAPS + OUTS];
    int pc = 0;
    for (int i = 0; i < TAPS; i++) begin h[i] = $urandom; pau_reg(i, h[i]); end
    for (int i = 0; i < TAPS + OUTS; i++) begin x[i] = $urandom; pau_reg(16 + i, x[i]); end
    for (int j = 0; j < OUTS; j++) begin
      for (int i = 0; i < TAPS; i++) begin pau_ins(pc, (j * TAPS + i) % 5, i, 16 + i + j, 64 + j * TAPS + i); pc++; end
      pau_ins(pc, 5 + j % 7, 64 + j * TAPS, 64 + j * TAPS + 1, 192 + j); pc++;
      for (int i = 2; i < TAPS; i++) begin pau_ins(pc, 5 + (i + j) % 7, 192 + j, 64 + j * TAPS + i, 192 + j); pc++; end
    end
    @(negedge clk); pau_start = 1; pau_prog_len = 9'(pc);
    @(negedge clk); pau_start = 0;
    while (!pau_done) @(negedge clk);
    for (int j = 0; j < OUTS; j++) begin
      automatic logic [31:0] y = 0;
      for (int i = 0; i < TAPS; i++) y += h[i] * x[i + j];
      pau_rd_addr = 8'(192 + j); #1;
      chk(pau_rd_data == y, "FIR output");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    test_hu();
    test_cp();
    test_pau();
    $display("hash unit: hit=%0d miss=%0d insert=%0d delete=%0d full=%0d", n_hit, n_miss, n_ins, n_del, n_full);
    $display("coprocessor: bursts=%0d exist=%0d full=%0d delete=%0d replace=%0d", n_cp_done, n_cp_exist, n_cp_full, n_cp_del, n_cp_rep);
    $display("arithmetic unit: stall=%0d junction crossings=%0d recirculations=%0d", n_stall, n_cross, n_recirc);
    chk(n_hit > 0, "hu hit"); chk(n_miss > 0, "hu miss"); chk(n_ins > 0, "hu insert");
    chk(n_del > 0, "hu delete"); chk(n_full > 0, "hu full bin");
    chk(n_cp_done == 2, "cp bursts done"); chk(n_cp_exist > 0, "cp exist");
    chk(n_cp_full > 0, "cp full"); chk(n_cp_del > 0, "cp delete"); chk(n_cp_rep > 0, "cp replace");
    chk(n_stall > 0, "pau stall"); chk(n_cross > 0, "pau junction crossing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
