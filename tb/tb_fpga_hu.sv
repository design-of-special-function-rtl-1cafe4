// tb_fpga_hu: bursts of hash operations through the coprocessor pipeline.
//
// Loads a Q matrix, then sends bursts (start + no_entries, then the requests)
// of inserts, lookups, deletes and replaces of 128-bit keys, reading results
// back in order with a randomly stalling reader.  A model with the same H3
// hash predicts every {opcode, exist, full}.  Checks Done rises only when the
// burst is complete, and that a burst with a reader that never stalls takes
// one cycle per operation plus the two-cycle pipeline fill.
module tb_fpga_hu #(parameter int NBINS = 16, parameter int M = 4);
  import fpga_hu_pkg::*;
  localparam int KEY_W = 128, IDX_W = $clog2(NBINS);
  logic clk = 0, rst_n = 0, start = 0, req_valid = 0, req_ready, rsp_valid, rsp_ready = 0, done;
  logic [31:0] no_entries = 0;
  opcode_e req_opcode = OP_NOP;
  logic [KEY_W-1:0] req_key = 0;
  result_t rsp;
  logic q_we = 0;
  logic [6:0] q_row = 0;
  logic [IDX_W-1:0] q_data = 0;
  logic [IDX_W-1:0] qm [KEY_W];
  logic [KEY_W-1:0] mk [NBINS][M];
  logic mval [NBINS][M];
  result_t expq [$];
  logic [KEY_W-1:0] pool [64];
  int checks = 0, failures = 0, n_exist = 0, n_full = 0, n_stall = 0;
  bit stall_reader = 1;

  fpga_hu #(.NBINS(NBINS), .M(M), .KEY_W(KEY_W), .FIFO_DEPTH(8)) dut (.*);
  always #5 clk = ~clk;

  function automatic int hbin(input logic [KEY_W-1:0] k);
    logic [IDX_W-1:0] h = '0;
    for (int i = 0; i < KEY_W; i++) if (k[i]) h ^= qm[i];
    return int'(h);
  endfunction
  function automatic int find(input int b, input logic [KEY_W-1:0] k);
    for (int i = 0; i < M; i++) if (mval[b][i] && mk[b][i] == k) return i;
    return -1;
  endfunction
  function automatic int first_free(input int b);
    for (int i = 0; i < M; i++) if (!mval[b][i]) return i;
    return -1;
  endfunction
  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Model one operation and queue its expected result.
  function automatic void model(input opcode_e op, input logic [KEY_W-1:0] k);
    int b = hbin(k), idx = find(b, k);
    result_t r;
    r.opcode = op; r.exist = (idx >= 0); r.full = (first_free(b) < 0);
    expq.push_back(r);
    if (r.exist) n_exist++;
    if (r.full) n_full++;
    case (op)
      OP_INSERT: if (idx < 0 && first_free(b) >= 0) begin
        idx = first_free(b); mk[b][idx] = k; mval[b][idx] = 1;
      end
      OP_DELETE: if (idx >= 0) mval[b][idx] = 0;
      OP_REPLACE: begin
        for (int i = 0; i < M; i++) mval[b][i] = 0;
        mk[b][0] = k; mval[b][0] = 1;
      end
      default: ;
    endcase
  endfunction

  // Reader: pops results, compares with the model in order.
  always @(posedge clk) begin
    if (rsp_valid && rsp_ready) begin
      chk(expq.size() > 0, "unexpected result");
      if (expq.size() > 0) begin
        automatic result_t e = expq.pop_front();
        chk(rsp == e, "result");
        if (rsp != e) $display("  got %p exp %p", rsp, e);
      end
    end
  end
  always @(negedge clk) begin
    rsp_ready <= stall_reader ? ($urandom_range(0, 3) != 0) : 1'b1;
    if (stall_reader && !rsp_ready && rsp_valid) n_stall++;
  end

  task automatic burst(input int n, input int mix);
    @(negedge clk); start = 1; no_entries = n;
    @(negedge clk); start = 0;
    chk(!done, "done low during burst");
    for (int i = 0; i < n; i++) begin
      automatic int r = $urandom_range(0, 19);
      automatic opcode_e op = (mix == 0) ? OP_INSERT :
                              r < 8 ? OP_LOOKUP : r < 14 ? OP_INSERT : r < 19 ? OP_DELETE : OP_REPLACE;
      automatic logic [KEY_W-1:0] k = pool[$urandom_range(0, 63)];
      req_valid = 1; req_opcode = op; req_key = k;
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      model(op, k);
      if (i < n - 1) chk(!done, "done low until last op");
      @(negedge clk);
    end
    req_valid = 0;
    while (!done) @(negedge clk);
    while (expq.size() > 0) @(negedge clk);
  endtask

  initial begin
    for (int b = 0; b < NBINS; b++) for (int i = 0; i < M; i++) mval[b][i] = 0;
    for (int i = 0; i < 64; i++) pool[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < KEY_W; i++) begin
      @(negedge clk); qm[i] = IDX_W'($urandom); q_we = 1; q_row = 7'(i); q_data = qm[i];
    end
    @(negedge clk); q_we = 0;
    chk(done, "done high when idle");
    burst(40, 0);
    for (int t = 0; t < 8; t++) burst($urandom_range(1, 40), 1);
    // Timed burst: reader never stalls; a stream outside any burst, then a
    // counted burst of 8 from an idle pipeline.
    stall_reader = 0;
    begin
      automatic int t0, t1;
      @(negedge clk);
      for (int i = 0; i < 8; i++) begin
        req_valid = 1; req_opcode = OP_LOOKUP; req_key = pool[i];
        model(OP_LOOKUP, pool[i]);
        @(negedge clk);
      end
      req_valid = 0;
      while (expq.size() > 0) @(negedge clk);
      // Now a counted burst from an idle pipeline.
      @(negedge clk); start = 1; no_entries = 8;
      for (int i = 0; i < 8; i++) begin
        req_valid = 1; req_opcode = OP_LOOKUP; req_key = pool[8 + i];
        model(OP_LOOKUP, pool[8 + i]);
        @(negedge clk); start = 0;
      end
      req_valid = 0;
    end
    begin
      automatic int cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      chk(cyc <= 2, "burst of 8 done within 1 op/cycle");
    end
    while (expq.size() > 0) @(negedge clk);
    $display("exist=%0d full=%0d reader_stalls=%0d", n_exist, n_full, n_stall);
    chk(n_exist > 0 && n_full > 0 && n_stall > 0, "exist, full and back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
