// tb_hash_unit: end-to-end test of the circuit-level hash unit.
//
// Loads a random Q matrix, then runs random lookups, inserts and deletes
// through the CPU op-codes, each insert/delete followed by the no-op cycle
// the sequence needs.  The expected bin of each key comes from an H3 model
// with the same Q; a per-bin model predicts Exist_n, Value_Out and bin_full.
// Checks the timing: lookup answers in its own cycle; an insert or delete is
// visible to a lookup issued right after its second cycle.  Counts that
// hits, misses, full bins, inserts and deletes all occur.
// Parameters: NBINS and M reduced (NBINS overridable) so bins fill quickly.
module tb_hash_unit #(parameter int NBINS = 8, parameter int M = 2);
  import hu_pkg::*;
  localparam int IDX_W = $clog2(NBINS);
  logic clk = 0, rst_n = 0, en = 0, q_we = 0, exist_n, bin_full;
  w_op_e w = W_NOP;
  logic [31:0] key = 0, value_in = 0, value_out;
  logic [4:0] q_row = 0;
  logic [IDX_W-1:0] q_data = 0;
  logic [IDX_W-1:0] qm [32];
  logic [31:0] mk [NBINS][M], mv [NBINS][M];
  logic        mval [NBINS][M];
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_full = 0, n_ins = 0, n_del = 0;

  hash_unit #(.NBINS(NBINS), .M(M)) dut (.*);
  always #5 clk = ~clk;

  function automatic int hbin(input logic [31:0] k);
    logic [IDX_W-1:0] h = '0;
    for (int i = 0; i < 32; i++) if (k[i]) h ^= qm[i];
    return int'(h);
  endfunction
  function automatic int find(input int b, input logic [31:0] k);
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

  initial begin
    for (int b = 0; b < NBINS; b++) for (int i = 0; i < M; i++) mval[b][i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); qm[i] = IDX_W'($urandom); q_we = 1; q_row = 5'(i); q_data = qm[i];
    end
    @(negedge clk); q_we = 0;
    for (int n = 0; n < 1500; n++) begin
      automatic int op = $urandom_range(1, 3);  // 1 lookup, 2 delete, 3 insert
      automatic logic [31:0] k = $urandom_range(0, 4 * NBINS * M) * 32'h9e3779b1;
      automatic int b = hbin(k);
      automatic logic [31:0] v = $urandom;
      automatic int idx = find(b, k);
      @(negedge clk); en = 1; w = w_op_e'(op); key = k; value_in = v; #1;
      chk(exist_n == (idx < 0), "exist_n");
      chk(value_out == (idx >= 0 ? mv[b][idx] : 0), "value_out");
      chk(bin_full == (first_free(b) < 0), "bin_full");
      if (idx >= 0) n_hit++; else n_miss++;
      if (first_free(b) < 0) n_full++;
      if (op != 1) begin
        @(negedge clk); w = W_NOP;
        if (op == 3 && idx < 0 && first_free(b) >= 0) begin
          idx = first_free(b); mk[b][idx] = k; mv[b][idx] = v; mval[b][idx] = 1; n_ins++;
        end else if (op == 2 && idx >= 0) begin
          mval[b][idx] = 0; n_del++;
        end
      end
      if ($urandom_range(0, 7) == 0) begin
        @(negedge clk); en = 0; w = W_INSERT; #1;   // disabled: nothing happens
        chk(exist_n == 1'b1, "disabled unit reports nothing");
      end
    end
    $display("hits=%0d misses=%0d full=%0d inserts=%0d deletes=%0d",
             n_hit, n_miss, n_full, n_ins, n_del);
    chk(n_hit > 0, "hit seen");
    chk(n_miss > 0, "miss seen");
    chk(n_full > 0, "full bin seen");
    chk(n_ins > 0 && n_del > 0, "insert and delete seen");
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
