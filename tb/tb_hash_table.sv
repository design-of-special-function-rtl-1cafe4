// tb_hash_table: the multi-bin table with bins selected directly by the
// testbench (bin = key mod NBINS).  Checks Exist_n, Value_Out and bin_full
// against a per-bin model, including that equal keys in different bins and
// operations on one bin leave the others untouched.
module tb_hash_table;
  import hu_pkg::*;
  localparam int NBINS = 4, M = 2;
  logic clk = 0, rst_n = 0, exist_n, bin_full;
  logic [NBINS-1:0] bin_en = 0;
  c_op_e c = C_NOP;
  logic [31:0] key = 0, value_in = 0, value_out;
  logic [31:0] mk [NBINS][M], mv [NBINS][M];
  logic        mval [NBINS][M];
  int checks = 0, failures = 0, n_full = 0;

  hash_table #(.NBINS(NBINS), .M(M)) dut (.*);
  always #5 clk = ~clk;

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
    for (int n = 0; n < 800; n++) begin
      automatic int op = $urandom_range(0, 2);
      automatic logic [31:0] k = $urandom_range(0, 15);
      automatic int b = int'(k % NBINS);
      automatic logic [31:0] v = $urandom;
      automatic int idx;
      @(negedge clk); bin_en = '0; bin_en[b] = 1; c = C_LOOKUP; key = k; #1;
      idx = find(b, k);
      chk(exist_n == (idx < 0), "exist_n");
      chk(value_out == (idx >= 0 ? mv[b][idx] : 0), "value_out");
      chk(bin_full == (first_free(b) < 0), "bin_full");
      if (op == 1 && idx < 0) begin
        @(negedge clk); c = C_INSERT; value_in = v;
        if (first_free(b) >= 0) begin
          idx = first_free(b); mk[b][idx] = k; mv[b][idx] = v; mval[b][idx] = 1;
        end else n_full++;
      end else if (op == 2 && idx >= 0) begin
        @(negedge clk); c = C_DELETE; mval[b][idx] = 0;
      end
    end
    chk(n_full > 0, "a full bin was met");
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
