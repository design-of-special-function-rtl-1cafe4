// tb_ht_bin: one hash-table bin against a row-by-row model.
// Random lookups, inserts and deletes (each insert/delete as the unit issues
// them: a lookup step, then the write step) over a small key pool so that
// the bin fills up, entries are deleted and freed rows are reused in
// first-free order.  Also checks that a disabled bin neither answers nor
// changes.
module tb_ht_bin;
  import hu_pkg::*;
  localparam int M = 4;
  logic clk = 0, rst_n = 0, bin_en = 0, hit, full;
  c_op_e c = C_NOP;
  logic [31:0] key = 0, value_in = 0, value_out;
  logic [31:0] mk [M], mv [M];
  logic        mval [M];
  int checks = 0, failures = 0, n_full = 0, n_del = 0, n_ins = 0;

  ht_bin #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  function automatic int find(input logic [31:0] k);
    for (int i = 0; i < M; i++) if (mval[i] && mk[i] == k) return i;
    return -1;
  endfunction
  function automatic int first_free();
    for (int i = 0; i < M; i++) if (!mval[i]) return i;
    return -1;
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Lookup step; returns model index of the key.
  task automatic lookup_step(input logic [31:0] k, output int idx);
    @(negedge clk); bin_en = 1; c = C_LOOKUP; key = k; #1;
    idx = find(k);
    chk(hit == (idx >= 0), "hit");
    chk(value_out == (idx >= 0 ? mv[idx] : 32'h0), "value_out");
    chk(full == (first_free() < 0), "full");
  endtask

  initial begin
    for (int i = 0; i < M; i++) mval[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      automatic int op = $urandom_range(0, 2);
      automatic logic [31:0] k = 32'h1000 + $urandom_range(0, 7);
      automatic logic [31:0] v = $urandom;
      int idx;
      lookup_step(k, idx);
      if (op == 1 && idx < 0) begin          // insert
        @(negedge clk); c = C_INSERT; value_in = v;
        if (first_free() >= 0) begin
          idx = first_free(); mk[idx] = k; mv[idx] = v; mval[idx] = 1; n_ins++;
        end else n_full++;
      end else if (op == 2 && idx >= 0) begin // delete
        @(negedge clk); c = C_DELETE; mval[idx] = 0; n_del++;
      end
      // A disabled bin must ignore insert attempts and not report hits.
      @(negedge clk); bin_en = 0; c = C_INSERT; key = k; value_in = 32'hdead; #1;
      chk(!hit && value_out == 0, "disabled bin silent");
    end
    chk(n_full > 0 && n_del > 0 && n_ins > 0, "full, delete and insert all exercised");
    $display("inserts=%0d deletes=%0d full=%0d", n_ins, n_del, n_full);
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
