// tb_bram_ht: the block-RAM hash table against a per-bin model.
// Random lookup, insert, delete and replace operations with the bin index
// chosen by the testbench; checks Exist and Full for every operation and
// that insert writes the first free column, delete frees exactly the
// matching entry and replace leaves only the replaced key in the bin.
module tb_bram_ht;
  import fpga_hu_pkg::*;
  localparam int NBINS = 4, M = 4, KEY_W = 128;
  logic clk = 0, rst_n = 0, op_valid = 0, exist, full;
  opcode_e opcode = OP_NOP;
  logic [1:0] bin_idx = 0;
  logic [KEY_W-1:0] key = 0;
  logic [KEY_W-1:0] mk [NBINS][M];
  logic mval [NBINS][M];
  int checks = 0, failures = 0, n_rep = 0, n_full = 0;

  bram_ht #(.NBINS(NBINS), .M(M), .KEY_W(KEY_W)) dut (.*);
  always #5 clk = ~clk;

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

  initial begin
    for (int b = 0; b < NBINS; b++) for (int i = 0; i < M; i++) mval[b][i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      automatic int r = $urandom_range(0, 19);
      automatic opcode_e op = r < 6 ? OP_LOOKUP : r < 13 ? OP_INSERT : r < 19 ? OP_DELETE : OP_REPLACE;
      automatic int b = $urandom_range(0, NBINS - 1);
      automatic logic [KEY_W-1:0] k = {$urandom, $urandom, 29'd0, 3'($urandom)} ^ KEY_W'(b);
      automatic int idx = find(b, k);
      @(negedge clk); op_valid = 1; opcode = op; bin_idx = 2'(b); key = k; #1;
      chk(exist == (idx >= 0), "exist");
      chk(full == (first_free(b) < 0), "full");
      if (first_free(b) < 0) n_full++;
      case (op)
        OP_INSERT: if (idx < 0 && first_free(b) >= 0) begin
          idx = first_free(b); mk[b][idx] = k; mval[b][idx] = 1;
        end
        OP_DELETE: if (idx >= 0) mval[b][idx] = 0;
        OP_REPLACE: begin
          for (int i = 0; i < M; i++) mval[b][i] = 0;
          mk[b][0] = k; mval[b][0] = 1; n_rep++;
        end
        default: ;
      endcase
      // Idle cycle with op_valid low: nothing may change.
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk); op_valid = 0; opcode = OP_INSERT; key = ~k;
      end
    end
    chk(n_rep > 0 && n_full > 0, "replace and full bin exercised");
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
