// tb_h3_hash: checks the H3 hash against an XOR-of-selected-rows model.
// Loads a random Q matrix row by row, then hashes random keys and keys with
// a single bit set (which must return exactly that row).  Also checks that
// rewriting one row changes exactly the hashes that use it.
module tb_h3_hash;
  localparam int KEY_W = 32, IDX_W = 10;
  logic clk = 0, rst_n = 0, q_we = 0;
  logic [4:0] q_row = 0;
  logic [IDX_W-1:0] q_data = 0, bin_idx;
  logic [KEY_W-1:0] key = 0;
  logic [IDX_W-1:0] qm [KEY_W];
  int checks = 0, failures = 0;

  h3_hash #(.KEY_W(KEY_W), .IDX_W(IDX_W)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [IDX_W-1:0] model(input logic [KEY_W-1:0] k);
    logic [IDX_W-1:0] h = '0;
    for (int i = 0; i < KEY_W; i++) if (k[i]) h ^= qm[i];
    return h;
  endfunction

  task automatic check(input logic [KEY_W-1:0] k);
    key = k; #1;
    checks++;
    if (bin_idx !== model(k)) begin
      failures++;
      $display("FAIL key=%h got %h exp %h", k, bin_idx, model(k));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < KEY_W; i++) begin
      @(negedge clk);
      qm[i] = IDX_W'($urandom); q_we = 1; q_row = 5'(i); q_data = qm[i];
    end
    @(negedge clk); q_we = 0;
    check('0);
    for (int i = 0; i < KEY_W; i++) check(KEY_W'(1) << i);
    for (int n = 0; n < 200; n++) check($urandom);
    // Rewrite row 7 and check again.
    @(negedge clk); qm[7] = ~qm[7]; q_we = 1; q_row = 7; q_data = qm[7];
    @(negedge clk); q_we = 0;
    for (int n = 0; n < 100; n++) check($urandom | 32'h80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
