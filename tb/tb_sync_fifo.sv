// tb_sync_fifo: random pushes and pops against a queue model; checks order,
// occupancy, full refusal and empty flags.
module tb_sync_fifo;
  localparam int W = 8, D = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_ready = 0, in_ready, out_valid;
  logic [W-1:0] in_data = 0, out_data;
  logic [2:0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, n_fullrefuse = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = 1'($urandom); in_data = W'($urandom); out_ready = ($urandom_range(0, 2) == 0);
      #1;
      chk(count == 3'(q.size()), "count");
      chk(in_ready == (q.size() < D), "in_ready");
      chk(out_valid == (q.size() > 0), "out_valid");
      if (q.size() > 0) chk(out_data == q[0], "order");
      if (in_valid && !in_ready) n_fullrefuse++;
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    chk(n_fullrefuse > 0, "full FIFO refused a write");
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
