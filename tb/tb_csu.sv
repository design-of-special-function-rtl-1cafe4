// tb_csu: checks the (W2,W1) -> (C2,C1) sequences of the control signals
// unit: lookup is one cycle of C=01; insert is C=01 then C=11 only if the
// key was absent; delete is C=01 then C=10 only if the key was present.
module tb_csu;
  import hu_pkg::*;
  logic clk = 0, rst_n = 0, exist_n = 1;
  w_op_e w = W_NOP;
  c_op_e c;
  int checks = 0, failures = 0;

  csu dut (.*);
  always #5 clk = ~clk;

  task automatic expect_c(input c_op_e e, input string what);
    #1; checks++;
    if (c !== e) begin failures++; $display("FAIL %s: c=%b exp %b", what, c, e); end
  endtask

  // One CPU operation: first cycle op-code w0 with lookup outcome ex,
  // second cycle no-op; checks both cycles.
  task automatic op(input w_op_e w0, input logic ex, input c_op_e second, input string what);
    @(negedge clk); w = w0; exist_n = ex;
    expect_c(w0 == W_NOP ? C_NOP : C_LOOKUP, {what, " cycle 1"});
    @(negedge clk); w = W_NOP; exist_n = 1'b1;
    expect_c(second, {what, " cycle 2"});
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    op(W_NOP,    1'b1, C_NOP,    "nop");
    op(W_LOOKUP, 1'b0, C_NOP,    "lookup hit");
    op(W_LOOKUP, 1'b1, C_NOP,    "lookup miss");
    op(W_INSERT, 1'b1, C_INSERT, "insert absent");
    op(W_INSERT, 1'b0, C_NOP,    "insert present");
    op(W_DELETE, 1'b0, C_DELETE, "delete present");
    op(W_DELETE, 1'b1, C_NOP,    "delete absent");
    // Back-to-back lookups: each cycle is a lookup, no second step.
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); w = W_LOOKUP; exist_n = 1'(i);
      expect_c(C_LOOKUP, "back-to-back lookup");
    end
    for (int n = 0; n < 200; n++) begin
      automatic w_op_e wr = w_op_e'($urandom_range(0, 3));
      automatic logic  ex = 1'($urandom);
      automatic c_op_e s = (wr == W_INSERT && ex)  ? C_INSERT :
                           (wr == W_DELETE && !ex) ? C_DELETE : C_NOP;
      op(wr, ex, s, "random");
    end
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
