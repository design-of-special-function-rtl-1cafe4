// tb_ring_rpt: the repeater must deliver every flit exactly one cycle later.
module tb_ring_rpt;
  import pau_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t flit_in = '0, flit_out, prev;
  int checks = 0, failures = 0;

  ring_rpt dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 500; n++) begin
      flit_in = flit_t'({$urandom, $urandom});
      prev = flit_in;
      #1;
      checks++;   // not yet through the register
      if (flit_out === prev && n > 0 && flit_out != '0) begin failures++; $display("FAIL early at %0t", $time); end
      @(negedge clk);
      checks++;
      if (flit_out !== prev) begin failures++; $display("FAIL at %0t", $time); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
