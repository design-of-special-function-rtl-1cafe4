// tb_bin_selector: every bin index must raise exactly its own Bin_EN line,
// and no line may be high while the unit is disabled.
module tb_bin_selector;
  localparam int NBINS = 1024;
  logic en;
  logic [9:0] bin_idx;
  logic [NBINS-1:0] bin_en, exp;
  int checks = 0, failures = 0;

  bin_selector #(.NBINS(NBINS)) dut (.*);

  initial begin
    for (int i = 0; i < NBINS; i++) begin
      en = 1; bin_idx = 10'(i); #1;
      exp = '0; exp[i] = 1'b1;
      checks++;
      if (bin_en !== exp) begin failures++; $display("FAIL idx %0d", i); end
      en = 0; #1;
      checks++;
      if (bin_en !== '0) begin failures++; $display("FAIL disabled idx %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
