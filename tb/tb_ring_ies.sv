// tb_ring_ies: insertion/extraction station against a cycle model.
// Random ring traffic (empty slots, flits for this station, flits for
// others), a randomly stalling endpoint reader and random endpoint sends.
// Checks each outgoing slot, each flit handed to the endpoint, and counts
// extractions, insertions, forwards and flits left circulating because the
// Din FIFO was full.
module tb_ring_ies;
  import pau_pkg::*;
  localparam int ROW = 1, COL = 2, D = 2;
  logic clk = 0, rst_n = 0, rx_valid, rx_ready = 0, tx_valid = 0, tx_ready, recirculate;
  flit_t flit_in = '0, flit_out, rx_flit, tx_flit = '0, exp_out;
  flit_t dinq [$], outq [$];
  int checks = 0, failures = 0, n_ext = 0, n_ins = 0, n_fwd = 0, n_recirc = 0;

  ring_ies #(.MY_ROW(ROW), .MY_COL(COL), .FIFO_DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t rnd_flit(input bit mine);
    flit_t f = flit_t'({$urandom, $urandom});
    f.valid = 1;
    if (mine) begin f.dst.row = ROW; f.dst.col = COL; end
    else if (f.dst.row == ROW && f.dst.col == COL) f.dst.col = COL + 1;
    return f;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      automatic int r = $urandom_range(0, 9);
      automatic bit for_me, extract, insert;
      @(negedge clk);
      flit_in  = r < 3 ? '0 : rnd_flit(r < 7);
      rx_ready = ($urandom_range(0, 3) == 0);
      tx_valid = 1'($urandom);
      tx_flit  = rnd_flit(0);
      tx_flit.valid = 0;   // the station sets valid when it inserts
      #1;
      for_me  = flit_in.valid && flit_in.dst.row == ROW && flit_in.dst.col == COL;
      extract = for_me && dinq.size() < D;
      insert  = (!flit_in.valid || extract) && outq.size() > 0;
      if (insert) begin exp_out = outq[0]; exp_out.valid = 1; end
      else if (extract) exp_out = '0;
      else exp_out = flit_in;
      chk(rx_valid == (dinq.size() > 0), "rx_valid");
      if (dinq.size() > 0) chk(rx_flit == dinq[0], "rx_flit");
      chk(tx_ready == (outq.size() < D), "tx_ready");
      chk(recirculate == (for_me && !extract), "recirculate");
      if (extract) n_ext++;
      if (insert) n_ins++;
      if (for_me && !extract) n_recirc++;
      if (!insert && !extract && flit_in.valid) n_fwd++;
      @(posedge clk);
      if (rx_valid && rx_ready) void'(dinq.pop_front());
      if (insert) void'(outq.pop_front());
      if (extract) dinq.push_back(flit_in);
      if (tx_valid && tx_ready) outq.push_back(tx_flit);
      #1;
      chk(flit_out == exp_out, "ring slot");
    end
    $display("extract=%0d insert=%0d forward=%0d recirculate=%0d", n_ext, n_ins, n_fwd, n_recirc);
    chk(n_ext > 0 && n_ins > 0 && n_fwd > 0 && n_recirc > 0, "all station cases seen");
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
