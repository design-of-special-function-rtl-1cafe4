// tb_ring_js: junction station against a cycle model.
// Random flits on both rings, for this row and for others.  Checks both
// outgoing slots every cycle and counts flits moved horizontal->vertical,
// vertical->horizontal, passed straight on, and kept on their ring because
// the junction FIFO was full.
module tb_ring_js;
  import pau_pkg::*;
  localparam int ROW = 2, D = 2;
  logic clk = 0, rst_n = 0;
  flit_t h_in = '0, v_in = '0, h_out, v_out, eh, ev;
  flit_t verq [$], horq [$];
  int checks = 0, failures = 0, n_hv = 0, n_vh = 0, n_pass = 0, n_blocked = 0;

  ring_js #(.MY_ROW(ROW), .FIFO_DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t rnd_flit(input int r);
    flit_t f = flit_t'({$urandom, $urandom});
    if (r < 3) return '0;
    f.valid = 1;
    f.dst.row = (r < 6) ? ROW : ((r & 1) ? 0 : 3);
    return f;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      automatic bit h_leave, v_leave, to_ver, to_hor, hor_pop, ver_pop;
      @(negedge clk);
      h_in = rnd_flit($urandom_range(0, 9));
      v_in = rnd_flit($urandom_range(0, 9));
      #1;
      h_leave = h_in.valid && h_in.dst.row != ROW;
      v_leave = v_in.valid && v_in.dst.row == ROW;
      to_ver  = h_leave && verq.size() < D;
      to_hor  = v_leave && horq.size() < D;
      hor_pop = horq.size() > 0 && (!h_in.valid || to_ver);
      ver_pop = verq.size() > 0 && (!v_in.valid || to_hor);
      eh = hor_pop ? horq[0] : to_ver ? '0 : h_in;
      ev = ver_pop ? verq[0] : to_hor ? '0 : v_in;
      if (to_ver) n_hv++;
      if (to_hor) n_vh++;
      if ((h_leave && !to_ver) || (v_leave && !to_hor)) n_blocked++;
      if ((h_in.valid && !h_leave) || (v_in.valid && !v_leave)) n_pass++;
      @(posedge clk);
      if (hor_pop) void'(horq.pop_front());
      if (ver_pop) void'(verq.pop_front());
      if (to_ver) verq.push_back(h_in);
      if (to_hor) horq.push_back(v_in);
      #1;
      chk(h_out == eh, "horizontal slot");
      chk(v_out == ev, "vertical slot");
    end
    $display("h->v=%0d v->h=%0d pass=%0d blocked=%0d", n_hv, n_vh, n_pass, n_blocked);
    chk(n_hv > 0 && n_vh > 0 && n_pass > 0 && n_blocked > 0, "all junction cases seen");
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
