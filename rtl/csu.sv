// csu: control signals unit of the circuit-level hash unit.
//
// Every CPU operation starts with a lookup.  In the cycle the CPU presents
// (W2,W1) = lookup, insert or delete, the CSU drives (C2,C1) = lookup.  At the
// clock edge it remembers whether a second step is owed (insert or delete) and
// the Exist_n that the lookup produced.  In the next cycle, while the CPU
// drives (W2,W1) = no-op, it drives:
//   insert pending and key absent  (Exist_n = 1) -> (C2,C1) = insert
//   delete pending and key present (Exist_n = 0) -> (C2,C1) = delete
//   otherwise                                    -> (C2,C1) = no-op
// so insert and delete take two cycles and lookup one.
//
// Interface/timing: c is combinational from w and the two state registers.
// Follows the document: the op-code table and the two-cycle sequence.  Own
// choice: the second step has priority over a new op-code, and an assertion
// flags a CPU that does not send the no-op the sequence expects.
module csu
  import hu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  w_op_e w,
  input  logic  exist_n,
  output c_op_e c
);

  c_op_e pend_q;     // second step owed after this cycle's lookup
  logic  exist_n_q;  // lookup outcome of the previous cycle

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend_q    <= C_NOP;
      exist_n_q <= 1'b1;
    end else begin
      exist_n_q <= exist_n;
      if (pend_q == C_NOP && w == W_INSERT)      pend_q <= C_INSERT;
      else if (pend_q == C_NOP && w == W_DELETE) pend_q <= C_DELETE;
      else                                       pend_q <= C_NOP;
    end
  end

  always_comb begin
    c = C_NOP;
    if (pend_q == C_INSERT)      c = exist_n_q ? C_INSERT : C_NOP;
    else if (pend_q == C_DELETE) c = exist_n_q ? C_NOP : C_DELETE;
    else if (w != W_NOP)         c = C_LOOKUP;
  end

  // The CPU must drive no-op in the second cycle of insert and delete.
  a_second_cycle_nop: assert property (@(posedge clk) disable iff (!rst_n)
    (pend_q != C_NOP) |-> (w == W_NOP));

endmodule
