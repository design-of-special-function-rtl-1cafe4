// ht_bin: one bin of the hash table, a small content-addressable memory.
//
// Each of the M rows holds a key and a valid bit (the CAM part, 33 cells for
// a 32-bit key) and a value (the SRAM part).  When the bin is enabled, the
// key is compared against all valid rows at once; the match lines ml[] give
// hit and select the value that is read out.  Atomic operations, (C2,C1):
//   lookup : compare; the match lines are latched into match_q (the D-latches
//            that later pick the row to delete).
//   delete : clear the valid bit of the row latched by the preceding lookup.
//   insert : a priority encoder over the valid bits picks the first empty
//            row; key, value and valid = 1 are written there.  Nothing is
//            written when the bin is full (full = 1).
// Only the enabled bin ever changes state.
//
// Interface/timing: hit, value_out and full are combinational from the
// stored rows and key (a one-cycle CAM search); writes happen at the clock
// edge of the delete or insert cycle.  value_out is zero without a match.
//
// Follows the document: row layout, valid-bit rules, latched match lines for
// delete, priority-encoded insert row.  Own choices: rows are flip-flops,
// reset clears every valid bit, and the full flag is brought out so a caller
// can send the entry elsewhere.
module ht_bin
  import hu_pkg::*;
#(
  parameter int unsigned M     = 16,
  parameter int unsigned KEY_W = 32,
  parameter int unsigned VAL_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bin_en,
  input  c_op_e            c,
  input  logic [KEY_W-1:0] key,
  input  logic [VAL_W-1:0] value_in,
  output logic             hit,
  output logic             full,
  output logic [VAL_W-1:0] value_out
);

  logic [KEY_W-1:0] key_q [M];
  logic [VAL_W-1:0] val_q [M];
  logic [M-1:0]     valid_q;
  logic [M-1:0]     match_q;   // latched match lines of the last lookup
  logic [M-1:0]     ml;        // match lines
  logic [$clog2(M)-1:0] ins_row;

  always_comb begin
    for (int unsigned i = 0; i < M; i++)
      ml[i] = valid_q[i] && (key_q[i] == key);
  end

  assign hit  = bin_en && (|ml);
  assign full = &valid_q;

  always_comb begin
    value_out = '0;
    if (bin_en)
      for (int unsigned i = 0; i < M; i++)
        if (ml[i]) value_out = value_out | val_q[i];
  end

  // Priority encoder: lowest-numbered row whose valid bit is 0.
  always_comb begin
    ins_row = '0;
    for (int i = M - 1; i >= 0; i--)
      if (!valid_q[i]) ins_row = i[$clog2(M)-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
      match_q <= '0;
    end else if (bin_en) begin
      unique case (c)
        C_LOOKUP: match_q <= ml;
        C_DELETE: valid_q <= valid_q & ~match_q;
        C_INSERT: if (!full) valid_q[ins_row] <= 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (bin_en && c == C_INSERT && !full) begin
      key_q[ins_row] <= key;
      val_q[ins_row] <= value_in;
    end
  end

  // Keys are unique in a bin, so at most one match line is high.
  a_one_match: assert property (@(posedge clk) disable iff (!rst_n)
    bin_en |-> $onehot0(ml));

endmodule
