// bram_ht: hash table built from block RAM columns, for membership queries.
//
// The table has NBINS bins of M entries.  Entry j of every bin lives in
// column memory j (one block RAM per column, NBINS words of KEY_W bits), so
// the bin index is the common address of all M columns and a whole bin is
// read in parallel.  The valid bits sit in flip-flops.  For one operation:
//   exist = some valid entry of the bin equals key
//   full  = every entry of the bin is valid
//   lookup  : report exist/full only.
//   insert  : if absent and not full, write key into the first invalid
//             column (priority encoder over the valid bits) and set valid.
//             If the bin is full nothing is written; full tells the caller to
//             extend the bin elsewhere.
//   delete  : if present, clear the valid bit of the matching entry.
//   replace : clear every valid bit of the bin and write key as its first
//             entry; the following inserts reload the rest of the bin.
//
// Interface/timing: exist and full are combinational for the operation
// presented with op_valid; the table changes at that clock edge, so one
// operation completes per cycle.  Memories are read asynchronously.
//
// Follows the document: column-per-entry memories, flip-flop valid bits,
// priority-encoded insert position, Exist and Full, the replace semantics.
// Own choices: asynchronous read (one operation per cycle without a bypass)
// and replace writing its own key as the first reloaded entry.
module bram_ht
  import fpga_hu_pkg::*;
#(
  parameter int unsigned NBINS = 1024,
  parameter int unsigned M     = 32,
  parameter int unsigned KEY_W = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     op_valid,
  input  opcode_e                  opcode,
  input  logic [$clog2(NBINS)-1:0] bin_idx,
  input  logic [KEY_W-1:0]         key,
  output logic                     exist,
  output logic                     full
);

  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;

  logic [M-1:0]     valid_q [NBINS];
  logic [KEY_W-1:0] rd_key  [M];
  logic [M-1:0]     match;
  logic [M-1:0]     bin_valid;
  logic [CW-1:0]    ins_col;
  logic [M-1:0]     col_we;

  assign bin_valid = valid_q[bin_idx];

  for (genvar j = 0; j < M; j++) begin : g_col
    logic [KEY_W-1:0] mem [NBINS];
    always_ff @(posedge clk) begin
      if (col_we[j]) mem[bin_idx] <= key;
    end
    assign rd_key[j] = mem[bin_idx];
    assign match[j]  = bin_valid[j] && (rd_key[j] == key);
  end

  assign exist = |match;
  assign full  = &bin_valid;

  always_comb begin
    ins_col = '0;
    for (int j = M - 1; j >= 0; j--)
      if (!bin_valid[j]) ins_col = j[CW-1:0];
  end

  always_comb begin
    col_we = '0;
    if (op_valid) begin
      if (opcode == OP_INSERT && !exist && !full) col_we[ins_col] = 1'b1;
      if (opcode == OP_REPLACE)                   col_we[0]       = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned b = 0; b < NBINS; b++) valid_q[b] <= '0;
    end else if (op_valid) begin
      unique case (opcode)
        OP_INSERT:  valid_q[bin_idx] <= bin_valid | col_we;
        OP_DELETE:  valid_q[bin_idx] <= bin_valid & ~match;
        OP_REPLACE: valid_q[bin_idx] <= M'(1);
        default: ;
      endcase
    end
  end

  a_one_match: assert property (@(posedge clk) disable iff (!rst_n)
    op_valid |-> $onehot0(match));

endmodule
