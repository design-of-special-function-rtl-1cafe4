// hash_unit: circuit-level hardware hash unit for a processor pipeline.
//
// A (key, value) store with one-cycle lookup.  The key is hashed by an H3
// hash function into a bin index; the bin selector turns it into one Bin_EN
// line; the control signals unit (CSU) turns the CPU op-code (W2,W1) into
// atomic table operations (C2,C1); the table searches only the selected bin.
//   lookup (W=01): one cycle, value_out and exist_n valid in that cycle.
//   insert (W=11): lookup, then in the next cycle (CPU drives W=00) an
//                  insert into the first empty row if the key was absent.
//   delete (W=10): lookup, then in the next cycle a delete if it was present.
// key and value_in must be held for both cycles of insert and delete.
// exist_n is low when the key is present (it reflects the lookup step).
// bin_full reports that the key's bin has no free row, i.e. an insert would
// have to be placed outside the unit.
//
// The Q matrix of the hash is loaded through q_we/q_row/q_data.
// Follows the document: the four sub-blocks, the op-codes, the two-cycle
// sequences and the sizes (1024 bins of 16 entries, 32-bit key and value,
// a 64kB table).  Own choices: reset, bin_full, Q in flip-flops.
module hash_unit
  import hu_pkg::*;
#(
  parameter int unsigned NBINS = 1024,
  parameter int unsigned M     = 16,
  parameter int unsigned KEY_W = 32,
  parameter int unsigned VAL_W = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  w_op_e                      w,
  input  logic [KEY_W-1:0]           key,
  input  logic [VAL_W-1:0]           value_in,
  input  logic                       q_we,
  input  logic [$clog2(KEY_W)-1:0]   q_row,
  input  logic [$clog2(NBINS)-1:0]   q_data,
  output logic [VAL_W-1:0]           value_out,
  output logic                       exist_n,
  output logic                       bin_full
);

  localparam int unsigned IDX_W = $clog2(NBINS);

  logic [IDX_W-1:0] bin_idx;
  logic [NBINS-1:0] bin_en;
  c_op_e            c;
  w_op_e            w_en;

  assign w_en = en ? w : W_NOP;

  h3_hash #(.KEY_W(KEY_W), .IDX_W(IDX_W)) u_hf (
    .clk, .rst_n, .q_we, .q_row, .q_data, .key, .bin_idx
  );

  bin_selector #(.NBINS(NBINS)) u_bs (
    .en(en || c != C_NOP), .bin_idx, .bin_en
  );

  csu u_csu (
    .clk, .rst_n, .w(w_en), .exist_n, .c
  );

  hash_table #(.NBINS(NBINS), .M(M), .KEY_W(KEY_W), .VAL_W(VAL_W)) u_ht (
    .clk, .rst_n, .bin_en, .c, .key, .value_in, .exist_n, .bin_full, .value_out
  );

endmodule
