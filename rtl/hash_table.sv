// hash_table: the hash unit's table, NBINS CAM bins of M entries each.
//
// The bin selector enables exactly one bin per cycle; only that bin compares
// and only that bin can be written.  The bins' hit, full and value outputs
// are combined here: Exist_n is low when the enabled bin holds the key,
// value_out is the matching value, bin_full reports a full enabled bin.
//
// Interface/timing: combinational outputs (one-cycle search); writes at the
// clock edge of an insert or delete step.  Follows the document's table
// organisation; bringing out bin_full is this design's choice.
module hash_table
  import hu_pkg::*;
#(
  parameter int unsigned NBINS = 1024,
  parameter int unsigned M     = 16,
  parameter int unsigned KEY_W = 32,
  parameter int unsigned VAL_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NBINS-1:0] bin_en,
  input  c_op_e            c,
  input  logic [KEY_W-1:0] key,
  input  logic [VAL_W-1:0] value_in,
  output logic             exist_n,
  output logic             bin_full,
  output logic [VAL_W-1:0] value_out
);

  logic [NBINS-1:0] hit;
  logic [NBINS-1:0] full;
  logic [VAL_W-1:0] val [NBINS];

  for (genvar b = 0; b < NBINS; b++) begin : g_bin
    ht_bin #(.M(M), .KEY_W(KEY_W), .VAL_W(VAL_W)) u_bin (
      .clk, .rst_n,
      .bin_en   (bin_en[b]),
      .c,
      .key,
      .value_in,
      .hit      (hit[b]),
      .full     (full[b]),
      .value_out(val[b])
    );
  end

  assign exist_n  = ~(|hit);
  assign bin_full = |(full & bin_en);

  always_comb begin
    value_out = '0;
    for (int unsigned b = 0; b < NBINS; b++) value_out = value_out | val[b];
  end

endmodule
