// bin_selector: one-hot decoder from the hash bin index to the Bin_EN lines.
//
// When en is high exactly one bin_en bit, the one numbered bin_idx, is high;
// when en is low all are low, so no bin of the hash table is active.  Only the
// enabled bin of the table spends dynamic power, which is the point of
// splitting the table into bins.
//
// Interface/timing: purely combinational.
// Follows the document: a decoder producing one-hot Bin_EN_i.  Gating by the
// unit's EN input is this design's choice.
module bin_selector #(
  parameter int unsigned NBINS = 1024
) (
  input  logic                     en,
  input  logic [$clog2(NBINS)-1:0] bin_idx,
  output logic [NBINS-1:0]         bin_en
);

  always_comb begin
    bin_en = '0;
    if (en) bin_en[bin_idx] = 1'b1;
  end

endmodule
