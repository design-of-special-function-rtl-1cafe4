// h3_hash: hash function of class H3.
//
// The bin index is the XOR of the rows of a Q matrix picked out by the
// one-bits of the key: bin_idx = XOR_i (key[i] & Q[i]).  Only AND and XOR
// gates sit in the path, so the hash settles well within one clock cycle.
// The Q matrix (KEY_W rows of IDX_W bits) lives in a register array that
// can be rewritten at any time through q_we/q_row/q_data, which changes the
// hash function for a new application.
//
// Interface/timing: bin_idx is combinational from key and the current Q.
// A Q row written with q_we takes effect in the cycle after the clock edge.
//
// Follows the document: the H3 structure and the loadable Q matrix.
// Own choices: Q is held in flip-flops rather than latches, and reset loads
// a fixed pseudo-random Q (multiplicative hashing of the row number) so the unit hashes
// sensibly before software loads its own matrix.
module h3_hash #(
  parameter int unsigned KEY_W = 32,
  parameter int unsigned IDX_W = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     q_we,
  input  logic [$clog2(KEY_W)-1:0] q_row,
  input  logic [IDX_W-1:0]         q_data,
  input  logic [KEY_W-1:0]         key,
  output logic [IDX_W-1:0]         bin_idx
);

  // Default Q row i: the top IDX_W bits of (i+1) times the 32-bit golden
  // ratio constant (multiplicative hashing), a well-spread fixed pattern.
  function automatic logic [IDX_W-1:0] default_row(input int unsigned i);
    logic [31:0] p;
    p = (i + 1) * 32'h9E37_79B1;
    return IDX_W'(p >> (32 - IDX_W));
  endfunction

  logic [IDX_W-1:0] q [KEY_W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < KEY_W; i++) q[i] <= default_row(i);
    end else if (q_we) begin
      q[q_row] <= q_data;
    end
  end

  always_comb begin
    bin_idx = '0;
    for (int unsigned i = 0; i < KEY_W; i++)
      bin_idx = bin_idx ^ (q[i] & {IDX_W{key[i]}});
  end

endmodule
