// fpga_hu: hash-unit coprocessor core, a three-stage streaming pipeline.
//
// The host sends a burst of hash operations and reads back one result per
// operation, in order:
//   read stage    : requests (op-code, key) queue in the RD FIFO.
//   execute stage : the head request is hashed (H3) to a bin index and
//                   executed on the block-RAM table in one cycle, whenever
//                   the WR FIFO has room.
//   result stage  : {op-code, exist, full} queue in the WR FIFO.
// start (one cycle) loads no_entries, the burst length; done goes high once
// that many operations have been executed and stays high until the next
// start.  Throughput is one operation per cycle; a request written into an
// empty RD FIFO produces its result in the WR FIFO two edges later.
//
// Follows the document: the stage structure, op-codes, the 128-bit key of an
// MD5 signature, 1024 bins of 32 entries (a 512kB table), No_entries and
// Done.  Own choices: the ready/valid handshakes, FIFO depth, and the Q
// matrix load port.  The transport to the host is outside this module.
module fpga_hu
  import fpga_hu_pkg::*;
#(
  parameter int unsigned NBINS      = 1024,
  parameter int unsigned M          = 32,
  parameter int unsigned KEY_W      = 128,
  parameter int unsigned FIFO_DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [31:0]              no_entries,
  input  logic                     req_valid,
  output logic                     req_ready,
  input  opcode_e                  req_opcode,
  input  logic [KEY_W-1:0]         req_key,
  output logic                     rsp_valid,
  input  logic                     rsp_ready,
  output result_t                  rsp,
  output logic                     done,
  input  logic                     q_we,
  input  logic [$clog2(KEY_W)-1:0] q_row,
  input  logic [$clog2(NBINS)-1:0] q_data
);

  localparam int unsigned IDX_W = $clog2(NBINS);
  localparam int unsigned CW    = $clog2(FIFO_DEPTH + 1);

  typedef struct packed {
    opcode_e          opcode;
    logic [KEY_W-1:0] key;
  } request_t;

  request_t         rd_head;
  logic             rd_valid, rd_pop;
  logic             wr_ready;
  logic [IDX_W-1:0] bin_idx;
  logic             exist, full;
  result_t          res;
  logic [31:0]      remaining;
  logic [CW-1:0]    rd_count, wr_count;

  sync_fifo #(.WIDTH($bits(request_t)), .DEPTH(FIFO_DEPTH)) u_rd_fifo (
    .clk, .rst_n,
    .in_valid (req_valid), .in_ready(req_ready), .in_data({req_opcode, req_key}),
    .out_valid(rd_valid),  .out_ready(rd_pop),   .out_data(rd_head),
    .count    (rd_count)
  );

  assign rd_pop = rd_valid && wr_ready;

  h3_hash #(.KEY_W(KEY_W), .IDX_W(IDX_W)) u_hf (
    .clk, .rst_n, .q_we, .q_row, .q_data, .key(rd_head.key), .bin_idx
  );

  bram_ht #(.NBINS(NBINS), .M(M), .KEY_W(KEY_W)) u_ht (
    .clk, .rst_n,
    .op_valid(rd_pop), .opcode(rd_head.opcode), .bin_idx, .key(rd_head.key),
    .exist, .full
  );

  assign res = '{opcode: rd_head.opcode, exist: exist, full: full};

  sync_fifo #(.WIDTH($bits(result_t)), .DEPTH(FIFO_DEPTH)) u_wr_fifo (
    .clk, .rst_n,
    .in_valid (rd_pop),    .in_ready (wr_ready),  .in_data (res),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp),
    .count    (wr_count)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      remaining <= '0;
    end else if (start) begin
      remaining <= no_entries;
    end else if (rd_pop && remaining != '0) begin
      remaining <= remaining - 1'b1;
    end
  end

  assign done = (remaining == '0);

endmodule
