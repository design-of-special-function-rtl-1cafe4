// sfu_top: three special function units for a general-purpose processor.
//
// The units are independent and stand side by side, each with its own ports:
//   hu_*  : circuit-level hash unit, a (key, value) store with one-cycle
//           lookup driven by the processor pipeline (see hash_unit).
//   cp_*  : hash-unit coprocessor core for membership queries on 128-bit
//           virus signatures, streamed in bursts by a host (see fpga_hu).
//   pau_* : programmable arithmetic unit, tiles and a controller on a ring
//           network-on-chip (see pau).
// All three run from clk and a synchronous active-low reset rst_n.  Every
// parameter keeps its default, the configuration described in each unit.
module sfu_top
  import hu_pkg::*;
  import fpga_hu_pkg::*;
  import pau_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // circuit-level hash unit
  input  logic              hu_en,
  input  w_op_e             hu_w,
  input  logic [31:0]       hu_key,
  input  logic [31:0]       hu_value_in,
  input  logic              hu_q_we,
  input  logic [4:0]        hu_q_row,
  input  logic [9:0]        hu_q_data,
  output logic [31:0]       hu_value_out,
  output logic              hu_exist_n,
  output logic              hu_bin_full,
  // hash coprocessor core
  input  logic              cp_start,
  input  logic [31:0]       cp_no_entries,
  input  logic              cp_req_valid,
  output logic              cp_req_ready,
  input  opcode_e           cp_req_opcode,
  input  logic [127:0]      cp_req_key,
  output logic              cp_rsp_valid,
  input  logic              cp_rsp_ready,
  output result_t           cp_rsp,
  output logic              cp_done,
  input  logic              cp_q_we,
  input  logic [6:0]        cp_q_row,
  input  logic [9:0]        cp_q_data,
  // programmable arithmetic unit
  input  logic              pau_prog_we,
  input  logic [7:0]        pau_prog_addr,
  input  instr_t            pau_prog_instr,
  input  logic              pau_reg_we,
  input  logic [TAG_W-1:0]  pau_reg_addr,
  input  logic [DATA_W-1:0] pau_reg_wdata,
  input  logic [TAG_W-1:0]  pau_rd_addr,
  output logic [DATA_W-1:0] pau_rd_data,
  input  logic              pau_start,
  input  logic [8:0]        pau_prog_len,
  output logic              pau_busy,
  output logic              pau_done,
  output logic              pau_stall,
  output logic              pau_recirculate
);

  hash_unit u_hu (
    .clk, .rst_n,
    .en(hu_en), .w(hu_w), .key(hu_key), .value_in(hu_value_in),
    .q_we(hu_q_we), .q_row(hu_q_row), .q_data(hu_q_data),
    .value_out(hu_value_out), .exist_n(hu_exist_n), .bin_full(hu_bin_full)
  );

  fpga_hu u_cp (
    .clk, .rst_n,
    .start(cp_start), .no_entries(cp_no_entries),
    .req_valid(cp_req_valid), .req_ready(cp_req_ready),
    .req_opcode(cp_req_opcode), .req_key(cp_req_key),
    .rsp_valid(cp_rsp_valid), .rsp_ready(cp_rsp_ready), .rsp(cp_rsp),
    .done(cp_done),
    .q_we(cp_q_we), .q_row(cp_q_row), .q_data(cp_q_data)
  );

  pau u_pau (
    .clk, .rst_n,
    .prog_we(pau_prog_we), .prog_addr(pau_prog_addr), .prog_instr(pau_prog_instr),
    .reg_we(pau_reg_we), .reg_addr(pau_reg_addr), .reg_wdata(pau_reg_wdata),
    .rd_addr(pau_rd_addr), .rd_data(pau_rd_data),
    .start(pau_start), .prog_len(pau_prog_len),
    .busy(pau_busy), .done(pau_done), .stall(pau_stall),
    .recirculate(pau_recirculate)
  );

endmodule
