// pau_fc: programmable controller of the arithmetic unit.
//
// The controller holds a register file (operands, coefficients, results)
// and a program of instructions, both written by the host.  An instruction
// {tile, src_a, src_b, dst} sends regs[src_a] and regs[src_b] over the ring
// to the given tile; the tile's result comes back tagged with dst and is
// written to regs[dst].  Programming a different instruction list maps a
// different application (FIR filter, DCT, Viterbi) onto the same tiles.
//
// Sequencing: after start the instructions issue in order, one every two
// cycles (operand A, then operand B into the station's out FIFO).  An
// instruction waits (stall = 1) while its tile is still busy with an earlier
// operation or while any of its registers awaits a result (a scoreboard of
// ready bits).  Tiles work in parallel; results may return in any order.
// done goes high once all prog_len instructions have issued and every result
// has returned, and stays high until the next start.
//
// Host interface: reg_we writes a register and marks it ready; prog_we
// writes an instruction; rd_addr/rd_data read a register combinationally.
// Write registers and program only while busy is low.
//
// Follows the document's role of the controller (programmable sequencing of
// the tiles and of the data moved between them).  The document builds it
// from FPGA look-up tables configured from a high-level-synthesis schedule;
// this design's own choice is the instruction memory and scoreboard above,
// which gives the same programmability.
module pau_fc
  import pau_pkg::*;
#(
  parameter int unsigned NTILES     = 12,
  parameter int unsigned NCOLS      = 4,
  parameter int unsigned PROG_DEPTH = 256,
  parameter int unsigned NREGS      = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host
  input  logic                          prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] prog_addr,
  input  instr_t                        prog_instr,
  input  logic                          reg_we,
  input  logic [TAG_W-1:0]              reg_addr,
  input  logic [DATA_W-1:0]             reg_wdata,
  input  logic [TAG_W-1:0]              rd_addr,
  output logic [DATA_W-1:0]             rd_data,
  input  logic                          start,
  input  logic [$clog2(PROG_DEPTH+1)-1:0] prog_len,
  output logic                          busy,
  output logic                          done,
  output logic                          stall,
  // ring station
  input  logic                          rx_valid,
  output logic                          rx_ready,
  input  flit_t                         rx_flit,
  output logic                          tx_valid,
  input  logic                          tx_ready,
  output flit_t                         tx_flit
);

  localparam int unsigned PW = $clog2(PROG_DEPTH + 1);

  instr_t            prog [PROG_DEPTH];
  logic [DATA_W-1:0] regs [NREGS];
  logic [NREGS-1:0]  rdy_q;
  localparam int unsigned TI_W = (NTILES > 1) ? $clog2(NTILES) : 1;
  logic [NTILES-1:0] tile_busy;
  logic [PW-1:0]     pc, len_q;
  logic              phase_b;
  flit_t             b_flit;
  instr_t            ins;
  logic              more, can_issue;
  flit_t             a_flit;

  assign ins  = prog[pc[$clog2(PROG_DEPTH)-1:0]];
  assign more = busy && (pc < len_q);

  assign can_issue = more && !phase_b && tx_ready
                  && rdy_q[ins.src_a] && rdy_q[ins.src_b] && rdy_q[ins.dst]
                  && !tile_busy[TI_W'(ins.tile)];
  assign stall     = more && !phase_b && !can_issue;

  assign rx_ready = 1'b1;
  assign rd_data  = regs[rd_addr];

  always_comb begin
    a_flit       = '0;
    a_flit.valid = 1'b1;
    a_flit.dst   = ep_addr(int'(ins.tile) + 1, NCOLS);
    a_flit.src   = '0;
    a_flit.tag   = ins.dst;
    a_flit.is_b  = 1'b0;
    a_flit.data  = regs[ins.src_a];
  end

  assign tx_valid = can_issue || phase_b;
  assign tx_flit  = phase_b ? b_flit : a_flit;

  always_ff @(posedge clk) begin
    if (prog_we) prog[prog_addr] <= prog_instr;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rdy_q     <= '1;
      tile_busy <= '0;
      pc        <= '0;
      len_q     <= '0;
      phase_b   <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
      b_flit    <= '0;
      for (int unsigned i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      if (reg_we) begin
        regs[reg_addr]  <= reg_wdata;
        rdy_q[reg_addr] <= 1'b1;
      end
      if (start && !busy) begin
        busy  <= 1'b1;
        done  <= 1'b0;
        pc    <= '0;
        len_q <= prog_len;
      end
      if (can_issue) begin
        phase_b              <= 1'b1;
        rdy_q[ins.dst]       <= 1'b0;
        tile_busy[TI_W'(ins.tile)] <= 1'b1;
        b_flit               <= a_flit;
        b_flit.is_b          <= 1'b1;
        b_flit.data          <= regs[ins.src_b];
      end
      if (phase_b && tx_ready) begin
        phase_b <= 1'b0;
        pc      <= pc + 1'b1;
      end
      if (rx_valid) begin
        regs[rx_flit.tag]  <= rx_flit.data;
        rdy_q[rx_flit.tag] <= 1'b1;
        tile_busy[TI_W'(rx_flit.src - 1'b1)] <= 1'b0;
      end
      if (busy && !start && pc == len_q && !phase_b && tile_busy == '0 && !rx_valid) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  a_result_from_tile: assert property (@(posedge clk) disable iff (!rst_n)
    rx_valid |-> (rx_flit.src != '0 && int'(rx_flit.src) <= NTILES));

endmodule
