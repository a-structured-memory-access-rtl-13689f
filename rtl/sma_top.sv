// sma_top: the Structured Memory Access machine.
//
// Two processors split the work of a conventional CPU. The Memory Access
// Processor (map) is the only unit that talks to memory: it fetches
// instructions, keeps loop indices and data-structure descriptions, makes
// every operand address and streams instructions and operands to the
// Computation Processor (cp). The CP only computes: it receives instructions
// and an ordered stream of data words, returns result words for the MAP to
// write, and reports the outcome of data-dependent tests. There is no address
// path from the CP to memory. Blocks of instructions stay buffered in both
// processors, so loops run without refetching, and the CP repeats a block for
// as long as data keeps coming; the MAP switches the CP to another block by
// an end-of-data word in the data stream.
// Ports: start / start_pc begin a program, halted signals its STOP, err
// collects {CP error, OIB overflow, index level error, bound error}; the
// memory port is the MAP's (valid/ready requests with a tag, tagged read
// responses in any order, writes unacknowledged).
module sma_top
  import sma_pkg::*;
#(
  parameter int unsigned NBLK        = 8,
  parameter int unsigned BLK_LINES   = 32,
  parameter int unsigned BLK_INSTR   = 8,
  parameter int unsigned IS_DEPTH    = 7,
  parameter int unsigned TMP_ENTRIES = 16,
  parameter int unsigned APT_ENTRIES = 32,
  parameter int unsigned AIT_ENTRIES = 16,
  parameter int unsigned NBASE       = 4,
  parameter int unsigned RQ_DEPTH    = 8,
  parameter int unsigned WQ_DEPTH    = 8,
  parameter int unsigned NREG        = 8,
  parameter int unsigned FIFO_DEPTH  = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  addr_t            start_pc,
  output logic             halted,
  output logic             cp_busy,
  output logic [3:0]       err,
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output logic             mem_req_we,
  output addr_t            mem_req_addr,
  output word_t            mem_req_wdata,
  output logic [TAG_W-1:0] mem_req_tag,
  input  logic             mem_resp_valid,
  input  logic [TAG_W-1:0] mem_resp_tag,
  input  word_t            mem_resp_data
);

  localparam int unsigned SW = (NBLK > 1) ? $clog2(NBLK) : 1;

  logic          cpi_wr, cpi_first, cpi_end;
  logic [SW-1:0] cpi_slot, cp_cur_slot;
  cp_instr_t     cpi_instr;
  logic          cpd_valid, cpd_ready, eod_taken;
  cp_data_t      cpd_data;
  logic          cpw_valid, cpw_ready, br_valid, br_taken, cp_cur_valid, cp_err;
  word_t         cpw_data;
  logic [2:0]    map_err;

  map #(
    .NBLK(NBLK), .BLK_LINES(BLK_LINES), .IS_DEPTH(IS_DEPTH),
    .TMP_ENTRIES(TMP_ENTRIES), .APT_ENTRIES(APT_ENTRIES), .AIT_ENTRIES(AIT_ENTRIES),
    .NBASE(NBASE), .RQ_DEPTH(RQ_DEPTH), .WQ_DEPTH(WQ_DEPTH)
  ) u_map (
    .clk, .rst_n, .start, .start_pc, .halted, .err(map_err),
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_req_tag, .mem_resp_valid, .mem_resp_tag, .mem_resp_data,
    .cpi_wr, .cpi_first, .cpi_slot, .cpi_instr, .cpi_end,
    .cpd_valid, .cpd_data, .cpd_ready, .cp_eod_taken(eod_taken),
    .cpw_valid, .cpw_data, .cpw_ready,
    .cp_br_valid(br_valid), .cp_br_taken(br_taken),
    .cp_cur_valid, .cp_cur_slot);

  cp #(.NBLK(NBLK), .BLK_INSTR(BLK_INSTR), .NREG(NREG), .FIFO_DEPTH(FIFO_DEPTH)) u_cp (
    .clk, .rst_n,
    .ib_wr(cpi_wr), .ib_first(cpi_first), .ib_slot(cpi_slot), .ib_instr(cpi_instr),
    .ib_end(cpi_end), .ib_end_slot(cpi_slot),
    .din_valid(cpd_valid), .din(cpd_data), .din_ready(cpd_ready), .eod_taken,
    .wd_valid(cpw_valid), .wd_data(cpw_data), .wd_ready(cpw_ready),
    .br_valid, .br_taken,
    .cur_valid(cp_cur_valid), .cur_slot(cp_cur_slot), .busy(cp_busy), .err(cp_err));

  assign err = {cp_err, map_err};

endmodule
