// map: the Memory Access Processor.
//
// The MAP makes every memory reference of the machine and feeds the CP.
// Organisation (instruction fetcher -> preprocessor -> operand and
// instruction buffer -> address generator -> read / write queues -> memory
// controller):
//  * the instruction fetcher holds the PC and fetches one block at a time;
//  * the preprocessor sends CP instructions to the CP and places MAP
//    instructions and all operand specifications in the OIB;
//  * the address generator executes MAP instructions (index stack, tables,
//    branches) and turns operand specifications into queue entries; a branch
//    to a buffered block needs no fetch;
//  * the read queue returns operands to the CP (cp_d*) in program order, with
//    end-of-data words that steer the CP between blocks; table words go back
//    to the address generator;
//  * the write queue pairs CP result words (cp_w*) with their addresses;
//  * the memory controller tags every request so memory may answer out of
//    order.
// Memory port: see mem_controller. start with start_pc begins execution;
// halted rises at STOP.
module map
  import sma_pkg::*;
#(
  parameter int unsigned NBLK        = 8,
  parameter int unsigned BLK_LINES   = 32,
  parameter int unsigned IS_DEPTH    = 7,
  parameter int unsigned TMP_ENTRIES = 16,
  parameter int unsigned APT_ENTRIES = 32,
  parameter int unsigned AIT_ENTRIES = 16,
  parameter int unsigned NBASE       = 4,
  parameter int unsigned RQ_DEPTH    = 8,
  parameter int unsigned WQ_DEPTH    = 8,
  localparam int unsigned SW = (NBLK > 1) ? $clog2(NBLK) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  addr_t            start_pc,
  output logic             halted,
  output logic [2:0]       err,          // {oib overflow, level error, bound error}
  // memory
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output logic             mem_req_we,
  output addr_t            mem_req_addr,
  output word_t            mem_req_wdata,
  output logic [TAG_W-1:0] mem_req_tag,
  input  logic             mem_resp_valid,
  input  logic [TAG_W-1:0] mem_resp_tag,
  input  word_t            mem_resp_data,
  // CP instructions
  output logic             cpi_wr,
  output logic             cpi_first,
  output logic [SW-1:0]    cpi_slot,
  output cp_instr_t        cpi_instr,
  output logic             cpi_end,
  // CP data stream
  output logic             cpd_valid,
  output cp_data_t         cpd_data,
  input  logic             cpd_ready,
  input  logic             cp_eod_taken,
  // CP results
  input  logic             cpw_valid,
  input  word_t            cpw_data,
  output logic             cpw_ready,
  input  logic             cp_br_valid,
  input  logic             cp_br_taken,
  input  logic             cp_cur_valid,
  input  logic [SW-1:0]    cp_cur_slot
);

  localparam int unsigned LW = $clog2(BLK_LINES + 1);

  // fetcher <-> controller / preprocessor
  logic   f_start, f_busy, if_valid, if_ready, if_rvalid;
  addr_t  f_pc, if_addr, f_addr;
  word_t  if_rdata, rdata;
  logic   f_ovalid, f_oready;
  instr_t f_instr;

  // OIB
  logic            o_alloc, o_wr, o_set_cp, o_set_loop, o_set_done, o_avail;
  logic            o_complete, o_has_cp, o_cp_loop, o_lk_hit, o_ovf;
  logic [SW-1:0]   o_alloc_slot, o_wslot, o_rslot, o_lk_slot;
  logic [LW-1:0]   o_rline;
  oib_line_t       o_wline, o_rdata;
  addr_t           o_next_w, o_next_r, o_lk_addr;
  logic [NBLK-1:0] o_valid;

  // allocation
  logic          a_req, a_done;
  addr_t         a_addr;
  logic [SW-1:0] a_slot;
  logic          eod_inflight;

  // queues
  logic                rq_push, rq_map, rq_ind, rq_rcv, rq_eod, rq_full, rq_empty;
  addr_t               rq_addr;
  word_t               rq_data;
  logic                rq_ovalid, rq_omap, rq_oeod, rq_pop, rq_pop_map;
  word_t               rq_odata;
  logic                rq_mvalid, rq_mready, rq_rvalid;
  addr_t               rq_maddr;
  logic [5:0]          rq_midx, rq_ridx;
  logic                wq_push, wq_ind, wq_full, wq_empty;
  addr_t               wq_addr;
  logic [WQ_DEPTH-1:0] wq_hit, wq_pend;
  logic                wqi_valid, wqi_ready, wqi_rvalid, wqw_valid, wqw_ready;
  addr_t               wqi_addr, wqw_addr;
  logic [5:0]          wqi_idx, wqi_ridx;
  word_t               wqw_data;
  logic                ag_err_oob, ag_err_lvl, blk_valid;
  logic [SW-1:0]       blk_slot;

  instr_fetcher u_fetch (
    .clk, .rst_n, .start(f_start), .start_pc(f_pc), .busy(f_busy),
    .if_valid, .if_addr, .if_ready, .if_rvalid, .if_rdata,
    .out_valid(f_ovalid), .out_instr(f_instr), .out_addr(f_addr), .out_ready(f_oready));

  instr_preproc #(.NBLK(NBLK)) u_pre (
    .clk, .rst_n,
    .alloc_req(a_req), .alloc_addr(a_addr), .alloc_done(a_done), .alloc_slot(a_slot),
    .blk_valid(o_valid), .cp_cur_valid, .cp_cur_slot, .eod_inflight,
    .oib_alloc(o_alloc), .oib_alloc_slot(o_alloc_slot), .fetch_start(f_start), .fetch_pc(f_pc),
    .in_valid(f_ovalid), .in_instr(f_instr), .in_addr(f_addr), .in_ready(f_oready),
    .oib_wr(o_wr), .oib_slot(o_wslot), .oib_line(o_wline),
    .oib_set_cp(o_set_cp), .oib_set_loop(o_set_loop), .oib_set_done(o_set_done),
    .oib_next(o_next_w),
    .cp_wr(cpi_wr), .cp_first(cpi_first), .cp_slot(cpi_slot), .cp_instr(cpi_instr),
    .cp_end(cpi_end));

  oib #(.NBLK(NBLK), .BLK_LINES(BLK_LINES)) u_oib (
    .clk, .rst_n,
    .alloc(o_alloc), .alloc_slot(o_alloc_slot), .alloc_addr(a_addr),
    .wr_en(o_wr), .wr_slot(o_wslot), .wr_data(o_wline),
    .set_cp(o_set_cp), .set_cp_loop(o_set_loop), .set_slot(o_wslot),
    .set_done(o_set_done), .set_next(o_next_w),
    .rd_slot(o_rslot), .rd_line(o_rline), .rd_data(o_rdata), .rd_avail(o_avail),
    .rd_complete(o_complete), .rd_has_cp(o_has_cp), .rd_cp_loop(o_cp_loop),
    .rd_next(o_next_r),
    .lk_addr(o_lk_addr), .lk_hit(o_lk_hit), .lk_slot(o_lk_slot),
    .valid(o_valid), .overflow(o_ovf));

  addr_gen #(
    .NBLK(NBLK), .BLK_LINES(BLK_LINES), .IS_DEPTH(IS_DEPTH),
    .TMP_ENTRIES(TMP_ENTRIES), .APT_ENTRIES(APT_ENTRIES), .AIT_ENTRIES(AIT_ENTRIES),
    .NBASE(NBASE)
  ) u_ag (
    .clk, .rst_n, .start, .start_pc, .halted, .err_oob(ag_err_oob), .err_lvl(ag_err_lvl),
    .oib_slot(o_rslot), .oib_line(o_rline), .oib_data(o_rdata), .oib_avail(o_avail),
    .oib_cp_loop(o_cp_loop), .oib_next(o_next_r),
    .lk_addr(o_lk_addr), .lk_hit(o_lk_hit), .lk_slot(o_lk_slot),
    .alloc_req(a_req), .alloc_addr(a_addr), .alloc_done(a_done), .alloc_slot(a_slot),
    .rq_push, .rq_map, .rq_ind, .rq_rcv, .rq_eod, .rq_addr, .rq_data, .rq_full,
    .rq_out_valid(rq_ovalid), .rq_out_map(rq_omap), .rq_out_data(rq_odata),
    .rq_pop_map,
    .wq_push, .wq_ind, .wq_addr, .wq_full,
    .cp_br_valid, .cp_br_taken, .cp_eod_taken, .eod_inflight,
    .cp_blk_valid(blk_valid), .cp_blk_slot(blk_slot));

  read_queue #(.DEPTH(RQ_DEPTH), .WQ_DEPTH(WQ_DEPTH)) u_rq (
    .clk, .rst_n,
    .push(rq_push), .push_map(rq_map), .push_ind(rq_ind), .push_rcv(rq_rcv),
    .push_eod(rq_eod), .push_addr(rq_addr), .push_data(rq_data),
    .wq_hit, .wq_pend, .full(rq_full), .empty(rq_empty),
    .req_valid(rq_mvalid), .req_addr(rq_maddr), .req_idx(rq_midx), .req_ready(rq_mready),
    .resp_valid(rq_rvalid), .resp_idx(rq_ridx), .resp_data(rdata),
    .out_valid(rq_ovalid), .out_map(rq_omap), .out_eod(rq_oeod), .out_data(rq_odata),
    .pop(rq_pop));

  write_queue #(.DEPTH(WQ_DEPTH)) u_wq (
    .clk, .rst_n,
    .push(wq_push), .push_map(1'b0), .push_ind(wq_ind), .push_addr(wq_addr),
    .full(wq_full), .empty(wq_empty),
    .wdata_valid(cpw_valid), .wdata(cpw_data), .wdata_ready(cpw_ready),
    .ind_valid(wqi_valid), .ind_addr(wqi_addr), .ind_idx(wqi_idx), .ind_ready(wqi_ready),
    .resp_valid(wqi_rvalid), .resp_idx(wqi_ridx), .resp_data(rdata),
    .wr_valid(wqw_valid), .wr_addr(wqw_addr), .wr_data(wqw_data), .wr_ready(wqw_ready),
    .cam_addr(rq_addr), .cam_hit(wq_hit), .pend(wq_pend));

  mem_controller u_mc (
    .if_valid, .if_addr, .if_ready, .if_rvalid, .if_rdata,
    .rq_valid(rq_mvalid), .rq_addr(rq_maddr), .rq_idx(rq_midx), .rq_ready(rq_mready),
    .rq_rvalid, .rq_ridx,
    .wqi_valid, .wqi_addr, .wqi_idx, .wqi_ready, .wqi_rvalid, .wqi_ridx,
    .wqw_valid, .wqw_addr, .wqw_data, .wqw_ready,
    .rdata,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_req_tag, .mem_resp_valid, .mem_resp_tag, .mem_resp_data);

  // head of the read queue: CP items go to the CP, MAP items to the generator
  assign cpd_valid = rq_ovalid && !rq_omap;
  assign cpd_data  = '{eod: rq_oeod, data: rq_odata};
  assign rq_pop    = rq_omap ? rq_pop_map : cpd_ready;

  assign err = {o_ovf, ag_err_lvl, ag_err_oob};

endmodule
