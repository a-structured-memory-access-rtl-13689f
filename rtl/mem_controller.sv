// mem_controller: the MAP's memory request controller.
//
// Three requesters share one memory port: the instruction fetcher, the write
// queue (writes, and reads of indirect write addresses) and the read queue.
// Each cycle the controller forwards one request, in the priority
// instruction fetch > write > indirect write address > read, and tags it with
// its source and queue entry: tag[7:6] = 0 instruction, 1 read queue,
// 2 write queue; tag[5:0] = entry. A read response comes back with its tag,
// possibly out of order, and is steered to the requester named in the tag.
// Writes get no response.
// Memory port: valid/ready request (we, addr, wdata, tag), response valid
// with tag and data, always accepted. Tagging follows the architecture; the
// priority and port handshake are this design's choices.
module mem_controller
  import sma_pkg::*;
(
  // instruction fetcher
  input  logic        if_valid,
  input  addr_t       if_addr,
  output logic        if_ready,
  output logic        if_rvalid,
  output word_t       if_rdata,
  // read queue
  input  logic        rq_valid,
  input  addr_t       rq_addr,
  input  logic [5:0]  rq_idx,
  output logic        rq_ready,
  output logic        rq_rvalid,
  output logic [5:0]  rq_ridx,
  // write queue: indirect address reads
  input  logic        wqi_valid,
  input  addr_t       wqi_addr,
  input  logic [5:0]  wqi_idx,
  output logic        wqi_ready,
  output logic        wqi_rvalid,
  output logic [5:0]  wqi_ridx,
  // write queue: writes
  input  logic        wqw_valid,
  input  addr_t       wqw_addr,
  input  word_t       wqw_data,
  output logic        wqw_ready,
  // shared response data
  output word_t       rdata,
  // memory
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output logic        mem_req_we,
  output addr_t       mem_req_addr,
  output word_t       mem_req_wdata,
  output logic [TAG_W-1:0] mem_req_tag,
  input  logic        mem_resp_valid,
  input  logic [TAG_W-1:0] mem_resp_tag,
  input  word_t       mem_resp_data
);

  typedef enum logic [1:0] {SRC_I = 2'd0, SRC_R = 2'd1, SRC_W = 2'd2} src_e;

  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = '0;
    mem_req_wdata = '0;
    mem_req_tag   = '0;
    if_ready      = 1'b0;
    rq_ready      = 1'b0;
    wqi_ready     = 1'b0;
    wqw_ready     = 1'b0;
    if (if_valid) begin
      mem_req_valid = 1'b1;
      mem_req_addr  = if_addr;
      mem_req_tag   = {SRC_I, 6'd0};
      if_ready      = mem_req_ready;
    end else if (wqw_valid) begin
      mem_req_valid = 1'b1;
      mem_req_we    = 1'b1;
      mem_req_addr  = wqw_addr;
      mem_req_wdata = wqw_data;
      wqw_ready     = mem_req_ready;
    end else if (wqi_valid) begin
      mem_req_valid = 1'b1;
      mem_req_addr  = wqi_addr;
      mem_req_tag   = {SRC_W, wqi_idx};
      wqi_ready     = mem_req_ready;
    end else if (rq_valid) begin
      mem_req_valid = 1'b1;
      mem_req_addr  = rq_addr;
      mem_req_tag   = {SRC_R, rq_idx};
      rq_ready      = mem_req_ready;
    end
  end

  always_comb begin
    src_e s;
    s          = src_e'(mem_resp_tag[7:6]);
    if_rvalid  = mem_resp_valid && (s == SRC_I);
    rq_rvalid  = mem_resp_valid && (s == SRC_R);
    wqi_rvalid = mem_resp_valid && (s == SRC_W);
    rq_ridx    = mem_resp_tag[5:0];
    wqi_ridx   = mem_resp_tag[5:0];
    rdata      = mem_resp_data;
    if_rdata   = mem_resp_data;
  end

endmodule
