// read_queue: the MAP's queue of outstanding reads (operands for CP and MAP).
//
// Entries are kept in the order the address generator made them, so the CP
// receives its operands in program order. An entry holds the status bits
// CP/MAP, indirect, received and done, an address, a data word and the
// end-of-data bit that steers the CP between instruction blocks.
//  * push: a memory operand enters with its address, not received; an
//    immediate value, an index value or an end-of-data word enters already
//    received.
//  * The memory controller is offered the oldest entry that still needs a
//    request (req_*); the request carries the entry number as its tag. An
//    entry is not requested while a write that was older than it and went to
//    the same address is still waiting in the write queue: at push time the
//    entry records which write-queue entries match (wq_hit) and those bits
//    clear as the writes leave (wq_pend).
//  * A response (resp_*) for an indirect entry becomes the entry's address,
//    the indirect bit clears and the entry is requested again; otherwise the
//    data is stored and the received bit set. Responses may come in any order.
//  * The head is shown on out_* once received; pop sets its done bit, which
//    frees it.
// The fields and their meaning follow the architecture; the queue depth and
// the way older writes are remembered are this design's choices.
module read_queue
  import sma_pkg::*;
#(
  parameter int unsigned DEPTH    = 8,
  parameter int unsigned WQ_DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // from the address generator
  input  logic                push,
  input  logic                push_map,
  input  logic                push_ind,
  input  logic                push_rcv,
  input  logic                push_eod,
  input  addr_t               push_addr,
  input  word_t               push_data,
  input  logic [WQ_DEPTH-1:0] wq_hit,
  input  logic [WQ_DEPTH-1:0] wq_pend,
  output logic                full,
  output logic                empty,
  // to the memory controller
  output logic                req_valid,
  output addr_t               req_addr,
  output logic [5:0]          req_idx,
  input  logic                req_ready,
  input  logic                resp_valid,
  input  logic [5:0]          resp_idx,
  input  word_t               resp_data,
  // head
  output logic                out_valid,
  output logic                out_map,
  output logic                out_eod,
  output word_t               out_data,
  input  logic                pop
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic                map;
    logic                ind;
    logic                rcv;
    logic                done;
    logic                req;
    logic                eod;
    addr_t               addr;
    word_t               data;
    logic [WQ_DEPTH-1:0] wmask;
  } rq_entry_t;

  rq_entry_t        q [DEPTH];
  logic [DEPTH-1:0] used;
  logic [PW-1:0]    head, tail;
  logic [PW:0]      count;

  assign full  = (count == (PW+1)'(DEPTH));
  assign empty = (count == '0);

  // oldest entry that needs a memory request
  logic [PW-1:0] sel;
  always_comb begin
    logic [PW-1:0] p;
    req_valid = 1'b0;
    sel       = '0;
    for (int k = DEPTH-1; k >= 0; k--) begin
      p = head + PW'(k);
      if (used[p] && !q[p].rcv && !q[p].req && ((q[p].wmask & wq_pend) == '0)) begin
        req_valid = 1'b1;
        sel       = p;
      end
    end
    req_addr = q[sel].addr;
    req_idx  = 6'(sel);
  end

  assign out_valid = used[head] && q[head].rcv && !q[head].ind;
  assign out_map   = q[head].map;
  assign out_eod   = q[head].eod;
  assign out_data  = q[head].data;

  logic [PW-1:0] ridx;
  assign ridx = resp_idx[PW-1:0];

  logic do_pop, do_push;
  assign do_pop  = pop && out_valid;
  assign do_push = push && !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      used  <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) q[i].wmask <= q[i].wmask & wq_pend;
      if (req_valid && req_ready) q[sel].req <= 1'b1;
      if (resp_valid && 32'(resp_idx) < DEPTH) begin : resp_upd
        // a response must name an entry that is waiting for one
        assert (used[ridx] && q[ridx].req && !q[ridx].rcv)
          else $error("read_queue: unexpected response for entry %0d", resp_idx);
        if (q[ridx].ind) begin
          q[ridx].addr <= addr_t'(resp_data);
          q[ridx].ind  <= 1'b0;
          q[ridx].req  <= 1'b0;
        end else begin
          q[ridx].data <= resp_data;
          q[ridx].rcv  <= 1'b1;
        end
      end
      if (do_pop) begin
        q[head].done <= 1'b1;
        used[head]   <= 1'b0;
        head         <= head + 1'b1;
      end
      if (do_push) begin
        q[tail].map   <= push_map;
        q[tail].ind   <= push_ind;
        q[tail].rcv   <= push_rcv;
        q[tail].done  <= 1'b0;
        q[tail].req   <= 1'b0;
        q[tail].eod   <= push_eod;
        q[tail].addr  <= push_addr;
        q[tail].data  <= push_data;
        q[tail].wmask <= push_rcv ? '0 : (wq_hit & wq_pend);
        used[tail]    <= 1'b1;
        tail          <= tail + 1'b1;
      end
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

endmodule
