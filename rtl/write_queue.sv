// write_queue: the MAP's queue of outstanding writes.
//
// The address generator pushes write addresses in program order; the CP later
// sends the data values, without identifiers, in the same order, and each
// value goes into the oldest entry that has no data yet (received bit).
// An entry whose address is indirect is offered to the memory controller at
// once as a read (ind_*); the word that comes back is the real address and
// the indirect bit clears. The head entry, once it has a direct address and
// its data, is offered as a memory write (wr_*); when memory takes it the
// done bit is set and the entry leaves. Writes therefore reach memory in
// program order.
// cam_addr/cam_hit let the read queue find older writes to an address
// (an entry whose address is still indirect counts as a match, since it may
// be any address); pend shows which entries are still waiting.
// Fields follow the architecture; depth and write ordering are this design's.
module write_queue
  import sma_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic             push_map,
  input  logic             push_ind,
  input  addr_t            push_addr,
  output logic             full,
  output logic             empty,
  // write data in program order
  input  logic             wdata_valid,
  input  word_t            wdata,
  output logic             wdata_ready,
  // indirect address reads
  output logic             ind_valid,
  output addr_t            ind_addr,
  output logic [5:0]       ind_idx,
  input  logic             ind_ready,
  input  logic             resp_valid,
  input  logic [5:0]       resp_idx,
  input  word_t            resp_data,
  // memory writes
  output logic             wr_valid,
  output addr_t            wr_addr,
  output word_t            wr_data,
  input  logic             wr_ready,
  // hazard check for the read queue
  input  addr_t            cam_addr,
  output logic [DEPTH-1:0] cam_hit,
  output logic [DEPTH-1:0] pend
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic  map;
    logic  ind;
    logic  rcv;
    logic  done;
    logic  req;
    addr_t addr;
    word_t data;
  } wq_entry_t;

  wq_entry_t        q [DEPTH];
  logic [DEPTH-1:0] used;
  logic [PW-1:0]    head, tail, dptr;
  logic [PW:0]      count;

  assign full  = (count == (PW+1)'(DEPTH));
  assign empty = (count == '0);
  assign pend  = used;

  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      cam_hit[i] = used[i] && (q[i].ind || q[i].addr == cam_addr);
  end

  // first indirect entry that still needs its address read
  logic [PW-1:0] isel;
  always_comb begin
    ind_valid = 1'b0;
    isel      = '0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (used[i] && q[i].ind && !q[i].req) begin
        ind_valid = 1'b1;
        isel      = PW'(i);
      end
    ind_addr = q[isel].addr;
    ind_idx  = 6'(isel);
  end

  assign wdata_ready = used[dptr] && !q[dptr].rcv;

  assign wr_valid = used[head] && !q[head].ind && q[head].rcv;
  assign wr_addr  = q[head].addr;
  assign wr_data  = q[head].data;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = wr_valid && wr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      dptr  <= '0;
      count <= '0;
      used  <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      if (ind_valid && ind_ready) q[isel].req <= 1'b1;
      if (resp_valid && 32'(resp_idx) < DEPTH) begin
        q[resp_idx[PW-1:0]].addr <= addr_t'(resp_data);
        q[resp_idx[PW-1:0]].ind  <= 1'b0;
      end
      if (wdata_valid && wdata_ready) begin
        q[dptr].data <= wdata;
        q[dptr].rcv  <= 1'b1;
        dptr         <= dptr + 1'b1;
      end
      if (do_pop) begin
        q[head].done <= 1'b1;
        used[head]   <= 1'b0;
        head         <= head + 1'b1;
      end
      if (do_push) begin
        q[tail].map  <= push_map;
        q[tail].ind  <= push_ind;
        q[tail].rcv  <= 1'b0;
        q[tail].done <= 1'b0;
        q[tail].req  <= 1'b0;
        q[tail].addr <= push_addr;
        q[tail].data <= '0;
        used[tail]   <= 1'b1;
        tail         <= tail + 1'b1;
      end
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

endmodule
