// cp_ibuf: the CP's instruction buffer.
//
// CP instructions arrive from the MAP's preprocessor with the number of the
// block slot they belong to; the first instruction of a block (first) starts
// the slot afresh, as a begin-of-block mark, and each instruction is stored
// after the previous one. end_en marks the block of end_slot complete (its
// end-of-block has passed the preprocessor). Slot k always holds the same
// block as slot k of the MAP's operand and instruction buffer, so the MAP can
// name a buffered block by its slot. Slots that receive a new block are also
// queued, in arrival order, on a small list read through new_*: an
// end-of-data word carrying the "new block" value selects the oldest of them.
// Writes take effect at the clock edge; reads are combinational. An
// instruction beyond BLK_INSTR raises overflow and is dropped.
module cp_ibuf
  import sma_pkg::*;
#(
  parameter int unsigned NBLK      = 8,
  parameter int unsigned BLK_INSTR = 8,
  localparam int unsigned SW = (NBLK > 1) ? $clog2(NBLK) : 1,
  localparam int unsigned IW = $clog2(BLK_INSTR + 1),
  localparam int unsigned XW = (BLK_INSTR > 1) ? $clog2(BLK_INSTR) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic          wr_first,
  input  logic [SW-1:0] wr_slot,
  input  cp_instr_t     wr_instr,
  input  logic          end_en,
  input  logic [SW-1:0] end_slot,
  input  logic [SW-1:0] rd_slot,
  input  logic [IW-1:0] rd_idx,
  output cp_instr_t     rd_instr,
  output logic [IW-1:0] rd_count,
  output logic          rd_complete,
  output logic          new_valid,
  output logic [SW-1:0] new_slot,
  input  logic          new_pop,
  output logic          overflow
);

  cp_instr_t       mem_q [NBLK][BLK_INSTR];
  logic [IW-1:0]   cnt_q [NBLK];
  logic            new_ready;
  logic [NBLK-1:0] done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_q   <= '0;
      overflow <= 1'b0;
      for (int s = 0; s < NBLK; s++) begin
        cnt_q[s] <= '0;
        for (int i = 0; i < BLK_INSTR; i++) mem_q[s][i] <= '0;
      end
    end else begin
      if (wr_en) begin
        if (wr_first) begin
          mem_q[wr_slot][0] <= wr_instr;
          cnt_q[wr_slot]    <= IW'(1);
          done_q[wr_slot]   <= 1'b0;
        end else if (32'(cnt_q[wr_slot]) < BLK_INSTR) begin
          mem_q[wr_slot][cnt_q[wr_slot][XW-1:0]] <= wr_instr;
          cnt_q[wr_slot] <= cnt_q[wr_slot] + 1'b1;
        end else begin
          overflow <= 1'b1;
        end
      end
      if (end_en) done_q[end_slot] <= 1'b1;
      if (wr_en && wr_first && !new_ready) overflow <= 1'b1;
    end
  end

  always_comb begin
    rd_instr    = '0;
    if (32'(rd_idx) < BLK_INSTR) rd_instr = mem_q[rd_slot][rd_idx[XW-1:0]];
    rd_count    = cnt_q[rd_slot];
    rd_complete = done_q[rd_slot];
  end

  // arrival order of new blocks
  sync_fifo #(.WIDTH(SW), .DEPTH(NBLK)) u_new (
    .clk, .rst_n, .in_valid(wr_en && wr_first), .in_data(wr_slot), .in_ready(new_ready),
    .out_valid(new_valid), .out_data(new_slot), .out_ready(new_pop));

endmodule
