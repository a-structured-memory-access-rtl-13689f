// oib: the MAP's operand and instruction buffer.
//
// The OIB keeps, for the instruction blocks currently buffered, every MAP
// instruction and the operand specification of every MAP and CP
// instruction, so a block that is executed again (a loop) is not fetched
// again. It is divided into NBLK block slots of BLK_LINES lines; slot k holds
// the same block as slot k of the CP's instruction buffer.
// A line holds: data/instruction bit, read bit, write bit, the opcode field or
// operand field, and end-of-block bit. Per slot the buffer keeps the address
// of the block's first instruction (compared against branch targets to find
// a buffered block), the address after its last instruction, the number of
// lines written, whether the block is complete, whether it has a CP
// instruction and whether its first CP instruction takes data from the MAP
// (the CP repeats such a block by itself).
// Writes (alloc, line append, flags) take effect at the clock edge; reads and
// the target lookup are combinational. A line that does not fit raises
// overflow and is dropped.
module oib
  import sma_pkg::*;
#(
  parameter int unsigned NBLK      = 8,
  parameter int unsigned BLK_LINES = 32,
  localparam int unsigned SW = (NBLK > 1) ? $clog2(NBLK) : 1,
  localparam int unsigned LW = $clog2(BLK_LINES + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // allocation of a slot to a new block
  input  logic            alloc,
  input  logic [SW-1:0]   alloc_slot,
  input  addr_t           alloc_addr,
  // line append
  input  logic            wr_en,
  input  logic [SW-1:0]   wr_slot,
  input  oib_line_t       wr_data,
  // block flags
  input  logic            set_cp,
  input  logic            set_cp_loop,
  input  logic [SW-1:0]   set_slot,
  input  logic            set_done,
  input  addr_t           set_next,
  // read by the address generator
  input  logic [SW-1:0]   rd_slot,
  input  logic [LW-1:0]   rd_line,
  output oib_line_t       rd_data,
  output logic            rd_avail,
  output logic            rd_complete,
  output logic            rd_has_cp,
  output logic            rd_cp_loop,
  output addr_t           rd_next,
  // branch target lookup
  input  addr_t           lk_addr,
  output logic            lk_hit,
  output logic [SW-1:0]   lk_slot,
  output logic [NBLK-1:0] valid,
  output logic            overflow
);

  oib_line_t        mem_q   [NBLK][BLK_LINES];
  logic [LW-1:0]    cnt_q   [NBLK];
  addr_t            start_q [NBLK];
  addr_t            next_q  [NBLK];
  logic [NBLK-1:0]  valid_q, done_q, cp_q, loop_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      done_q   <= '0;
      cp_q     <= '0;
      loop_q   <= '0;
      overflow <= 1'b0;
      for (int s = 0; s < NBLK; s++) begin
        cnt_q[s]   <= '0;
        start_q[s] <= '0;
        next_q[s]  <= '0;
        for (int l = 0; l < BLK_LINES; l++) mem_q[s][l] <= '0;
      end
    end else begin
      if (alloc) begin
        valid_q[alloc_slot] <= 1'b1;
        done_q[alloc_slot]  <= 1'b0;
        cp_q[alloc_slot]    <= 1'b0;
        loop_q[alloc_slot]  <= 1'b0;
        cnt_q[alloc_slot]   <= '0;
        start_q[alloc_slot] <= alloc_addr;
      end else begin
        if (wr_en) begin
          if (32'(cnt_q[wr_slot]) < BLK_LINES) begin
            mem_q[wr_slot][cnt_q[wr_slot][$clog2(BLK_LINES)-1:0]] <= wr_data;
            cnt_q[wr_slot] <= cnt_q[wr_slot] + 1'b1;
          end else begin
            overflow <= 1'b1;
          end
        end
        if (set_cp && !cp_q[set_slot]) begin
          cp_q[set_slot]   <= 1'b1;
          loop_q[set_slot] <= set_cp_loop;
        end
        if (set_done) begin
          done_q[set_slot] <= 1'b1;
          next_q[set_slot] <= set_next;
        end
      end
    end
  end

  always_comb begin
    rd_avail    = rd_line < cnt_q[rd_slot];
    rd_data     = '0;
    if (32'(rd_line) < BLK_LINES) rd_data = mem_q[rd_slot][rd_line[$clog2(BLK_LINES)-1:0]];
    rd_complete = done_q[rd_slot];
    rd_has_cp   = cp_q[rd_slot];
    rd_cp_loop  = loop_q[rd_slot];
    rd_next     = next_q[rd_slot];
    lk_hit      = 1'b0;
    lk_slot     = '0;
    for (int s = NBLK-1; s >= 0; s--)
      if (valid_q[s] && start_q[s] == lk_addr) begin
        lk_hit  = 1'b1;
        lk_slot = SW'(s);
      end
  end

  assign valid = valid_q;

endmodule
