// instr_preproc: the MAP's instruction preprocessor.
//
// Allocation: when the address generator needs a block that is not buffered
// (alloc_req with its address), the preprocessor chooses a slot, frees it in
// the OIB (and thereby in the CP's instruction buffer), starts the fetcher at
// the block address and answers alloc_done with the slot. The slot is an
// unused one if there is one, else the next in round-robin order that is not
// the block the CP is executing; it waits while an end-of-data word is on its
// way to the CP, because that word may name a buffered block.
// Splitting: each instruction from the fetcher becomes OIB lines, one per
// cycle: a MAP instruction gives an instruction line and one line per
// operand; a CP instruction gives one line per operand (at least one) and is
// itself sent to the CP with, for each operand, whether it takes a word from
// the data stream, whether that word is a register tag and whether the
// operand is written. The read/write bits follow the operand-count rule: with
// one operand the opcode says read or write; with two, read then read+write;
// with three, read, read, write. The last line of the block carries
// end-of-block; the preprocessor then records the address after the block.
// Timing: an instruction with n lines is accepted after n cycles.
module instr_preproc
  import sma_pkg::*;
#(
  parameter int unsigned NBLK = 8,
  localparam int unsigned SW = (NBLK > 1) ? $clog2(NBLK) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // block allocation
  input  logic            alloc_req,
  input  addr_t           alloc_addr,
  output logic            alloc_done,
  output logic [SW-1:0]   alloc_slot,
  input  logic [NBLK-1:0] blk_valid,
  input  logic            cp_cur_valid,
  input  logic [SW-1:0]   cp_cur_slot,
  input  logic            eod_inflight,
  output logic            oib_alloc,
  output logic [SW-1:0]   oib_alloc_slot,
  output logic            fetch_start,
  output addr_t           fetch_pc,
  // from the fetcher
  input  logic            in_valid,
  input  instr_t          in_instr,
  input  addr_t           in_addr,
  output logic            in_ready,
  // OIB writes
  output logic            oib_wr,
  output logic [SW-1:0]   oib_slot,
  output oib_line_t       oib_line,
  output logic            oib_set_cp,
  output logic            oib_set_loop,
  output logic            oib_set_done,
  output addr_t           oib_next,
  // to the CP instruction buffer
  output logic            cp_wr,
  output logic            cp_first,
  output logic [SW-1:0]   cp_slot,
  output cp_instr_t       cp_instr,
  output logic            cp_end
);

  logic [SW-1:0] cur_slot, rr;
  logic          seen_cp;
  logic [1:0]    k;          // line within the current instruction

  // ---- victim choice
  logic [SW-1:0] victim;
  logic          victim_ok;
  always_comb begin
    logic [SW-1:0] s;
    victim_ok = 1'b0;
    victim    = '0;
    for (int i = NBLK-1; i >= 0; i--) begin
      s = rr + SW'(i);
      if (!(cp_cur_valid && s == cp_cur_slot)) begin
        victim_ok = 1'b1;
        victim    = s;
      end
    end
    for (int i = NBLK-1; i >= 0; i--)
      if (!blk_valid[i]) begin
        victim_ok = 1'b1;
        victim    = SW'(i);
      end
    if (eod_inflight) victim_ok = 1'b0;
  end

  assign oib_alloc   = alloc_req && victim_ok && !alloc_done;
  assign fetch_start = oib_alloc;
  assign oib_alloc_slot = victim;
  assign fetch_pc    = alloc_addr;
  assign alloc_slot  = cur_slot;

  // ---- splitting
  opcode_t    opc;
  opnd_t      opnds [3];
  logic [2:0] rdb, wrb;
  logic [1:0] nlines_m1;     // lines of this instruction minus one
  logic       last_line;
  always_comb begin
    opc      = in_instr.opc;
    opnds[0] = in_instr.o1;
    opnds[1] = in_instr.o2;
    opnds[2] = in_instr.o3;
    rdb      = opc.is_map ? 3'b000 : rd_bits(opc.nops, opc.one_wr);
    wrb      = opc.is_map ? 3'b000 : wr_bits(opc.nops, opc.one_wr);
    if (opc.is_map)            nlines_m1 = opc.nops;
    else if (opc.nops == 2'd0) nlines_m1 = 2'd0;
    else                       nlines_m1 = opc.nops - 2'd1;
    last_line = (k == nlines_m1);
  end

  always_comb begin
    logic [1:0] oi;
    oib_line = '0;
    oi       = '0;
    if (opc.is_map) begin
      if (k == 2'd0) begin
        oib_line.is_instr = 1'b1;
        oib_line.field    = in_instr.opc;
      end else begin
        oi             = k - 2'd1;
        oib_line.field = opnds[oi];
      end
    end else if (opc.nops != 2'd0) begin
      oi             = k;
      oib_line.rd    = rdb[oi];
      oib_line.wr    = wrb[oi];
      oib_line.field = opnds[oi];
    end
    oib_line.eob = opc.eob && last_line;
  end

  // CP instruction as the CP sees it
  logic cp_loop_flag;
  always_comb begin
    logic imm;
    imm           = 1'b0;
    cp_instr      = '0;
    cp_instr.op   = opc.op;
    cp_instr.nops = opc.nops;
    cp_instr.eob  = opc.eob;
    for (int i = 0; i < 3; i++) begin
      if (i < int'(opc.nops)) begin
        imm                 = (opnds[i].otype == OPT_IMM) && !opnds[i].ind;
        cp_instr.rd[i]      = rdb[i] || imm;
        cp_instr.wr[i]      = wrb[i];
        cp_instr.reg_sel[i] = imm && opc.imm_reg;
      end
    end
    cp_loop_flag = |cp_instr.rd;
  end

  logic busy_alloc;
  assign busy_alloc = alloc_req && !alloc_done;

  assign oib_wr       = in_valid && !busy_alloc;
  assign oib_slot     = cur_slot;
  assign in_ready     = oib_wr && last_line;
  assign cp_wr        = oib_wr && !opc.is_map && (k == 2'd0);
  assign cp_first     = cp_wr && !seen_cp;
  assign cp_slot      = cur_slot;
  assign oib_set_cp   = cp_first;
  assign oib_set_loop = cp_loop_flag;
  assign oib_set_done = in_ready && opc.eob;
  assign oib_next     = in_addr + 1'b1;
  assign cp_end       = oib_set_done && (seen_cp || cp_wr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_slot   <= '0;
      rr         <= '0;
      seen_cp    <= 1'b0;
      k          <= '0;
      alloc_done <= 1'b0;
    end else begin
      alloc_done <= 1'b0;
      if (oib_alloc) begin
        cur_slot   <= victim;
        rr         <= victim + 1'b1;
        seen_cp    <= 1'b0;
        k          <= '0;
        alloc_done <= 1'b1;
      end else if (oib_wr) begin
        if (cp_wr) seen_cp <= 1'b1;
        k <= last_line ? 2'd0 : k + 2'd1;
      end
    end
  end

endmodule
