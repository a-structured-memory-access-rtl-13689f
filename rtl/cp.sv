// cp: the Computation Processor.
//
// The CP makes no memory references. It receives CP instructions into its
// instruction buffer (cp_ibuf) and a stream of data words from the MAP into a
// small FIFO, and it sends back only result words for the MAP's write queue
// and the outcome of data-dependent tests.
// Execution: for each instruction of the current block the CP takes, in
// operand order, one word from the FIFO for every operand that has one (a
// memory value, an immediate value, or a register tag when the opcode says
// immediates name registers), waiting while the FIFO is empty. It then
// computes CLR (0), MOV (a), ADD (a+b), SUB (a-b), MUL (a*b) and stores the
// result in the written operand: a register, or the next word of write data
// for the MAP. TSTZ / TSTN report a==0 / a<0 on br_valid/br_taken.
// Block control: a word marked end-of-data selects the next block: its value
// is a buffered block slot, or all ones for "the block that has just been
// sent" (oldest newly arrived block). When the CP reaches the end of a block
// whose first instruction takes data, it starts the block again (loop mode)
// unless the FIFO head is an end-of-data word; a block whose first
// instruction takes no data runs once and the CP then waits for an
// end-of-data word. eod_taken pulses for each end-of-data word used.
// The ALU operations and register count are this design's choices; the
// data-driven loop mode and block switching follow the architecture.
module cp
  import sma_pkg::*;
#(
  parameter int unsigned NBLK       = 8,
  parameter int unsigned BLK_INSTR  = 8,
  parameter int unsigned NREG       = 8,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned SW = (NBLK > 1) ? $clog2(NBLK) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // instructions from the MAP
  input  logic          ib_wr,
  input  logic          ib_first,
  input  logic [SW-1:0] ib_slot,
  input  cp_instr_t     ib_instr,
  input  logic          ib_end,
  input  logic [SW-1:0] ib_end_slot,
  // data from the MAP
  input  logic          din_valid,
  input  cp_data_t      din,
  output logic          din_ready,
  output logic          eod_taken,
  // write data to the MAP
  output logic          wd_valid,
  output word_t         wd_data,
  input  logic          wd_ready,
  // data-dependent test outcome
  output logic          br_valid,
  output logic          br_taken,
  // status
  output logic          cur_valid,
  output logic [SW-1:0] cur_slot,
  output logic          busy,
  output logic          err
);

  localparam int unsigned IW = $clog2(BLK_INSTR + 1);
  localparam int unsigned RW = (NREG > 1) ? $clog2(NREG) : 1;

  typedef enum logic [2:0] {C_WAIT, C_FETCH, C_OPND, C_EXEC, C_WR} cp_state_e;

  cp_state_e     st;
  logic [IW-1:0] idx;
  logic [1:0]    k;
  cp_instr_t     ins;
  word_t         v [3];
  word_t         tg [3];
  logic          loop_blk;
  word_t         regs [NREG];
  word_t         res;

  // data FIFO
  logic     hv;
  cp_data_t hd;
  logic     hpop;
  sync_fifo #(.WIDTH($bits(cp_data_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .in_valid(din_valid), .in_data(din), .in_ready(din_ready),
    .out_valid(hv), .out_data(hd), .out_ready(hpop));

  // instruction buffer
  cp_instr_t     ib_rd;
  logic [IW-1:0] ib_cnt;
  logic          ib_cmp, nv, npop, ib_ovf;
  logic [SW-1:0] ns;
  cp_ibuf #(.NBLK(NBLK), .BLK_INSTR(BLK_INSTR)) u_ib (
    .clk, .rst_n, .wr_en(ib_wr), .wr_first(ib_first), .wr_slot(ib_slot),
    .wr_instr(ib_instr), .end_en(ib_end), .end_slot(ib_end_slot),
    .rd_slot(cur_slot), .rd_idx(idx), .rd_instr(ib_rd), .rd_count(ib_cnt),
    .rd_complete(ib_cmp), .new_valid(nv), .new_slot(ns), .new_pop(npop),
    .overflow(ib_ovf));

  // an end-of-data word at the FIFO head can be taken
  logic eod_at_head, take_eod;
  assign eod_at_head = hv && hd.eod && ((hd.data != EOD_NEW) || nv);
  assign take_eod    = eod_at_head &&
                       ((st == C_WAIT) ||
                        (st == C_FETCH && idx == '0 && ib_cnt != '0 && (|ib_rd.rd)));

  // operand fetch
  logic opnd_take;
  assign opnd_take = (st == C_OPND) && (k < ins.nops) && ins.rd[k] && hv && !hd.eod;

  assign hpop      = take_eod || opnd_take;
  assign npop      = take_eod && (hd.data == EOD_NEW);
  assign eod_taken = take_eod;
  assign busy      = (st != C_WAIT);

  // write operand
  logic       has_w;
  logic [1:0] wk;
  always_comb begin
    has_w = 1'b0;
    wk    = '0;
    for (int i = 0; i < 3; i++)
      if (i < int'(ins.nops) && ins.wr[i]) begin
        has_w = 1'b1;
        wk    = 2'(i);
      end
  end

  always_comb begin
    case (ins.op)
      COP_CLR: res = '0;
      COP_MOV: res = v[0];
      COP_ADD: res = v[0] + v[1];
      COP_SUB: res = v[0] - v[1];
      COP_MUL: res = v[0] * v[1];
      default: res = v[0];
    endcase
  end

  assign br_valid = (st == C_EXEC) && (ins.op == COP_TSTZ || ins.op == COP_TSTN);
  assign br_taken = (ins.op == COP_TSTZ) ? (v[0] == '0) : v[0][WORD_W-1];
  assign wd_valid = (st == C_WR);
  assign wd_data  = res;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= C_WAIT;
      idx       <= '0;
      k         <= '0;
      ins       <= '0;
      loop_blk  <= 1'b0;
      cur_valid <= 1'b0;
      cur_slot  <= '0;
      err       <= 1'b0;
      for (int i = 0; i < 3; i++) begin
        v[i]  <= '0;
        tg[i] <= '0;
      end
      for (int r = 0; r < NREG; r++) regs[r] <= '0;
    end else begin
      if (ib_ovf) err <= 1'b1;
      if (take_eod) begin
        cur_valid <= 1'b1;
        cur_slot  <= (hd.data == EOD_NEW) ? ns : SW'(hd.data);
        idx       <= '0;
        st        <= C_FETCH;
      end else begin
        case (st)
          C_WAIT: if (hv && !hd.eod) err <= 1'b1;   // data with no block
          C_FETCH: begin
            if (idx < ib_cnt) begin
              ins <= ib_rd;
              k   <= '0;
              if (idx == '0) loop_blk <= |ib_rd.rd;
              if (!(idx == '0 && (|ib_rd.rd) && !hv)) st <= C_OPND;
            end else if (ib_cmp) begin
              if (loop_blk) idx <= '0;
              else          st  <= C_WAIT;
            end
          end
          C_OPND: begin
            if (k == ins.nops) st <= C_EXEC;
            else if (!ins.rd[k]) begin
              v[k] <= '0;
              k    <= k + 2'd1;
            end else if (opnd_take) begin
              v[k]  <= ins.reg_sel[k] ? regs[RW'(hd.data)] : hd.data;
              tg[k] <= hd.data;
              k     <= k + 2'd1;
            end else if (hv && hd.eod) begin
              err <= 1'b1;    // end-of-data inside a block pass
            end
          end
          C_EXEC: begin
            if (has_w && !ins.reg_sel[wk]) st <= C_WR;
            else begin
              if (has_w) regs[RW'(tg[wk])] <= res;
              idx <= idx + 1'b1;
              st  <= C_FETCH;
            end
          end
          C_WR: if (wd_ready) begin
            idx <= idx + 1'b1;
            st  <= C_FETCH;
          end
          default: st <= C_WAIT;
        endcase
      end
    end
  end

endmodule
