// addr_gen: the MAP's address generation unit.
//
// It steps through the operand and instruction buffer (OIB) with its own
// block slot and line counter and, for each line:
//  * CP operand specification: forms the operand and queues it. Immediate
//    values and index-stack values go on the read queue already received;
//    scalars (base register + displacement) and data-structure elements
//    (access pattern table + index stack + access information table, see
//    ds_addr_gen) go on the read queue, the write queue or both, by the
//    line's read/write bits, with the indirect bit when asked for. An
//    immediate marked indirect is used as a direct address.
//  * MAP instruction: collects its operand lines and executes it:
//      LDAPT e,a / LDAIT e,a / LDTMP e,a  load a table entry from the words at
//                  a (or, indirect, at the address stored at a); the words are
//                  read through the read queue marked for the MAP, and the
//                  unit waits for them
//      SETUP t     push template t on the index stack
//      SETUP t,a   the same, but the initial value is the memory word at a
//                  (immediate address or scalar), read through the read
//                  queue for the MAP: an index value saved earlier (for
//                  example a pivot row) is put back on the stack
//      INCR l,t1,t2  step index level l; branch to t1 while it is within its
//                  final value, else to t2 (the index is then removed)
//      REMIDX / CLRIDX  remove the top index / all indices
//      BR t        branch; BRCP t1,t2  wait for the CP's test outcome and
//                  branch to t1 if it was true, else t2
//      LDBASE r,v  load scalar base register r; STOP halt
// At the end of a block the successor address (branch target, or the address
// after the block) is compared with the buffered blocks. A hit continues at
// once in that slot; a miss asks the preprocessor for a slot and the fetcher
// for the block, and waits for its lines. Each end of block prepares an
// end-of-data word; it goes on the read queue just before the first CP
// operand of the new block, so a block without CP instructions sends
// nothing and a later end of block replaces the prepared word. It carries
// the slot of the block, or the reserved all-ones value when the block has
// just been fetched. It is left out when the CP repeats the same block by
// itself (the block is already the CP's and starts with an instruction that
// takes data). Index, template, pattern and information tables sit inside
// this unit, as in the MAP organisation.
// Errors (sticky): err_oob an index beyond its upper bound, err_lvl a level
// not on the index stack or a stack over/underflow.
module addr_gen
  import sma_pkg::*;
#(
  parameter int unsigned NBLK        = 8,
  parameter int unsigned BLK_LINES   = 32,
  parameter int unsigned IS_DEPTH    = 7,
  parameter int unsigned TMP_ENTRIES = 16,
  parameter int unsigned APT_ENTRIES = 32,
  parameter int unsigned AIT_ENTRIES = 16,
  parameter int unsigned NBASE       = 4,
  localparam int unsigned SW = (NBLK > 1) ? $clog2(NBLK) : 1,
  localparam int unsigned LW = $clog2(BLK_LINES + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  addr_t           start_pc,
  output logic            halted,
  output logic            err_oob,
  output logic            err_lvl,
  // OIB
  output logic [SW-1:0]   oib_slot,
  output logic [LW-1:0]   oib_line,
  input  oib_line_t       oib_data,
  input  logic            oib_avail,
  input  logic            oib_cp_loop,
  input  addr_t           oib_next,
  output addr_t           lk_addr,
  input  logic            lk_hit,
  input  logic [SW-1:0]   lk_slot,
  // block fetch
  output logic            alloc_req,
  output addr_t           alloc_addr,
  input  logic            alloc_done,
  input  logic [SW-1:0]   alloc_slot,
  // read queue
  output logic            rq_push,
  output logic            rq_map,
  output logic            rq_ind,
  output logic            rq_rcv,
  output logic            rq_eod,
  output addr_t           rq_addr,
  output word_t           rq_data,
  input  logic            rq_full,
  input  logic            rq_out_valid,
  input  logic            rq_out_map,
  input  word_t           rq_out_data,
  output logic            rq_pop_map,
  // write queue
  output logic            wq_push,
  output logic            wq_ind,
  output addr_t           wq_addr,
  input  logic            wq_full,
  // CP
  input  logic            cp_br_valid,
  input  logic            cp_br_taken,
  input  logic            cp_eod_taken,
  output logic            eod_inflight,
  output logic            cp_blk_valid,
  output logic [SW-1:0]   cp_blk_slot
);

  typedef enum logic [3:0] {
    S_IDLE, S_ALLOC, S_RUN, S_MOPND, S_EXEC, S_PTR, S_PTRW, S_TLOAD,
    S_BRCP, S_EOB, S_HALT
  } ag_state_e;

  ag_state_e      st;
  logic [SW-1:0]  slot;
  logic [LW-1:0]  line;
  logic           fresh, eod_pend;
  opcode_t        mop;
  opnd_t          mo [3];
  logic [1:0]     mk;
  addr_t          target;
  logic           br_have, br_taken;
  logic [7:0]     eod_cnt;
  addr_t          base_q [NBASE];
  // table load
  logic [1:0]     tl_kind;      // 0 APT, 1 AIT, 2 TMP
  logic [7:0]     tl_entry;
  addr_t          tl_base;
  logic [2:0]     ti, tr, tn;
  logic           sv_setup;     // SETUP waiting for its initial value from memory

  assign oib_slot = slot;
  assign oib_line = line;
  assign lk_addr  = target;
  assign halted   = (st == S_HALT);
  assign eod_inflight = (eod_cnt != '0);

  // ---------------- tables and index stack
  logic [LVL_W-1:0] is_rd_lvl [4];
  val_t             is_rd_val [4];
  logic [3:0]       is_rd_ok;
  logic             is_setup, is_incr, is_pop, is_clear, is_cont;
  logic [LVL_W-1:0] is_incr_lvl, is_depth;
  logic             is_ovf, is_unf;
  val_t             t_init, t_final, t_step;

  opnd_t            cur_o;
  opcode_t          line_opc;
  assign cur_o    = opnd_t'(oib_data.field);
  assign line_opc = opcode_t'(oib_data.field);

  logic [LVL_W-1:0] apt_ilf [NDIM];
  val_t             apt_iof [NDIM];
  addr_t            ait_base;
  addr_t            ait_disp [NDIM];
  val_t             ait_upb  [NDIM];
  addr_t            ds_addr;
  logic             ds_oob, ds_bad;
  val_t             ds_idx [NDIM];

  logic             tw_en;
  word_t            tw_data;

  index_stack #(.DEPTH(IS_DEPTH), .NRD(4)) u_is (
    .clk, .rst_n, .clear(is_clear), .setup(is_setup),
    .setup_init(sv_setup ? val_t'(rq_out_data) : t_init), .setup_final(t_final), .setup_step(t_step),
    .incr(is_incr), .incr_lvl(is_incr_lvl), .incr_cont(is_cont), .pop(is_pop),
    .rd_lvl(is_rd_lvl), .rd_val(is_rd_val), .rd_ok(is_rd_ok), .depth(is_depth),
    .overflow(is_ovf), .underflow(is_unf));

  template_table #(.ENTRIES(TMP_ENTRIES)) u_tmp (
    .clk, .rst_n, .wr_en(tw_en && tl_kind == 2'd2), .wr_idx(tl_entry),
    .wr_word(tr[1:0]), .wr_data(tw_data), .rd_idx(mo[0].value[7:0]),
    .rd_init(t_init), .rd_final(t_final), .rd_step(t_step));

  access_pattern_table #(.ENTRIES(APT_ENTRIES)) u_apt (
    .clk, .rst_n, .wr_en(tw_en && tl_kind == 2'd0), .wr_idx(tl_entry),
    .wr_word(tr[1:0]), .wr_data(tw_data), .rd_idx(cur_o.value[7:0]),
    .rd_ilf(apt_ilf), .rd_iof(apt_iof));

  access_info_table #(.ENTRIES(AIT_ENTRIES)) u_ait (
    .clk, .rst_n, .wr_en(tw_en && tl_kind == 2'd1), .wr_idx(tl_entry),
    .wr_word(tr), .wr_data(tw_data), .rd_idx({3'b000, cur_o.value[12:8]}),
    .rd_base(ait_base), .rd_disp(ait_disp), .rd_upb(ait_upb));

  always_comb begin
    for (int d = 0; d < NDIM; d++) begin
      is_rd_lvl[d] = apt_ilf[d];
      ds_idx[d]    = is_rd_val[d];
    end
    is_rd_lvl[3] = cur_o.value[LVL_W-1:0];
  end

  ds_addr_gen u_ds (
    .ilf(apt_ilf), .iof(apt_iof), .idx_val(ds_idx), .idx_ok(is_rd_ok[NDIM-1:0]),
    .base(ait_base), .disp(ait_disp), .upb(ait_upb),
    .addr(ds_addr), .oob(ds_oob), .bad_lvl(ds_bad));

  // ---------------- operand of the current line
  logic  op_mem;      // operand lives in memory
  logic  op_ind;
  addr_t op_addr;
  word_t op_val;      // value of an immediate / index operand
  always_comb begin
    op_mem  = 1'b1;
    op_ind  = cur_o.ind;
    op_addr = '0;
    op_val  = '0;
    case (cur_o.otype)
      OPT_IMM: begin
        op_mem  = cur_o.ind;
        op_ind  = 1'b0;
        op_addr = addr_t'(cur_o.value);
        op_val  = word_t'(cur_o.value);
      end
      OPT_SCALAR: op_addr = base_q[cur_o.value[12:11]] + addr_t'(cur_o.value[10:0]);
      OPT_DS:     op_addr = ds_addr;
      OPT_INDEX: begin
        op_mem = 1'b0;
        op_val = word_t'(is_rd_val[3]);
      end
      default: ;
    endcase
  end

  // needs of a CP operand line
  logic need_rq, need_wq, can_issue;
  logic eod_send;
  assign need_rq   = op_mem ? oib_data.rd : 1'b1;
  assign need_wq   = op_mem && oib_data.wr;
  assign can_issue = !(need_rq && rq_full) && !(need_wq && wq_full);
  assign eod_send  = fresh || !(cp_blk_valid && cp_blk_slot == slot && oib_cp_loop);

  // ---------------- control
  logic run_op, run_eod;
  assign run_eod = (st == S_RUN) && oib_avail && !oib_data.is_instr && eod_pend;
  assign run_op  = (st == S_RUN) && oib_avail && !oib_data.is_instr && !eod_pend && can_issue;

  always_comb begin
    rq_push    = 1'b0;
    rq_map     = 1'b0;
    rq_ind     = 1'b0;
    rq_rcv     = 1'b0;
    rq_eod     = 1'b0;
    rq_addr    = '0;
    rq_data    = '0;
    wq_push    = 1'b0;
    wq_ind     = 1'b0;
    wq_addr    = '0;
    rq_pop_map = 1'b0;
    tw_en      = 1'b0;
    tw_data    = rq_out_data;
    is_setup   = 1'b0;
    is_incr    = 1'b0;
    is_pop     = 1'b0;
    is_clear   = 1'b0;
    is_incr_lvl = mo[0].value[LVL_W-1:0];
    if (run_eod && eod_send && !rq_full) begin
      rq_push = 1'b1;
      rq_rcv  = 1'b1;
      rq_eod  = 1'b1;
      rq_data = fresh ? EOD_NEW : word_t'(slot);
    end
    if (run_op) begin
      if (need_rq) begin
        rq_push = 1'b1;
        rq_rcv  = !op_mem;
        rq_ind  = op_mem && op_ind;
        rq_addr = op_addr;
        rq_data = op_val;
      end
      if (need_wq) begin
        wq_push = 1'b1;
        wq_ind  = op_ind;
        wq_addr = op_addr;
      end
    end
    if (st == S_PTR && !rq_full) begin
      rq_push = 1'b1;
      rq_map  = 1'b1;
      rq_addr = tl_base;
    end
    if (st == S_PTRW && rq_out_valid && rq_out_map) begin
      rq_pop_map = 1'b1;
      is_setup   = sv_setup;
    end
    if (st == S_TLOAD) begin
      if (ti < tn && !rq_full) begin
        rq_push = 1'b1;
        rq_map  = 1'b1;
        rq_addr = tl_base + addr_t'(ti);
      end
      if (tr < tn && rq_out_valid && rq_out_map) begin
        rq_pop_map = 1'b1;
        tw_en      = 1'b1;
      end
    end
    if (st == S_EXEC) begin
      case (mop.op)
        MOP_SETUP:  is_setup = (mop.nops != 2'd2);
        MOP_INCR:   is_incr  = 1'b1;
        MOP_REMIDX: is_pop   = 1'b1;
        MOP_CLRIDX: is_clear = 1'b1;
        default: ;
      endcase
    end
  end

  assign alloc_req  = (st == S_ALLOC);
  assign alloc_addr = target;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      slot         <= '0;
      line         <= '0;
      fresh        <= 1'b0;
      eod_pend     <= 1'b0;
      mop          <= '0;
      for (int i = 0; i < 3; i++) mo[i] <= '0;
      mk           <= '0;
      target       <= '0;
      br_have      <= 1'b0;
      br_taken     <= 1'b0;
      eod_cnt      <= '0;
      cp_blk_valid <= 1'b0;
      cp_blk_slot  <= '0;
      tl_kind      <= '0;
      tl_entry     <= '0;
      tl_base      <= '0;
      sv_setup     <= 1'b0;
      ti           <= '0;
      tr           <= '0;
      tn           <= '0;
      err_oob      <= 1'b0;
      err_lvl      <= 1'b0;
      for (int b = 0; b < NBASE; b++) base_q[b] <= '0;
    end else begin
      // end-of-data words in flight to the CP
      eod_cnt <= eod_cnt + 8'(rq_push && rq_eod) - 8'(cp_eod_taken);
      if (cp_br_valid) begin
        br_have  <= 1'b1;
        br_taken <= cp_br_taken;
      end
      if (is_ovf || is_unf) err_lvl <= 1'b1;
      if (tw_en) tr <= tr + 1'b1;
      if (st == S_TLOAD && rq_push) ti <= ti + 1'b1;

      case (st)
        S_IDLE: if (start) begin
          target   <= start_pc;
          eod_pend <= 1'b1;
          st       <= S_EOB;
        end
        S_ALLOC: if (alloc_done) begin
          slot  <= alloc_slot;
          line  <= '0;
          fresh <= 1'b1;
          st    <= S_RUN;
        end
        S_RUN: if (oib_avail) begin
          if (oib_data.is_instr) begin
            mop  <= opcode_t'(oib_data.field);
            mk   <= '0;
            line <= line + 1'b1;
            st   <= (line_opc.nops == 2'd0) ? S_EXEC : S_MOPND;
          end else if (eod_pend) begin
            if (!eod_send) eod_pend <= 1'b0;
            else if (!rq_full) begin
              eod_pend     <= 1'b0;
              cp_blk_valid <= 1'b1;
              cp_blk_slot  <= slot;
            end
          end else if (can_issue) begin
            if (cur_o.otype == OPT_DS && op_mem) begin
              if (ds_oob) err_oob <= 1'b1;
              if (ds_bad) err_lvl <= 1'b1;
            end
            if (cur_o.otype == OPT_INDEX && !is_rd_ok[3]) err_lvl <= 1'b1;
            if (oib_data.eob) begin
              target <= oib_next;
              st     <= S_EOB;
            end else begin
              line <= line + 1'b1;
            end
          end
        end
        S_MOPND: if (oib_avail) begin
          mo[mk] <= opnd_t'(oib_data.field);
          line   <= line + 1'b1;
          if (mk == mop.nops - 2'd1) st <= S_EXEC;
          else mk <= mk + 2'd1;
        end
        S_EXEC: begin
          st <= mop.eob ? S_EOB : S_RUN;
          if (mop.eob) target <= oib_next;
          case (mop.op)
            MOP_LDAPT, MOP_LDAIT, MOP_LDTMP: begin
              tl_kind  <= (mop.op == MOP_LDAPT) ? 2'd0 : (mop.op == MOP_LDAIT) ? 2'd1 : 2'd2;
              tn       <= (mop.op == MOP_LDAIT) ? 3'(AIT_WORDS) :
                          (mop.op == MOP_LDAPT) ? 3'(APT_WORDS) : 3'(TMP_WORDS);
              ti       <= '0;
              tr       <= '0;
              if (mop.nops == 2'd1) begin
                tl_entry <= 8'd1;
                tl_base  <= addr_t'(mo[0].value);
                st       <= mo[0].ind ? S_PTR : S_TLOAD;
              end else begin
                tl_entry <= mo[0].value[7:0];
                tl_base  <= addr_t'(mo[1].value);
                st       <= mo[1].ind ? S_PTR : S_TLOAD;
              end
            end
            MOP_INCR: begin
              target <= is_cont ? addr_t'(mo[1].value) : addr_t'(mo[2].value);
              st     <= S_EOB;
            end
            MOP_BR: begin
              target <= addr_t'(mo[0].value);
              st     <= S_EOB;
            end
            MOP_SETUP: if (mop.nops == 2'd2) begin
              // initial value from memory: an immediate address or a scalar
              sv_setup <= 1'b1;
              tl_base  <= (mo[1].otype == OPT_SCALAR) ?
                          base_q[mo[1].value[12:11]] + addr_t'(mo[1].value[10:0]) :
                          addr_t'(mo[1].value);
              st       <= S_PTR;
            end
            MOP_BRCP: st <= S_BRCP;
            MOP_LDBASE: base_q[mo[0].value[$clog2(NBASE)-1:0]] <= addr_t'(mo[1].value);
            MOP_STOP: st <= S_HALT;
            default: ;
          endcase
        end
        S_PTR: if (!rq_full) st <= S_PTRW;
        S_PTRW: if (rq_out_valid && rq_out_map) begin
          if (sv_setup) begin
            sv_setup <= 1'b0;
            if (mop.eob) target <= oib_next;
            st <= mop.eob ? S_EOB : S_RUN;
          end else begin
            tl_base <= addr_t'(rq_out_data);
            st      <= S_TLOAD;
          end
        end
        S_TLOAD: if (tr == tn) begin
          if (mop.eob) begin
            target <= oib_next;
            st     <= S_EOB;
          end else begin
            st <= S_RUN;
          end
        end
        S_BRCP: if (br_have) begin
          br_have <= 1'b0;
          target  <= br_taken ? addr_t'(mo[0].value) : addr_t'(mo[1].value);
          st      <= S_EOB;
        end
        S_EOB: begin
          eod_pend <= 1'b1;
          if (lk_hit) begin
            slot  <= lk_slot;
            line  <= '0;
            fresh <= 1'b0;
            st    <= S_RUN;
          end else begin
            st <= S_ALLOC;
          end
        end
        S_HALT: ;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
