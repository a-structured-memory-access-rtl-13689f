// index_stack: the MAP's index stack (IS).
//
// Each active loop index is held as (current value, final value, step) on a
// LIFO stack. Levels are numbered from the bottom: level 1 is the outermost
// active index, so an access pattern can name "the index at level 2" no matter
// how deep the stack is. Operations (at most one per cycle, priority clear >
// setup > incr > pop):
//   setup  push (init, final, step); the current value starts at init
//   incr   add the step to the index at incr_lvl. incr_cont tells, in the
//          same cycle, whether the new value is still within the final value
//          (<= final for a positive step, >= final for a negative one). When
//          it is not, the index at that level and every level above it are
//          removed, as an index that has run out is removed from the stack.
//   pop    remove the top index; clear removes all.
// NRD combinational read ports give the current value of any level; a level
// of 0 or above the top reads as 0 and drops rd_ok.
// The stack and its numbering follow the architecture; depth, the "ran out"
// comparison (the loop runs while the final value is not exceeded) and
// removal of the levels above an exited index are this design's choices.
module index_stack
  import sma_pkg::*;
#(
  parameter int unsigned DEPTH = 7,
  parameter int unsigned NRD   = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   setup,
  input  val_t                   setup_init,
  input  val_t                   setup_final,
  input  val_t                   setup_step,
  input  logic                   incr,
  input  logic [LVL_W-1:0]       incr_lvl,
  output logic                   incr_cont,
  input  logic                   pop,
  input  logic [LVL_W-1:0]       rd_lvl [NRD],
  output val_t                   rd_val [NRD],
  output logic [NRD-1:0]         rd_ok,
  output logic [LVL_W-1:0]       depth,
  output logic                   overflow,
  output logic                   underflow
);

  val_t cur_q  [DEPTH];
  val_t fin_q  [DEPTH];
  val_t step_q [DEPTH];
  logic [LVL_W-1:0] depth_q;

  val_t incr_next;
  logic incr_ok;

  always_comb begin
    incr_ok   = (incr_lvl != '0) && (incr_lvl <= depth_q);
    incr_next = '0;
    incr_cont = 1'b0;
    if (incr_ok) begin
      incr_next = cur_q[incr_lvl-1] + step_q[incr_lvl-1];
      if (step_q[incr_lvl-1] < 0) incr_cont = (incr_next >= fin_q[incr_lvl-1]);
      else                        incr_cont = (incr_next <= fin_q[incr_lvl-1]);
    end
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      rd_ok[p]  = (rd_lvl[p] != '0) && (rd_lvl[p] <= depth_q);
      rd_val[p] = rd_ok[p] ? cur_q[rd_lvl[p]-1] : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      depth_q   <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
      for (int l = 0; l < DEPTH; l++) begin
        cur_q[l]  <= '0;
        fin_q[l]  <= '0;
        step_q[l] <= '0;
      end
    end else if (clear) begin
      depth_q <= '0;
    end else if (setup) begin
      if (depth_q < LVL_W'(DEPTH)) begin
        cur_q[depth_q]  <= setup_init;
        fin_q[depth_q]  <= setup_final;
        step_q[depth_q] <= setup_step;
        depth_q         <= depth_q + 1'b1;
      end else begin
        overflow <= 1'b1;
      end
    end else if (incr) begin
      if (incr_ok) begin
        cur_q[incr_lvl-1] <= incr_next;
        if (!incr_cont) depth_q <= incr_lvl - 1'b1;
      end else begin
        underflow <= 1'b1;
      end
    end else if (pop) begin
      if (depth_q != '0) depth_q <= depth_q - 1'b1;
      else               underflow <= 1'b1;
    end
  end

  assign depth = depth_q;

endmodule
