// tb_index_stack: random test of the index stack against a reference model.
// Each cycle drives one random operation (clear, setup, incr at a random
// level, pop, or none) with random read levels, checks the combinational
// outputs (incr_cont, read ports, depth) against the model before the clock
// edge, then updates the model. Steps are positive and negative, so both
// "ran out" comparisons are used; overflow and underflow are provoked and
// checked. Interface and timing as the module: one operation per cycle.
module tb_index_stack;
  import sma_pkg::*;

  localparam int DEPTH = 7, NRD = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             clear, setup, incr, pop, incr_cont;
  val_t             s_init, s_fin, s_step;
  logic [LVL_W-1:0] incr_lvl, depth;
  logic [LVL_W-1:0] rd_lvl [NRD];
  val_t             rd_val [NRD];
  logic [NRD-1:0]   rd_ok;
  logic             overflow, underflow;

  index_stack #(.DEPTH(DEPTH), .NRD(NRD)) dut (
    .clk, .rst_n, .clear, .setup, .setup_init(s_init), .setup_final(s_fin),
    .setup_step(s_step), .incr, .incr_lvl, .incr_cont, .pop, .rd_lvl, .rd_val,
    .rd_ok, .depth, .overflow, .underflow);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  // reference
  int m_cur [DEPTH], m_fin [DEPTH], m_step [DEPTH];
  int m_depth = 0;
  bit m_ovf = 0, m_unf = 0;
  int n_exit = 0, n_cont = 0, n_neg = 0;

  initial begin
    clear = 0; setup = 0; incr = 0; pop = 0;
    s_init = '0; s_fin = '0; s_step = '0; incr_lvl = '0;
    foreach (rd_lvl[p]) rd_lvl[p] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int r, lvl, nxt;
      bit exp_cont;
      nxt = 0;
      @(negedge clk);
      clear = 0; setup = 0; incr = 0; pop = 0;
      r = $urandom_range(99);
      if (r < 2) clear = 1;
      else if (r < 30) begin
        setup  = 1;
        s_init = val_t'($urandom_range(10));
        s_step = ($urandom_range(3) == 0) ? val_t'(-1 - int'($urandom_range(1))) : val_t'(1 + $urandom_range(2));
        s_fin  = (s_step < 0) ? val_t'(int'(s_init) - int'($urandom_range(6))) : val_t'(int'(s_init) + int'($urandom_range(6)));
      end else if (r < 85) begin
        incr = 1;
        incr_lvl = LVL_W'($urandom_range(m_depth + ($urandom_range(9) == 0 ? 1 : 0)));
      end else if (r < 95) pop = 1;
      foreach (rd_lvl[p]) rd_lvl[p] = LVL_W'($urandom_range(DEPTH));
      #1;
      // combinational checks
      check(depth == LVL_W'(m_depth), $sformatf("depth %0d exp %0d", depth, m_depth));
      for (int p = 0; p < NRD; p++) begin
        bit ok;
        ok = (rd_lvl[p] != 0) && (rd_lvl[p] <= m_depth);
        check(rd_ok[p] == ok, $sformatf("rd_ok[%0d] lvl %0d", p, rd_lvl[p]));
        if (ok) check(int'(rd_val[p]) == m_cur[rd_lvl[p]-1],
                      $sformatf("rd_val[%0d] lvl %0d = %0d exp %0d", p, rd_lvl[p], rd_val[p], m_cur[rd_lvl[p]-1]));
      end
      lvl = int'(incr_lvl);
      exp_cont = 0;
      if (incr && lvl >= 1 && lvl <= m_depth) begin
        nxt = m_cur[lvl-1] + m_step[lvl-1];
        exp_cont = (m_step[lvl-1] < 0) ? (nxt >= m_fin[lvl-1]) : (nxt <= m_fin[lvl-1]);
        check(incr_cont == exp_cont, $sformatf("incr_cont lvl %0d", lvl));
      end
      check(overflow == m_ovf && underflow == m_unf, "sticky flags");
      // model update
      if (clear) m_depth = 0;
      else if (setup) begin
        if (m_depth < DEPTH) begin
          m_cur[m_depth] = int'(s_init); m_fin[m_depth] = int'(s_fin); m_step[m_depth] = int'(s_step);
          if (s_step < 0) n_neg++;
          m_depth++;
        end else m_ovf = 1;
      end else if (incr) begin
        if (lvl >= 1 && lvl <= m_depth) begin
          m_cur[lvl-1] = nxt;
          if (!exp_cont) begin m_depth = lvl - 1; n_exit++; end
          else n_cont++;
        end else m_unf = 1;
      end else if (pop) begin
        if (m_depth > 0) m_depth--;
        else m_unf = 1;
      end
    end
    @(negedge clk);
    check(n_exit > 100 && n_cont > 100 && n_neg > 100 && m_ovf && m_unf, "coverage of exits, steps and flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
