// tb_cp_ibuf: random test of the CP instruction buffer against a model.
// Each cycle may write an instruction to a random slot (starting the slot
// afresh with the first-of-block mark, or appending), mark a slot complete,
// and pop the list of newly started slots. Before the edge it checks a
// random read (instruction, count, complete) and the head of the new-slot
// list. Appending past BLK_INSTR must raise overflow and drop the word.
module tb_cp_ibuf;
  import sma_pkg::*;

  localparam int NBLK = 4, BLK_INSTR = 4, SW = 2, IW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          wr_en, wr_first, end_en, rd_complete, new_valid, new_pop, overflow;
  logic [SW-1:0] wr_slot, end_slot, rd_slot, new_slot;
  logic [IW-1:0] rd_idx, rd_count;
  cp_instr_t     wr_instr, rd_instr;

  cp_ibuf #(.NBLK(NBLK), .BLK_INSTR(BLK_INSTR)) dut (.*);

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

  cp_instr_t m_ins [NBLK][BLK_INSTR];
  int        m_cnt [NBLK];
  bit        m_done [NBLK];
  bit        m_ovf;
  int        new_q [$];
  int        n_ovf = 0, n_new = 0;

  initial begin
    wr_en = 0; wr_first = 0; end_en = 0; new_pop = 0;
    wr_slot = '0; end_slot = '0; rd_slot = '0; rd_idx = '0; wr_instr = '0;
    for (int s = 0; s < NBLK; s++) begin
      m_cnt[s] = 0; m_done[s] = 0;
      for (int i = 0; i < BLK_INSTR; i++) m_ins[s][i] = '0;
    end
    m_ovf = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      wr_en = ($urandom_range(1) == 0);
      wr_first = wr_en && ($urandom_range(4) == 0) && (new_q.size() < NBLK);
      wr_slot = SW'($urandom);
      wr_instr = cp_instr_t'($urandom);
      end_en = ($urandom_range(5) == 0);
      end_slot = SW'($urandom);
      rd_slot = SW'($urandom);
      rd_idx = IW'($urandom_range(BLK_INSTR));
      new_pop = ($urandom_range(2) == 0);
      #1;
      check(rd_count == IW'(m_cnt[rd_slot]) && rd_complete == m_done[rd_slot], "count / complete");
      if (int'(rd_idx) < m_cnt[rd_slot])
        check(rd_instr == m_ins[rd_slot][rd_idx], $sformatf("slot %0d instr %0d", rd_slot, rd_idx));
      check(new_valid == (new_q.size() > 0), "new-slot list valid");
      if (new_q.size() > 0) check(int'(new_slot) == new_q[0], "new-slot list order");
      check(overflow == m_ovf, "overflow flag");
      if (new_pop && new_q.size() > 0) void'(new_q.pop_front());
      if (wr_en) begin
        if (wr_first) begin
          m_ins[wr_slot][0] = wr_instr; m_cnt[wr_slot] = 1; m_done[wr_slot] = 0;
          new_q.push_back(int'(wr_slot));
          n_new++;
        end else if (m_cnt[wr_slot] < BLK_INSTR) begin
          m_ins[wr_slot][m_cnt[wr_slot]] = wr_instr; m_cnt[wr_slot]++;
        end else begin
          m_ovf = 1; n_ovf++;
        end
      end
      if (end_en) m_done[end_slot] = 1;
    end
    check(n_ovf > 0 && n_new > 500, "coverage of overflow and new blocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
