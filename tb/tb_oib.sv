// tb_oib: random test of the operand and instruction buffer against a
// reference model. Each cycle either allocates a random slot for a random
// block address (from a small set, so lookups hit and miss) or appends a
// random line to a random slot, possibly together with the CP flags and the
// block-complete mark. Before each edge it checks a random read (line,
// availability, flags, next address) and a random target lookup (lowest
// slot holding that start address). Filling a slot past BLK_LINES must raise
// the sticky overflow flag and drop the line.
module tb_oib;
  import sma_pkg::*;

  localparam int NBLK = 4, BLK_LINES = 8;
  localparam int SW = 2, LW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            alloc, wr_en, set_cp, set_cp_loop, set_done;
  logic [SW-1:0]   alloc_slot, wr_slot, set_slot, rd_slot, lk_slot;
  addr_t           alloc_addr, set_next, rd_next, lk_addr;
  oib_line_t       wr_data, rd_data;
  logic [LW-1:0]   rd_line;
  logic            rd_avail, rd_complete, rd_has_cp, rd_cp_loop, lk_hit, overflow;
  logic [NBLK-1:0] valid;

  oib #(.NBLK(NBLK), .BLK_LINES(BLK_LINES)) dut (.*);

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

  oib_line_t m_line [NBLK][BLK_LINES];
  int        m_cnt [NBLK];
  addr_t     m_start [NBLK], m_next [NBLK];
  bit        m_valid [NBLK], m_done [NBLK], m_cp [NBLK], m_loop [NBLK];
  bit        m_ovf;
  int        n_hit, n_ovf_try;

  initial begin
    alloc = 0; wr_en = 0; set_cp = 0; set_cp_loop = 0; set_done = 0;
    alloc_slot = '0; wr_slot = '0; set_slot = '0; rd_slot = '0; rd_line = '0;
    alloc_addr = '0; set_next = '0; lk_addr = '0; wr_data = '0;
    for (int s = 0; s < NBLK; s++) begin
      m_cnt[s] = 0; m_start[s] = '0; m_next[s] = '0;
      m_valid[s] = 0; m_done[s] = 0; m_cp[s] = 0; m_loop[s] = 0;
      for (int l = 0; l < BLK_LINES; l++) m_line[s][l] = '0;
    end
    m_ovf = 0; n_hit = 0; n_ovf_try = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit e_hit;
      int e_slot;
      @(negedge clk);
      alloc = ($urandom_range(9) == 0);
      alloc_slot = SW'($urandom);
      alloc_addr = addr_t'(10 * $urandom_range(5));
      wr_en = !alloc && ($urandom_range(2) != 0);
      wr_slot = SW'($urandom);
      wr_data = oib_line_t'($urandom);
      set_cp = !alloc && ($urandom_range(3) == 0);
      set_cp_loop = $urandom_range(1);
      set_done = !alloc && ($urandom_range(5) == 0);
      set_slot = wr_slot;
      set_next = addr_t'($urandom);
      rd_slot = SW'($urandom);
      rd_line = LW'($urandom_range(BLK_LINES));
      lk_addr = addr_t'(10 * $urandom_range(5));
      #1;
      check(rd_avail == (int'(rd_line) < m_cnt[rd_slot]), "rd_avail");
      if (int'(rd_line) < m_cnt[rd_slot])
        check(rd_data == m_line[rd_slot][rd_line], $sformatf("slot %0d line %0d data", rd_slot, rd_line));
      check(rd_complete == m_done[rd_slot] && rd_has_cp == m_cp[rd_slot] &&
            rd_cp_loop == m_loop[rd_slot], "slot flags");
      if (m_done[rd_slot]) check(rd_next == m_next[rd_slot], "next address");
      e_hit = 0;
      e_slot = 0;
      for (int s = NBLK - 1; s >= 0; s--)
        if (m_valid[s] && m_start[s] == lk_addr) begin e_hit = 1; e_slot = s; end
      check(lk_hit == e_hit, $sformatf("lookup %0d hit", lk_addr));
      if (e_hit) begin
        check(int'(lk_slot) == e_slot, "lookup slot");
        n_hit++;
      end
      for (int s = 0; s < NBLK; s++) check(valid[s] == m_valid[s], "valid vector");
      check(overflow == m_ovf, "overflow flag");
      // model update
      if (alloc) begin
        m_valid[alloc_slot] = 1; m_done[alloc_slot] = 0; m_cp[alloc_slot] = 0;
        m_loop[alloc_slot] = 0; m_cnt[alloc_slot] = 0; m_start[alloc_slot] = alloc_addr;
      end else begin
        if (wr_en) begin
          if (m_cnt[wr_slot] < BLK_LINES) begin
            m_line[wr_slot][m_cnt[wr_slot]] = wr_data;
            m_cnt[wr_slot]++;
          end else begin
            m_ovf = 1;
            n_ovf_try++;
          end
        end
        if (set_cp && !m_cp[set_slot]) begin m_cp[set_slot] = 1; m_loop[set_slot] = set_cp_loop; end
        if (set_done) begin m_done[set_slot] = 1; m_next[set_slot] = set_next; end
      end
    end
    check(n_hit > 1000 && n_ovf_try > 0, "lookups hit and overflow was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
