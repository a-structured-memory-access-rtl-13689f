// tb_access_pattern_table: random writes of APT words (index level in bits
// [2:0], index offset in bits [23:8]) to random entries and dimensions,
// including out-of-range entries and dimension numbers that must be ignored,
// and combinational reads checked against a reference.
module tb_access_pattern_table;
  import sma_pkg::*;

  localparam int ENTRIES = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             wr_en;
  logic [7:0]       wr_idx, rd_idx;
  logic [1:0]       wr_word;
  word_t            wr_data;
  logic [LVL_W-1:0] rd_ilf [NDIM];
  val_t             rd_iof [NDIM];

  access_pattern_table #(.ENTRIES(ENTRIES)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  logic [LVL_W-1:0] m_ilf [ENTRIES][NDIM];
  val_t             m_iof [ENTRIES][NDIM];

  initial begin
    wr_en = 0; wr_idx = '0; rd_idx = '0; wr_word = '0; wr_data = '0;
    foreach (m_ilf[e, d]) begin m_ilf[e][d] = '0; m_iof[e][d] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      wr_en   = ($urandom_range(1) == 1);
      wr_idx  = 8'($urandom_range(ENTRIES + 3));
      wr_word = 2'($urandom_range(3));
      wr_data = {$urandom, $urandom};
      rd_idx  = 8'($urandom_range(ENTRIES + 3));
      #1;
      for (int d = 0; d < NDIM; d++)
        if (rd_idx < ENTRIES)
          check(rd_ilf[d] == m_ilf[rd_idx][d] && rd_iof[d] == m_iof[rd_idx][d],
                $sformatf("entry %0d dim %0d read %0d/%0d", rd_idx, d, rd_ilf[d], rd_iof[d]));
        else
          check(rd_ilf[d] == 0 && rd_iof[d] == 0, "out-of-range entry reads 0");
      if (wr_en && wr_idx < ENTRIES && wr_word < NDIM) begin
        m_ilf[wr_idx][wr_word] = wr_data[LVL_W-1:0];
        m_iof[wr_idx][wr_word] = val_t'(wr_data[23:8]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
