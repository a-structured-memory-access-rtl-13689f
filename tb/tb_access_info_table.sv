// tb_access_info_table: random writes of AIT words (0 base, 1-2 second and
// third displacement, 3-5 upper bounds) to random entries, including
// out-of-range entry and word numbers that must be ignored, and combinational
// reads checked against a reference; the first displacement must always read
// as 1 for an existing entry.
module tb_access_info_table;
  import sma_pkg::*;

  localparam int ENTRIES = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       wr_en;
  logic [7:0] wr_idx, rd_idx;
  logic [2:0] wr_word;
  word_t      wr_data;
  addr_t      rd_base;
  addr_t      rd_disp [NDIM];
  val_t       rd_upb  [NDIM];

  access_info_table #(.ENTRIES(ENTRIES)) dut (.*);

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

  logic [15:0] m [ENTRIES][6];

  initial begin
    wr_en = 0; wr_idx = '0; rd_idx = '0; wr_word = '0; wr_data = '0;
    foreach (m[e, w]) m[e][w] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      wr_en   = ($urandom_range(1) == 1);
      wr_idx  = 8'($urandom_range(ENTRIES + 3));
      wr_word = 3'($urandom_range(7));
      wr_data = {$urandom, $urandom};
      rd_idx  = 8'($urandom_range(ENTRIES + 3));
      #1;
      if (rd_idx < ENTRIES) begin
        check(rd_base == m[rd_idx][0], $sformatf("entry %0d base", rd_idx));
        check(rd_disp[0] == 1, "first displacement is 1");
        check(rd_disp[1] == m[rd_idx][1] && rd_disp[2] == m[rd_idx][2],
              $sformatf("entry %0d displacements", rd_idx));
        for (int d = 0; d < NDIM; d++)
          check(rd_upb[d] == m[rd_idx][3 + d], $sformatf("entry %0d bound %0d", rd_idx, d));
      end else begin
        check(rd_base == 0 && rd_disp[0] == 0 && rd_upb[0] == 0, "out-of-range entry reads 0");
      end
      if (wr_en && wr_idx < ENTRIES && wr_word < 6) m[wr_idx][wr_word] = wr_data[15:0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
