// tb_template_table: random writes of (initial, final, step) words to random
// entries, including out-of-range entry numbers that must be ignored, and
// combinational reads of random entries checked against a reference array.
// Values are signed 16-bit; only the low 16 bits of a written word are kept.
module tb_template_table;
  import sma_pkg::*;

  localparam int ENTRIES = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       wr_en;
  logic [7:0] wr_idx, rd_idx;
  logic [1:0] wr_word;
  word_t      wr_data;
  val_t       rd_init, rd_final, rd_step;

  template_table #(.ENTRIES(ENTRIES)) dut (.*);

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

  val_t m [ENTRIES][3];

  initial begin
    wr_en = 0; wr_idx = '0; rd_idx = '0; wr_word = '0; wr_data = '0;
    foreach (m[e, w]) m[e][w] = '0;
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
      if (rd_idx < ENTRIES)
        check(rd_init == m[rd_idx][0] && rd_final == m[rd_idx][1] && rd_step == m[rd_idx][2],
              $sformatf("entry %0d read %0d %0d %0d", rd_idx, rd_init, rd_final, rd_step));
      else
        check(rd_init == 0 && rd_final == 0 && rd_step == 0, "out-of-range entry reads 0");
      if (wr_en && wr_idx < ENTRIES && wr_word < 3) m[wr_idx][wr_word] = val_t'(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
