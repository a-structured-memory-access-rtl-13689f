// tb_ds_addr_gen: random check of the data-structure address arithmetic.
// For random APT lines (levels 0..3, offsets -2..2), index values, bases,
// displacements and upper bounds it compares addr, oob and bad_lvl with
//   base + sum over used dimensions of (index + offset) * displacement
// (first displacement 1), a bound violation when index + offset exceeds the
// dimension's upper bound, and a level error when a used level is absent.
// Directed cases: all levels unused (address = base), exactly-at-bound (no
// error) and one-above-bound (error). Purely combinational; a clock is kept
// only to pace the watchdog.
module tb_ds_addr_gen;
  import sma_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [LVL_W-1:0] ilf     [NDIM];
  val_t             iof     [NDIM];
  val_t             idx_val [NDIM];
  logic [NDIM-1:0]  idx_ok;
  addr_t            base;
  addr_t            disp    [NDIM];
  val_t             upb     [NDIM];
  addr_t            addr;
  logic             oob, bad_lvl;

  ds_addr_gen dut (.*);

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

  task automatic expect_out(string tag);
    int a, v;
    bit e_oob, e_bad;
    a = int'(base);
    e_oob = 0;
    e_bad = 0;
    for (int d = 0; d < NDIM; d++)
      if (ilf[d] != 0) begin
        v = int'(idx_val[d]) + int'(iof[d]);
        if (v > int'(upb[d])) e_oob = 1;
        if (!idx_ok[d]) e_bad = 1;
        a += v * int'(disp[d]);
      end
    #1;
    check(addr == addr_t'(a), $sformatf("%s: addr %0d exp %0d", tag, addr, addr_t'(a)));
    check(oob == e_oob, $sformatf("%s: oob %0b", tag, oob));
    check(bad_lvl == e_bad, $sformatf("%s: bad_lvl %0b", tag, bad_lvl));
  endtask

  int n_oob = 0, n_bad = 0;

  initial begin
    // directed: nothing used
    foreach (ilf[d]) begin
      ilf[d] = '0; iof[d] = '0; idx_val[d] = '0; disp[d] = '0; upb[d] = '0;
    end
    idx_ok = '0;
    base = 16'd1234;
    disp[0] = 1;
    expect_out("no dimensions");
    check(addr == 1234, "address equals base when no level is used");
    // directed: at bound and one above
    ilf[0] = 1; idx_val[0] = 5; iof[0] = 0; upb[0] = 5; idx_ok = 3'b111;
    expect_out("at bound");
    check(!oob, "index equal to bound is legal");
    iof[0] = 1;
    expect_out("above bound");
    check(oob, "index above bound raises oob");
    // random
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      base = addr_t'($urandom_range(4000));
      for (int d = 0; d < NDIM; d++) begin
        ilf[d]     = LVL_W'($urandom_range(3));
        iof[d]     = val_t'(int'($urandom_range(4)) - 2);
        idx_val[d] = val_t'($urandom_range(30));
        disp[d]    = (d == 0) ? addr_t'(1) : addr_t'($urandom_range(40));
        upb[d]     = val_t'($urandom_range(32));
      end
      idx_ok = ($urandom_range(9) == 0) ? 3'($urandom) : 3'b111;
      expect_out($sformatf("random %0d", i));
      if (oob) n_oob++;
      if (bad_lvl) n_bad++;
    end
    check(n_oob > 100 && n_bad > 100, "random cases include bound and level errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
