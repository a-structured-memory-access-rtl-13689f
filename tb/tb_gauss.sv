// tb_gauss: the elimination kernel of a Gaussian elimination, run on the
// whole machine at its default sizes with n = 20 (the matrix size of the
// GAUSS program the architecture is measured with).
//
// Kernel, on an n x n matrix A stored column-major (element (r,c) at
// AB + r + c*n, indices from 1), in integer arithmetic modulo 2^64 so that no
// divide is needed:
//    for k := 1 to n-1
//      for i := k+1 to n
//        for j := k+1 to n
//          A[i,j] := A[k,k]*A[i,j] - A[i,k]*A[k,j]
// The inner loops start at k+1, a bound that depends on the outer index:
// the CP computes k+1 from the index operand k and stores it as a scalar,
// and SETUP t,a puts it back on the index stack as the initial value of i
// and of j. This makes the read of that scalar wait for its write, and the
// j loop (three CP instructions, four data-structure reads, one write) runs
// in CP loop mode while the MAP steps j.
// Program (addresses):
//    1  table loads (4 access patterns, 1 array, 2 templates), base, SETUP k
//   10  CP: KP1 = k + 1;  MAP: SETUP i from KP1
//   12  MAP: SETUP j from KP1
//   13  CP: r1 = A[k,k]*A[i,j]; r2 = A[i,k]*A[k,j]; A[i,j] = r1 - r2;
//       MAP: INCR j -> 13 / 17
//   17  INCR i -> 12 / 18;  18 INCR k -> 10 / 19;  19 STOP
// Checks: every element of A against a model of the same loops, no error
// bits, STOP reached; the cycle count is printed. A watchdog ends the run.
module tb_gauss;
  import sma_pkg::*;
  import sma_tb_pkg::*;

  localparam int N = 20;
  localparam int AB = 1000, SBASE = 600;
  localparam int APT_AT = 100, AIT_AT = 120, TMP1_AT = 130, TMP2_AT = 133;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start, halted, cp_busy;
  addr_t            start_pc;
  logic [3:0]       err;
  logic             mreq_valid, mreq_ready, mreq_we, mresp_valid;
  addr_t            mreq_addr;
  word_t            mreq_wdata, mresp_data;
  logic [TAG_W-1:0] mreq_tag, mresp_tag;

  sma_top u_dut (
    .clk, .rst_n, .start, .start_pc, .halted, .cp_busy, .err,
    .mem_req_valid(mreq_valid), .mem_req_ready(mreq_ready), .mem_req_we(mreq_we),
    .mem_req_addr(mreq_addr), .mem_req_wdata(mreq_wdata), .mem_req_tag(mreq_tag),
    .mem_resp_valid(mresp_valid), .mem_resp_tag(mresp_tag), .mem_resp_data(mresp_data));

  mem_model u_mem (
    .clk, .rst_n,
    .req_valid(mreq_valid), .req_ready(mreq_ready), .req_we(mreq_we),
    .req_addr(mreq_addr), .req_wdata(mreq_wdata), .req_tag(mreq_tag),
    .resp_valid(mresp_valid), .resp_tag(mresp_tag), .resp_data(mresp_data));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic poke(int a, word_t v);
    u_mem.mem[a] = v;
  endtask

  function automatic word_t aptw(int ilf, int iof);
    return word_t'(((iof & 16'hffff) << 8) | ilf);
  endfunction

  function automatic int el(int r, int c);
    return AB + r + c * N;
  endfunction

  longint unsigned A [1:N][1:N];

  // watchdog
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc, quiet;

  initial begin
    start = 1'b0;
    start_pc = 1;
    for (int a = 0; a < 2**ADDR_W; a++) u_mem.mem[a] = '0;
    // table loads and the outer index
    poke(1,  mapi(MOP_LDAPT, 0, 2, IM(1), IM(APT_AT)));       // (i, j)
    poke(2,  mapi(MOP_LDAPT, 0, 2, IM(2), IM(APT_AT + 3)));   // (k, k)
    poke(3,  mapi(MOP_LDAPT, 0, 2, IM(3), IM(APT_AT + 6)));   // (i, k)
    poke(4,  mapi(MOP_LDAPT, 0, 2, IM(4), IM(APT_AT + 9)));   // (k, j)
    poke(5,  mapi(MOP_LDAIT, 0, 2, IM(1), IM(AIT_AT)));
    poke(6,  mapi(MOP_LDTMP, 0, 2, IM(1), IM(TMP1_AT)));
    poke(7,  mapi(MOP_LDTMP, 0, 2, IM(2), IM(TMP2_AT)));
    poke(8,  mapi(MOP_LDBASE, 0, 2, IM(0), IM(SBASE)));
    poke(9,  mapi(MOP_SETUP, 1, 1, IM(1)));                          // k
    poke(10, cpi(COP_ADD, 0, 3, 0, 0, IX(1), IM(1), SC(0, 0)));      // KP1 = k + 1
    poke(11, mapi(MOP_SETUP, 1, 2, IM(2), SC(0, 0)));                // i from KP1
    poke(12, mapi(MOP_SETUP, 1, 2, IM(2), SC(0, 0)));                // j from KP1
    poke(13, cpi(COP_MUL, 0, 3, 1, 0, DS(1, 2), DS(1, 1), IM(1)));   // r1 = A[k,k]*A[i,j]
    poke(14, cpi(COP_MUL, 0, 3, 1, 0, DS(1, 3), DS(1, 4), IM(2)));   // r2 = A[i,k]*A[k,j]
    poke(15, cpi(COP_SUB, 0, 3, 1, 0, IM(1), IM(2), DS(1, 1)));      // A[i,j] = r1 - r2
    poke(16, mapi(MOP_INCR, 1, 3, IM(3), IM(13), IM(17)));
    poke(17, mapi(MOP_INCR, 1, 3, IM(2), IM(12), IM(18)));
    poke(18, mapi(MOP_INCR, 1, 3, IM(1), IM(10), IM(19)));
    poke(19, mapi(MOP_STOP, 1, 0));
    poke(APT_AT + 0, aptw(2, 0)); poke(APT_AT + 1,  aptw(3, 0)); poke(APT_AT + 2,  aptw(0, 0));
    poke(APT_AT + 3, aptw(1, 0)); poke(APT_AT + 4,  aptw(1, 0)); poke(APT_AT + 5,  aptw(0, 0));
    poke(APT_AT + 6, aptw(2, 0)); poke(APT_AT + 7,  aptw(1, 0)); poke(APT_AT + 8,  aptw(0, 0));
    poke(APT_AT + 9, aptw(1, 0)); poke(APT_AT + 10, aptw(3, 0)); poke(APT_AT + 11, aptw(0, 0));
    poke(AIT_AT + 0, AB); poke(AIT_AT + 1, N); poke(AIT_AT + 2, 0);
    poke(AIT_AT + 3, N);  poke(AIT_AT + 4, N); poke(AIT_AT + 5, 0);
    poke(TMP1_AT, 1); poke(TMP1_AT + 1, N - 1); poke(TMP1_AT + 2, 1);
    poke(TMP2_AT, 0); poke(TMP2_AT + 1, N);     poke(TMP2_AT + 2, 1);
    for (int r = 1; r <= N; r++)
      for (int c = 1; c <= N; c++) begin
        A[r][c] = longint'($urandom_range(200)) - 100;
        poke(el(r, c), A[r][c]);
      end
    // reference
    for (int k = 1; k <= N - 1; k++)
      for (int i = k + 1; i <= N; i++)
        for (int j = k + 1; j <= N; j++)
          A[i][j] = A[k][k] * A[i][j] - A[i][k] * A[k][j];

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1 start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    quiet = 0;
    cyc = 0;
    while (quiet < 40 && cyc < 1000000) begin
      @(posedge clk);
      cyc++;
      if (halted && u_dut.u_map.wq_empty && u_dut.u_map.rq_empty && !mreq_valid) quiet++;
      else quiet = 0;
    end
    check(halted, "program reached STOP");
    check(err == 4'b0000, $sformatf("err = %b", err));
    $display("n=%0d elimination finished after %0d cycles, %0d inner iterations", N, cyc,
             (N - 1) * N * (2 * N - 1) / 6);
    for (int r = 1; r <= N; r++)
      for (int c = 1; c <= N; c++)
        check(u_mem.mem[el(r, c)] == A[r][c],
              $sformatf("A[%0d,%0d] = %0d, expected %0d", r, c,
                        $signed(u_mem.mem[el(r, c)]), $signed(A[r][c])));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
