// tb_sma_top: end-to-end test of the whole machine at its default sizes.
//
// A behavioural memory (random back-pressure, random latency, answers out of
// order) holds one program made of two parts:
//  1. matrix multiply C = A x B (n x n, column-major, indices from 1) written
//     the way the architecture's sample program is: three access patterns,
//     three data-structure descriptions, one index template, a CP loop body
//     of MUL3/ADD2 that the CP repeats by itself while the MAP steps k;
//  2. a vector pass with scalars and a data-dependent branch: S += X[i] and
//     Y[i] = i over i = 1..n (X described through an indirect table load),
//     then r2 = S - T (T read indirectly), TSTN r2 and a MAP branch on the
//     CP's outcome that writes a flag through an indirect or a direct scalar,
//     then an index set up from a saved value P in memory (Z = that index),
//     SETUP / REMIDX / CLRIDX / STOP.
// The program has 12 instruction blocks, more than the 8 buffer slots, so
// blocks are replaced. Three runs with reset in between use different n and
// random data; run 1 takes the branch, run 2 does not, run 3 gives X an upper
// bound one short so the bound check must fire.
// Checks: every C element, S, every Y element, the flag, Z, the error bits.
// Each mechanism is counted from the design's internal signals and must
// occur at least once over the runs.
module tb_sma_top;
  import sma_pkg::*;
  import sma_tb_pkg::*;

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

  // ---------------------------------------------------------------- layout
  localparam int APT_AT = 100, AIT_C = 109, AIT_A = 115, AIT_B = 121, TMP_AT = 127;
  localparam int APT4 = 130, AIT4_PTR = 140, AIT4_AT = 141, AIT5_AT = 150, TMP2_AT = 160;
  localparam int CB = 1000, AB = 1200, BB = 1400, XB = 1600, YB = 1700;
  localparam int SBASE = 500, TADDR = 510, F1ADDR = 520;

  function automatic word_t aptw(int ilf, int iof);
    return word_t'(((iof & 16'hffff) << 8) | ilf);
  endfunction

  task automatic poke(int a, word_t v);
    u_mem.mem[a] = v;
  endtask

  function automatic int mat_addr(int b, int r, int c, int n);
    return b + r + c * n;
  endfunction

  longint unsigned A [1:8][1:8];
  longint unsigned B [1:8][1:8];
  longint unsigned X [1:8];
  longint unsigned pivot;

  task automatic load_program(int n, longint unsigned s0, longint unsigned t, bit short_bound);
    for (int i = 0; i < 2**ADDR_W; i++) u_mem.mem[i] = '0;
    // part 1: matrix multiply
    poke(1,  mapi(MOP_LDAPT, 0, 2, IM(1), IM(APT_AT)));
    poke(2,  mapi(MOP_LDAPT, 0, 2, IM(2), IM(APT_AT + 3)));
    poke(3,  mapi(MOP_LDAPT, 0, 2, IM(3), IM(APT_AT + 6)));
    poke(4,  mapi(MOP_LDAIT, 0, 2, IM(1), IM(AIT_C)));
    poke(5,  mapi(MOP_LDAIT, 0, 2, IM(2), IM(AIT_A)));
    poke(6,  mapi(MOP_LDAIT, 0, 2, IM(3), IM(AIT_B)));
    poke(7,  mapi(MOP_LDTMP, 0, 1, IM(TMP_AT)));
    poke(8,  mapi(MOP_SETUP, 1, 1, IM(1)));                       // i
    poke(9,  mapi(MOP_SETUP, 1, 1, IM(1)));                       // j
    poke(10, cpi(COP_CLR, 0, 1, 0, 1, DS(1, 1)));                 // C[i,j] = 0
    poke(11, mapi(MOP_SETUP, 1, 1, IM(1)));                       // k
    poke(12, cpi(COP_MUL, 0, 3, 1, 0, DS(2, 2), DS(3, 3), IM(1))); // r1 = A[i,k]*B[k,j]
    poke(13, cpi(COP_ADD, 0, 2, 1, 0, IM(1), DS(1, 1)));          // C[i,j] += r1
    poke(14, mapi(MOP_INCR, 1, 3, IM(3), IM(12), IM(15)));
    poke(15, mapi(MOP_INCR, 1, 3, IM(2), IM(10), IM(16)));
    poke(16, mapi(MOP_INCR, 1, 3, IM(1), IM(9), IM(17)));
    poke(17, mapi(MOP_BR, 1, 1, IM(40)));
    poke(APT_AT + 0, aptw(1, 0)); poke(APT_AT + 1, aptw(2, 0)); poke(APT_AT + 2, aptw(0, 0));
    poke(APT_AT + 3, aptw(1, 0)); poke(APT_AT + 4, aptw(3, 0)); poke(APT_AT + 5, aptw(0, 0));
    poke(APT_AT + 6, aptw(3, 0)); poke(APT_AT + 7, aptw(2, 0)); poke(APT_AT + 8, aptw(0, 0));
    foreach (AIT_BASES[q]) begin
      poke(AIT_BASES[q] + 0, word_t'(MAT_BASES[q]));
      poke(AIT_BASES[q] + 1, word_t'(n));
      poke(AIT_BASES[q] + 2, '0);
      poke(AIT_BASES[q] + 3, word_t'(n));
      poke(AIT_BASES[q] + 4, word_t'(n));
      poke(AIT_BASES[q] + 5, '0);
    end
    poke(TMP_AT, 1); poke(TMP_AT + 1, word_t'(n)); poke(TMP_AT + 2, 1);
    for (int r = 1; r <= n; r++)
      for (int c = 1; c <= n; c++) begin
        A[r][c] = longint'($urandom_range(40)) - 20;
        B[r][c] = longint'($urandom_range(40)) - 20;
        poke(mat_addr(AB, r, c, n), A[r][c]);
        poke(mat_addr(BB, r, c, n), B[r][c]);
        poke(mat_addr(CB, r, c, n), 64'hdead);
      end
    // part 2: vector pass and data-dependent branch
    poke(40, mapi(MOP_LDBASE, 0, 2, IM(0), IM(SBASE)));
    poke(41, mapi(MOP_LDAPT, 0, 2, IM(4), IM(APT4)));
    poke(42, mapi(MOP_LDAIT, 0, 2, IM(4), IMI(AIT4_PTR)));
    poke(43, mapi(MOP_LDAIT, 0, 2, IM(5), IM(AIT5_AT)));
    poke(44, mapi(MOP_LDTMP, 0, 2, IM(2), IM(TMP2_AT)));
    poke(45, mapi(MOP_SETUP, 1, 1, IM(2)));
    poke(46, cpi(COP_ADD, 0, 2, 0, 0, DS(4, 4), SC(0, 0)));       // S = X[i] + S
    poke(47, cpi(COP_MOV, 0, 2, 0, 0, IX(1), DS(5, 4)));          // Y[i] = i
    poke(48, mapi(MOP_INCR, 1, 3, IM(1), IM(46), IM(49)));
    poke(49, cpi(COP_SUB, 0, 3, 1, 0, SC(0, 0), SCI(0, 1), IM(2))); // r2 = S - T
    poke(50, cpi(COP_TSTN, 0, 1, 1, 0, IM(2)));
    poke(51, mapi(MOP_BRCP, 1, 2, IM(52), IM(54)));
    poke(52, cpi(COP_MOV, 0, 2, 0, 0, IM(1), SCI(0, 2)));         // *flag1 = 1
    poke(53, mapi(MOP_BR, 1, 1, IM(56)));
    poke(54, cpi(COP_MOV, 0, 2, 0, 0, IM(2), SC(0, 3)));          // flag2 = 2
    poke(55, mapi(MOP_BR, 1, 1, IM(56)));
    poke(56, mapi(MOP_SETUP, 0, 1, IM(2)));
    poke(57, mapi(MOP_SETUP, 0, 2, IM(2), SC(0, 4)));             // index from saved P
    poke(58, cpi(COP_MOV, 0, 2, 0, 0, IX(2), SC(0, 5)));          // Z = that index
    poke(59, mapi(MOP_REMIDX, 0, 0));
    poke(60, mapi(MOP_CLRIDX, 0, 0));
    poke(61, mapi(MOP_STOP, 1, 0));
    poke(APT4, aptw(1, 0));
    poke(AIT4_PTR, AIT4_AT);
    poke(AIT4_AT + 0, XB); poke(AIT4_AT + 3, word_t'(short_bound ? n - 1 : n));
    poke(AIT5_AT + 0, YB); poke(AIT5_AT + 3, word_t'(n));
    poke(TMP2_AT, 1); poke(TMP2_AT + 1, word_t'(n)); poke(TMP2_AT + 2, 1);
    poke(SBASE + 0, s0);
    poke(SBASE + 1, TADDR);
    poke(SBASE + 2, F1ADDR);
    pivot = longint'($urandom_range(1, 50));
    poke(SBASE + 4, pivot);
    poke(TADDR, t);
    for (int i = 1; i <= n; i++) begin
      X[i] = longint'($urandom_range(1000));
      poke(XB + i, X[i]);
      poke(YB + i, 64'hbeef);
    end
  endtask

  int AIT_BASES [3] = '{AIT_C, AIT_A, AIT_B};
  int MAT_BASES [3] = '{CB, AB, BB};

  // ---------------------------------------------------------------- mechanism counters
  localparam int NM = 21;
  string mname [NM] = '{
    "table load (APT/AIT/template word)", "indirect table load", "block fetched into a free slot",
    "block replaced (eviction)", "resident block reused", "end-of-data: new block",
    "end-of-data: resident block slot", "end-of-data left out (CP repeats block)",
    "CP restarts a loop block", "CP waits for data", "read held behind a pending write",
    "indirect operand read", "indirect operand write", "memory answer out of order",
    "memory back-pressure", "data-dependent branch taken", "data-dependent branch not taken",
    "index operand", "index stack pop / clear", "bound check fired",
    "index set up from a memory value"};
  int mcount [NM];

  always @(posedge clk) if (rst_n) begin
    if (u_dut.u_map.u_ag.tw_en) mcount[0]++;
    if (u_dut.u_map.u_ag.st == u_dut.u_map.u_ag.S_PTR && !u_dut.u_map.rq_full) mcount[1]++;
    if (u_dut.u_map.o_alloc && !u_dut.u_map.o_valid[u_dut.u_map.o_alloc_slot]) mcount[2]++;
    if (u_dut.u_map.o_alloc && u_dut.u_map.o_valid[u_dut.u_map.o_alloc_slot]) mcount[3]++;
    if (u_dut.u_map.u_ag.st == u_dut.u_map.u_ag.S_EOB && u_dut.u_map.o_lk_hit) mcount[4]++;
    if (u_dut.u_map.rq_push && u_dut.u_map.rq_eod && u_dut.u_map.rq_data == EOD_NEW) mcount[5]++;
    if (u_dut.u_map.rq_push && u_dut.u_map.rq_eod && u_dut.u_map.rq_data != EOD_NEW) mcount[6]++;
    if (u_dut.u_map.u_ag.run_eod && !u_dut.u_map.u_ag.eod_send) mcount[7]++;
    if (u_dut.u_cp.st == u_dut.u_cp.C_FETCH && u_dut.u_cp.ib_cmp && u_dut.u_cp.loop_blk &&
        u_dut.u_cp.idx >= u_dut.u_cp.ib_cnt && !u_dut.u_cp.take_eod) mcount[8]++;
    if (u_dut.u_cp.st == u_dut.u_cp.C_OPND && u_dut.u_cp.ins.rd[u_dut.u_cp.k] &&
        u_dut.u_cp.k < u_dut.u_cp.ins.nops && !u_dut.u_cp.hv) mcount[9]++;
    for (int i = 0; i < 8; i++)
      if (u_dut.u_map.u_rq.used[i] && u_dut.u_map.u_rq.q[i].wmask != '0 &&
          !u_dut.u_map.u_rq.q[i].rcv) begin
        mcount[10]++;
        break;
      end
    if (u_dut.u_map.rq_push && u_dut.u_map.rq_ind) mcount[11]++;
    if (u_dut.u_map.wq_push && u_dut.u_map.wq_ind) mcount[12]++;
    if (mreq_valid && !mreq_ready) mcount[14]++;
    if (u_dut.u_cp.br_valid && u_dut.u_cp.br_taken) mcount[15]++;
    if (u_dut.u_cp.br_valid && !u_dut.u_cp.br_taken) mcount[16]++;
    if (u_dut.u_map.u_ag.run_op && u_dut.u_map.u_ag.cur_o.otype == OPT_INDEX) mcount[17]++;
    if (u_dut.u_map.u_ag.is_pop || u_dut.u_map.u_ag.is_clear) mcount[18]++;
    if (u_dut.u_map.u_ag.run_op && u_dut.u_map.u_ag.cur_o.otype == OPT_DS &&
        u_dut.u_map.u_ag.ds_oob) mcount[19]++;
    if (u_dut.u_map.u_ag.is_setup && u_dut.u_map.u_ag.sv_setup) mcount[20]++;
  end

  // optional cycle trace (+trace)
  bit trace;
  initial trace = $test$plusargs("trace");
  always @(posedge clk) if (trace && rst_n)
    $display("%0t ag=%0d slot=%0d line=%0d tgt=%0d fetch=%0d pre_k=%0d rq_full=%0d cp=%0d idx=%0d mreq=%0d/%0d a=%0d t=%h resp=%0d t=%h",
             $time, u_dut.u_map.u_ag.st, u_dut.u_map.u_ag.slot, u_dut.u_map.u_ag.line,
             u_dut.u_map.u_ag.target, u_dut.u_map.u_fetch.st, u_dut.u_map.u_pre.k,
             u_dut.u_map.rq_full, u_dut.u_cp.st, u_dut.u_cp.idx, mreq_valid, mreq_ready,
             mreq_addr, mreq_tag, mresp_valid, mresp_tag);

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, longint unsigned s0, longint unsigned t, bit short_bound);
    int quiet, cyc;
    longint unsigned sum, exp_c;
    rst_n = 1'b0;
    start = 1'b0;
    start_pc = 1;
    load_program(n, s0, t, short_bound);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1 start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    quiet = 0;
    cyc = 0;
    while (quiet < 40 && cyc < 100000) begin
      @(posedge clk);
      cyc++;
      if (halted && u_dut.u_map.wq_empty && u_dut.u_map.rq_empty && !mreq_valid) quiet++;
      else quiet = 0;
    end
    check(halted, $sformatf("n=%0d: program reached STOP", n));
    $display("run n=%0d finished after %0d cycles", n, cyc);
    for (int r = 1; r <= n; r++)
      for (int c = 1; c <= n; c++) begin
        exp_c = 0;
        for (int k = 1; k <= n; k++) exp_c += A[r][k] * B[k][c];
        check(u_mem.mem[mat_addr(CB, r, c, n)] == exp_c,
              $sformatf("n=%0d C[%0d,%0d] = %0d, expected %0d", n, r, c,
                        $signed(u_mem.mem[mat_addr(CB, r, c, n)]), $signed(exp_c)));
      end
    sum = s0;
    for (int i = 1; i <= n; i++) begin
      sum += X[i];
      check(u_mem.mem[YB + i] == word_t'(i),
            $sformatf("n=%0d Y[%0d] = %0d", n, i, u_mem.mem[YB + i]));
    end
    check(u_mem.mem[SBASE] == sum,
          $sformatf("n=%0d S = %0d, expected %0d", n, u_mem.mem[SBASE], sum));
    if ($signed(sum - t) < 0) begin
      check(u_mem.mem[F1ADDR] == 1 && u_mem.mem[SBASE + 3] == 0,
            $sformatf("n=%0d taken branch: flags %0d %0d", n, u_mem.mem[F1ADDR], u_mem.mem[SBASE + 3]));
    end else begin
      check(u_mem.mem[F1ADDR] == 0 && u_mem.mem[SBASE + 3] == 2,
            $sformatf("n=%0d not-taken branch: flags %0d %0d", n, u_mem.mem[F1ADDR], u_mem.mem[SBASE + 3]));
    end
    check(u_mem.mem[SBASE + 5] == pivot,
          $sformatf("n=%0d index set up from memory: %0d, expected %0d", n, u_mem.mem[SBASE + 5], pivot));
    check(err == (short_bound ? 4'b0001 : 4'b0000), $sformatf("n=%0d err = %b", n, err));
    mcount[13] += int'(u_mem.n_ooo);
  endtask

  initial begin
    start = 1'b0;
    start_pc = 1;
    foreach (mcount[m]) mcount[m] = 0;
    run(3, 5, 100000, 0);      // S < T: branch taken
    run(4, 7, 0, 0);           // S >= T: not taken
    run(2, 1, 0, 1);           // X bound one short: bound error
    foreach (mcount[m]) begin
      $display("mechanism %-42s : %0d", mname[m], mcount[m]);
      check(mcount[m] > 0, $sformatf("mechanism never happened: %s", mname[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
