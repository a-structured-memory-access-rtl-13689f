// tb_addr_gen: the address generation unit with testbench models of the
// operand and instruction buffer (blocks split from a program array, slots
// given out in turn, lines appearing at a random rate), the read queue (MAP
// words answered in order from the program array, random full), the write
// queue (random full) and the CP (end-of-data words taken after a random
// delay, a random BRCP outcome).
// Program: table loads (one through an indirect pointer), a scalar base,
// two nested loops (i = 1..3 up, j = 5..2 down) over a CP block
//    ADD  A[i,j-1], *(b1+6) -> Bm[j,i]     (2-D pattern with offset -1,
//    MOV  index i -> Bm[j,i]                 indirect scalar, index operand)
// then BRCP to one of two tails:
//    taken:     SETUP i from a memory word; CLR A'[i+5] (above its bound:
//               bound error); STOP
//    not taken: SETUP; REMIDX; SETUP; CLRIDX; CLR A''[i] (no level i: level
//               error); STOP
// Checks: the exact sequence of read-queue pushes (MAP table words, CP
// operand addresses, indirect bits, immediate and index values, end-of-data
// words: "new block" where expected, none while the CP repeats the loop
// block) and of write-queue pushes; the error flags for the path taken;
// halted; eod_inflight against the words pushed and taken.
module tb_addr_gen;
  import sma_pkg::*;
  import sma_tb_pkg::*;

  localparam int NBLK = 8, SW = 3, BLK_LINES = 32, LW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start, halted, err_oob, err_lvl;
  addr_t         start_pc, lk_addr, alloc_addr, rq_addr, wq_addr, oib_next;
  logic [SW-1:0] oib_slot, lk_slot, alloc_slot, cp_blk_slot;
  logic [LW-1:0] oib_line;
  oib_line_t     oib_data;
  logic          oib_avail, oib_cp_loop, lk_hit, alloc_req, alloc_done;
  logic          rq_push, rq_map, rq_ind, rq_rcv, rq_eod, rq_full, rq_out_valid, rq_out_map;
  word_t         rq_data, rq_out_data;
  logic          rq_pop_map, wq_push, wq_ind, wq_full;
  logic          cp_br_valid, cp_br_taken, cp_eod_taken, eod_inflight, cp_blk_valid;

  addr_gen #(.NBLK(NBLK), .BLK_LINES(BLK_LINES)) dut (.*);

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

  word_t pm [512];

  // ---------------- OIB model
  bit        o_valid [NBLK];
  addr_t     o_start [NBLK], o_nextv [NBLK];
  int        o_cnt [NBLK], o_total [NBLK];
  oib_line_t o_lines [NBLK][BLK_LINES];
  bit        o_loop [NBLK];
  int        rr = 0, filling = -1;

  always_comb begin
    oib_data    = o_lines[oib_slot][oib_line[4:0]];
    oib_avail   = int'(oib_line) < o_cnt[oib_slot];
    oib_cp_loop = o_loop[oib_slot];
    oib_next    = o_nextv[oib_slot];
    lk_hit  = 1'b0;
    lk_slot = '0;
    for (int s = NBLK - 1; s >= 0; s--)
      if (o_valid[s] && o_start[s] == lk_addr) begin
        lk_hit = 1'b1;
        lk_slot = SW'(s);
      end
  end

  task automatic split_block(int s, addr_t a0);
    int n, a;
    bit seen_cp, last;
    instr_t w;
    opnd_t o [3];
    logic [2:0] rb, wb;
    n = 0; a = int'(a0); seen_cp = 0; last = 0;
    o_loop[s] = 0;
    while (!last) begin
      w = instr_t'(pm[a]);
      o[0] = w.o1; o[1] = w.o2; o[2] = w.o3;
      last = w.opc.eob;
      if (w.opc.is_map) begin
        o_lines[s][n] = '0; o_lines[s][n].is_instr = 1; o_lines[s][n].field = w.opc;
        o_lines[s][n].eob = last && w.opc.nops == 0;
        n++;
        for (int i = 0; i < int'(w.opc.nops); i++) begin
          o_lines[s][n] = '0; o_lines[s][n].field = o[i];
          o_lines[s][n].eob = last && i == int'(w.opc.nops) - 1;
          n++;
        end
      end else begin
        rb = rd_bits(w.opc.nops, w.opc.one_wr);
        wb = wr_bits(w.opc.nops, w.opc.one_wr);
        if (!seen_cp) begin
          for (int i = 0; i < int'(w.opc.nops); i++)
            if (rb[i] || (o[i].otype == OPT_IMM && !o[i].ind)) o_loop[s] = 1;
          seen_cp = 1;
        end
        for (int i = 0; i < int'(w.opc.nops); i++) begin
          o_lines[s][n] = '0; o_lines[s][n].rd = rb[i]; o_lines[s][n].wr = wb[i];
          o_lines[s][n].field = o[i]; o_lines[s][n].eob = last && i == int'(w.opc.nops) - 1;
          n++;
        end
      end
      a++;
    end
    o_total[s] = n;
    o_cnt[s] = 0;
    o_nextv[s] = addr_t'(a);
  endtask

  // allocation and line filling
  int alloc_wait;
  initial begin
    alloc_done = 0; alloc_slot = '0; alloc_wait = 0;
  end
  always @(posedge clk) if (rst_n) begin
    alloc_done <= 1'b0;
    if (filling >= 0 && o_cnt[filling] < o_total[filling] && $urandom_range(2) != 0)
      o_cnt[filling] <= o_cnt[filling] + 1;
    if (alloc_req && !alloc_done) begin
      if (alloc_wait < 2) alloc_wait <= alloc_wait + 1;
      else begin
        alloc_wait   <= 0;
        o_valid[rr]  <= 1;
        o_start[rr]  <= alloc_addr;
        split_block(rr, alloc_addr);
        filling      <= rr;
        alloc_slot   <= SW'(rr);
        alloc_done   <= 1'b1;
        rr           <= (rr + 1) % NBLK;
        n_alloc++;
      end
    end
  end

  always @(posedge clk) if ($test$plusargs("trace")) $display("%0t st=%0d slot=%0d line=%0d avail=%0b cnt0=%0d tot0=%0d filling=%0d rq_full=%0b mq=%0d ov=%0b push=%0b map=%0b pop=%0b", $time, dut.st, oib_slot, oib_line, oib_avail, o_cnt[0], o_total[0], filling, rq_full, map_q.size(), rq_out_valid, rq_push, rq_map, rq_pop_map);

  // ---------------- read / write queue and CP models
  addr_t map_q [$];
  int    eod_pending = 0, eod_delay = 0, eod_pushed = 0, eod_taken_n = 0, n_alloc = 0;
  bit    br_sent;
  bit    taken;
  int    pv;

  typedef struct packed {
    logic  map, ind, rcv, eod;
    addr_t addr;
    word_t data;
  } rq_item_t;
  rq_item_t exp_rq [$];
  addr_t    exp_wq [$];
  bit       exp_wq_ind [$];
  int       n_rq = 0, n_wq = 0;

  always @(posedge clk) begin
    rq_full <= ($urandom_range(9) == 0);
    wq_full <= ($urandom_range(9) == 0);
  end
  assign rq_out_valid = (map_q.size() > 0);
  assign rq_out_map   = 1'b1;
  assign rq_out_data  = (map_q.size() > 0) ? pm[map_q[0][8:0]] : '0;

  // the model samples the unit's outputs at the clock edge and changes its own
  // state 1 time unit later, so the unit sees the values from before the edge
  logic  s_pop, s_push, s_map, s_ind, s_rcv, s_eod, s_wpush, s_wind, s_rfull, s_wfull;
  addr_t s_addr, s_waddr;
  word_t s_data;
  always @(posedge clk) if (rst_n) begin
    s_pop = rq_pop_map; s_push = rq_push; s_map = rq_map; s_ind = rq_ind; s_rcv = rq_rcv;
    s_eod = rq_eod; s_addr = rq_addr; s_data = rq_data; s_wpush = wq_push; s_wind = wq_ind;
    s_waddr = wq_addr; s_rfull = rq_full; s_wfull = wq_full;
    #1;
    cp_eod_taken <= 1'b0;
    cp_br_valid  <= 1'b0;
    if (s_pop) begin
      check(map_q.size() > 0, "MAP word popped with none present");
      if (map_q.size() > 0) void'(map_q.pop_front());
    end
    if (s_push) begin
      rq_item_t e;
      check(!s_rfull, "no push into a full read queue");
      if (s_map) map_q.push_back(s_addr);
      if (s_eod) begin
        eod_pending++;
        eod_pushed++;
      end
      check(exp_rq.size() > 0, $sformatf("read push %0d with nothing expected", n_rq));
      if (exp_rq.size() > 0) begin
        e = exp_rq.pop_front();
        check(s_map == e.map && s_ind == e.ind && s_rcv == e.rcv && s_eod == e.eod &&
              (e.rcv ? (s_data == e.data) : (s_addr == e.addr)),
              $sformatf("read push %0d: map%0b ind%0b rcv%0b eod%0b addr %0d data %0d; expected map%0b ind%0b rcv%0b eod%0b addr %0d data %0d",
                        n_rq, s_map, s_ind, s_rcv, s_eod, s_addr, s_data,
                        e.map, e.ind, e.rcv, e.eod, e.addr, e.data));
      end
      n_rq++;
    end
    if (s_wpush) begin
      check(!s_wfull, "no push into a full write queue");
      check(exp_wq.size() > 0, "write push with nothing expected");
      if (exp_wq.size() > 0) begin
        addr_t a;
        bit ind;
        a = exp_wq.pop_front();
        ind = exp_wq_ind.pop_front();
        check(s_waddr == a && s_wind == ind, $sformatf("write push %0d: %0d/%0b expected %0d/%0b", n_wq, s_waddr, s_wind, a, ind));
      end
      n_wq++;
    end
    if (eod_pending > 0) begin
      if (eod_delay >= 3) begin
        cp_eod_taken <= 1'b1;
        eod_pending--;
        eod_taken_n++;
        eod_delay <= 0;
      end else eod_delay <= eod_delay + 1;
    end
    if (dut.st == dut.S_BRCP && !br_sent) begin
      cp_br_valid <= 1'b1;
      cp_br_taken <= taken;
      br_sent = 1;
    end
  end

  // ---------------- expected sequences
  task automatic exp_map_words(int a, int n);
    rq_item_t e;
    for (int i = 0; i < n; i++) begin
      e = '0; e.map = 1; e.addr = addr_t'(a + i);
      exp_rq.push_back(e);
    end
  endtask
  task automatic exp_read(int a, bit ind);
    rq_item_t e;
    e = '0; e.ind = ind; e.addr = addr_t'(a);
    exp_rq.push_back(e);
  endtask
  task automatic exp_value(word_t v, bit eod);
    rq_item_t e;
    e = '0; e.rcv = 1; e.eod = eod; e.data = v;
    exp_rq.push_back(e);
  endtask
  task automatic exp_write(int a, bit ind);
    exp_wq.push_back(addr_t'(a));
    exp_wq_ind.push_back(ind);
  endtask

  localparam int AB = 1000, BM = 3000, BASE1 = 2000;

  initial begin
    int cyc;
    start = 0; start_pc = 1; cp_br_valid = 0; cp_br_taken = 0; cp_eod_taken = 0;
    rq_full = 0; wq_full = 0; br_sent = 0;
    taken = $urandom_range(1);
    for (int s = 0; s < NBLK; s++) begin
      o_valid[s] = 0; o_start[s] = '0; o_nextv[s] = '0; o_cnt[s] = 0; o_total[s] = 0; o_loop[s] = 0;
      for (int l = 0; l < BLK_LINES; l++) o_lines[s][l] = '0;
    end
    foreach (pm[a]) pm[a] = '0;
    pm[1]  = mapi(MOP_LDAPT, 0, 2, IM(1), IM(100));
    pm[2]  = mapi(MOP_LDAPT, 0, 2, IM(2), IM(103));
    pm[3]  = mapi(MOP_LDAPT, 0, 2, IM(3), IM(106));
    pm[4]  = mapi(MOP_LDAIT, 0, 2, IM(1), IM(110));
    pm[5]  = mapi(MOP_LDAIT, 0, 2, IM(2), IMI(130));
    pm[6]  = mapi(MOP_LDTMP, 0, 2, IM(1), IM(120));
    pm[7]  = mapi(MOP_LDTMP, 0, 2, IM(2), IM(123));
    pm[8]  = mapi(MOP_LDBASE, 0, 2, IM(1), IM(BASE1));
    pm[9]  = mapi(MOP_SETUP, 1, 1, IM(1));
    pm[10] = mapi(MOP_SETUP, 1, 1, IM(2));
    pm[11] = cpi(COP_ADD, 0, 3, 0, 0, DS(1, 1), SCI(1, 6), DS(2, 2));
    pm[12] = cpi(COP_MOV, 0, 2, 0, 0, IX(1), DS(2, 2));
    pm[13] = mapi(MOP_INCR, 1, 3, IM(2), IM(11), IM(14));
    pm[14] = mapi(MOP_INCR, 1, 3, IM(1), IM(10), IM(15));
    pm[15] = mapi(MOP_BRCP, 1, 2, IM(16), IM(20));
    pm[16] = mapi(MOP_SETUP, 0, 2, IM(1), IM(140));   // i from the word at 140
    pm[17] = cpi(COP_CLR, 0, 1, 0, 1, DS(1, 3));
    pm[18] = mapi(MOP_STOP, 1, 0);
    pm[20] = mapi(MOP_SETUP, 0, 1, IM(1));
    pm[21] = mapi(MOP_REMIDX, 0, 0);
    pm[22] = mapi(MOP_SETUP, 0, 1, IM(2));
    pm[23] = mapi(MOP_CLRIDX, 0, 0);
    pm[24] = cpi(COP_CLR, 0, 1, 0, 1, DS(1, 2));
    pm[25] = mapi(MOP_STOP, 1, 0);
    // APT 1: A[i, j-1]; APT 2: Bm[j, i]; APT 3: A[i+5] (too big)
    pm[100] = word_t'(1); pm[101] = word_t'(((16'hffff) << 8) | 2); pm[102] = 0;
    pm[103] = word_t'(2); pm[104] = word_t'(1); pm[105] = 0;
    pm[106] = word_t'((5 << 8) | 1); pm[107] = 0; pm[108] = 0;
    // AIT 1: A, column stride 10, bounds 3 x 4; AIT 2 (through pointer 130): Bm
    pm[110] = AB; pm[111] = 10; pm[112] = 0; pm[113] = 3; pm[114] = 4; pm[115] = 0;
    pm[130] = 131;
    pv = $urandom_range(1, 3);
    pm[140] = word_t'(pv);
    pm[131] = BM; pm[132] = 8; pm[133] = 0; pm[134] = 5; pm[135] = 3; pm[136] = 0;
    // templates: i = 1..3 step 1; j = 5 down to 2
    pm[120] = 1; pm[121] = 3; pm[122] = 1;
    pm[123] = 5; pm[124] = 2; pm[125] = word_t'(-1);
    // expected pushes
    exp_map_words(100, 3); exp_map_words(103, 3); exp_map_words(106, 3);
    exp_map_words(110, 6); exp_map_words(130, 1); exp_map_words(131, 6);
    exp_map_words(120, 3); exp_map_words(123, 3);
    exp_value(EOD_NEW, 1);
    for (int i = 1; i <= 3; i++)
      for (int j = 5; j >= 2; j--) begin
        exp_read(AB + i + (j - 1) * 10, 0);
        exp_read(BASE1 + 6, 1);
        exp_write(BM + j + i * 8, 0);
        exp_value(word_t'(i), 0);
        exp_read(BM + j + i * 8, 0);
        exp_write(BM + j + i * 8, 0);
      end
    if (taken) exp_map_words(140, 1);
    exp_value(EOD_NEW, 1);
    if (taken) exp_write(AB + pv + 5, 0);
    else       exp_write(AB, 0);       // no index level is active, so every index reads 0
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!halted && cyc < 20000) begin
      @(negedge clk);
      check(eod_inflight == ((eod_pushed - eod_taken_n) > 0) || cp_eod_taken,
            "eod_inflight follows words pushed and taken");
      cyc++;
    end
    repeat (10) @(posedge clk);
    check(halted, "STOP reached");
    check(exp_rq.size() == 0 && exp_wq.size() == 0,
          $sformatf("%0d reads and %0d writes never pushed", exp_rq.size(), exp_wq.size()));
    if (taken) check(err_oob && !err_lvl, $sformatf("taken path: bound error only (%0b %0b)", err_oob, err_lvl));
    else       check(!err_oob && err_lvl, $sformatf("other path: level error only (%0b %0b)", err_oob, err_lvl));
    check(n_alloc == 6, $sformatf("six blocks fetched once each (%0d)", n_alloc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
