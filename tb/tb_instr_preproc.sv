// tb_instr_preproc: block allocation and instruction splitting.
//  * Allocation: for each block the testbench raises alloc_req with random
//    slot-valid bits, a random CP slot and, at times, an end-of-data word in
//    flight. It checks that nothing is allocated while the word is in flight,
//    that an unused slot is chosen when there is one (the lowest), that the
//    CP's current slot is never chosen, that the fetcher is started at the
//    block address, and that alloc_done answers with the slot.
//  * Splitting: random MAP and CP instructions (0..3 operands, all operand
//    kinds, end-of-block on the last) are offered with a random valid; every
//    OIB line, the CP instruction stream (slot, first-of-block, read / write
//    / register-tag bits per operand) and the end-of-block bookkeeping
//    (complete mark, address after the block, CP end mark, CP-loop flag) are
//    compared with a reference split.
module tb_instr_preproc;
  import sma_pkg::*;

  localparam int NBLK = 8, SW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            alloc_req, alloc_done, cp_cur_valid, eod_inflight, oib_alloc, fetch_start;
  addr_t           alloc_addr, fetch_pc, in_addr, oib_next;
  logic [SW-1:0]   alloc_slot, cp_cur_slot, oib_alloc_slot, oib_slot, cp_slot;
  logic [NBLK-1:0] blk_valid;
  logic            in_valid, in_ready, oib_wr, oib_set_cp, oib_set_loop, oib_set_done;
  logic            cp_wr, cp_first, cp_end;
  instr_t          in_instr;
  oib_line_t       oib_line;
  cp_instr_t       cp_instr;

  instr_preproc #(.NBLK(NBLK)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  oib_line_t exp_lines [$];
  cp_instr_t exp_cp [$];
  bit        exp_first [$];

  // reference split of one instruction
  task automatic split(instr_t w);
    opnd_t     o [3];
    oib_line_t l;
    cp_instr_t c;
    logic [2:0] rb, wb;
    int n;
    o[0] = w.o1; o[1] = w.o2; o[2] = w.o3;
    n = int'(w.opc.nops);
    if (w.opc.is_map) begin
      l = '0; l.is_instr = 1; l.field = w.opc; l.eob = w.opc.eob && n == 0;
      exp_lines.push_back(l);
      for (int i = 0; i < n; i++) begin
        l = '0; l.field = o[i]; l.eob = w.opc.eob && i == n - 1;
        exp_lines.push_back(l);
      end
    end else begin
      rb = rd_bits(w.opc.nops, w.opc.one_wr);
      wb = wr_bits(w.opc.nops, w.opc.one_wr);
      if (n == 0) begin
        l = '0; l.eob = w.opc.eob;
        exp_lines.push_back(l);
      end
      for (int i = 0; i < n; i++) begin
        l = '0; l.rd = rb[i]; l.wr = wb[i]; l.field = o[i]; l.eob = w.opc.eob && i == n - 1;
        exp_lines.push_back(l);
      end
      c = '0; c.op = w.opc.op; c.nops = w.opc.nops; c.eob = w.opc.eob;
      for (int i = 0; i < n; i++) begin
        bit imm;
        imm = (o[i].otype == OPT_IMM) && !o[i].ind;
        c.rd[i] = rb[i] || imm;
        c.wr[i] = wb[i];
        c.reg_sel[i] = imm && w.opc.imm_reg;
      end
      exp_cp.push_back(c);
    end
  endtask

  // monitor of the OIB / CP side
  logic [SW-1:0] blk_slot;
  bit            blk_seen_cp, blk_loop_exp, blk_loop_set;
  addr_t         blk_last_addr;
  int            n_lines = 0, n_cp = 0, n_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (oib_wr) begin
      oib_line_t e;
      check(exp_lines.size() > 0, "OIB line with nothing expected");
      if (exp_lines.size() > 0) begin
        e = exp_lines.pop_front();
        check(oib_line == e, $sformatf("OIB line %0d: %h expected %h", n_lines, oib_line, e));
      end
      check(oib_slot == blk_slot, "OIB line goes to the allocated slot");
      n_lines++;
    end
    if (cp_wr) begin
      cp_instr_t e;
      check(exp_cp.size() > 0, "CP instruction with nothing expected");
      if (exp_cp.size() > 0) begin
        e = exp_cp.pop_front();
        check(cp_instr == e, $sformatf("CP instruction %0d: %h expected %h", n_cp, cp_instr, e));
        check(cp_first == !blk_seen_cp, "first-of-block mark");
        if (!blk_seen_cp) begin
          check(oib_set_cp && oib_set_loop == (|e.rd), "CP flags set on the first CP instruction");
        end
      end
      check(cp_slot == blk_slot, "CP instruction slot");
      blk_seen_cp = 1;
      n_cp++;
    end
    if (oib_set_done) begin
      check(oib_next == blk_last_addr + 1, "address after the block");
      check(cp_end == blk_seen_cp, "CP end mark only for blocks with CP instructions");
      n_done++;
    end else check(!cp_end, "no CP end mark inside a block");
  end

  function automatic instr_t rand_instr(bit last);
    instr_t w;
    w = instr_t'({$urandom, $urandom});
    w.opc.rsvd = '0;
    w.opc.eob = last;
    return w;
  endfunction

  int n_evict = 0, n_free = 0, n_wait = 0;

  initial begin
    int nins, waited;
    alloc_req = 0; alloc_addr = '0; cp_cur_valid = 0; cp_cur_slot = '0; eod_inflight = 0;
    blk_valid = '0; in_valid = 0; in_instr = '0; in_addr = '0;
    blk_slot = '0; blk_seen_cp = 0; blk_last_addr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int b = 0; b < 400; b++) begin
      // ---- allocation
      @(negedge clk);
      alloc_req = 1;
      alloc_addr = addr_t'($urandom);
      blk_valid = ($urandom_range(2) == 0) ? NBLK'($urandom) : '1;
      cp_cur_valid = $urandom_range(1);
      cp_cur_slot = SW'($urandom);
      eod_inflight = ($urandom_range(3) == 0);
      waited = 0;
      while (1) begin
        #1;
        if (eod_inflight) begin
          check(!oib_alloc, "no allocation while an end-of-data word is in flight");
          n_wait++;
        end
        if (oib_alloc) break;
        @(negedge clk);
        waited++;
        if (waited > 2) eod_inflight = 0;
      end
      check(fetch_start && fetch_pc == alloc_addr, "fetcher started at the block");
      if (blk_valid != '1) begin
        int lo;
        lo = 0;
        for (int i = NBLK - 1; i >= 0; i--) if (!blk_valid[i]) lo = i;
        check(int'(oib_alloc_slot) == lo, "lowest unused slot chosen");
        n_free++;
      end else begin
        check(!(cp_cur_valid && oib_alloc_slot == cp_cur_slot), "CP's current block is not replaced");
        n_evict++;
      end
      blk_slot = oib_alloc_slot;
      @(negedge clk);
      check(alloc_done && alloc_slot == blk_slot, "alloc_done with the slot");
      alloc_req = 0;
      blk_seen_cp = 0;
      // ---- instructions
      nins = 1 + $urandom_range(4);
      for (int i = 0; i < nins; i++) begin
        in_instr = rand_instr(i == nins - 1);
        in_addr = alloc_addr + addr_t'(i);
        blk_last_addr = in_addr;
        split(in_instr);
        in_valid = 0;
        while (!in_valid) begin
          in_valid = ($urandom_range(2) != 0);
          if (!in_valid) @(negedge clk);
        end
        #1;
        while (!in_ready) begin
          @(negedge clk);
          #1;
        end
        @(negedge clk);
        in_valid = 0;
      end
      @(negedge clk);
      check(exp_lines.size() == 0 && exp_cp.size() == 0, "block fully split");
    end
    check(n_evict > 50 && n_free > 50 && n_wait > 50 && n_done == 400,
          $sformatf("coverage: evict %0d free %0d wait %0d done %0d", n_evict, n_free, n_wait, n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
