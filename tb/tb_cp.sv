// tb_cp: the Computation Processor on its own; the testbench plays the MAP.
// Three blocks are loaded into the instruction buffer (slots 2, 5, 6):
//   slot 2: ADD3 d,d,w ; SUB3 d,d,w              (loop block, two results)
//   slot 5: CLR w                                (takes no data: one pass)
//   slot 6: MUL3 d,d,r3 ; MOV r3,dw ; TSTN r3    (register tags, a test)
// The data stream, sent with random gaps, selects blocks with end-of-data
// words (the "new block" value three times, then slot numbers to rerun
// resident blocks) and carries random operands for a random number of passes
// of each loop block. Result words are taken with a random ready.
// Checks: every result word and every test outcome, in order, against a
// reference; the current-slot output after each switch; no error; and, at
// the end, that data arriving with no block selected raises the error flag.
module tb_cp;
  import sma_pkg::*;

  localparam int NBLK = 8, SW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          ib_wr, ib_first, ib_end, din_valid, din_ready, eod_taken;
  logic          wd_valid, wd_ready, br_valid, br_taken, cur_valid, busy, err;
  logic [SW-1:0] ib_slot, ib_end_slot, cur_slot;
  cp_instr_t     ib_instr;
  cp_data_t      din;
  word_t         wd_data;

  cp #(.NBLK(NBLK), .BLK_INSTR(8), .NREG(8), .FIFO_DEPTH(4)) dut (.*);

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

  function automatic cp_instr_t ci(logic [7:0] op, int nops, logic [2:0] rd, logic [2:0] wr,
                                   logic [2:0] rs, bit eob);
    cp_instr_t c;
    c.op = op; c.nops = 2'(nops); c.rd = rd; c.wr = wr; c.reg_sel = rs; c.eob = eob;
    return c;
  endfunction

  task automatic ib_put(int slot, cp_instr_t c, bit first, bit last);
    @(negedge clk);
    ib_wr = 1; ib_first = first; ib_slot = SW'(slot); ib_instr = c;
    ib_end = last; ib_end_slot = SW'(slot);
    @(negedge clk);
    ib_wr = 0; ib_first = 0; ib_end = 0;
  endtask

  cp_data_t dq [$];
  word_t    exp_w [$];
  bit       exp_b [$];
  int       exp_slot [$];

  task automatic eod(int v);
    cp_data_t d;
    d.eod = 1;
    d.data = (v < 0) ? EOD_NEW : word_t'(v);
    dq.push_back(d);
  endtask
  task automatic dat(word_t v);
    cp_data_t d;
    d.eod = 0;
    d.data = v;
    dq.push_back(d);
  endtask

  task automatic run_slot2(int passes);
    for (int p = 0; p < passes; p++) begin
      word_t a, b, c, d;
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      c = {$urandom, $urandom}; d = {$urandom, $urandom};
      dat(a); dat(b); dat(c); dat(d);
      exp_w.push_back(a + b);
      exp_w.push_back(c - d);
    end
  endtask
  task automatic run_slot6(int passes);
    for (int p = 0; p < passes; p++) begin
      word_t x, y, z;
      x = word_t'(longint'($urandom_range(200)) - 100);
      y = word_t'(longint'($urandom_range(200)) - 100);
      z = {$urandom, $urandom};
      dat(x); dat(y); dat(3);     // MUL3 x, y -> r3
      dat(3); dat(z);             // MOV r3 -> (written word)
      dat(3);                     // TSTN r3
      exp_w.push_back(x * y);
      exp_b.push_back($signed(x * y) < 0);
    end
  endtask

  // data sender
  always @(posedge clk) if (rst_n) begin
    if (din_valid && din_ready) void'(dq.pop_front());
  end
  always @(posedge clk) begin
    wd_ready <= ($urandom_range(2) != 0);
  end
  initial din_valid = 0;
  always @(negedge clk) begin
    din_valid = (dq.size() > 0) && ($urandom_range(3) != 0);
    din = (dq.size() > 0) ? dq[0] : '0;
  end

  // result monitor
  int n_w = 0, n_b = 0, n_sw = 0;
  always @(posedge clk) if (rst_n) begin
    if (wd_valid && wd_ready) begin
      check(exp_w.size() > 0, "result with nothing expected");
      if (exp_w.size() > 0) begin
        word_t e;
        e = exp_w.pop_front();
        check(wd_data == e, $sformatf("result %0d = %h expected %h", n_w, wd_data, e));
      end
      n_w++;
    end
    if (br_valid) begin
      check(exp_b.size() > 0, "test outcome with nothing expected");
      if (exp_b.size() > 0) begin
        bit e;
        e = exp_b.pop_front();
        check(br_taken == e, $sformatf("test outcome %0d", n_b));
      end
      n_b++;
    end
  end
  always @(posedge clk) if (rst_n && eod_taken) begin
    #1;
    check(exp_slot.size() > 0 && cur_valid && int'(cur_slot) == exp_slot[0],
          $sformatf("switch %0d: current slot %0d", n_sw, cur_slot));
    if (exp_slot.size() > 0) void'(exp_slot.pop_front());
    n_sw++;
  end

  initial begin
    ib_wr = 0; ib_first = 0; ib_end = 0; ib_slot = '0; ib_end_slot = '0; ib_instr = '0;
    din = '0; wd_ready = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    ib_put(2, ci(COP_ADD, 3, 3'b011, 3'b100, 3'b000, 0), 1, 0);
    ib_put(2, ci(COP_SUB, 3, 3'b011, 3'b100, 3'b000, 1), 0, 1);
    ib_put(5, ci(COP_CLR, 1, 3'b000, 3'b001, 3'b000, 1), 1, 1);
    ib_put(6, ci(COP_MUL, 3, 3'b111, 3'b100, 3'b100, 0), 1, 0);
    ib_put(6, ci(COP_MOV, 2, 3'b011, 3'b010, 3'b001, 0), 0, 0);
    ib_put(6, ci(COP_TSTN, 1, 3'b001, 3'b000, 3'b001, 1), 0, 1);
    eod(-1); exp_slot.push_back(2); run_slot2(1 + $urandom_range(5));
    eod(-1); exp_slot.push_back(5); exp_w.push_back(0);
    eod(-1); exp_slot.push_back(6); run_slot6(1 + $urandom_range(5));
    for (int r = 0; r < 60; r++) begin
      case ($urandom_range(2))
        0: begin eod(2); exp_slot.push_back(2); run_slot2(1 + $urandom_range(6)); end
        1: begin eod(5); exp_slot.push_back(5); exp_w.push_back(0); end
        default: begin eod(6); exp_slot.push_back(6); run_slot6(1 + $urandom_range(6)); end
      endcase
    end
    eod(5); exp_slot.push_back(5); exp_w.push_back(0);
    while (dq.size() > 0 || exp_w.size() > 0) @(posedge clk);
    repeat (20) @(posedge clk);
    check(exp_w.size() == 0 && exp_b.size() == 0 && exp_slot.size() == 0, "all results seen");
    check(!err, "no error in normal operation");
    check(n_sw == 64 && n_b > 20, $sformatf("coverage: switches %0d tests %0d", n_sw, n_b));
    // data with no block waiting: error
    dat(64'd7);
    repeat (20) @(posedge clk);
    check(err, "data word with no block raises the error flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
