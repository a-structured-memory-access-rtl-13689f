// tb_read_queue: the testbench plays address generator, write queue, memory
// and consumer around the read queue.
//  * Pushes (random, when not full): immediate values (already received),
//    end-of-data words, direct reads, and indirect reads whose first answer
//    is a pointer. Some pushes are marked as matching pending writes.
//  * Pending writes: WQ_DEPTH bits that the testbench sets and later clears
//    at random, standing in for the write queue.
//  * Memory: takes requests with a random ready, answers after a random
//    latency and in any order with mem[address].
//  * Consumer: pops the head with a random ready.
// Checks: the head sequence equals the push sequence with the right data
// (value, mem[a] or mem[mem[a]]) and map / end-of-data bits; no entry is
// requested while a write it was marked against is still pending; every
// response names an entry that requested; full / empty agree with the count.
module tb_read_queue;
  import sma_pkg::*;

  localparam int DEPTH = 8, WQ = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          push, push_map, push_ind, push_rcv, push_eod, full, empty;
  addr_t         push_addr, req_addr;
  word_t         push_data, resp_data, out_data;
  logic [WQ-1:0] wq_hit, wq_pend;
  logic          req_valid, req_ready, resp_valid, out_valid, out_map, out_eod, pop;
  logic [5:0]    req_idx, resp_idx;

  read_queue #(.DEPTH(DEPTH), .WQ_DEPTH(WQ)) dut (.*);

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

  word_t mem [256];

  typedef struct {
    word_t data;
    bit    map;
    bit    eod;
  } exp_t;
  exp_t exp_q [$];

  // per-slot mask of writes the entry must wait for (testbench view)
  logic [WQ-1:0] slot_mask [DEPTH];
  int tail_m = 0, count_m = 0;

  // memory in flight
  typedef struct {
    logic [5:0] idx;
    word_t      data;
    int         lat;
  } mresp_t;
  mresp_t inflight [$];

  int n_held = 0, n_ind = 0, n_ooo = 0, n_popped = 0;
  int pick;

  initial begin
    for (int a = 0; a < 128; a++) mem[a] = word_t'(128 + $urandom_range(127));
    for (int a = 128; a < 256; a++) mem[a] = {$urandom, $urandom};
    foreach (slot_mask[s]) slot_mask[s] = '0;
    push = 0; push_map = 0; push_ind = 0; push_rcv = 0; push_eod = 0;
    push_addr = '0; push_data = '0; wq_hit = '0; wq_pend = '0;
    req_ready = 0; resp_valid = 0; resp_idx = '0; resp_data = '0; pop = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      exp_t e;
      @(negedge clk);
      // random stimulus
      push = ($urandom_range(2) != 0) && (cyc < 29000);
      push_map = ($urandom_range(4) == 0);
      push_eod = 0;
      push_rcv = 0;
      push_ind = 0;
      push_data = {$urandom, $urandom};
      case ($urandom_range(5))
        0: push_rcv = 1;
        1: begin push_rcv = 1; push_eod = 1; push_map = 0; end
        2: push_ind = 1;
        default: ;
      endcase
      push_addr = push_ind ? addr_t'($urandom_range(127)) : addr_t'($urandom_range(255));
      wq_hit = WQ'({$urandom} & {$urandom});
      if ($urandom_range(3) == 0) wq_pend = wq_pend & WQ'($urandom);
      else wq_pend = wq_pend | WQ'({$urandom} & {$urandom} & {$urandom});
      req_ready = ($urandom_range(3) != 0);
      pop = ($urandom_range(2) != 0);
      // memory answer: a random entry whose latency has run out
      resp_valid = 0;
      pick = -1;
      foreach (inflight[i]) if (inflight[i].lat <= 0 && (pick < 0 || $urandom_range(1) == 0)) pick = i;
      if (pick >= 0) begin
        resp_valid = 1;
        resp_idx   = inflight[pick].idx;
        resp_data  = inflight[pick].data;
        if (pick != 0) n_ooo++;
        inflight.delete(pick);
      end
      #1;
      // checks before the edge
      check(full == (count_m == DEPTH) && empty == (count_m == 0), "full / empty");
      if (req_valid) begin
        check((slot_mask[req_idx[2:0]] & wq_pend) == '0, "request only after older writes left");
        if (req_ready) begin
          mresp_t m;
          m.idx  = req_idx;
          m.data = mem[req_addr[7:0]];
          m.lat  = $urandom_range(5);
          inflight.push_back(m);
        end
      end
      for (int s = 0; s < DEPTH; s++) slot_mask[s] &= wq_pend;
      for (int s = 0; s < DEPTH; s++)
        if (dut.used[s] && !dut.q[s].rcv && !dut.q[s].req && (slot_mask[s] != '0)) begin
          n_held++;
          break;
        end
      if (out_valid && pop) begin
        check(exp_q.size() > 0, "head with nothing expected");
        if (exp_q.size() > 0) begin
          e = exp_q.pop_front();
          check(out_data == e.data && out_map == e.map && out_eod == e.eod,
                $sformatf("head %0d: data %h map %0b eod %0b, expected %h %0b %0b",
                          n_popped, out_data, out_map, out_eod, e.data, e.map, e.eod));
        end
        n_popped++;
        count_m--;
      end
      if (push && !full) begin
        e.map = push_map;
        e.eod = push_eod;
        e.data = push_rcv ? push_data :
                 push_ind ? mem[mem[push_addr[7:0]][7:0]] : mem[push_addr[7:0]];
        if (push_ind) n_ind++;
        exp_q.push_back(e);
        slot_mask[tail_m] = push_rcv ? '0 : (wq_hit & wq_pend);
        tail_m = (tail_m + 1) % DEPTH;
        count_m++;
      end
      foreach (inflight[i]) inflight[i].lat--;
    end
    check(exp_q.size() == 0 || !dut.used[dut.head] || dut.q[dut.head].rcv, "queue drains");
    check(n_popped > 5000 && n_held > 100 && n_ind > 1000 && n_ooo > 100,
          $sformatf("coverage: popped %0d held %0d indirect %0d out-of-order %0d", n_popped, n_held, n_ind, n_ooo));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
