// tb_write_queue: the testbench plays address generator, CP, memory and the
// read queue's address comparator around the write queue.
//  * Pushes (random, when not full): direct addresses and indirect ones
//    (whose real address is the word stored at the pushed address).
//  * CP data: a counter value sent with a random valid whenever the queue
//    accepts it; values must attach to entries in push order.
//  * Memory: indirect reads answered after a random latency in any order;
//    writes accepted with a random ready.
// Checks: the writes reach memory in push order with the resolved address
// and the right data; a write never leaves before its data and address are
// known; cam_hit matches a model (entry in use and address equal or still
// indirect) for a random compare address; pend equals the entries in use;
// full / empty agree with the count; indirect reads are answered out of order.
module tb_write_queue;
  import sma_pkg::*;

  localparam int DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             push, push_map, push_ind, full, empty;
  addr_t            push_addr, ind_addr, wr_addr, cam_addr;
  logic             wdata_valid, wdata_ready, ind_valid, ind_ready, resp_valid;
  word_t            wdata, resp_data, wr_data;
  logic [5:0]       ind_idx, resp_idx;
  logic             wr_valid, wr_ready;
  logic [DEPTH-1:0] cam_hit, pend;

  write_queue #(.DEPTH(DEPTH)) dut (.*);

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

  typedef struct { addr_t addr; word_t data; } wr_t;
  addr_t exp_addr [$];
  word_t exp_data [$];

  bit    m_used [DEPTH], m_ind [DEPTH];
  addr_t m_addr [DEPTH];
  int    tail_m = 0, count_m = 0;
  word_t next_data = 1;

  typedef struct { logic [5:0] idx; word_t data; int lat; } mresp_t;
  mresp_t inflight [$];
  int n_ooo = 0, n_wr = 0, n_ind = 0, pick;

  initial begin
    for (int a = 0; a < 256; a++) mem[a] = word_t'($urandom_range(255));
    for (int s = 0; s < DEPTH; s++) begin m_used[s] = 0; m_ind[s] = 0; m_addr[s] = '0; end
    push = 0; push_map = 0; push_ind = 0; push_addr = '0; cam_addr = '0;
    wdata_valid = 0; wdata = '0; ind_ready = 0; resp_valid = 0; resp_idx = '0;
    resp_data = '0; wr_ready = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      push = ($urandom_range(2) != 0) && cyc < 29000;
      push_map = 0;
      push_ind = ($urandom_range(2) == 0);
      push_addr = addr_t'($urandom_range(255));
      wdata_valid = ($urandom_range(2) != 0);
      wdata = next_data;
      ind_ready = ($urandom_range(3) != 0);
      wr_ready = ($urandom_range(2) != 0);
      cam_addr = addr_t'($urandom_range(255));
      resp_valid = 0;
      pick = -1;
      foreach (inflight[i]) if (inflight[i].lat <= 0 && (pick < 0 || $urandom_range(1) == 0)) pick = i;
      if (pick >= 0) begin
        resp_valid = 1;
        resp_idx = inflight[pick].idx;
        resp_data = inflight[pick].data;
        if (pick != 0) n_ooo++;
        inflight.delete(pick);
      end
      #1;
      check(full == (count_m == DEPTH) && empty == (count_m == 0), "full / empty");
      for (int s = 0; s < DEPTH; s++) begin
        check(pend[s] == m_used[s], "pend");
        check(cam_hit[s] == (m_used[s] && (m_ind[s] || m_addr[s] == cam_addr)),
              $sformatf("cam_hit[%0d]", s));
      end
      if (ind_valid && ind_ready) begin
        mresp_t m;
        check(m_used[ind_idx] && m_ind[ind_idx] && ind_addr == m_addr[ind_idx], "indirect read of a waiting entry");
        m.idx = ind_idx;
        m.data = mem[ind_addr[7:0]];
        m.lat = $urandom_range(5);
        inflight.push_back(m);
      end
      if (wr_valid && wr_ready) begin
        check(exp_addr.size() > 0 && exp_data.size() > 0, "write with nothing expected");
        if (exp_addr.size() > 0 && exp_data.size() > 0) begin
          addr_t a;
          word_t d;
          a = exp_addr.pop_front();
          d = exp_data.pop_front();
          check(wr_addr == a && wr_data == d,
                $sformatf("write %0d: %0d <- %0d, expected %0d <- %0d", n_wr, wr_addr, wr_data, a, d));
        end
        n_wr++;
        m_used[dut.head] = 0;
        count_m--;
      end
      if (wdata_valid && wdata_ready) begin
        exp_data.push_back(wdata);
        next_data++;
      end
      if (resp_valid) begin
        m_ind[resp_idx[2:0]] = 0;
        m_addr[resp_idx[2:0]] = addr_t'(resp_data);
      end
      if (push && !full) begin
        m_used[tail_m] = 1;
        m_ind[tail_m] = push_ind;
        m_addr[tail_m] = push_addr;
        exp_addr.push_back(push_ind ? addr_t'(mem[push_addr[7:0]]) : push_addr);
        if (push_ind) n_ind++;
        tail_m = (tail_m + 1) % DEPTH;
        count_m++;
      end
      foreach (inflight[i]) inflight[i].lat--;
    end
    check(n_wr > 5000 && n_ind > 2000 && n_ooo > 100,
          $sformatf("coverage: writes %0d indirect %0d out-of-order %0d", n_wr, n_ind, n_ooo));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
