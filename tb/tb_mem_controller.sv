// tb_mem_controller: random requests on all four requester ports with a
// random memory ready, checking each cycle that the highest-priority
// requester (instruction fetch, then write, then write-queue indirect read,
// then read queue) wins, that its address, data, write flag and tag reach
// the memory port, that only the winner sees ready, and that random tagged
// responses are routed to exactly the requester named by the tag's top two
// bits with the entry index from the low six bits. Combinational unit.
module tb_mem_controller;
  import sma_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        if_valid, if_ready, if_rvalid;
  addr_t       if_addr;
  word_t       if_rdata;
  logic        rq_valid, rq_ready, rq_rvalid;
  addr_t       rq_addr;
  logic [5:0]  rq_idx, rq_ridx;
  logic        wqi_valid, wqi_ready, wqi_rvalid;
  addr_t       wqi_addr;
  logic [5:0]  wqi_idx, wqi_ridx;
  logic        wqw_valid, wqw_ready;
  addr_t       wqw_addr;
  word_t       wqw_data, rdata;
  logic        mem_req_valid, mem_req_ready, mem_req_we;
  addr_t       mem_req_addr;
  word_t       mem_req_wdata;
  logic [TAG_W-1:0] mem_req_tag, mem_resp_tag;
  logic        mem_resp_valid;
  word_t       mem_resp_data;

  mem_controller dut (.*);

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

  int win [5];

  initial begin
    foreach (win[i]) win[i] = 0;
    for (int i = 0; i < 10000; i++) begin
      int w;
      @(negedge clk);
      if_valid  = ($urandom_range(3) == 0);
      wqw_valid = ($urandom_range(2) == 0);
      wqi_valid = ($urandom_range(2) == 0);
      rq_valid  = ($urandom_range(1) == 0);
      if_addr   = addr_t'($urandom);
      rq_addr   = addr_t'($urandom);
      wqi_addr  = addr_t'($urandom);
      wqw_addr  = addr_t'($urandom);
      wqw_data  = {$urandom, $urandom};
      rq_idx    = 6'($urandom);
      wqi_idx   = 6'($urandom);
      mem_req_ready  = ($urandom_range(3) != 0);
      mem_resp_valid = ($urandom_range(1) == 0);
      mem_resp_tag   = {2'($urandom_range(2)), 6'($urandom)};
      mem_resp_data  = {$urandom, $urandom};
      #1;
      w = if_valid ? 0 : wqw_valid ? 1 : wqi_valid ? 2 : rq_valid ? 3 : 4;
      win[w]++;
      check(mem_req_valid == (w != 4), "request valid when any requester is");
      check(if_ready  == (w == 0 && mem_req_ready), "fetch ready");
      check(wqw_ready == (w == 1 && mem_req_ready), "write ready");
      check(wqi_ready == (w == 2 && mem_req_ready), "indirect ready");
      check(rq_ready  == (w == 3 && mem_req_ready), "read ready");
      case (w)
        0: check(!mem_req_we && mem_req_addr == if_addr && mem_req_tag == 8'h00, "fetch request fields");
        1: check(mem_req_we && mem_req_addr == wqw_addr && mem_req_wdata == wqw_data, "write request fields");
        2: check(!mem_req_we && mem_req_addr == wqi_addr && mem_req_tag == {2'd2, wqi_idx}, "indirect request fields");
        3: check(!mem_req_we && mem_req_addr == rq_addr && mem_req_tag == {2'd1, rq_idx}, "read request fields");
        default: ;
      endcase
      check(if_rvalid  == (mem_resp_valid && mem_resp_tag[7:6] == 2'd0), "fetch response routing");
      check(rq_rvalid  == (mem_resp_valid && mem_resp_tag[7:6] == 2'd1), "read response routing");
      check(wqi_rvalid == (mem_resp_valid && mem_resp_tag[7:6] == 2'd2), "indirect response routing");
      if (rq_rvalid)  check(rq_ridx == mem_resp_tag[5:0] && rdata == mem_resp_data, "read response index/data");
      if (wqi_rvalid) check(wqi_ridx == mem_resp_tag[5:0] && rdata == mem_resp_data, "indirect response index/data");
      if (if_rvalid)  check(if_rdata == mem_resp_data, "fetch response data");
    end
    foreach (win[i]) check(win[i] > 100, $sformatf("winner %0d occurred", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
