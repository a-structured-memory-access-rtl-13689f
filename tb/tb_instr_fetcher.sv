// tb_instr_fetcher: the fetcher reads instruction blocks from a small
// testbench memory that accepts requests with random delay and answers
// after a random latency; the preprocessor side takes instructions with a
// random ready. Random blocks (1..8 instructions, end-of-block bit on the
// last) are placed at random addresses; for each start the test checks that
// exactly the block's instructions come out, in order, with their addresses,
// that only one request is outstanding at a time, that nothing is requested
// after the end-of-block instruction, and that busy drops at the end.
module tb_instr_fetcher;
  import sma_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   start, busy, if_valid, if_ready, if_rvalid, out_valid, out_ready;
  addr_t  start_pc, if_addr, out_addr;
  word_t  if_rdata;
  instr_t out_instr;

  instr_fetcher dut (.*);

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

  word_t mem [256];

  // memory: one outstanding request, random latency
  int    lat;
  bit    pend;
  addr_t paddr;
  initial begin
    if_ready = 0; if_rvalid = 0; if_rdata = '0; pend = 0; lat = 0; paddr = '0;
  end
  always @(posedge clk) begin
    if_rvalid <= 1'b0;
    if (pend) begin
      if (lat == 0) begin
        if_rvalid <= 1'b1;
        if_rdata  <= mem[paddr[7:0]];
        pend      <= 1'b0;
      end else lat <= lat - 1;
    end
    if (if_valid && if_ready) begin
      check(!pend, "only one fetch outstanding");
      pend  <= 1'b1;
      paddr <= if_addr;
      lat   <= $urandom_range(4);
    end
    if_ready  <= ($urandom_range(2) != 0);
    out_ready <= ($urandom_range(2) != 0);
  end

  initial begin
    int len, base, got;
    start = 0; start_pc = '0; out_ready = 0;
    foreach (mem[i]) mem[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int b = 0; b < 300; b++) begin
      len  = 1 + $urandom_range(7);
      base = $urandom_range(200);
      for (int i = 0; i < len; i++) begin
        instr_t w;
        w = instr_t'({$urandom, $urandom});
        w.opc.eob = (i == len - 1);
        mem[base + i] = w;
      end
      mem[base + len] = {$urandom, $urandom} | 64'h4000_0000_0000_0000;
      @(negedge clk);
      start = 1; start_pc = addr_t'(base);
      @(negedge clk);
      start = 0;
      got = 0;
      while (busy) begin
        @(posedge clk);
        if (out_valid && out_ready) begin
          check(out_addr == addr_t'(base + got), $sformatf("block %0d instr %0d address", b, got));
          check(out_instr == instr_t'(mem[base + got]), $sformatf("block %0d instr %0d word", b, got));
          got++;
        end
        if (got > len) begin
          check(0, $sformatf("block %0d: fetch runs past the end of block", b));
          break;
        end
      end
      if (got > len) begin
        rst_n = 1'b0;
        #1 rst_n = 1'b1;
      end
      check(got == len, $sformatf("block %0d: %0d instructions, expected %0d", b, got, len));
      repeat ($urandom_range(3)) @(posedge clk);
      check(!if_valid && !out_valid, "idle after the block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
