// tb_map: the Memory Access Processor with the behavioural memory; the
// testbench stands in for the CP.
// Program (n = 6 elements):
//    1-5   LDAPT, LDAIT (X and Y), LDTMP, SETUP        (first block)
//    6-7   MOV X[i] -> Y[i] ; INCR i, 6, 8             (loop block)
//    8     BRCP 9, 11
//    9-10  CLR s0 ; STOP        11-12  CLR s1 ; STOP
// The stand-in CP takes data words with a random ready, tracks the block it
// is in from the end-of-data words (and the new-block list of slots),
// reports which block it is executing, answers BRCP once all loop data has
// been taken (random outcome), and sends one result word per MOV pass
// (3*X[i]+1) and one for the CLR, each only after the words it depends on.
// Checks: the exact data stream (end-of-data for the new loop block, X[i],
// old Y[i] per pass, no end-of-data between passes of the repeated block,
// end-of-data for the branch target block); the instructions forwarded to the
// CP (one MOV, one CLR, first-of-block marks, end marks); memory afterwards
// (Y[i] = 3*X[i]+1, the scalar on the chosen path only); halted; no error.
module tb_map;
  import sma_pkg::*;
  import sma_tb_pkg::*;

  localparam int NBLK = 8, SW = 3, N = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start, halted;
  addr_t            start_pc;
  logic [2:0]       err;
  logic             mreq_valid, mreq_ready, mreq_we, mresp_valid;
  addr_t            mreq_addr;
  word_t            mreq_wdata, mresp_data;
  logic [TAG_W-1:0] mreq_tag, mresp_tag;
  logic             cpi_wr, cpi_first, cpi_end, cpd_valid, cpd_ready, cp_eod_taken;
  logic [SW-1:0]    cpi_slot, cp_cur_slot;
  cp_instr_t        cpi_instr;
  cp_data_t         cpd_data;
  logic             cpw_valid, cpw_ready, cp_br_valid, cp_br_taken, cp_cur_valid;
  word_t            cpw_data;

  map #(.NBLK(NBLK)) dut (
    .clk, .rst_n, .start, .start_pc, .halted, .err,
    .mem_req_valid(mreq_valid), .mem_req_ready(mreq_ready), .mem_req_we(mreq_we),
    .mem_req_addr(mreq_addr), .mem_req_wdata(mreq_wdata), .mem_req_tag(mreq_tag),
    .mem_resp_valid(mresp_valid), .mem_resp_tag(mresp_tag), .mem_resp_data(mresp_data),
    .cpi_wr, .cpi_first, .cpi_slot, .cpi_instr, .cpi_end,
    .cpd_valid, .cpd_data, .cpd_ready, .cp_eod_taken,
    .cpw_valid, .cpw_data, .cpw_ready, .cp_br_valid, .cp_br_taken,
    .cp_cur_valid, .cp_cur_slot);

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
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  localparam int XB = 200, YB = 300, S0 = 400;
  word_t X [1:N], Y [1:N];
  bit    taken;

  // expected data stream
  cp_data_t exp_d [$];
  word_t    wr_vals [$];
  int       n_data = 0, n_mov = 0, n_clr = 0, n_first = 0, n_end = 0;
  int       new_slots [$];
  // a result may only be sent after the words it depends on were taken
  int       n_sent = 0, n_allowed;
  assign n_allowed = (n_data >= 2 + 2 * N) ? N + 1 : (n_data - 1) / 2;
  bit       loop_done;

  // ---- stand-in CP
  always @(posedge clk) begin
    cpd_ready <= ($urandom_range(3) != 0);
    cpw_valid <= (wr_vals.size() > 0) && (n_sent + int'(cpw_valid && cpw_ready) < n_allowed) &&
                 ($urandom_range(2) != 0);
  end
  assign cpw_data     = (wr_vals.size() > 0) ? wr_vals[0] : '0;
  assign cp_eod_taken = cpd_valid && cpd_ready && cpd_data.eod;

  // the result list changes 1 time unit after the edge, so the MAP samples
  // the word from before the edge
  always @(posedge clk) if (rst_n && cpw_valid && cpw_ready) begin
    #1;
    void'(wr_vals.pop_front());
    n_sent++;
  end

  always @(posedge clk) if (rst_n) begin
    cp_br_valid <= 1'b0;
    if (cpi_wr) begin
      if (cpi_first) begin
        new_slots.push_back(int'(cpi_slot));
        n_first++;
      end
      if (cpi_instr.op == COP_MOV) begin
        n_mov++;
        check(cpi_instr.nops == 2 && cpi_instr.rd == 3'b011 && cpi_instr.wr == 3'b010, "MOV operand bits");
      end
      if (cpi_instr.op == COP_CLR) begin
        n_clr++;
        check(cpi_instr.nops == 1 && cpi_instr.rd == 3'b000 && cpi_instr.wr == 3'b001, "CLR operand bits");
      end
    end
    if (cpi_end) n_end++;
    if (cpd_valid && cpd_ready) begin
      check(exp_d.size() > 0, "data word with nothing expected");
      if (exp_d.size() > 0) begin
        cp_data_t e;
        e = exp_d.pop_front();
        check(cpd_data == e, $sformatf("data word %0d: eod %0b %h, expected eod %0b %h",
                                       n_data, cpd_data.eod, cpd_data.data, e.eod, e.data));
      end
      if (cpd_data.eod) begin
        cp_cur_valid <= 1'b1;
        if (cpd_data.data == EOD_NEW) begin
          if (new_slots.size() > 0) cp_cur_slot <= SW'(new_slots.pop_front());
        end else cp_cur_slot <= SW'(cpd_data.data);
      end
      n_data++;
      if (n_data == 1 + 2 * N) begin
        cp_br_valid <= 1'b1;
        cp_br_taken <= taken;
      end
    end
  end

  task automatic poke(int a, word_t v);
    u_mem.mem[a] = v;
  endtask

  initial begin
    cp_data_t d;
    int cyc;
    start = 0; start_pc = 1; cp_br_valid = 0; cp_br_taken = 0; cp_cur_valid = 0; cp_cur_slot = '0;
    cpd_ready = 0; cpw_valid = 0;
    taken = $urandom_range(1);
    poke(1, mapi(MOP_LDAPT, 0, 2, IM(1), IM(100)));
    poke(2, mapi(MOP_LDAIT, 0, 2, IM(1), IM(110)));
    poke(3, mapi(MOP_LDAIT, 0, 2, IM(2), IM(120)));
    poke(4, mapi(MOP_LDTMP, 0, 2, IM(1), IM(130)));
    poke(5, mapi(MOP_SETUP, 1, 1, IM(1)));
    poke(6, cpi(COP_MOV, 0, 2, 0, 0, DS(1, 1), DS(2, 1)));
    poke(7, mapi(MOP_INCR, 1, 3, IM(1), IM(6), IM(8)));
    poke(8, mapi(MOP_BRCP, 1, 2, IM(9), IM(11)));
    poke(9, cpi(COP_CLR, 0, 1, 0, 1, SC(0, S0)));
    poke(10, mapi(MOP_STOP, 1, 0));
    poke(11, cpi(COP_CLR, 0, 1, 0, 1, SC(0, S0 + 1)));
    poke(12, mapi(MOP_STOP, 1, 0));
    poke(100, 1);
    poke(110, XB); poke(113, N);
    poke(120, YB); poke(123, N);
    poke(130, 1); poke(131, N); poke(132, 1);
    poke(S0, 55); poke(S0 + 1, 66);
    d.eod = 1; d.data = EOD_NEW; exp_d.push_back(d);
    for (int i = 1; i <= N; i++) begin
      X[i] = {$urandom, $urandom};
      Y[i] = {$urandom, $urandom};
      poke(XB + i, X[i]);
      poke(YB + i, Y[i]);
      d.eod = 0; d.data = X[i]; exp_d.push_back(d);
      d.data = Y[i]; exp_d.push_back(d);
      wr_vals.push_back(3 * X[i] + 1);
    end
    wr_vals.push_back(64'd777);
    d.eod = 1; d.data = EOD_NEW; exp_d.push_back(d);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!(halted && wr_vals.size() == 0 && dut.wq_empty) && cyc < 20000) begin
      @(posedge clk);
      cyc++;
    end
    repeat (30) @(posedge clk);
    check(halted, "STOP reached");
    check(exp_d.size() == 0, $sformatf("%0d data words never arrived", exp_d.size()));
    for (int i = 1; i <= N; i++)
      check(u_mem.mem[YB + i] == 3 * X[i] + 1, $sformatf("Y[%0d] written", i));
    check(u_mem.mem[XB + N + 1] == 0, "nothing written past the vector");
    if (taken) check(u_mem.mem[S0] == 777 && u_mem.mem[S0 + 1] == 66, "taken path wrote s0 only");
    else       check(u_mem.mem[S0] == 55 && u_mem.mem[S0 + 1] == 777, "not-taken path wrote s1 only");
    check(n_mov == 1 && n_clr == 1 && n_first == 2 && n_end == 2,
          $sformatf("instructions forwarded once: MOV %0d CLR %0d first %0d end %0d", n_mov, n_clr, n_first, n_end));
    check(err == 3'b000, $sformatf("no error (%b)", err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
