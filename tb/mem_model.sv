// mem_model: behavioural main memory for the testbenches (not a design
// block). Word-addressed, 64-bit words, AW address bits.
// Requests: valid/ready with a write flag, address, write data and a tag.
// The model accepts a request when one of its NSLOT service slots is free and
// a random draw allows it (READY_PCT percent), so requesters see back-pressure.
// Writes update the array when accepted and are not answered. Reads take the
// word when accepted and answer after a random latency of 1..MAXLAT cycles;
// one answer per cycle, so answers come back out of request order.
// Counters: n_rd, n_wr, n_ooo (answers that overtook an older read).
// The testbench loads and inspects the array mem[] directly.
module mem_model
  import sma_pkg::*;
#(
  parameter int unsigned AW        = ADDR_W,
  parameter int unsigned NSLOT     = 8,
  parameter int unsigned MAXLAT    = 6,
  parameter int unsigned READY_PCT = 85
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic             req_we,
  input  logic [AW-1:0]    req_addr,
  input  word_t            req_wdata,
  input  logic [TAG_W-1:0] req_tag,
  output logic             resp_valid,
  output logic [TAG_W-1:0] resp_tag,
  output word_t            resp_data
);

  word_t mem [2**AW];

  logic             s_busy [NSLOT];
  int unsigned      s_cnt  [NSLOT];
  int unsigned      s_seq  [NSLOT];
  logic [TAG_W-1:0] s_tag  [NSLOT];
  word_t            s_data [NSLOT];
  int unsigned      seq;
  int unsigned      n_rd, n_wr, n_ooo;
  logic             rdy_draw;

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  // the array is written with blocking assignments only (here and by the
  // testbench loader); one request per cycle, so there is no read/write race
  always @(posedge clk)
    if (rst_n && req_valid && req_ready && req_we) mem[req_addr] = req_wdata;

  // free slot and the answering slot
  int free_s, ans_s;
  always_comb begin
    free_s = -1;
    ans_s  = -1;
    for (int i = NSLOT - 1; i >= 0; i--) begin
      if (!s_busy[i]) free_s = i;
      if (s_busy[i] && s_cnt[i] == 0) ans_s = i;
    end
  end

  assign req_ready  = rdy_draw && (free_s >= 0);
  assign resp_valid = (ans_s >= 0);
  assign resp_tag   = (ans_s >= 0) ? s_tag[ans_s] : '0;
  assign resp_data  = (ans_s >= 0) ? s_data[ans_s] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSLOT; i++) begin
        s_busy[i] <= 1'b0;
        s_cnt[i]  <= 0;
        s_seq[i]  <= 0;
        s_tag[i]  <= '0;
        s_data[i] <= '0;
      end
      seq      <= 0;
      n_rd     <= 0;
      n_wr     <= 0;
      n_ooo    <= 0;
      rdy_draw <= 1'b1;
    end else begin
      rdy_draw <= ($urandom_range(99) < READY_PCT);
      for (int i = 0; i < NSLOT; i++)
        if (s_busy[i] && s_cnt[i] != 0) s_cnt[i] <= s_cnt[i] - 1;
      if (ans_s >= 0) begin
        s_busy[ans_s] <= 1'b0;
        for (int i = 0; i < NSLOT; i++)
          if (s_busy[i] && s_seq[i] < s_seq[ans_s]) begin
            n_ooo <= n_ooo + 1;
            break;
          end
      end
      if (req_valid && req_ready) begin
        if (req_we) begin
          n_wr <= n_wr + 1;
        end else begin
          s_busy[free_s] <= 1'b1;
          s_cnt[free_s]  <= $urandom_range(MAXLAT - 1);
          s_seq[free_s]  <= seq;
          s_tag[free_s]  <= req_tag;
          s_data[free_s] <= mem[req_addr];
          seq            <= seq + 1;
          n_rd           <= n_rd + 1;
        end
      end
    end
  end

endmodule
