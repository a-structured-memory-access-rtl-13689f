// access_info_table: the MAP's access information table (AIT).
//
// One line per data structure in use: its base address (DSBA), the
// displacement of dimensions 2 and 3 and the upper bound of each of the three
// dimensions. The first dimension's displacement is 1 (consecutive elements),
// so a line is six memory words, loaded by LDAIT one word per write in the
// order base, disp2, disp3, ub1, ub2, ub3. Writes take effect at the clock
// edge; the read port is combinational. Out-of-range entries are ignored /
// read as 0.
module access_info_table
  import sma_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [7:0] wr_idx,
  input  logic [2:0] wr_word,
  input  word_t      wr_data,
  input  logic [7:0] rd_idx,
  output addr_t      rd_base,
  output addr_t      rd_disp [NDIM],
  output val_t       rd_upb  [NDIM]
);

  addr_t base_q [ENTRIES];
  addr_t disp_q [ENTRIES][NDIM];   // [0] unused: the first displacement is 1
  val_t  upb_q  [ENTRIES][NDIM];

  localparam int unsigned EW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  logic [EW-1:0] wi, ri;
  assign wi = wr_idx[EW-1:0];
  assign ri = rd_idx[EW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        base_q[e] <= '0;
        for (int d = 0; d < NDIM; d++) begin
          disp_q[e][d] <= '0;
          upb_q[e][d]  <= '0;
        end
      end
    end else if (wr_en && (32'(wr_idx) < ENTRIES)) begin
      case (wr_word)
        3'd0: base_q[wi]    <= addr_t'(wr_data);
        3'd1: disp_q[wi][1] <= addr_t'(wr_data);
        3'd2: disp_q[wi][2] <= addr_t'(wr_data);
        3'd3: upb_q[wi][0]  <= val_t'(wr_data);
        3'd4: upb_q[wi][1]  <= val_t'(wr_data);
        3'd5: upb_q[wi][2]  <= val_t'(wr_data);
        default: ;
      endcase
    end
  end

  always_comb begin
    rd_base = '0;
    for (int d = 0; d < NDIM; d++) begin
      rd_disp[d] = '0;
      rd_upb[d]  = '0;
    end
    if (32'(rd_idx) < ENTRIES) begin
      rd_base    = base_q[ri];
      rd_disp[0] = addr_t'(1);
      for (int d = 1; d < NDIM; d++) rd_disp[d] = disp_q[ri][d];
      for (int d = 0; d < NDIM; d++) rd_upb[d]  = upb_q[ri][d];
    end
  end

endmodule
