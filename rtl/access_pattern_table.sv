// access_pattern_table: the MAP's access pattern table (APT).
//
// Each line says which loop indices address a data structure: for each of
// NDIM dimensions an index level (ILF; 0 = dimension unused) and a small
// signed offset added to that index (IOF). A line does not depend on any one
// data structure, so several structures may share it. A line is loaded from
// memory by LDAPT, one word per dimension: bits [2:0] = ILF, bits [23:8] = IOF
// (layout chosen by this design). Writes take effect at the clock edge; the
// read port is combinational. Out-of-range entries are ignored / read as 0.
module access_pattern_table
  import sma_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [7:0]       wr_idx,
  input  logic [1:0]       wr_word,
  input  word_t            wr_data,
  input  logic [7:0]       rd_idx,
  output logic [LVL_W-1:0] rd_ilf [NDIM],
  output val_t             rd_iof [NDIM]
);

  logic [LVL_W-1:0] ilf_q [ENTRIES][NDIM];
  val_t             iof_q [ENTRIES][NDIM];

  localparam int unsigned EW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  logic [EW-1:0] wi, ri;
  assign wi = wr_idx[EW-1:0];
  assign ri = rd_idx[EW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++)
        for (int d = 0; d < NDIM; d++) begin
          ilf_q[e][d] <= '0;
          iof_q[e][d] <= '0;
        end
    end else if (wr_en && (32'(wr_idx) < ENTRIES) && (32'(wr_word) < NDIM)) begin
      ilf_q[wi][wr_word] <= wr_data[LVL_W-1:0];
      iof_q[wi][wr_word] <= val_t'(wr_data[8 +: VAL_W]);
    end
  end

  always_comb begin
    for (int d = 0; d < NDIM; d++) begin
      rd_ilf[d] = '0;
      rd_iof[d] = '0;
      if (32'(rd_idx) < ENTRIES) begin
        rd_ilf[d] = ilf_q[ri][d];
        rd_iof[d] = iof_q[ri][d];
      end
    end
  end

endmodule
