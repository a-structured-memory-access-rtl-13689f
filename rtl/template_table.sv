// template_table: the MAP's index template table.
//
// A template is the (initial, final, step) triple that sets up a loop index.
// Templates are loaded from memory once, by LDTMP, one word per write
// (word 0 = initial, 1 = final, 2 = step, the order being this design's
// choice), and a SETUP instruction copies a whole template onto the index
// stack in one cycle without touching memory. Many loops share a template
// (the common "1, n, 1"), so the table is small. Writes take effect at the
// clock edge; the read port is combinational. Entry numbers out of range are
// ignored on write and read as zero.
module template_table
  import sma_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [7:0]  wr_idx,
  input  logic [1:0]  wr_word,
  input  word_t       wr_data,
  input  logic [7:0]  rd_idx,
  output val_t        rd_init,
  output val_t        rd_final,
  output val_t        rd_step
);

  val_t init_q [ENTRIES];
  val_t fin_q  [ENTRIES];
  val_t step_q [ENTRIES];

  localparam int unsigned EW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  logic [EW-1:0] wi, ri;
  assign wi = wr_idx[EW-1:0];
  assign ri = rd_idx[EW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        init_q[e] <= '0;
        fin_q[e]  <= '0;
        step_q[e] <= '0;
      end
    end else if (wr_en && (32'(wr_idx) < ENTRIES)) begin
      case (wr_word)
        2'd0:    init_q[wi] <= val_t'(wr_data);
        2'd1:    fin_q[wi]  <= val_t'(wr_data);
        2'd2:    step_q[wi] <= val_t'(wr_data);
        default: ;
      endcase
    end
  end

  always_comb begin
    rd_init  = '0;
    rd_final = '0;
    rd_step  = '0;
    if (32'(rd_idx) < ENTRIES) begin
      rd_init  = init_q[ri];
      rd_final = fin_q[ri];
      rd_step  = step_q[ri];
    end
  end

endmodule
