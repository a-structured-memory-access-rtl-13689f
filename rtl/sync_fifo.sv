// sync_fifo: small synchronous FIFO with valid/ready on both sides.
// A word pushed is visible at the head on the next cycle; push and pop may
// happen in the same cycle. Used as the CP's data buffer.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             in_ready,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data,
  input  logic             out_ready
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rp, wp;
  logic [PW:0]      cnt;

  assign in_ready  = (cnt != (PW+1)'(DEPTH));
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rp];

  logic do_in, do_out;
  assign do_in  = in_valid && in_ready;
  assign do_out = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_in) begin
        mem[wp] <= in_data;
        wp      <= (32'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      end
      if (do_out) rp <= (32'(rp) == DEPTH-1) ? '0 : rp + 1'b1;
      cnt <= cnt + (PW+1)'(do_in) - (PW+1)'(do_out);
    end
  end
endmodule
