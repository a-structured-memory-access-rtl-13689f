// ds_addr_gen: data-structure address arithmetic of the MAP.
//
// Given an APT line (index level and offset per dimension), the index values
// the index stack holds at those levels, and an AIT line (base, displacement
// and upper bound per dimension), it forms
//     address = base + sum_d (IS[ILF_d] + IOF_d) * DISP_d
// over the dimensions whose level is not 0, and checks each offset index
// against that dimension's upper bound: a value above the bound raises
// oob. It also raises bad_lvl when a used level is not on the stack. Purely
// combinational; the formula and the bound check are the architecture's, the
// single-cycle form is this design's choice.
module ds_addr_gen
  import sma_pkg::*;
(
  input  logic [LVL_W-1:0] ilf     [NDIM],
  input  val_t             iof     [NDIM],
  input  val_t             idx_val [NDIM],  // IS value at level ilf[d]
  input  logic [NDIM-1:0]  idx_ok,          // level ilf[d] is on the stack
  input  addr_t            base,
  input  addr_t            disp    [NDIM],
  input  val_t             upb     [NDIM],
  output addr_t            addr,
  output logic             oob,
  output logic             bad_lvl
);

  always_comb begin
    val_t  v;
    addr_t a;
    a       = base;
    v       = '0;
    oob     = 1'b0;
    bad_lvl = 1'b0;
    for (int d = 0; d < NDIM; d++) begin
      if (ilf[d] != '0) begin
        v = idx_val[d] + iof[d];
        if (v > upb[d]) oob = 1'b1;
        if (!idx_ok[d]) bad_lvl = 1'b1;
        a = a + addr_t'(v) * disp[d];
      end
    end
    addr = a;
  end

endmodule
