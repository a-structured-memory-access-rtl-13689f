// instr_fetcher: the MAP's instruction fetcher, holder of the program counter.
//
// A start pulse loads the PC with the first address of a block. The fetcher
// then requests one instruction at a time from the memory controller, hands
// each returned instruction with its address to the preprocessor, and, once
// the preprocessor has taken it, requests the next one. It stops after an
// instruction marked end-of-block and waits for the next start, which the
// address generator gives only for blocks that are not already buffered.
// One request is outstanding at a time. busy is high from start until the
// end-of-block instruction has been handed over.
module instr_fetcher
  import sma_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  addr_t  start_pc,
  output logic   busy,
  // memory controller
  output logic   if_valid,
  output addr_t  if_addr,
  input  logic   if_ready,
  input  logic   if_rvalid,
  input  word_t  if_rdata,
  // preprocessor
  output logic   out_valid,
  output instr_t out_instr,
  output addr_t  out_addr,
  input  logic   out_ready
);

  typedef enum logic [1:0] {F_IDLE, F_REQ, F_WAIT, F_HOLD} fstate_e;
  fstate_e st;
  addr_t   pc;
  instr_t  ir;

  assign busy      = (st != F_IDLE);
  assign if_valid  = (st == F_REQ);
  assign if_addr   = pc;
  assign out_valid = (st == F_HOLD);
  assign out_instr = ir;
  assign out_addr  = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_IDLE;
      pc <= '0;
      ir <= '0;
    end else begin
      case (st)
        F_IDLE: if (start) begin
          pc <= start_pc;
          st <= F_REQ;
        end
        F_REQ:  if (if_ready) st <= F_WAIT;
        F_WAIT: if (if_rvalid) begin
          ir <= instr_t'(if_rdata);
          st <= F_HOLD;
        end
        F_HOLD: if (out_ready) begin
          if (ir.opc.eob) st <= F_IDLE;
          else begin
            pc <= pc + 1'b1;
            st <= F_REQ;
          end
        end
        default: st <= F_IDLE;
      endcase
    end
  end

endmodule
