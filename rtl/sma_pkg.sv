// sma_pkg: shared widths, instruction encoding and record types of the
// Structured Memory Access (SMA) machine.
//
// The machine is split into a Memory Access Processor (MAP), which makes every
// memory reference, and a Computation Processor (CP), which only computes. The
// split, the operand kinds (immediate, scalar, data structure, index), the
// index stack and the two access tables follow the architecture; the bit
// layout of instructions below is this design's own choice, since the
// architecture leaves word size and encoding open.
//
// Memory word: 64 bits. Instruction (one word):
//   [63:48] opcode field
//           [15] 1 = MAP instruction, 0 = CP instruction
//           [14] end of block (last instruction of an instruction block)
//           [13:12] number of operands (0..3)
//           [11] CP: immediate operands are register tags
//           [10] CP, one operand: the operand is written (else read)
//           [7:0] operation
//   [47:32] operand 1, [31:16] operand 2, [15:0] operand 3
// Operand field (16 bits): [15:14] type, [13] indirect, [12:0] value.
//   type 1 immediate (value), type 2 data structure (value[12:8] = AIT entry,
//   value[7:0] = APT entry), type 0 scalar (value[12:11] base register,
//   value[10:0] displacement), type 3 index (value = index stack level).
package sma_pkg;

  localparam int unsigned WORD_W = 64;   // memory word and data item
  localparam int unsigned ADDR_W = 16;   // word address
  localparam int unsigned VAL_W  = 16;   // index values, offsets, bounds
  localparam int unsigned NDIM   = 3;    // dimension fields per APT line
  localparam int unsigned LVL_W  = 3;    // index level field (0 = unused)
  localparam int unsigned TAG_W  = 8;    // memory request tag

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic signed [VAL_W-1:0] val_t;

  // Operand types
  typedef enum logic [1:0] {
    OPT_SCALAR = 2'd0,
    OPT_IMM    = 2'd1,
    OPT_DS     = 2'd2,
    OPT_INDEX  = 2'd3
  } opnd_type_e;

  typedef struct packed {
    opnd_type_e  otype;
    logic        ind;
    logic [12:0] value;
  } opnd_t;

  typedef struct packed {
    logic       is_map;
    logic       eob;
    logic [1:0] nops;
    logic       imm_reg;
    logic       one_wr;
    logic [1:0] rsvd;
    logic [7:0] op;
  } opcode_t;

  typedef struct packed {
    opcode_t opc;
    opnd_t   o1;
    opnd_t   o2;
    opnd_t   o3;
  } instr_t;

  // MAP operations
  localparam logic [7:0] MOP_LDAPT  = 8'd1;
  localparam logic [7:0] MOP_LDAIT  = 8'd2;
  localparam logic [7:0] MOP_LDTMP  = 8'd3;
  localparam logic [7:0] MOP_SETUP  = 8'd4;
  localparam logic [7:0] MOP_INCR   = 8'd5;
  localparam logic [7:0] MOP_REMIDX = 8'd6;
  localparam logic [7:0] MOP_CLRIDX = 8'd7;
  localparam logic [7:0] MOP_BR     = 8'd8;
  localparam logic [7:0] MOP_BRCP   = 8'd9;
  localparam logic [7:0] MOP_LDBASE = 8'd10;
  localparam logic [7:0] MOP_STOP   = 8'd11;

  // CP operations
  localparam logic [7:0] COP_CLR  = 8'd1;
  localparam logic [7:0] COP_MOV  = 8'd2;
  localparam logic [7:0] COP_ADD  = 8'd3;
  localparam logic [7:0] COP_SUB  = 8'd4;
  localparam logic [7:0] COP_MUL  = 8'd5;
  localparam logic [7:0] COP_TSTZ = 8'd6;   // outcome = operand == 0
  localparam logic [7:0] COP_TSTN = 8'd7;   // outcome = operand < 0

  // Words per table entry in memory
  localparam int unsigned APT_WORDS = 3;
  localparam int unsigned AIT_WORDS = 6;
  localparam int unsigned TMP_WORDS = 3;

  // End-of-data value meaning "a new block follows from the MAP"
  localparam word_t EOD_NEW = '1;

  // One line of the operand and instruction buffer
  typedef struct packed {
    logic        is_instr;  // 1 = MAP instruction, 0 = operand specification
    logic        rd;
    logic        wr;
    logic [15:0] field;     // opcode field or operand field
    logic        eob;
  } oib_line_t;

  // CP instruction as forwarded by the preprocessor
  typedef struct packed {
    logic [7:0] op;
    logic [1:0] nops;
    logic [2:0] rd;       // per operand: value read
    logic [2:0] wr;       // per operand: result written
    logic [2:0] reg_sel;  // per operand: immediate is a register tag
    logic       eob;
  } cp_instr_t;

  // Read-queue head item delivered to the CP
  typedef struct packed {
    logic  eod;
    word_t data;
  } cp_data_t;

  // Rules an operand count implies (read / write bit per operand)
  function automatic logic [2:0] rd_bits(logic [1:0] nops, logic one_wr);
    case (nops)
      2'd1:    rd_bits = one_wr ? 3'b000 : 3'b001;
      2'd2:    rd_bits = 3'b011;
      2'd3:    rd_bits = 3'b011;
      default: rd_bits = 3'b000;
    endcase
  endfunction

  function automatic logic [2:0] wr_bits(logic [1:0] nops, logic one_wr);
    case (nops)
      2'd1:    wr_bits = one_wr ? 3'b001 : 3'b000;
      2'd2:    wr_bits = 3'b010;
      2'd3:    wr_bits = 3'b100;
      default: wr_bits = 3'b000;
    endcase
  endfunction

endpackage
