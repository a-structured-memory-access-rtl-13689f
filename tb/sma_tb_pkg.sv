// sma_tb_pkg: helpers shared by the testbenches - builders for operand fields
// and instruction words in the machine's encoding (see sma_pkg), so test
// programs read like assembly listings.
// Interface: functions only. Timing: none.
// The encoding is this design's own choice; the helpers only mirror it.
package sma_tb_pkg;
  import sma_pkg::*;

  function automatic logic [15:0] opnd(int t, bit ind, int v);
    return {2'(t), ind, 13'(v)};
  endfunction

  function automatic logic [15:0] IM(int v);            return opnd(1, 0, v); endfunction
  function automatic logic [15:0] IMI(int v);           return opnd(1, 1, v); endfunction
  function automatic logic [15:0] DS(int ait, int apt); return opnd(2, 0, (ait << 8) | apt); endfunction
  function automatic logic [15:0] DSI(int ait, int apt); return opnd(2, 1, (ait << 8) | apt); endfunction
  function automatic logic [15:0] SC(int b, int d);     return opnd(0, 0, (b << 11) | d); endfunction
  function automatic logic [15:0] SCI(int b, int d);    return opnd(0, 1, (b << 11) | d); endfunction
  function automatic logic [15:0] IX(int lvl);          return opnd(3, 0, lvl); endfunction

  // MAP instruction
  function automatic word_t mapi(logic [7:0] op, bit eob, int nops,
                                 logic [15:0] o1 = '0, logic [15:0] o2 = '0,
                                 logic [15:0] o3 = '0);
    opcode_t c;
    c         = '0;
    c.is_map  = 1'b1;
    c.eob     = eob;
    c.nops    = 2'(nops);
    c.op      = op;
    return {c, o1, o2, o3};
  endfunction

  // CP instruction
  function automatic word_t cpi(logic [7:0] op, bit eob, int nops, bit imm_reg, bit one_wr,
                                logic [15:0] o1 = '0, logic [15:0] o2 = '0,
                                logic [15:0] o3 = '0);
    opcode_t c;
    c         = '0;
    c.is_map  = 1'b0;
    c.eob     = eob;
    c.nops    = 2'(nops);
    c.imm_reg = imm_reg;
    c.one_wr  = one_wr;
    c.op      = op;
    return {c, o1, o2, o3};
  endfunction
endpackage
