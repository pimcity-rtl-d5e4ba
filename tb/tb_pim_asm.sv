// tb_pim_asm: instruction builders shared by the fabric-level testbenches.
// Each function returns one instruction word for the PimCity controller, and
// cycles_of() gives the number of cycles the controller spends on it.
package tb_pim_asm;
  import pimcity_pkg::*;

  // A single line address (not bulk).
  function automatic line_addr_t line_addr(int unsigned n);
    return line_addr_t'(n);
  endfunction

  function automatic instr_t i_gate(gate_e g, dir_e d, int a, int b, int c,
                                    line_addr_t par, link_e l = LINK_NONE,
                                    tsel_e ts = TS_ALL, int tile = 0);
    instr_t i;
    i = '0;
    i.op = OP_LOGIC; i.gate = g; i.dir = d; i.link = l; i.tsel = ts;
    i.tile = TILE_IDX_W'(tile);
    i.a = line_addr(a); i.b = line_addr(b); i.c = line_addr(c); i.par = par;
    return i;
  endfunction

  function automatic instr_t i_write(int tile, int row, int buf_idx, line_addr_t cols);
    instr_t i;
    i = '0;
    i.op = OP_WRITE; i.tsel = TS_ONE; i.tile = TILE_IDX_W'(tile);
    i.c = line_addr(row); i.par = cols; i.buf_idx = DBUF_IDX_W'(buf_idx);
    return i;
  endfunction

  function automatic instr_t i_read(int tile, int row, int buf_idx);
    instr_t i;
    i = '0;
    i.op = OP_READ; i.tsel = TS_ONE; i.tile = TILE_IDX_W'(tile);
    i.a = line_addr(row); i.par = bulk_addr(BULK_ALL); i.buf_idx = DBUF_IDX_W'(buf_idx);
    return i;
  endfunction

  function automatic instr_t i_halt();
    instr_t i;
    i = '0;
    i.op = OP_HALT;
    return i;
  endfunction

  function automatic int cycles_of(instr_t i);
    case (i.op)
      OP_LOGIC: return gate_inputs(i.gate) + 2;
      OP_WRITE: return 2;
      OP_READ:  return 3;
      default:  return 1;
    endcase
  endfunction

endpackage
