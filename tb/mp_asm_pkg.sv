// mp_asm_pkg: microinstruction assembler for testbenches of the platform in
// its default configuration (mp_pkg::KINDS_DEF, 16 registers).
//
// Words are built field by field: start from blank(), which has an all-zero
// header and every I/O byte set to "constant 0" / "no reg", then set the
// header, the constant and the bytes of the module ports that are used.
// Slot numbers are topology positions in KINDS_DEF:
//   0..7 IN, 8 MUL, 9 SHR, 10 ALU, 11 MD, 12..13 CMP, 14..20 XOR,
//   21..22 BOOL, 23 SHR, 24 ALU.
package mp_asm_pkg;
  import mp_pkg::*;

  localparam int unsigned IW   = instr_w(KINDS_DEF);
  localparam int unsigned NB   = n_bytes(KINDS_DEF);
  localparam int unsigned NREG = NREG_DEF;
  typedef logic [IW-1:0] uword_t;

  localparam int S_IN0 = 0, S_MUL = 8, S_SHR = 9, S_ALU = 10, S_MD = 11,
                 S_CMP0 = 12, S_CMP1 = 13, S_XOR0 = 14, S_BOOL0 = 21,
                 S_SHR1 = 23, S_ALU1 = 24;

  function automatic sel_t kc(int c);          // constant operand
    return '{cflag: 1'b1, idx: 7'(c)};
  endfunction
  function automatic sel_t rg(int r);          // register
    return '{cflag: 1'b0, idx: 7'(r)};
  endfunction
  function automatic sel_t mo(int slot, int o); // output o of module slot
    return '{cflag: 1'b0, idx: 7'(NREG + MAXOUT * slot + o)};
  endfunction
  function automatic sel_t noreg();
    return '{cflag: 1'b1, idx: 7'd0};
  endfunction

  function automatic uword_t blank();
    uword_t w = '0;
    for (int b = 0; b < NB; b++) w[IW-HDR_W-CONST_W-1-8*b -: 8] = 8'h80;
    return w;
  endfunction
  function automatic uword_t set_hdr(uword_t w, logic mov, logic [1:0] jmp,
                                     logic [3:0] load, logic [MAXMOD-1:0] mods);
    header_t h = '{mov: mov, jmp: jmp, load: load, modules: mods};
    w[IW-1 -: HDR_W] = h;
    return w;
  endfunction
  function automatic uword_t set_const(uword_t w, int c);
    w[IW-HDR_W-1 -: CONST_W] = 32'(c);
    return w;
  endfunction
  function automatic uword_t set_byte(uword_t w, int b, sel_t s);
    w[IW-HDR_W-CONST_W-1-8*b -: 8] = s;
    return w;
  endfunction
  function automatic uword_t set_in(uword_t w, int slot, int i, sel_t s);
    return set_byte(w, byte_off(KINDS_DEF, slot) + i, s);
  endfunction
  function automatic uword_t set_out(uword_t w, int slot, int o, sel_t s);
    return set_byte(w, byte_off(KINDS_DEF, slot) + n_in(KINDS_DEF[slot]) + o, s);
  endfunction

  // Common microinstructions
  function automatic uword_t op_out_reg(int r);
    return set_byte(set_hdr(blank(), 1'b0, JMP_NONE, IO_OUT, '0), 0, rg(r));
  endfunction
  function automatic uword_t op_in(int r);
    return set_byte(set_hdr(blank(), 1'b0, JMP_NONE, IO_IN, '0), 0, rg(r));
  endfunction
  function automatic uword_t op_movi(int r, int c);
    uword_t w = set_const(set_hdr(blank(), 1'b1, JMP_NONE, IO_NONE, '0), c);
    return set_byte(set_byte(w, 0, rg(r)), 1, kc(0));
  endfunction
  function automatic uword_t op_jsmod(int slot, int off);
    return set_byte(set_const(set_hdr(blank(), 1'b0, JMP_SMOD, IO_NONE, '0), off), 0, rg(slot));
  endfunction
  function automatic uword_t op_jmp(int off);
    return set_const(set_hdr(blank(), 1'b0, JMP_ALWAYS, IO_NONE, '0), off);
  endfunction
  function automatic uword_t op_exec(logic [MAXMOD-1:0] mods);
    return set_hdr(blank(), 1'b0, JMP_NONE, IO_NONE, mods);
  endfunction
endpackage
