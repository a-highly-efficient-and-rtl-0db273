// dragon_asm_pkg: instruction encoders for the testbenches.
// Each function returns one 64-bit slot word in the field layout of
// dragon_pkg; vliw() pairs two slots into a 128-bit instruction
// (slot 1 in the low half).
package dragon_asm_pkg;
  import dragon_pkg::*;

  function automatic logic [63:0] nop();
    return '0;
  endfunction

  // R-type computation; src2 names the register for OPSrc = RF, otherwise
  // the operand source is opsrc. mode selects RF / LM / scatter.
  function automatic logic [63:0] rop(opcode_e op, int rdst, int src1, int src2,
                                      opsrc_e opsrc = SRC_RF, logic [1:0] mode = MODE_RF,
                                      int lmaddr = 0, int bmaddr = 0, int broff = 0);
    rtype_t r;
    r.opcode = op; r.src1 = 8'(src1); r.mode = mode; r.lmaddr = 12'(lmaddr);
    r.broffset = 4'(broff); r.bmaddr = 12'(bmaddr); r.src2 = 8'(src2);
    r.rdst = 8'(rdst); r.opsrc = opsrc;
    return r;
  endfunction

  // R-type with a 16-bit immediate second operand
  function automatic logic [63:0] ropi(opcode_e op, int rdst, int src1, logic [15:0] imm,
                                       logic [1:0] mode = MODE_RF, int lmaddr = 0);
    rtype_t r;
    r = rtype_t'(rop(op, rdst, src1, 0, SRC_IMM, mode, lmaddr));
    {r.broffset, r.bmaddr} = imm;
    return r;
  endfunction

  // LDimm: both slots
  function automatic logic [127:0] ldimm(int rdst, logic [63:0] v);
    rtype_t r;
    r = rtype_t'(rop(OP_LDIMM, rdst, 0, 0, SRC_IMM));
    {r.broffset, r.bmaddr} = v[63:48];
    return {{16'd0, v[47:0]}, 64'(r)};
  endfunction

  function automatic logic [63:0] ld(int rdst, int lmaddr);
    rtype_t r;
    r = '0; r.opcode = OP_LD; r.lmaddr = 12'(lmaddr); r.rdst = 8'(rdst);
    return r;
  endfunction

  function automatic logic [63:0] st(int src2, int lmaddr);
    rtype_t r;
    r = '0; r.opcode = OP_ST; r.lmaddr = 12'(lmaddr); r.src2 = 8'(src2);
    return r;
  endfunction

  function automatic logic [63:0] stbm(int bmaddr, int src2, logic from_lm = 0, int lmaddr = 0);
    rtype_t r;
    r = '0; r.opcode = OP_STBM; r.mode = {1'b0, from_lm}; r.lmaddr = 12'(lmaddr);
    r.bmaddr = 12'(bmaddr); r.src2 = 8'(src2);
    return r;
  endfunction

  // STBM of the ALU/FPU result of the slot-1 instruction in the same word
  function automatic logic [63:0] stbm_res(int bmaddr);
    rtype_t r;
    r = '0; r.opcode = OP_STBM; r.mode = 2'b10; r.bmaddr = 12'(bmaddr);
    return r;
  endfunction

  function automatic logic [63:0] ldbm(int lmaddr, int bmaddr, int count, int first = 0,
                                       int num = 0, logic bcast = 0, int broff = 0);
    ldbm_t l;
    l = '0; l.opcode = OP_LDBM; l.mask = {4'(num), 4'(first)}; l.mode = {1'b0, bcast};
    l.lmaddr = 12'(lmaddr); l.broffset = 4'(broff); l.bmaddr = 12'(bmaddr); l.count = 12'(count);
    return l;
  endfunction

  function automatic logic [63:0] ntype(opcode_e op, logic [3:0] ndst = 0, logic [3:0] nsrc = 0,
                                        int src2 = 0, int lmaddr = 0);
    ntype_t n;
    n = '0; n.opcode = op; n.ndst = {4'd0, ndst}; n.nsrc = nsrc; n.src2 = 8'(src2);
    n.lmaddr = 12'(lmaddr);
    return n;
  endfunction

  function automatic logic [63:0] ctl(cfunc_e f, logic [19:0] iters = 0);
    logic [63:0] w;
    w = '0; w[63:58] = 6'b111111; w[57:52] = f; w[51:32] = iters;
    return w;
  endfunction

  // RDGMEM / WRGMEM: both slots
  function automatic logic [127:0] gmem(logic wr, int beats, int bmoff, logic [63:0] gmoff);
    ctype_t c;
    c.opcode = 6'b111111; c.func = wr ? FN_WRGMEM : FN_RDGMEM;
    c.burst = 8'(beats - 1); c.bmoffset = 12'(bmoff); c.gm_hi = gmoff[63:32];
    return {{32'd0, gmoff[31:0]}, 64'(c)};
  endfunction

  function automatic logic [127:0] vliw(logic [63:0] s1, logic [63:0] s2);
    return {s2, s1};
  endfunction
endpackage
