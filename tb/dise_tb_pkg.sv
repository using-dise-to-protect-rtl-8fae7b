// dise_tb_pkg: helpers shared by the DISE testbenches.
//
// Alpha instruction encoders, builders for patterns and templates, and the
// three return-address-protection productions: the call production (push
// the XOR-encoded return address and the stack pointer on the shadow stack,
// call expand() when the stack is full), the return production (pop,
// decode, compare with the return register, call addrcheck() on a
// mismatch) and the store production (trap on a store into the shadow
// stack's segment). They occupy templates 0-7, 8-13 and 14-18.
package dise_tb_pkg;
  import dise_pkg::*;

  // application registers
  localparam logic [4:0] R_V0 = 5'd0, R_T0 = 5'd1, R_T1 = 5'd2, R_T2 = 5'd3,
                         R_RA = 5'd26, R_SP = 5'd30, R_ZERO = 5'd31;
  // DISE registers
  localparam logic [4:0] D_DR0 = 5'd0, D_DSSB = 5'd1, D_DSSP = 5'd2,
                         D_DARP = 5'd3, D_DXR = 5'd4, D_DSR = 5'd5;

  // DISE function addresses and the trap code
  localparam logic [63:0] EXPAND_PC    = 64'h0000_0000_0000_4000;
  localparam logic [63:0] ADDRCHECK_PC = 64'h0000_0000_0000_5000;
  localparam logic [20:0] ERR_CODE     = 21'd77;

  function automatic logic [31:0] enc_mem(logic [5:0] op, logic [4:0] ra,
                                          logic [4:0] rb, int disp);
    return {op, ra, rb, 16'(disp)};
  endfunction
  function automatic logic [31:0] enc_opr(logic [5:0] op, logic [6:0] fn,
                                          logic [4:0] ra, logic [4:0] rb,
                                          logic [4:0] rc);
    return {op, ra, rb, 3'b000, 1'b0, fn, rc};
  endfunction
  function automatic logic [31:0] enc_opl(logic [5:0] op, logic [6:0] fn,
                                          logic [4:0] ra, logic [7:0] lit,
                                          logic [4:0] rc);
    return {op, ra, lit, 1'b1, fn, rc};
  endfunction
  function automatic logic [31:0] enc_jmp(logic [1:0] hint, logic [4:0] ra,
                                          logic [4:0] rb);
    return {OP_JMP, ra, rb, hint, 14'd0};
  endfunction
  function automatic logic [31:0] enc_br(logic [5:0] op, logic [4:0] ra, int disp);
    return {op, ra, 21'(disp)};
  endfunction
  // ccall: target is an absolute word address
  function automatic logic [31:0] enc_ccall(logic [4:0] ra, logic [63:0] target);
    return {OP_CCALL, ra, target[22:2]};
  endfunction
  function automatic logic [31:0] enc_ctrap(logic [4:0] ra, logic [20:0] code);
    return {OP_CTRAP, ra, code};
  endfunction
  function automatic logic [31:0] enc_dise(logic [6:0] fn, logic [4:0] ra,
                                           logic [4:0] rb, logic [4:0] rc);
    return {OP_DISE, ra, rb, 3'b000, 1'b0, fn, rc};
  endfunction
  localparam logic [31:0] HALT = 32'h0000_0000;  // call_pal halt

  function automatic template_t tm(logic [31:0] word,
                                   rsel_e ra = R_LIT_APP, rsel_e rb = R_LIT_APP,
                                   rsel_e rc = R_LIT_APP,
                                   logic t_op = 1'b0, logic t_imm = 1'b0);
    template_t t;
    t.t_inst = 1'b0;
    t.t_op   = t_op;
    t.t_imm  = t_imm;
    t.ra_sel = ra;
    t.rb_sel = rb;
    t.rc_sel = rc;
    t.word   = word;
    return t;
  endfunction
  function automatic template_t tm_inst();
    template_t t;
    t = '0;
    t.t_inst = 1'b1;
    return t;
  endfunction

  function automatic pattern_t pat(logic [NCLS-1:0] cls_mask, int start, int len,
                                   logic [5:0] op_val = 6'd0, logic [5:0] op_mask = 6'd0,
                                   logic ra_en = 1'b0, logic [4:0] ra_val = 5'd0,
                                   logic rb_en = 1'b0, logic [4:0] rb_val = 5'd0);
    pattern_t p;
    p.valid    = 1'b1;
    p.cls_mask = cls_mask;
    p.op_val   = op_val;
    p.op_mask  = op_mask;
    p.ra_en    = ra_en;
    p.ra_val   = ra_val;
    p.rb_en    = rb_en;
    p.rb_val   = rb_val;
    p.rt_start = 8'(start);
    p.rt_len   = 5'(len);
    return p;
  endfunction

  function automatic logic [NCLS-1:0] cm(opclass_e c);
    return NCLS'(1) << c;
  endfunction

  // ------------------------------------------------ the three productions
  localparam int N_TMPL = 19;
  localparam int CALL_START = 0,  CALL_LEN = 8;
  localparam int RET_START  = 8,  RET_LEN  = 6;
  localparam int ST_START   = 14, ST_LEN   = 5;

  function automatic template_t prod_tmpl(int i);
    unique case (i)
      // call: T.OPCLASS == jsr | bsr
      0:  return tm(enc_opl(OP_INTA, F_ADDQ, 0, 8'd4, D_DR0), R_T_PC, R_LIT_APP, R_LIT_DISE);
      1:  return tm(enc_opr(OP_INTL, F_XOR, D_DR0, D_DXR, D_DR0), R_LIT_DISE, R_LIT_DISE, R_LIT_DISE);
      2:  return tm(enc_opl(OP_INTA, F_ADDQ, D_DSSP, 8'd16, D_DSSP), R_LIT_DISE, R_LIT_APP, R_LIT_DISE);
      3:  return tm(enc_mem(OP_STQ, D_DR0, D_DSSP, -8), R_LIT_DISE, R_LIT_DISE);
      4:  return tm(enc_mem(OP_STQ, R_SP, D_DSSP, -16), R_LIT_APP, R_LIT_DISE);
      5:  return tm(enc_opr(OP_INTA, F_CMPEQ, D_DSSP, D_DARP, D_DR0), R_LIT_DISE, R_LIT_DISE, R_LIT_DISE);
      6:  return tm(enc_ccall(D_DR0, EXPAND_PC), R_LIT_DISE);
      7:  return tm_inst();
      // return: T.OPCLASS == ret
      8:  return tm(enc_mem(OP_LDQ, D_DR0, D_DSSP, -8), R_LIT_DISE, R_LIT_DISE);
      9:  return tm(enc_opl(OP_INTA, F_SUBQ, D_DSSP, 8'd16, D_DSSP), R_LIT_DISE, R_LIT_APP, R_LIT_DISE);
      10: return tm(enc_opr(OP_INTL, F_XOR, D_DR0, D_DXR, D_DR0), R_LIT_DISE, R_LIT_DISE, R_LIT_DISE);
      11: return tm(enc_opr(OP_INTA, F_CMPNE, 0, D_DR0, D_DR0), R_T_RB, R_LIT_DISE, R_LIT_DISE);
      12: return tm(enc_ccall(D_DR0, ADDRCHECK_PC), R_LIT_DISE);
      13: return tm_inst();
      // store: T.OPCLASS == store
      14: return tm(enc_mem(OP_LDA, D_DR0, 0, 0), R_LIT_DISE, R_T_RB, R_LIT_APP, 1'b0, 1'b1);
      15: return tm(enc_opl(OP_INTS, F_SRL, D_DR0, 8'd26, D_DR0), R_LIT_DISE, R_LIT_APP, R_LIT_DISE);
      16: return tm(enc_opr(OP_INTA, F_CMPEQ, D_DR0, D_DSR, D_DR0), R_LIT_DISE, R_LIT_DISE, R_LIT_DISE);
      17: return tm(enc_ctrap(D_DR0, ERR_CODE), R_LIT_DISE);
      default: return tm_inst();
    endcase
  endfunction

  // pattern entries: 0 call, 1 return, 2 store
  function automatic pattern_t prod_pat(int i);
    unique case (i)
      0:       return pat(cm(C_JSR) | cm(C_BSR), CALL_START, CALL_LEN);
      1:       return pat(cm(C_RET), RET_START, RET_LEN);
      default: return pat(cm(C_STORE), ST_START, ST_LEN);
    endcase
  endfunction

endpackage
