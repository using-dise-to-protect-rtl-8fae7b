// dise_tb_expect: expected edited instruction streams for the DISE tests.
//
// For a trigger word and PC, gives the instruction words and register
// spaces that the call, return and store productions must expand to,
// written out field by field (independently of the engine's template
// instantiation), and the uop a non-matching instruction passes as.
package dise_tb_expect;
  import dise_pkg::*;
  import dise_tb_pkg::*;

  typedef struct {
    logic [31:0] w;
    regspace_e   a, b, c;
    logic [63:0] pc;
    logic        repl, dfunc, illegal;
  } exp_t;

  function automatic exp_t e(logic [31:0] w, regspace_e a, regspace_e b, regspace_e c,
                             logic [63:0] pc, logic repl, logic dfunc = 1'b0,
                             logic illegal = 1'b0);
    exp_t x;
    x.w = w; x.a = a; x.b = b; x.c = c; x.pc = pc;
    x.repl = repl; x.dfunc = dfunc; x.illegal = illegal;
    return x;
  endfunction

  function automatic void exp_pass(ref exp_t q[$], input logic [31:0] w, input logic [63:0] pc,
                                   input logic dfunc = 1'b0, input logic illegal = 1'b0);
    q.push_back(e(w, SP_APP, SP_APP, SP_APP, pc, 1'b0, dfunc, illegal));
  endfunction

  // call production, templates [from, 8)
  function automatic void exp_call(ref exp_t q[$], input logic [31:0] t, input logic [63:0] pc,
                                   input int from = 0);
    exp_t s[8];
    s[0] = e(enc_opl(OP_INTA, F_ADDQ, 5'd0, 8'd4, D_DR0),       SP_PC,   SP_APP,  SP_DISE, pc, 1);
    s[1] = e(enc_opr(OP_INTL, F_XOR, D_DR0, D_DXR, D_DR0),      SP_DISE, SP_DISE, SP_DISE, pc, 1);
    s[2] = e(enc_opl(OP_INTA, F_ADDQ, D_DSSP, 8'd16, D_DSSP),   SP_DISE, SP_APP,  SP_DISE, pc, 1);
    s[3] = e(enc_mem(OP_STQ, D_DR0, D_DSSP, -8),                SP_DISE, SP_DISE, SP_APP,  pc, 1);
    s[4] = e(enc_mem(OP_STQ, R_SP, D_DSSP, -16),                SP_APP,  SP_DISE, SP_APP,  pc, 1);
    s[5] = e(enc_opr(OP_INTA, F_CMPEQ, D_DSSP, D_DARP, D_DR0),  SP_DISE, SP_DISE, SP_DISE, pc, 1);
    s[6] = e(enc_ccall(D_DR0, EXPAND_PC),                       SP_DISE, SP_APP,  SP_APP,  pc, 1);
    s[7] = e(t,                                                 SP_APP,  SP_APP,  SP_APP,  pc, 1);
    for (int i = from; i < 8; i++) q.push_back(s[i]);
  endfunction

  // return production, templates [from, 6)
  function automatic void exp_ret(ref exp_t q[$], input logic [31:0] t, input logic [63:0] pc,
                                  input int from = 0, input int upto = 6);
    exp_t s[6];
    s[0] = e(enc_mem(OP_LDQ, D_DR0, D_DSSP, -8),                SP_DISE, SP_DISE, SP_APP,  pc, 1);
    s[1] = e(enc_opl(OP_INTA, F_SUBQ, D_DSSP, 8'd16, D_DSSP),   SP_DISE, SP_APP,  SP_DISE, pc, 1);
    s[2] = e(enc_opr(OP_INTL, F_XOR, D_DR0, D_DXR, D_DR0),      SP_DISE, SP_DISE, SP_DISE, pc, 1);
    s[3] = e(enc_opr(OP_INTA, F_CMPNE, t[20:16], D_DR0, D_DR0), SP_APP,  SP_DISE, SP_DISE, pc, 1);
    s[4] = e(enc_ccall(D_DR0, ADDRCHECK_PC),                    SP_DISE, SP_APP,  SP_APP,  pc, 1);
    s[5] = e(t,                                                 SP_APP,  SP_APP,  SP_APP,  pc, 1);
    for (int i = from; i < upto; i++) q.push_back(s[i]);
  endfunction

  // store production
  function automatic void exp_store(ref exp_t q[$], input logic [31:0] t, input logic [63:0] pc);
    q.push_back(e({OP_LDA, D_DR0, t[20:16], t[15:0]},           SP_DISE, SP_APP,  SP_APP,  pc, 1));
    q.push_back(e(enc_opl(OP_INTS, F_SRL, D_DR0, 8'd26, D_DR0), SP_DISE, SP_APP,  SP_DISE, pc, 1));
    q.push_back(e(enc_opr(OP_INTA, F_CMPEQ, D_DR0, D_DSR, D_DR0), SP_DISE, SP_DISE, SP_DISE, pc, 1));
    q.push_back(e(enc_ctrap(D_DR0, ERR_CODE),                   SP_DISE, SP_APP,  SP_APP,  pc, 1));
    q.push_back(e(t,                                            SP_APP,  SP_APP,  SP_APP,  pc, 1));
  endfunction

  function automatic bit same(exp_t x, uop_t u);
    return u.insn == x.w && u.ra_sp == x.a && u.rb_sp == x.b && u.rc_sp == x.c &&
           u.pc == x.pc && u.repl == x.repl && u.dfunc == x.dfunc && u.illegal == x.illegal;
  endfunction

endpackage
