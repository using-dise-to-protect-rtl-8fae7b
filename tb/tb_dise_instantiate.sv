// tb_dise_instantiate: self-checking test of template instantiation.
//
// Expands the load-through-$sp example production (add 8 to the base of
// every $sp-based load) and the templates of the return-address
// productions against concrete triggers, comparing with instruction words
// worked out by hand with the encoders.
module tb_dise_instantiate;
  import dise_pkg::*;
  import dise_tb_pkg::*;

  template_t   tmpl;
  logic [31:0] trig_insn, insn;
  regspace_e   ra_sp, rb_sp, rc_sp;
  int checks = 0, failures = 0;

  dise_instantiate dut (.*);

  task automatic expect_inst(string name, template_t t, logic [31:0] trig,
                             logic [31:0] w, regspace_e a, regspace_e b, regspace_e c);
    tmpl = t; trig_insn = trig;
    #1;
    checks++;
    if (insn !== w || ra_sp !== a || rb_sp !== b || rc_sp !== c) begin
      failures++;
      $display("FAIL %s: got %h %0d %0d %0d want %h %0d %0d %0d", name, insn,
               ra_sp, rb_sp, rc_sp, w, a, b, c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ld, st, ret_i, call_i, alu_i;
    ld     = enc_mem(OP_LDQ, 5'd4, R_SP, 32);
    st     = enc_mem(OP_STL, 5'd7, 5'd9, -12);
    ret_i  = enc_jmp(H_RET, R_ZERO, R_RA);
    call_i = enc_br(OP_BSR, R_RA, 40);
    alu_i  = enc_opr(OP_INTL, F_XOR, 5'd1, 5'd2, 5'd3);

    // addq T.RS, 8, $dr0 -> addq $sp, 8, $dr0
    expect_inst("fig1 add",
      tm(enc_opl(OP_INTA, F_ADDQ, 0, 8'd8, D_DR0), R_T_RB, R_LIT_APP, R_LIT_DISE), ld,
      enc_opl(OP_INTA, F_ADDQ, R_SP, 8'd8, D_DR0), SP_APP, SP_APP, SP_DISE);
    // T.OP T.RD, T.IMM($dr0) -> ldq $r4, 32($dr0)
    expect_inst("fig1 load",
      tm(enc_mem(6'd0, 0, D_DR0, 0), R_T_RA, R_LIT_DISE, R_LIT_APP, 1'b1, 1'b1), ld,
      enc_mem(OP_LDQ, 5'd4, D_DR0, 32), SP_APP, SP_DISE, SP_APP);
    // T.OP with an operate trigger copies the function code too
    expect_inst("t.op alu",
      tm(enc_opr(OP_INTA, F_ADDQ, 5'd10, 5'd11, 5'd12), R_LIT_APP, R_LIT_APP, R_LIT_APP, 1'b1), alu_i,
      enc_opr(OP_INTL, F_XOR, 5'd10, 5'd11, 5'd12), SP_APP, SP_APP, SP_APP);
    // T.RC copies the trigger's rc field
    expect_inst("t.rc",
      tm(enc_opr(OP_INTA, F_ADDQ, 5'd10, 5'd11, 5'd0), R_LIT_APP, R_LIT_APP, R_T_RC), alu_i,
      enc_opr(OP_INTA, F_ADDQ, 5'd10, 5'd11, 5'd3), SP_APP, SP_APP, SP_APP);
    // call production
    expect_inst("call 0 T.PC", prod_tmpl(0), call_i,
      enc_opl(OP_INTA, F_ADDQ, 5'd0, 8'd4, D_DR0), SP_PC, SP_APP, SP_DISE);
    expect_inst("call 3 stq", prod_tmpl(3), call_i,
      enc_mem(OP_STQ, D_DR0, D_DSSP, -8), SP_DISE, SP_DISE, SP_APP);
    expect_inst("call 4 stq sp", prod_tmpl(4), call_i,
      enc_mem(OP_STQ, R_SP, D_DSSP, -16), SP_APP, SP_DISE, SP_APP);
    expect_inst("call 6 ccall", prod_tmpl(6), call_i,
      enc_ccall(D_DR0, EXPAND_PC), SP_DISE, SP_APP, SP_APP);
    expect_inst("call 7 T.INST", prod_tmpl(7), call_i, call_i, SP_APP, SP_APP, SP_APP);
    // return production: cmpne T.RS, $dr0, $dr0 with T.RS = $ra
    expect_inst("ret 11 cmpne", prod_tmpl(11), ret_i,
      enc_opr(OP_INTA, F_CMPNE, R_RA, D_DR0, D_DR0), SP_APP, SP_DISE, SP_DISE);
    expect_inst("ret 13 T.INST", prod_tmpl(13), ret_i, ret_i, SP_APP, SP_APP, SP_APP);
    // store production: lda $dr0, T.IMM(T.RS1)
    expect_inst("st 14 lda", prod_tmpl(14), st,
      enc_mem(OP_LDA, D_DR0, 5'd9, -12), SP_DISE, SP_APP, SP_APP);
    expect_inst("st 15 srl", prod_tmpl(15), st,
      enc_opl(OP_INTS, F_SRL, D_DR0, 8'd26, D_DR0), SP_DISE, SP_APP, SP_DISE);
    expect_inst("st 18 T.INST", prod_tmpl(18), st, st, SP_APP, SP_APP, SP_APP);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
