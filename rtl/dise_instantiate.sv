// dise_instantiate: turns one replacement template into a concrete
// instruction by filling its holes with fields of the trigger.
//
// Directives: T.INST emits the trigger word itself; T.OP copies the
// trigger's opcode (and, for an operate-format trigger, its function code
// [11:5]); T.IMM copies the trigger's displacement [15:0]; each register
// field (ra [25:21], rb [20:16], rc [4:0]) is either the template's own
// field, in the application or the DISE register space, or the trigger's
// ra, rb or rc field, or the trigger's PC as an operand (T.PC). The output
// carries, for each register field, the register space the execution side
// must read: this is how replacement instructions name DISE registers that
// the 5-bit Alpha fields cannot.
//
// Purely combinational. The directive set follows the productions of DISE
// (T.OP, T.RS, T.RD, T.IMM, T.PC, T.INST); mapping T.RS to the trigger's rb
// field and T.RD to its ra field is this design's reading for Alpha
// memory-format and jump-format instructions.
module dise_instantiate
  import dise_pkg::*;
(
  input  template_t   tmpl,
  input  logic [31:0] trig_insn,
  output logic [31:0] insn,
  output regspace_e   ra_sp,
  output regspace_e   rb_sp,
  output regspace_e   rc_sp
);

  function automatic logic [4:0] pick(input rsel_e sel, input logic [4:0] lit,
                                      input logic [31:0] t);
    unique case (sel)
      R_T_RA:  return t[25:21];
      R_T_RB:  return t[20:16];
      R_T_RC:  return t[4:0];
      R_T_PC:  return 5'd0;
      default: return lit;
    endcase
  endfunction

  function automatic regspace_e space(input rsel_e sel);
    unique case (sel)
      R_LIT_DISE: return SP_DISE;
      R_T_PC:     return SP_PC;
      default:    return SP_APP;
    endcase
  endfunction

  logic trig_is_alu;
  assign trig_is_alu = (classify(trig_insn) == C_ALU);

  always_comb begin
    if (tmpl.t_inst) begin
      insn  = trig_insn;
      ra_sp = SP_APP;
      rb_sp = SP_APP;
      rc_sp = SP_APP;
    end else begin
      insn = tmpl.word;
      if (tmpl.t_op) begin
        insn[31:26] = trig_insn[31:26];
        if (trig_is_alu) insn[11:5] = trig_insn[11:5];
      end
      if (tmpl.t_imm) insn[15:0] = trig_insn[15:0];
      // register fields are written after the immediate so that an explicit
      // register directive wins over a copied displacement for rc [4:0]
      insn[25:21] = pick(tmpl.ra_sel, tmpl.word[25:21], trig_insn);
      insn[20:16] = pick(tmpl.rb_sel, tmpl.word[20:16], trig_insn);
      if (!tmpl.t_imm || (tmpl.rc_sel != R_LIT_APP))
        insn[4:0] = pick(tmpl.rc_sel, tmpl.word[4:0], trig_insn);
      ra_sp = space(tmpl.ra_sel);
      rb_sp = space(tmpl.rb_sel);
      rc_sp = space(tmpl.rc_sel);
    end
  end

endmodule
