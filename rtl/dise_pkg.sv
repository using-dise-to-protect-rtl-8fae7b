// dise_pkg: types and constants shared by the DISE (dynamic instruction
// stream editing) blocks.
//
// The instruction set is the Alpha AXP one. Field positions follow the Alpha
// formats: opcode [31:26], ra [25:21], rb [20:16], memory displacement
// [15:0], operate literal [20:13] with flag [12], operate function [11:5],
// rc [4:0], jump hint [15:14]. Opcode numbers of the Alpha instructions are
// the architecture's. The DISE-only instructions (dmfr, dmtr, dret, ccall,
// ctrap) are given opcodes that Alpha leaves reserved (0x01..0x03); their
// encoding is this design's choice.
//
// A pattern matches an opcode class set, an opcode under a mask and,
// optionally, the ra and rb fields. A template is an Alpha-format word plus
// directives that overwrite its fields with fields of the trigger
// instruction (T.OP, T.RA/T.RB/T.RC, T.IMM, T.PC, T.INST).
package dise_pkg;

  // ---------------------------------------------------------------- opcodes
  localparam logic [5:0] OP_DISE  = 6'h01; // dmfr / dmtr / dret (func [11:5])
  localparam logic [5:0] OP_CCALL = 6'h02; // ccall ra, target: call if ra != 0
  localparam logic [5:0] OP_CTRAP = 6'h03; // ctrap ra, code: trap if ra != 0
  localparam logic [5:0] OP_LDA   = 6'h08;
  localparam logic [5:0] OP_LDAH  = 6'h09;
  localparam logic [5:0] OP_LDBU  = 6'h0A;
  localparam logic [5:0] OP_LDQU  = 6'h0B;
  localparam logic [5:0] OP_LDWU  = 6'h0C;
  localparam logic [5:0] OP_STW   = 6'h0D;
  localparam logic [5:0] OP_STB   = 6'h0E;
  localparam logic [5:0] OP_STQU  = 6'h0F;
  localparam logic [5:0] OP_INTA  = 6'h10; // addq, subq, cmpeq, ...
  localparam logic [5:0] OP_INTL  = 6'h11; // and, bis, xor, ...
  localparam logic [5:0] OP_INTS  = 6'h12; // srl, sll, ...
  localparam logic [5:0] OP_INTM  = 6'h13; // mulq
  localparam logic [5:0] OP_JMP   = 6'h1A; // jmp / jsr / ret by hint [15:14]
  localparam logic [5:0] OP_LDL   = 6'h28;
  localparam logic [5:0] OP_LDQ   = 6'h29;
  localparam logic [5:0] OP_STL   = 6'h2C;
  localparam logic [5:0] OP_STQ   = 6'h2D;
  localparam logic [5:0] OP_BR    = 6'h30;
  localparam logic [5:0] OP_BSR   = 6'h34;

  // operate function codes (Alpha)
  localparam logic [6:0] F_ADDQ  = 7'h20;
  localparam logic [6:0] F_SUBQ  = 7'h29;
  localparam logic [6:0] F_CMPEQ = 7'h2D;
  localparam logic [6:0] F_XOR   = 7'h40;
  localparam logic [6:0] F_SRL   = 7'h34;
  localparam logic [6:0] F_CMPNE = 7'h2E; // not an Alpha code (unused slot): cmpeq negated
  // DISE-only function codes under OP_DISE
  localparam logic [6:0] F_DMFR  = 7'h00; // rc(app) <- dise[rb]
  localparam logic [6:0] F_DMTR  = 7'h01; // dise[rc] <- ra(app)
  localparam logic [6:0] F_DRET  = 7'h02; // leave the DISE function

  // jump hints
  localparam logic [1:0] H_JMP = 2'd0;
  localparam logic [1:0] H_JSR = 2'd1;
  localparam logic [1:0] H_RET = 2'd2;
  localparam logic [1:0] H_JCR = 2'd3;

  // ---------------------------------------------------------- opcode class
  typedef enum logic [3:0] {
    C_LOAD  = 4'd0,
    C_STORE = 4'd1,
    C_JSR   = 4'd2,
    C_BSR   = 4'd3,
    C_RET   = 4'd4,
    C_JMP   = 4'd5,
    C_BR    = 4'd6,
    C_ALU   = 4'd7,
    C_LDA   = 4'd8,
    C_DISE  = 4'd9
  } opclass_e;
  localparam int unsigned NCLS = 10;

  function automatic opclass_e classify(input logic [31:0] insn);
    logic [5:0] op;
    op = insn[31:26];
    unique case (op)
      OP_LDBU, OP_LDQU, OP_LDWU, OP_LDL, OP_LDQ,
      6'h20, 6'h21, 6'h22, 6'h23, 6'h2A, 6'h2B:    return C_LOAD;
      OP_STW, OP_STB, OP_STQU, OP_STL, OP_STQ,
      6'h24, 6'h25, 6'h26, 6'h27, 6'h2E, 6'h2F:    return C_STORE;
      OP_JMP: begin
        unique case (insn[15:14])
          H_JSR, H_JCR: return C_JSR;
          H_RET:        return C_RET;
          default:      return C_JMP;
        endcase
      end
      OP_BSR:                                      return C_BSR;
      OP_LDA, OP_LDAH:                             return C_LDA;
      OP_INTA, OP_INTL, OP_INTS, OP_INTM:          return C_ALU;
      OP_DISE, OP_CCALL, OP_CTRAP:                 return C_DISE;
      default:                                     return C_BR;
    endcase
  endfunction

  // -------------------------------------------------------------- patterns
  typedef struct packed {
    logic            valid;
    logic [NCLS-1:0] cls_mask; // bit c set: class c matches
    logic [5:0]      op_val;   // opcode must equal op_val where op_mask is 1
    logic [5:0]      op_mask;
    logic            ra_en;    // ra field must equal ra_val
    logic [4:0]      ra_val;
    logic            rb_en;    // rb field must equal rb_val
    logic [4:0]      rb_val;
    logic [7:0]      rt_start; // first template of the replacement sequence
    logic [4:0]      rt_len;   // number of templates (0: entry never fires)
  } pattern_t;

  // ------------------------------------------------------------- templates
  // Source of one register field of a replacement instruction.
  typedef enum logic [2:0] {
    R_LIT_APP  = 3'd0, // the template's own field, application register
    R_LIT_DISE = 3'd1, // the template's own field names a DISE register
    R_T_RA     = 3'd2, // trigger's ra field (T.RD of a memory instruction)
    R_T_RB     = 3'd3, // trigger's rb field (T.RS: base or jump target)
    R_T_RC     = 3'd4, // trigger's rc field
    R_T_PC     = 3'd5  // the trigger's PC as an operand (T.PC)
  } rsel_e;

  typedef struct packed {
    logic        t_inst;  // emit the trigger unchanged (T.INST)
    logic        t_op;    // take opcode (and ALU function) from the trigger
    logic        t_imm;   // take displacement [15:0] from the trigger
    rsel_e       ra_sel;
    rsel_e       rb_sel;
    rsel_e       rc_sel;
    logic [31:0] word;    // literal instruction, Alpha format
  } template_t;

  // register space of an instruction's register field
  typedef enum logic [1:0] {
    SP_APP  = 2'd0,
    SP_DISE = 2'd1,
    SP_PC   = 2'd2
  } regspace_e;

  // ---------------------------------------------- instruction to execution
  typedef struct packed {
    logic [31:0] insn;    // Alpha-format word
    regspace_e   ra_sp;
    regspace_e   rb_sp;
    regspace_e   rc_sp;
    logic [63:0] pc;      // PC of the instruction, or of the trigger
    logic        repl;    // part of a replacement sequence
    logic        dfunc;   // fetched inside a DISE function
    logic        illegal; // DISE-only instruction outside DISE mode
    logic [7:0]  rt_idx;  // template index (replacement instructions)
    logic [7:0]  rt_end;  // one past the sequence's last template
    logic [31:0] trig;    // trigger word of the sequence
  } uop_t;

  // state handed back by the execution side when a ccall is taken
  typedef struct packed {
    logic [7:0]  rt_next;
    logic [7:0]  rt_end;
    logic [31:0] trig;
    logic [63:0] pc;
  } resume_t;

  // ----------------------------------------------------- controller access
  typedef enum logic [1:0] {
    T_PT   = 2'd0, // pattern table entry
    T_RT   = 2'd1, // replacement table template
    T_DREG = 2'd2, // DISE register
    T_CTRL = 2'd3  // index 0: bit 0 enables the engine
  } cfg_target_e;

  localparam int unsigned CFG_W = 64;

endpackage
