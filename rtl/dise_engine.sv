// dise_engine: the DISE engine, between instruction fetch and execution.
//
// Every fetched instruction is matched against the pattern table. A
// non-matching instruction passes through unchanged. A matching one (the
// trigger) is replaced by its replacement sequence: the templates
// rt_start .. rt_start+rt_len-1 are instantiated with the trigger's fields
// and emitted one per cycle, while fetch is held off, so a trigger with an
// N-instruction sequence occupies the output for N cycles. The sequence is
// produced inside the engine and has no instruction addresses of its own,
// so nothing can jump into its middle; every instruction of it carries the
// trigger's PC.
//
// DISE mode. Instructions of a replacement sequence are marked repl. When
// the execution side takes a ccall from a sequence it reports ccall_taken
// together with the ccall's resume state (next template, end, trigger word
// and PC, all carried in the uop). The engine drops what it had in flight
// and enters the DISE-function state: fetched instructions (the body of the
// called DISE function) pass through unexpanded and marked dfunc, so
// replacement sequences are never expanded recursively. On dret the engine
// leaves that state and resumes the interrupted sequence at the template
// after the ccall; resume_pc (trigger PC + 4) is where fetch must restart.
// dmfr, dmtr and dret are legal only in DISE mode (repl or dfunc); ccall and
// ctrap only inside a replacement sequence; anywhere else they are passed on
// marked illegal. For a legal dmfr (dmtr) the rb (rc) field is marked as
// naming a DISE register. flush (a redirect by the execution side) drops in-flight
// work, an unfinished sequence included; it does not change the
// DISE-function state.
//
// Context switch: the DISE-function flag and the stored resume point can be
// read (in_dfunc, ctx_saved) and written (ctx_wr_en, ctx_wdata: word 1 is
// {rt_next, rt_end, trigger}, word 2 the trigger PC) so that the OS can
// switch away from a program in the middle of a DISE function. This is only
// meant for a drained engine; a write has priority over stream events.
//
// Timing: match, template read and instantiation are combinational, the
// output is one register stage with a valid/ready handshake on both sides.
// Expansion only happens while enable is set (loaded by the controller).
//
// The behaviour (match, parameterized replacement, atomic sequences, no
// expansion in DISE functions, ccall / dret, DISE-mode-only instructions)
// follows the description of DISE; the handshakes, the one-instruction-per-
// cycle rate and the ccall / dret resume protocol are this design's choices.
module dise_engine
  import dise_pkg::*;
#(
  parameter int unsigned PT_ENTRIES = 8,
  parameter int unsigned RT_ENTRIES = 32,
  localparam int unsigned PW = (PT_ENTRIES > 1) ? $clog2(PT_ENTRIES) : 1,
  localparam int unsigned RW = (RT_ENTRIES > 1) ? $clog2(RT_ENTRIES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  // table programming (from the controller)
  input  logic          pt_wr_en,
  input  logic [PW-1:0] pt_wr_idx,
  input  pattern_t      pt_wr_data,
  input  logic [PW-1:0] pt_rd_idx,
  output pattern_t      pt_rd_data,
  input  logic          rt_wr_en,
  input  logic [RW-1:0] rt_wr_idx,
  input  template_t     rt_wr_data,
  input  logic [RW-1:0] rt_rd_idx,
  output template_t     rt_rd_data,
  // fetched instruction stream
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [31:0]   in_insn,
  input  logic [63:0]   in_pc,
  // edited instruction stream
  output logic          out_valid,
  input  logic          out_ready,
  output uop_t          out_uop,
  // events from the execution side
  input  logic          flush,
  input  logic          ccall_taken,
  input  resume_t       ccall_resume,
  input  logic          dret,
  output logic [63:0]   resume_pc,
  output logic          in_dfunc,
  output logic          busy,      // a replacement sequence is being emitted
  // context save / restore (from the controller, engine drained)
  input  logic [2:0]    ctx_wr_en, // 0: DISE-function flag, 1: resume point, 2: resume PC
  input  logic [63:0]   ctx_wdata,
  output resume_t       ctx_saved
);

  // ------------------------------------------------------------ state
  logic        expanding;
  logic [7:0]  seq_ptr, seq_end;
  logic [31:0] seq_trig;
  logic [63:0] seq_pc;
  logic        dfunc;
  resume_t     saved;

  // ------------------------------------------------------------ tables
  logic      pt_hit;
  logic [PW-1:0] pt_hit_idx;
  logic [7:0] pt_start;
  logic [4:0] pt_len;

  dise_pattern_table #(.PT_ENTRIES(PT_ENTRIES)) u_pt (
    .clk, .rst_n,
    .wr_en(pt_wr_en), .wr_idx(pt_wr_idx), .wr_data(pt_wr_data),
    .rd_idx(pt_rd_idx), .rd_data(pt_rd_data),
    .insn(in_insn), .hit(pt_hit), .hit_idx(pt_hit_idx),
    .rt_start(pt_start), .rt_len(pt_len)
  );

  logic       adv, take_in, trigger;
  logic [7:0] tmpl_idx;
  template_t  tmpl;
  logic [31:0] inst_trig;

  assign adv      = !out_valid || out_ready;
  assign in_ready = adv && !expanding && !flush && !ccall_taken && !dret;
  assign take_in  = in_valid && in_ready;
  assign trigger  = take_in && enable && !dfunc && pt_hit;
  assign tmpl_idx = expanding ? seq_ptr : pt_start;
  assign inst_trig = expanding ? seq_trig : in_insn;

  dise_replacement_table #(.RT_ENTRIES(RT_ENTRIES)) u_rt (
    .clk, .rst_n,
    .wr_en(rt_wr_en), .wr_idx(rt_wr_idx), .wr_data(rt_wr_data),
    .rd_idx(tmpl_idx[RW-1:0]), .rd_data(tmpl),
    .cfg_rd_idx(rt_rd_idx), .cfg_rd_data(rt_rd_data)
  );

  logic [31:0] r_insn;
  regspace_e   r_ra_sp, r_rb_sp, r_rc_sp;

  dise_instantiate u_inst (
    .tmpl(tmpl), .trig_insn(inst_trig),
    .insn(r_insn), .ra_sp(r_ra_sp), .rb_sp(r_rb_sp), .rc_sp(r_rc_sp)
  );

  // DISE-only instructions outside their context
  function automatic logic illegal_app(input logic [31:0] w, input logic in_func);
    logic [5:0] op;
    op = w[31:26];
    if (op == OP_CCALL || op == OP_CTRAP) return 1'b1;
    if (op == OP_DISE)                    return !in_func;
    return 1'b0;
  endfunction

  uop_t repl_uop, pass_uop;
  logic [7:0] new_end;

  assign new_end = pt_start + 8'(pt_len);

  always_comb begin
    repl_uop         = '0;
    repl_uop.insn    = r_insn;
    repl_uop.ra_sp   = r_ra_sp;
    repl_uop.rb_sp   = r_rb_sp;
    repl_uop.rc_sp   = r_rc_sp;
    repl_uop.pc      = expanding ? seq_pc : in_pc;
    repl_uop.repl    = 1'b1;
    repl_uop.dfunc   = 1'b0;
    repl_uop.illegal = 1'b0;
    repl_uop.rt_idx  = tmpl_idx;
    repl_uop.rt_end  = expanding ? seq_end : new_end;
    repl_uop.trig    = inst_trig;

    pass_uop         = '0;
    pass_uop.insn    = in_insn;
    pass_uop.ra_sp   = SP_APP;
    pass_uop.rb_sp   = SP_APP;
    pass_uop.rc_sp   = SP_APP;
    pass_uop.pc      = in_pc;
    pass_uop.dfunc   = dfunc;
    pass_uop.illegal = illegal_app(in_insn, dfunc);
    pass_uop.trig    = in_insn;
    // dmfr reads the DISE register named by rb, dmtr writes the one named
    // by rc; the engine marks that field when the instruction is legal
    if (in_insn[31:26] == OP_DISE && dfunc) begin
      if (in_insn[11:5] == F_DMFR) pass_uop.rb_sp = SP_DISE;
      if (in_insn[11:5] == F_DMTR) pass_uop.rc_sp = SP_DISE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_uop   <= '0;
      expanding <= 1'b0;
      seq_ptr   <= '0;
      seq_end   <= '0;
      seq_trig  <= '0;
      seq_pc    <= '0;
      dfunc     <= 1'b0;
      saved     <= '0;
    end else if (ctx_wr_en != '0) begin
      if (ctx_wr_en[0]) dfunc <= ctx_wdata[0];
      if (ctx_wr_en[1]) begin
        saved.rt_next <= ctx_wdata[47:40];
        saved.rt_end  <= ctx_wdata[39:32];
        saved.trig    <= ctx_wdata[31:0];
      end
      if (ctx_wr_en[2]) saved.pc <= ctx_wdata;
    end else if (ccall_taken) begin
      out_valid <= 1'b0;
      expanding <= 1'b0;
      dfunc     <= 1'b1;
      saved     <= ccall_resume;
    end else if (dret) begin
      out_valid <= 1'b0;
      dfunc     <= 1'b0;
      expanding <= (saved.rt_next != saved.rt_end);
      seq_ptr   <= saved.rt_next;
      seq_end   <= saved.rt_end;
      seq_trig  <= saved.trig;
      seq_pc    <= saved.pc;
    end else if (flush) begin
      out_valid <= 1'b0;
      expanding <= 1'b0;
    end else if (adv) begin
      if (expanding) begin
        out_valid <= 1'b1;
        out_uop   <= repl_uop;
        seq_ptr   <= seq_ptr + 8'd1;
        if (seq_ptr + 8'd1 == seq_end) expanding <= 1'b0;
      end else if (trigger) begin
        out_valid <= 1'b1;
        out_uop   <= repl_uop;
        seq_trig  <= in_insn;
        seq_pc    <= in_pc;
        seq_ptr   <= pt_start + 8'd1;
        seq_end   <= new_end;
        expanding <= (pt_len > 5'd1);
      end else if (take_in) begin
        out_valid <= 1'b1;
        out_uop   <= pass_uop;
      end else begin
        out_valid <= 1'b0;
      end
    end
  end

  assign resume_pc = saved.pc + 64'd4;
  assign in_dfunc  = dfunc;
  assign busy      = expanding;
  assign ctx_saved = saved;

  // output must hold while stalled
  property p_hold;
    @(posedge clk) disable iff (!rst_n || flush || ccall_taken || dret)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_uop));
  endproperty
  a_hold: assert property (p_hold);

  // fetch is never accepted while a sequence is being emitted
  a_atomic: assert property (@(posedge clk) disable iff (!rst_n)
      expanding |-> !in_ready);

endmodule
