// tb_dise_engine: self-checking test of the DISE engine.
//
// The call, return and store productions are loaded into the tables and
// instruction streams are pushed through with random fetch gaps and random
// back-pressure. Every uop leaving the engine is compared with the
// expected stream (dise_tb_expect). Directed parts check:
//  - with enable clear, nothing is expanded;
//  - the expansion rate: a trigger with an N-template sequence occupies N
//    consecutive output cycles and holds fetch off for N-1 cycles;
//  - ccall taken: in-flight work is dropped, the DISE function body passes
//    unexpanded and marked dfunc (a store and a call in it stay as they
//    are), dmfr is legal there; on dret the sequence resumes at the
//    template after the ccall and resume_pc is the trigger's PC + 4;
//  - DISE-only instructions outside DISE mode are marked illegal;
//  - flush in the middle of a sequence drops its remainder;
//  - first-match priority lets stores through $sp skip the store check;
//  - a context restore of the DISE-function state and resume point.
module tb_dise_engine;
  import dise_pkg::*;
  import dise_tb_pkg::*;
  import dise_tb_expect::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        enable = 1'b0;
  logic        pt_wr_en = 1'b0, rt_wr_en = 1'b0;
  logic [2:0]  pt_wr_idx = '0, pt_rd_idx = '0;
  logic [4:0]  rt_wr_idx = '0, rt_rd_idx = '0;
  pattern_t    pt_wr_data = '0, pt_rd_data;
  template_t   rt_wr_data = '0, rt_rd_data;
  logic        in_valid = 1'b0, in_ready;
  logic [31:0] in_insn = '0;
  logic [63:0] in_pc = '0;
  logic        out_valid, out_ready = 1'b0;
  uop_t        out_uop;
  logic        flush = 1'b0, ccall_taken = 1'b0, dret = 1'b0;
  resume_t     ccall_resume = '0;
  logic [63:0] resume_pc;
  logic        in_dfunc, busy;
  logic [2:0]  ctx_wr_en = '0;
  logic [63:0] ctx_wdata = '0;
  resume_t     ctx_saved;

  dise_engine #(.PT_ENTRIES(8), .RT_ENTRIES(32)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(string name, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", name, $time); end
  endtask

  // ---------------------------------------------------------- fetch model
  typedef struct { logic [31:0] w; logic [63:0] pc; } fetch_t;
  fetch_t feed_q[$];
  bit gaps = 1'b0, bp = 1'b0, hold_out = 1'b0;

  always @(negedge clk) begin
    if (feed_q.size() > 0 && (!gaps || $urandom_range(2) != 0)) begin
      in_valid <= 1'b1;
      in_insn  <= feed_q[0].w;
      in_pc    <= feed_q[0].pc;
    end else begin
      in_valid <= 1'b0;
    end
    out_ready <= !hold_out && (!bp || $urandom_range(2) != 0);
  end
  always @(posedge clk) if (in_valid && in_ready) void'(feed_q.pop_front());

  function automatic void fetch(logic [31:0] w, logic [63:0] pc);
    fetch_t f;
    f.w = w; f.pc = pc;
    feed_q.push_back(f);
  endfunction

  // ------------------------------------------------------------- monitor
  uop_t got[$];
  int   got_cycle[$];
  int   cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid && out_ready && !flush && !ccall_taken && !dret) begin
      got.push_back(out_uop);
      got_cycle.push_back(cyc);
    end
  end

  exp_t exp_q[$];

  task automatic drain_and_compare(string name, int max_cycles = 400);
    int n;
    n = 0;
    while ((feed_q.size() > 0 || got.size() < exp_q.size()) && n < max_cycles) begin
      @(negedge clk);
      n++;
    end
    repeat (3) @(negedge clk);
    chk({name, ": count"}, got.size() == exp_q.size());
    if (got.size() != exp_q.size())
      $display("  got %0d want %0d", got.size(), exp_q.size());
    for (int i = 0; i < exp_q.size() && i < got.size(); i++) begin
      checks++;
      if (!same(exp_q[i], got[i])) begin
        failures++;
        $display("FAIL %s: uop %0d got %h pc=%h repl=%0b dfunc=%0b ill=%0b want %h pc=%h",
                 name, i, got[i].insn, got[i].pc, got[i].repl, got[i].dfunc,
                 got[i].illegal, exp_q[i].w, exp_q[i].pc);
      end
    end
    got.delete(); got_cycle.delete(); exp_q.delete();
  endtask

  task automatic load_productions();
    for (int i = 0; i < N_TMPL; i++) begin
      @(negedge clk);
      rt_wr_en = 1'b1; rt_wr_idx = 5'(i); rt_wr_data = prod_tmpl(i);
    end
    @(negedge clk);
    rt_wr_en = 1'b0;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      pt_wr_en = 1'b1; pt_wr_idx = 3'(i); pt_wr_data = prod_pat(i);
    end
    @(negedge clk);
    pt_wr_en = 1'b0;
  endtask

  // wait until the given opcode is at the output, not yet taken
  task automatic wait_head(logic [5:0] op, int max_cycles = 200);
    int n;
    n = 0;
    while (!(out_valid && out_uop.insn[31:26] == op) && n < max_cycles) begin
      @(negedge clk);
      n++;
    end
    chk("head reached", n < max_cycles);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] w_bsr, w_jsr, w_ret, w_stq, w_ldq, w_add, w_dmfr, w_dret, w_ccall;
  initial begin
    w_bsr  = enc_br(OP_BSR, R_RA, 64);
    w_jsr  = enc_jmp(H_JSR, R_RA, 5'd27);
    w_ret  = enc_jmp(H_RET, R_ZERO, R_RA);
    w_stq  = enc_mem(OP_STQ, 5'd1, R_SP, 24);
    w_ldq  = enc_mem(OP_LDQ, 5'd2, 5'd9, -4);
    w_add  = enc_opr(OP_INTA, F_ADDQ, 5'd1, 5'd2, 5'd3);
    w_dmfr = enc_dise(F_DMFR, R_ZERO, D_DSSP, 5'd1);
    w_dret = enc_dise(F_DRET, R_ZERO, R_ZERO, R_ZERO);
    w_ccall = enc_ccall(5'd1, EXPAND_PC);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_productions();

    // 1. disabled: everything passes
    fetch(w_bsr, 64'h100); exp_pass(exp_q, w_bsr, 64'h100);
    fetch(w_stq, 64'h104); exp_pass(exp_q, w_stq, 64'h104);
    fetch(w_ret, 64'h108); exp_pass(exp_q, w_ret, 64'h108);
    drain_and_compare("disabled");

    // 2. enabled, no back-pressure: exact sequences and their timing
    enable = 1'b1;
    fetch(w_add, 64'h200); exp_pass(exp_q, w_add, 64'h200);
    fetch(w_bsr, 64'h204); exp_call(exp_q, w_bsr, 64'h204);
    fetch(w_ldq, 64'h208); exp_pass(exp_q, w_ldq, 64'h208);
    drain_and_compare("call timing pre", 400);
    fetch(w_bsr, 64'h300); fetch(w_ldq, 64'h304);
    repeat (20) @(negedge clk);
    chk("call uop count", got.size() == 9);
    if (got.size() == 9) begin
      chk("call uops back to back", got_cycle[7] - got_cycle[0] == 7);
      chk("next insn right after the sequence", got_cycle[8] - got_cycle[7] == 1);
    end
    got.delete(); got_cycle.delete();

    // 3. random stream with gaps and back-pressure
    gaps = 1'b1; bp = 1'b1;
    for (int k = 0; k < 300; k++) begin
      logic [63:0] pc;
      logic [31:0] w;
      int sel;
      pc = 64'h1000 + 64'(k * 4);
      sel = int'($urandom_range(5));
      case (sel)
        0: begin w = w_bsr; exp_call(exp_q, w, pc); end
        1: begin w = w_jsr; exp_call(exp_q, w, pc); end
        2: begin w = enc_jmp(H_RET, R_ZERO, 5'($urandom_range(30))); exp_ret(exp_q, w, pc); end
        3: begin w = enc_mem(OP_STL, 5'($urandom_range(30)), 5'($urandom_range(30)),
                             int'($urandom_range(65535))); exp_store(exp_q, w, pc); end
        4: begin w = w_ldq; exp_pass(exp_q, w, pc); end
        default: begin w = w_add; exp_pass(exp_q, w, pc); end
      endcase
      fetch(w, pc);
    end
    drain_and_compare("random stream", 20000);
    gaps = 1'b0; bp = 1'b0;

    // 4. DISE-only instructions in application code
    fetch(w_dmfr, 64'h400);  exp_pass(exp_q, w_dmfr, 64'h400, 1'b0, 1'b1);
    fetch(w_ccall, 64'h404); exp_pass(exp_q, w_ccall, 64'h404, 1'b0, 1'b1);
    fetch(w_dret, 64'h408);  exp_pass(exp_q, w_dret, 64'h408, 1'b0, 1'b1);
    drain_and_compare("illegal outside DISE mode");

    // 5. ccall taken from the call sequence, DISE function, dret
    hold_out = 1'b0;
    fetch(w_bsr, 64'h500);
    wait_head(OP_CCALL);
    // the ccall is at the head: the execution side takes it instead of
    // accepting it, and returns its resume state
    hold_out = 1'b1;
    @(negedge clk);
    ccall_taken = 1'b1;
    ccall_resume.rt_next = out_uop.rt_idx + 8'd1;
    ccall_resume.rt_end  = out_uop.rt_end;
    ccall_resume.trig    = out_uop.trig;
    ccall_resume.pc      = out_uop.pc;
    exp_call(exp_q, w_bsr, 64'h500);
    void'(exp_q.pop_back()); void'(exp_q.pop_back());    // ccall, T.INST not yet
    @(negedge clk);
    ccall_taken = 1'b0;
    hold_out = 1'b0;
    chk("in DISE function", in_dfunc);
    // function body
    fetch(w_stq, EXPAND_PC);        exp_pass(exp_q, w_stq, EXPAND_PC, 1'b1);
    fetch(w_bsr, EXPAND_PC + 4);    exp_pass(exp_q, w_bsr, EXPAND_PC + 4, 1'b1);
    fetch(w_dmfr, EXPAND_PC + 8);
    exp_q.push_back(e(w_dmfr, SP_APP, SP_DISE, SP_APP, EXPAND_PC + 8, 1'b0, 1'b1));
    fetch(w_dret, EXPAND_PC + 12);  exp_pass(exp_q, w_dret, EXPAND_PC + 12, 1'b1);
    wait_head(OP_DISE);
    wait_head(OP_DISE);
    while (!(out_valid && out_uop.insn == w_dret)) @(negedge clk);
    @(negedge clk);   // dret accepted
    dret = 1'b1;
    @(negedge clk);
    dret = 1'b0;
    chk("resume_pc", resume_pc == 64'h504);
    chk("out of DISE function", !in_dfunc);
    exp_q.push_back(e(w_bsr, SP_APP, SP_APP, SP_APP, 64'h500, 1'b1));  // T.INST resumed
    fetch(w_stq, 64'h504); exp_store(exp_q, w_stq, 64'h504);
    drain_and_compare("ccall / dret");

    // 6. flush in the middle of a return sequence
    hold_out = 1'b0;
    fetch(w_ret, 64'h600);
    while (!(out_valid && out_uop.repl && out_uop.rt_idx == 8'd10)) @(negedge clk);
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    exp_ret(exp_q, w_ret, 64'h600, 0, 2);
    fetch(w_add, 64'h700); exp_pass(exp_q, w_add, 64'h700);
    drain_and_compare("flush");
    chk("not busy after flush", !busy);

    // 7. trusted stack pointer: a higher-priority entry gives stores through
    //    $sp a sequence of just T.INST, so only other stores are checked
    @(negedge clk);
    rt_wr_en = 1'b1; rt_wr_idx = 5'd19; rt_wr_data = tm_inst();
    @(negedge clk);
    rt_wr_en = 1'b0; pt_wr_en = 1'b1; pt_wr_idx = 3'd2;
    pt_wr_data = pat(cm(C_STORE), 19, 1, 6'd0, 6'd0, 1'b0, 5'd0, 1'b1, R_SP);
    @(negedge clk);
    pt_wr_idx = 3'd3; pt_wr_data = prod_pat(2);
    @(negedge clk);
    pt_wr_en = 1'b0;
    fetch(w_stq, 64'h800);
    exp_q.push_back(e(w_stq, SP_APP, SP_APP, SP_APP, 64'h800, 1'b1));
    fetch(enc_mem(OP_STQ, 5'd1, 5'd9, 24), 64'h804);
    exp_store(exp_q, enc_mem(OP_STQ, 5'd1, 5'd9, 24), 64'h804);
    drain_and_compare("trusted sp stores");

    // 8. context restore: load a DISE-function state and a resume point
    //    (a return sequence stopped before its T.INST), then dret
    @(negedge clk);
    ctx_wr_en = 3'b001; ctx_wdata = 64'd1;
    @(negedge clk);
    ctx_wr_en = 3'b010; ctx_wdata = {16'd0, 8'(RET_START + 5), 8'(RET_START + RET_LEN), w_ret};
    @(negedge clk);
    ctx_wr_en = 3'b100; ctx_wdata = 64'h900;
    @(negedge clk);
    ctx_wr_en = 3'b000;
    chk("ctx: dfunc loaded", in_dfunc);
    chk("ctx: resume point read back", ctx_saved.rt_next == 8'(RET_START + 5) &&
        ctx_saved.rt_end == 8'(RET_START + RET_LEN) && ctx_saved.trig == w_ret &&
        ctx_saved.pc == 64'h900);
    fetch(w_stq, EXPAND_PC + 40); exp_pass(exp_q, w_stq, EXPAND_PC + 40, 1'b1);
    drain_and_compare("ctx: function body");
    @(negedge clk);
    dret = 1'b1;
    @(negedge clk);
    dret = 1'b0;
    chk("ctx: resume_pc", resume_pc == 64'h904);
    exp_q.push_back(e(w_ret, SP_APP, SP_APP, SP_APP, 64'h900, 1'b1));
    drain_and_compare("ctx: resumed T.INST");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
