// tb_dise_top: end-to-end test of the DISE hardware with return-address
// protection installed.
//
// A small in-order behavioural executor of an Alpha subset stands in for the
// processor core: it fetches from an instruction array into the engine,
// executes every uop the engine emits (reading and writing DISE registers
// through the register-file ports), redirects fetch on control flow with a
// flush, reports ccall_taken / dret, and stops on halt, ctrap or an illegal
// instruction. The OS side loads the call, return and store productions,
// the DISE registers (shadow-stack base, pointer, limit, XOR key, segment)
// and the enable bit through the privileged controller port.
//
// Runs:
//  A0 recursive sum of 1..4 with DISE disabled, as the baseline.
//  A  recursive sum of 1..4: five nested calls; the shadow stack fills and
//     expand() (a DISE function using dmfr / dmtr / dret) grows it once;
//     result 10, normal halt, shadow entries XOR-encoded, dssp back at base;
//     the executed-instruction overhead over A0 is exactly the inserted
//     instructions (7 per call, 5 per return, 4 per store) plus expand().
//  X  run A again with only the call and return productions installed
//     (shadow stack with XOR encoding, no store check): the overhead is 7
//     per call, 5 per return and expand().
//  S  run A again, but switch context in the middle of expand(): the DISE
//     registers and the engine's DISE-function flag and resume point are
//     saved through the controller, everything is reset and restored, and
//     the program completes with the same result.
//  B  a copy routine whose stack buffer overflows onto its saved return
//     address, pointing it at "attack" code: the return sequence sees the
//     mismatch and calls addrcheck(), which finds no matching entry and
//     terminates (code 0xBAD).
//  B0 the same run with DISE disabled: the attack code runs (code 0x666).
//  B1 the same routine with a fitting input: normal return, no alarm.
//  L  main -> A -> B -> C, where C unwinds straight back into A (as longjmp
//     does): A's return mismatches the top entry, addrcheck() pops until
//     return address and stack pointer both match, and the program goes on.
//  L2 C redirects its return to main's return point, a valid address of the
//     chain, but the stack pointer does not match: terminated.
//  C  an application store into the shadow-stack segment: the store
//     sequence traps before the store is performed.
//  D  unprivileged programming is refused; dmfr in application code is
//     flagged illegal.
// Each mechanism is counted and a failure is counted for one never seen.
module tb_dise_top;
  import dise_pkg::*;
  import dise_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------- DUT
  logic             cfg_valid = 1'b0, cfg_write = 1'b0, cfg_priv = 1'b0;
  cfg_target_e      cfg_target = T_PT;
  logic [7:0]       cfg_index = '0;
  logic [CFG_W-1:0] cfg_wdata = '0, cfg_rdata;
  logic             cfg_rvalid, cfg_error, enable;
  logic             in_valid, in_ready;
  logic [31:0]      in_insn;
  logic [63:0]      in_pc;
  logic             out_valid, out_ready;
  uop_t             out_uop;
  logic             flush = 1'b0, ccall_taken = 1'b0, dret = 1'b0;
  resume_t          ccall_resume = '0;
  logic [63:0]      resume_pc;
  logic             in_dfunc, busy;
  logic             dr_mode, dr_rd1_en, dr_rd2_en, dr_wr_en, dr_fault;
  logic [4:0]       dr_rd1_idx, dr_rd2_idx, dr_wr_idx;
  logic [63:0]      dr_rd1_data, dr_rd2_data, dr_wr_data;

  dise_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(string name, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", name, $time); end
  endtask

  // ------------------------------------------------- machine state
  localparam logic [63:0] SS_BASE = 64'h0000_0000_0400_0000;   // segment 1
  localparam logic [63:0] XKEY    = 64'h5EC2_E7C0_FFEE_1234;

  logic [31:0] imem [8192];          // pc[14:2]
  logic [63:0] dmem [8192];          // {addr[26], addr[14:3]}
  logic [63:0] regs [32];
  logic [63:0] fetch_pc;
  logic        running = 1'b0;
  logic        stopped;
  int          stop_kind;            // 1 halt, 2 ctrap, 3 illegal, 4 dreg fault
  logic [63:0] stop_code;
  bit          bp = 1'b0;

  function automatic int unsigned dix(logic [63:0] a);
    return int'({a[26], a[14:3]}) & 8191;
  endfunction

  // fetch
  assign in_valid = running && !stopped;
  assign in_insn  = imem[fetch_pc[14:2]];
  assign in_pc    = fetch_pc;

  logic rdy_rand = 1'b1;
  always @(negedge clk) rdy_rand <= !bp || ($urandom_range(3) != 0);
  assign out_ready = running && !stopped && rdy_rand;

  // ------------------------------------------------- execute (combinational)
  logic        commit;
  logic [5:0]  op;
  logic [6:0]  fn;
  logic [63:0] va, vb, vlit, res, addr, target;
  logic        wr_dst, dst_dise;
  logic [4:0]  dst;
  logic        is_load, is_store, redirect, do_ccall, do_dret, do_trap, do_halt;
  logic        bad;

  function automatic logic [63:0] sext16(logic [15:0] d);
    return {{48{d[15]}}, d};
  endfunction

  always_comb begin
    op   = out_uop.insn[31:26];
    fn   = out_uop.insn[11:5];
    commit = out_valid && out_ready && !flush && !ccall_taken && !dret;
    dr_mode    = out_uop.repl || out_uop.dfunc;
    dr_rd1_en  = commit && out_uop.ra_sp == SP_DISE;
    dr_rd1_idx = out_uop.insn[25:21];
    dr_rd2_en  = commit && out_uop.rb_sp == SP_DISE;
    dr_rd2_idx = out_uop.insn[20:16];
    unique case (out_uop.ra_sp)
      SP_DISE: va = dr_rd1_data;
      SP_PC:   va = out_uop.pc;
      default: va = regs[out_uop.insn[25:21]];
    endcase
    unique case (out_uop.rb_sp)
      SP_DISE: vb = dr_rd2_data;
      SP_PC:   vb = out_uop.pc;
      default: vb = regs[out_uop.insn[20:16]];
    endcase
    vlit = out_uop.insn[12] ? 64'(out_uop.insn[20:13]) : vb;
    addr = vb + sext16(out_uop.insn[15:0]);
    res = '0; wr_dst = 1'b0; dst = out_uop.insn[4:0]; dst_dise = out_uop.rc_sp == SP_DISE;
    is_load = 1'b0; is_store = 1'b0; redirect = 1'b0; target = '0;
    do_ccall = 1'b0; do_dret = 1'b0; do_trap = 1'b0; do_halt = 1'b0; bad = 1'b0;
    if (out_uop.illegal) bad = 1'b1;
    else unique case (op)
      6'h00: do_halt = 1'b1;
      OP_LDA, OP_LDAH: begin
        wr_dst = 1'b1; dst = out_uop.insn[25:21]; dst_dise = out_uop.ra_sp == SP_DISE;
        res = (op == OP_LDA) ? addr : vb + (sext16(out_uop.insn[15:0]) << 16);
      end
      OP_LDQ: begin
        wr_dst = 1'b1; is_load = 1'b1; dst = out_uop.insn[25:21];
        dst_dise = out_uop.ra_sp == SP_DISE; res = dmem[dix(addr)];
      end
      OP_STQ: is_store = 1'b1;
      OP_INTA: begin
        wr_dst = 1'b1;
        unique case (fn)
          F_ADDQ:  res = va + vlit;
          F_SUBQ:  res = va - vlit;
          F_CMPEQ: res = 64'(va == vlit);
          F_CMPNE: res = 64'(va != vlit);
          default: bad = 1'b1;
        endcase
      end
      OP_INTL: begin wr_dst = 1'b1; if (fn == F_XOR) res = va ^ vlit; else bad = 1'b1; end
      OP_INTS: begin wr_dst = 1'b1; if (fn == F_SRL) res = va >> vlit[5:0]; else bad = 1'b1; end
      OP_JMP: begin
        redirect = 1'b1; target = vb & ~64'd3;
        wr_dst = 1'b1; dst = out_uop.insn[25:21]; dst_dise = 1'b0; res = out_uop.pc + 4;
      end
      OP_BSR, OP_BR, 6'h39, 6'h3D: begin
        target = out_uop.pc + 4 + ({{43{out_uop.insn[20]}}, out_uop.insn[20:0]} << 2);
        if (op == OP_BSR || op == OP_BR) begin
          redirect = 1'b1; wr_dst = 1'b1; dst = out_uop.insn[25:21]; dst_dise = 1'b0;
          res = out_uop.pc + 4;
        end else begin
          redirect = (op == 6'h39) ? (va == 0) : (va != 0);
        end
      end
      OP_CCALL: begin do_ccall = (va != 0); target = {41'd0, out_uop.insn[20:0], 2'b00}; end
      OP_CTRAP: do_trap = (va != 0);
      OP_DISE: begin
        unique case (fn)
          F_DMFR: begin wr_dst = 1'b1; dst_dise = 1'b0; res = vb; end
          F_DMTR: begin wr_dst = 1'b1; res = va; end
          F_DRET: do_dret = 1'b1;
          default: bad = 1'b1;
        endcase
      end
      default: bad = 1'b1;
    endcase
    dr_wr_en   = commit && wr_dst && dst_dise && !bad;
    dr_wr_idx  = dst;
    dr_wr_data = res;
  end

  // dmfr reads the DISE register in its rb field and dmtr writes the one in
  // its rc field: the engine marks those fields as DISE-space when legal.

  // ------------------------------------------------- counters
  int n_call, n_ret, n_store, n_expand, n_addrcheck, n_trap, n_illegal;
  int n_dfunc, n_fetch_stall, n_flush, n_dret, n_cfg_err, n_fault;
  int n_commit, n_ctxsw;

  // ------------------------------------------------- execute (state)
  always @(posedge clk) begin
    if (running && !stopped) begin
      flush <= 1'b0; ccall_taken <= 1'b0; dret <= 1'b0;
      if (in_valid && !in_ready && !flush && !ccall_taken && !dret) n_fetch_stall++;
      if (dr_fault) begin stopped <= 1'b1; stop_kind <= 4; n_fault++; end
      else if (commit) begin
        n_commit++;
        if (out_uop.repl && out_uop.rt_idx == 8'(CALL_START)) n_call++;
        if (out_uop.repl && out_uop.rt_idx == 8'(RET_START))  n_ret++;
        if (out_uop.repl && out_uop.rt_idx == 8'(ST_START))   n_store++;
        if (out_uop.dfunc) n_dfunc++;
        if (bad) begin
          stopped <= 1'b1; stop_kind <= 3; n_illegal++;
        end else if (do_halt) begin
          stopped <= 1'b1; stop_kind <= 1; stop_code <= regs[1];
        end else if (do_trap) begin
          stopped <= 1'b1; stop_kind <= 2; stop_code <= 64'(out_uop.insn[20:0]); n_trap++;
        end else begin
          if (wr_dst && !dst_dise && dst != 5'd31) regs[dst] <= res;
          if (is_store) dmem[dix(addr)] <= va;
          if (do_ccall) begin
            ccall_taken <= 1'b1;
            ccall_resume.rt_next <= out_uop.rt_idx + 8'd1;
            ccall_resume.rt_end  <= out_uop.rt_end;
            ccall_resume.trig    <= out_uop.trig;
            ccall_resume.pc      <= out_uop.pc;
            fetch_pc <= target;
            if (target == EXPAND_PC) n_expand++;
            if (target == ADDRCHECK_PC) n_addrcheck++;
          end else if (do_dret) begin
            dret <= 1'b1; fetch_pc <= resume_pc; n_dret++;
          end else if (redirect) begin
            flush <= 1'b1; fetch_pc <= target; n_flush++;
          end else if (in_valid && in_ready) begin
            fetch_pc <= fetch_pc + 4;
          end
        end
      end else if (in_valid && in_ready) begin
        fetch_pc <= fetch_pc + 4;
      end
    end else begin
      flush <= 1'b0; ccall_taken <= 1'b0; dret <= 1'b0;
    end
  end

  // ------------------------------------------------- OS side
  task automatic cfg(cfg_target_e t, int idx, logic [63:0] d, logic priv = 1'b1);
    @(negedge clk);
    cfg_valid = 1'b1; cfg_write = 1'b1; cfg_priv = priv; cfg_target = t;
    cfg_index = 8'(idx); cfg_wdata = d;
    @(negedge clk);
    cfg_valid = 1'b0;
    if (cfg_error) n_cfg_err++;
  endtask

  // n_pat = 3: call, return and store productions (XOR encoding plus store
  // check); n_pat = 2: call and return only (XOR encoding alone)
  task automatic install(logic en, int n_pat = 3);
    for (int i = 0; i < N_TMPL; i++) cfg(T_RT, i, 64'(prod_tmpl(i)));
    for (int i = 0; i < n_pat; i++) cfg(T_PT, i, 64'(prod_pat(i)));
    cfg(T_DREG, D_DSSB, SS_BASE);
    cfg(T_DREG, D_DSSP, SS_BASE);
    cfg(T_DREG, D_DARP, SS_BASE + 64'd48);   // room for three entries
    cfg(T_DREG, D_DXR,  XKEY);
    cfg(T_DREG, D_DSR,  SS_BASE >> 26);
    cfg(T_CTRL, 0, 64'(en));
  endtask

  // ------------------------------------------------- programs
  function automatic logic [31:0] b_to(logic [5:0] o, logic [4:0] ra, int from, int to);
    return enc_br(o, ra, (to - from - 4) / 4);
  endfunction
  localparam logic [4:0] A0 = 5'd16, A1 = 5'd17, R3 = 5'd3, R4 = 5'd4, R5 = 5'd5;
  localparam logic [4:0] T0 = 5'd1, R20 = 5'd20, R21 = 5'd21, R22 = 5'd22;
  localparam int AC = int'(ADDRCHECK_PC);

  // main -> A -> B -> C. With longjmp set, C unwinds straight to A's
  // epilogue (restoring A's stack pointer), skipping the returns of C and B;
  // otherwise C overwrites its saved return address with main's return
  // point, a valid address of the call chain but with the wrong $sp.
  task automatic load_chain(bit longjmp);
    imem[0] = enc_mem(OP_LDA, R_SP, R_ZERO, 'h7000);
    imem[1] = enc_mem(OP_LDA, R20, R_ZERO, 'h20);
    imem[2] = enc_mem(OP_LDA, R21, R_ZERO, 'h21);
    imem[3] = enc_mem(OP_LDA, R22, R_ZERO, 'h22);
    imem[4] = b_to(OP_BSR, R_RA, 'h10, 'h400);
    imem[5] = enc_mem(OP_LDA, T0, R_ZERO, 0);
    imem[6] = HALT;
    imem['h400/4] = enc_opl(OP_INTA, F_SUBQ, R_SP, 8'd16, R_SP);
    imem['h404/4] = enc_mem(OP_STQ, R_RA, R_SP, 0);
    imem['h408/4] = b_to(OP_BSR, R_RA, 'h408, 'h440);
    imem['h40c/4] = enc_mem(OP_LDQ, R_RA, R_SP, 0);
    imem['h410/4] = enc_opl(OP_INTA, F_ADDQ, R_SP, 8'd16, R_SP);
    imem['h414/4] = enc_jmp(H_RET, R_ZERO, R_RA);
    imem['h440/4] = enc_opl(OP_INTA, F_SUBQ, R_SP, 8'd16, R_SP);
    imem['h444/4] = enc_mem(OP_STQ, R_RA, R_SP, 0);
    imem['h448/4] = b_to(OP_BSR, R_RA, 'h448, 'h480);
    imem['h44c/4] = enc_mem(OP_LDQ, R_RA, R_SP, 0);
    imem['h450/4] = enc_opl(OP_INTA, F_ADDQ, R_SP, 8'd16, R_SP);
    imem['h454/4] = enc_jmp(H_RET, R_ZERO, R_RA);
    if (longjmp) begin
      imem['h480/4] = enc_mem(OP_LDA, R_SP, R_ZERO, 'h6FF0);
      imem['h484/4] = b_to(OP_BR, R_ZERO, 'h484, 'h40c);
    end else begin
      imem['h480/4] = enc_opl(OP_INTA, F_SUBQ, R_SP, 8'd16, R_SP);
      imem['h484/4] = enc_mem(OP_LDA, R4, R_ZERO, 'h14);
      imem['h488/4] = enc_mem(OP_STQ, R4, R_SP, 0);
      imem['h48c/4] = enc_mem(OP_LDQ, R_RA, R_SP, 0);
      imem['h490/4] = enc_opl(OP_INTA, F_ADDQ, R_SP, 8'd16, R_SP);
      imem['h494/4] = enc_jmp(H_RET, R_ZERO, R_RA);
    end
  endtask

  task automatic read_cfg(cfg_target_e t, int idx, output logic [63:0] v);
    @(negedge clk);
    cfg_valid = 1'b1; cfg_write = 1'b0; cfg_priv = 1'b1; cfg_target = t;
    cfg_index = 8'(idx);
    @(negedge clk);
    cfg_valid = 1'b0;
    v = cfg_rvalid ? cfg_rdata : 64'hFFFF_FFFF_FFFF_FFFF;
  endtask

  task automatic read_dreg(logic [4:0] idx, output logic [63:0] v);
    read_cfg(T_DREG, int'(idx), v);
  endtask

  task automatic load_common();
    for (int i = 0; i < 8192; i++) begin imem[i] = HALT; dmem[i] = '0; end
    for (int i = 0; i < 32; i++) regs[i] = '0;
    // rsum(a0): a0 + rsum(a0 - 1), rsum(0) = 0, result in v0
    imem['h100/4] = enc_opl(OP_INTA, F_SUBQ, R_SP, 8'd16, R_SP);
    imem['h104/4] = enc_mem(OP_STQ, R_RA, R_SP, 0);
    imem['h108/4] = enc_mem(OP_STQ, A0, R_SP, 8);
    imem['h10c/4] = b_to(6'h39, A0, 'h10c, 'h124);
    imem['h110/4] = enc_opl(OP_INTA, F_SUBQ, A0, 8'd1, A0);
    imem['h114/4] = b_to(OP_BSR, R_RA, 'h114, 'h100);
    imem['h118/4] = enc_mem(OP_LDQ, A0, R_SP, 8);
    imem['h11c/4] = enc_opr(OP_INTA, F_ADDQ, R_V0, A0, R_V0);
    imem['h120/4] = b_to(OP_BR, R_ZERO, 'h120, 'h128);
    imem['h124/4] = enc_mem(OP_LDA, R_V0, R_ZERO, 0);
    imem['h128/4] = enc_mem(OP_LDQ, R_RA, R_SP, 0);
    imem['h12c/4] = enc_opl(OP_INTA, F_ADDQ, R_SP, 8'd16, R_SP);
    imem['h130/4] = enc_jmp(H_RET, R_ZERO, R_RA);
    // vuln(a0 words from a1): copies into a 3-word stack buffer
    imem['h200/4] = enc_opl(OP_INTA, F_SUBQ, R_SP, 8'd32, R_SP);
    imem['h204/4] = enc_mem(OP_STQ, R_RA, R_SP, 24);
    imem['h208/4] = enc_mem(OP_LDA, R3, R_SP, 0);
    imem['h20c/4] = b_to(6'h39, A0, 'h20c, 'h228);
    imem['h210/4] = enc_mem(OP_LDQ, R4, A1, 0);
    imem['h214/4] = enc_mem(OP_STQ, R4, R3, 0);
    imem['h218/4] = enc_opl(OP_INTA, F_ADDQ, R3, 8'd8, R3);
    imem['h21c/4] = enc_opl(OP_INTA, F_ADDQ, A1, 8'd8, A1);
    imem['h220/4] = enc_opl(OP_INTA, F_SUBQ, A0, 8'd1, A0);
    imem['h224/4] = b_to(OP_BR, R_ZERO, 'h224, 'h20c);
    imem['h228/4] = enc_mem(OP_LDQ, R_RA, R_SP, 24);
    imem['h22c/4] = enc_opl(OP_INTA, F_ADDQ, R_SP, 8'd32, R_SP);
    imem['h230/4] = enc_jmp(H_RET, R_ZERO, R_RA);
    // attack code
    imem['h300/4] = enc_mem(OP_LDA, T0, R_ZERO, 'h666);
    imem['h304/4] = HALT;
    // DISE function expand(): $darp += 64, r5 kept in a DISE register
    imem[EXPAND_PC[14:2] + 0] = enc_dise(F_DMTR, R5, R_ZERO, 5'd6);
    imem[EXPAND_PC[14:2] + 1] = enc_dise(F_DMFR, R_ZERO, D_DARP, R5);
    imem[EXPAND_PC[14:2] + 2] = enc_mem(OP_LDA, R5, R5, 64);
    imem[EXPAND_PC[14:2] + 3] = enc_dise(F_DMTR, R5, R_ZERO, D_DARP);
    imem[EXPAND_PC[14:2] + 4] = enc_dise(F_DMFR, R_ZERO, 5'd6, R5);
    imem[EXPAND_PC[14:2] + 5] = enc_dise(F_DRET, R_ZERO, R_ZERO, R_ZERO);
    // DISE function addrcheck(): the popped entry did not match. Pop older
    // entries until one matches both the return address ($ra, compared in
    // encoded form) and the stack pointer; that is a legitimate non-local
    // return and execution continues with the shadow stack cut back to it.
    // If the shadow stack runs empty, terminate with code 0xBAD. r20-r22
    // are kept in DISE registers and restored.
    imem[ADDRCHECK_PC[14:2] + 0]  = enc_dise(F_DMTR, R20, R_ZERO, D_DR0);
    imem[ADDRCHECK_PC[14:2] + 1]  = enc_dise(F_DMTR, R21, R_ZERO, 5'd6);
    imem[ADDRCHECK_PC[14:2] + 2]  = enc_dise(F_DMTR, R22, R_ZERO, 5'd7);
    imem[ADDRCHECK_PC[14:2] + 3]  = enc_dise(F_DMFR, R_ZERO, D_DSSP, R20);
    imem[ADDRCHECK_PC[14:2] + 4]  = enc_dise(F_DMFR, R_ZERO, D_DXR, R21);
    imem[ADDRCHECK_PC[14:2] + 5]  = enc_opr(OP_INTL, F_XOR, R21, R_RA, R21);
    // loop:
    imem[ADDRCHECK_PC[14:2] + 6]  = enc_dise(F_DMFR, R_ZERO, D_DSSB, R22);
    imem[ADDRCHECK_PC[14:2] + 7]  = enc_opr(OP_INTA, F_CMPEQ, R20, R22, R22);
    imem[ADDRCHECK_PC[14:2] + 8]  = b_to(6'h3D, R22, AC + 32, AC + 84);
    imem[ADDRCHECK_PC[14:2] + 9]  = enc_mem(OP_LDQ, R22, R20, -8);
    imem[ADDRCHECK_PC[14:2] + 10] = enc_opl(OP_INTA, F_SUBQ, R20, 8'd16, R20);
    imem[ADDRCHECK_PC[14:2] + 11] = enc_opr(OP_INTA, F_CMPEQ, R22, R21, R22);
    imem[ADDRCHECK_PC[14:2] + 12] = b_to(6'h39, R22, AC + 48, AC + 24);
    imem[ADDRCHECK_PC[14:2] + 13] = enc_mem(OP_LDQ, R22, R20, 0);
    imem[ADDRCHECK_PC[14:2] + 14] = enc_opr(OP_INTA, F_CMPEQ, R22, R_SP, R22);
    imem[ADDRCHECK_PC[14:2] + 15] = b_to(6'h39, R22, AC + 60, AC + 24);
    imem[ADDRCHECK_PC[14:2] + 16] = enc_dise(F_DMTR, R20, R_ZERO, D_DSSP);
    imem[ADDRCHECK_PC[14:2] + 17] = enc_dise(F_DMFR, R_ZERO, D_DR0, R20);
    imem[ADDRCHECK_PC[14:2] + 18] = enc_dise(F_DMFR, R_ZERO, 5'd6, R21);
    imem[ADDRCHECK_PC[14:2] + 19] = enc_dise(F_DMFR, R_ZERO, 5'd7, R22);
    imem[ADDRCHECK_PC[14:2] + 20] = enc_dise(F_DRET, R_ZERO, R_ZERO, R_ZERO);
    // fail:
    imem[ADDRCHECK_PC[14:2] + 21] = enc_mem(OP_LDA, T0, R_ZERO, 'hBAD);
    imem[ADDRCHECK_PC[14:2] + 22] = HALT;
    // input data for vuln: three words, then the attack address
    dmem[dix(64'h6000)] = 64'd11;
    dmem[dix(64'h6008)] = 64'd22;
    dmem[dix(64'h6010)] = 64'd33;
    dmem[dix(64'h6018)] = 64'h300;
  endtask

  task automatic main_sum();
    imem[0] = enc_mem(OP_LDA, R_SP, R_ZERO, 'h7000);
    imem[1] = enc_mem(OP_LDA, A0, R_ZERO, 4);
    imem[2] = b_to(OP_BSR, R_RA, 8, 'h100);
    imem[3] = enc_mem(OP_LDA, T0, R_ZERO, 0);
    imem[4] = HALT;
  endtask

  task automatic main_vuln(int n);
    imem[0] = enc_mem(OP_LDA, R_SP, R_ZERO, 'h7000);
    imem[1] = enc_mem(OP_LDA, A0, R_ZERO, n);
    imem[2] = enc_mem(OP_LDA, A1, R_ZERO, 'h6000);
    imem[3] = b_to(OP_BSR, R_RA, 12, 'h200);
    imem[4] = enc_mem(OP_LDA, T0, R_ZERO, 0);
    imem[5] = HALT;
  endtask

  task automatic reset_machine();
    running = 1'b0;
    @(negedge clk);
    rst_n = 1'b0;
    stopped = 1'b0; stop_kind = 0; stop_code = '0; fetch_pc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  endtask

  task automatic run(int max_cycles, output int cycles);
    cycles = 0;
    @(negedge clk);
    running = 1'b1;
    while (!stopped && cycles < max_cycles) begin
      @(negedge clk);
      cycles++;
    end
    running = 1'b0;
    chk("program stopped in time", stopped);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, cyc0, c0, d0, base_commit;
    logic [63:0] restart_pc;
    logic [63:0] saved_dr [8];
    logic [63:0] saved_ctx [3];
    logic [63:0] enc_seen;
    n_call = 0; n_ret = 0; n_store = 0; n_expand = 0; n_addrcheck = 0; n_trap = 0;
    n_illegal = 0; n_dfunc = 0; n_fetch_stall = 0; n_flush = 0; n_dret = 0;
    n_cfg_err = 0; n_fault = 0; n_commit = 0; n_ctxsw = 0;
    stopped = 1'b0;

    // ---- A0: the recursive sum without protection, for the overhead
    load_common(); main_sum();
    reset_machine(); install(1'b0);
    run(20000, cyc0);
    base_commit = n_commit;
    chk("A0: sum 1..4 unprotected", regs[0] == 64'd10 && stop_kind == 1);

    // ---- A: recursion with shadow-stack expansion
    load_common(); main_sum();
    reset_machine();
    install(1'b1);
    n_commit = 0;
    run(20000, cyc);
    // 5 calls x 7 + 5 returns x 5 + 10 stores x 4 inserted instructions, and
    // the 6 instructions of one expand() call
    chk("A: instruction overhead", n_commit - base_commit == 5 * 7 + 5 * 5 + 10 * 4 + 6);
    $display("A: %0d instructions, %0d cycles; without DISE %0d instructions, %0d cycles",
             n_commit, cyc, base_commit, cyc0);
    // the deepest frame's entry (the fifth) stays in memory after the pop
    enc_seen = dmem[dix(SS_BASE + 64'd72)];
    chk("A: normal halt", stop_kind == 1 && stop_code == 0);
    chk("A: sum 1..4", regs[0] == 64'd10);
    chk("A: five calls and returns expanded", n_call == 5 && n_ret == 5);
    chk("A: expand() called once", n_expand == 1 && n_dret == 1);
    chk("A: stack pointer restored", regs[30] == 64'h7000);
    chk("A: shadow entry XOR-encoded", enc_seen == (64'h118 ^ XKEY));
    chk("A: addrcheck never called", n_addrcheck == 0);
    chk("A: shadow sp stored", dmem[dix(SS_BASE + 64'd64)] != 64'd0);
    chk("A: r5 preserved by expand()", regs[5] == 64'd0);
    read_dreg(D_DSSP, enc_seen);
    chk("A: dssp back at base", enc_seen == SS_BASE);
    read_dreg(D_DARP, enc_seen);
    chk("A: darp grown by expand()", enc_seen == SS_BASE + 64'd112);

    // ---- X: the same sum with call and return productions only
    load_common(); main_sum();
    reset_machine(); install(1'b1, 2);
    n_commit = 0; c0 = n_store;
    run(20000, cyc);
    chk("X: sum 1..4", stop_kind == 1 && stop_code == 0 && regs[0] == 64'd10);
    chk("X: instruction overhead", n_commit - base_commit == 5 * 7 + 5 * 5 + 6);
    chk("X: stores not expanded", n_store == c0);
    $display("X: %0d instructions, %0d cycles", n_commit, cyc);

    // ---- S: context switch in the middle of expand(). The program is
    // stopped with the engine drained, its DISE registers and engine context
    // are read out, the hardware is reset and loaded again, and the program
    // goes on from the first instruction not yet executed.
    load_common(); main_sum();
    reset_machine(); install(1'b1);
    c0 = n_dret; d0 = n_dfunc;
    @(negedge clk);
    running = 1'b1;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
    end while (!stopped && cyc < 20000 &&
               !(in_dfunc && !busy && !flush && !ccall_taken && !dret && n_dfunc >= d0 + 2));
    running = 1'b0;
    chk("S: stopped inside expand()", !stopped && in_dfunc && n_dret == c0);
    restart_pc = out_valid ? out_uop.pc : fetch_pc;
    for (int i = 0; i < 8; i++) read_dreg(5'(i), saved_dr[i]);
    for (int i = 0; i < 3; i++) read_cfg(T_CTRL, i + 1, saved_ctx[i]);
    chk("S: DISE-function flag saved", saved_ctx[0] == 64'd1);
    reset_machine();
    chk("S: reset clears the context", !in_dfunc);
    install(1'b1);
    for (int i = 0; i < 8; i++) cfg(T_DREG, i, saved_dr[i]);
    for (int i = 0; i < 3; i++) cfg(T_CTRL, i + 1, saved_ctx[i]);
    chk("S: context restored", in_dfunc);
    fetch_pc = restart_pc;
    n_ctxsw++;
    run(20000, cyc);
    chk("S: sum 1..4 after the switch", stop_kind == 1 && stop_code == 0 && regs[0] == 64'd10);
    chk("S: expand() returned once", n_dret == c0 + 1);
    read_dreg(D_DSSP, enc_seen);
    chk("S: dssp back at base", enc_seen == SS_BASE);

    // ---- B: return-address smash, protected
    load_common(); main_vuln(4);
    reset_machine(); install(1'b1);
    run(20000, cyc);
    chk("B: attack detected by addrcheck()", stop_kind == 1 && stop_code == 64'hBAD);
    chk("B: addrcheck called", n_addrcheck == 1);

    // ---- B0: same attack, DISE disabled
    load_common(); main_vuln(4);
    reset_machine(); install(1'b0);
    run(20000, cyc);
    chk("B0: unprotected attack succeeds", stop_kind == 1 && stop_code == 64'h666);

    // ---- B1: same routine, input fits
    load_common(); main_vuln(3);
    reset_machine(); install(1'b1);
    bp = 1'b1;
    run(20000, cyc);
    bp = 1'b0;
    chk("B1: benign run, no alarm", stop_kind == 1 && stop_code == 0 && n_addrcheck == 1);
    chk("B1: data copied", dmem[dix(64'h7000 - 64'd32 + 64'd16)] == 64'd33);

    // ---- C: store into the shadow-stack segment
    load_common();
    imem[0] = enc_mem(OP_LDA, R4, R_ZERO, 'h55);
    imem[1] = enc_mem(OP_LDAH, R3, R_ZERO, 'h400);
    imem[2] = enc_mem(OP_STQ, R4, R3, 8);
    imem[3] = enc_mem(OP_LDA, T0, R_ZERO, 0);
    imem[4] = HALT;
    reset_machine(); install(1'b1);
    run(2000, cyc);
    chk("C: store trapped", stop_kind == 2 && stop_code == 64'(ERR_CODE));
    chk("C: shadow stack untouched", dmem[dix(SS_BASE + 64'd8)] == 64'd0);

    // ---- L: non-local return (longjmp-style unwind), recovered
    load_common(); load_chain(1'b1);
    reset_machine(); install(1'b1);
    c0 = n_addrcheck;
    run(20000, cyc);
    chk("L: non-local return accepted", stop_kind == 1 && stop_code == 0);
    chk("L: addrcheck called once", n_addrcheck == c0 + 1);
    chk("L: registers kept by addrcheck",
        regs[20] == 64'h20 && regs[21] == 64'h21 && regs[22] == 64'h22);
    chk("L: stack pointer", regs[30] == 64'h7000);
    read_dreg(D_DSSP, enc_seen);
    chk("L: shadow stack cut back to empty", enc_seen == SS_BASE);

    // ---- L2: return address redirected to main's return point, wrong $sp
    load_common(); load_chain(1'b0);
    reset_machine(); install(1'b1);
    run(20000, cyc);
    chk("L2: call-chain redirect detected", stop_kind == 1 && stop_code == 64'hBAD);

    // ---- D: user access attempts
    load_common();
    imem[0] = enc_dise(F_DMFR, R_ZERO, D_DXR, R4);
    imem[1] = HALT;
    reset_machine(); install(1'b1);
    c0 = n_cfg_err;
    cfg(T_PT, 0, 64'd0, 1'b0);
    cfg(T_DREG, D_DXR, 64'd0, 1'b0);
    chk("D: unprivileged writes refused", n_cfg_err == c0 + 2);
    run(2000, cyc);
    chk("D: dmfr in application code illegal", stop_kind == 3 && regs[4] == 64'd0);

    // ---- every mechanism seen
    $display("calls %0d returns %0d stores %0d expand %0d addrcheck %0d traps %0d",
             n_call, n_ret, n_store, n_expand, n_addrcheck, n_trap);
    $display("dfunc insns %0d drets %0d illegal %0d fetch stalls %0d flushes %0d cfg errors %0d",
             n_dfunc, n_dret, n_illegal, n_fetch_stall, n_flush, n_cfg_err);
    chk("seen: call expansion", n_call > 0);
    chk("seen: return expansion", n_ret > 0);
    chk("seen: store expansion", n_store > 0);
    chk("seen: ccall to expand", n_expand > 0);
    chk("seen: ccall to addrcheck", n_addrcheck > 0);
    chk("seen: dret resume", n_dret > 0);
    chk("seen: DISE function body", n_dfunc > 0);
    chk("seen: ctrap", n_trap > 0);
    chk("seen: illegal", n_illegal > 0);
    chk("seen: fetch stall", n_fetch_stall > 0);
    chk("seen: flush", n_flush > 0);
    chk("seen: refused config", n_cfg_err > 0);
    chk("seen: context switch", n_ctxsw > 0);
    chk("no DISE register fault", n_fault == 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
