// tb_dise_pattern_table: self-checking test of the DISE pattern table.
//
// Loads the call / return / store patterns plus extra entries that use the
// opcode mask, the register fields, an empty sequence and an overlapping
// lower-priority entry, then presents instructions whose expected match
// (hit, entry, sequence) is written out by hand. Also checks read-back and
// that reset clears the table.
module tb_dise_pattern_table;
  import dise_pkg::*;
  import dise_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        wr_en = 1'b0;
  logic [2:0]  wr_idx = '0, rd_idx = '0, hit_idx;
  pattern_t    wr_data = '0, rd_data;
  logic [31:0] insn = '0;
  logic        hit;
  logic [7:0]  rt_start;
  logic [4:0]  rt_len;

  int checks = 0, failures = 0;

  dise_pattern_table #(.PT_ENTRIES(8)) dut (.*);

  task automatic wr(int i, pattern_t p);
    @(negedge clk);
    wr_en = 1'b1; wr_idx = 3'(i); wr_data = p;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic expect_match(string name, logic [31:0] w, logic h, int idx, int st, int ln);
    insn = w;
    #1;
    checks++;
    if (hit !== h || (h && (hit_idx != 3'(idx) || rt_start != 8'(st) || rt_len != 5'(ln)))) begin
      failures++;
      $display("FAIL %s: hit=%0b idx=%0d start=%0d len=%0d", name, hit, hit_idx, rt_start, rt_len);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) wr(i, prod_pat(i));
    // entry 3: loads through $sp only (the Figure 1 style production)
    wr(3, pat(cm(C_LOAD), 20, 2, 6'd0, 6'd0, 1'b0, 5'd0, 1'b1, R_SP));
    // entry 4: opcode LDQ exactly with ra == 4, lower priority than 3
    wr(4, pat(cm(C_LOAD), 24, 3, OP_LDQ, 6'h3F, 1'b1, 5'd4));
    // entry 5: a valid entry with an empty sequence never fires
    wr(5, pat(cm(C_ALU), 28, 0));

    expect_match("bsr",         enc_br(OP_BSR, R_RA, 100),             1, 0, 0, 8);
    expect_match("jsr",         enc_jmp(H_JSR, R_RA, 5'd27),           1, 0, 0, 8);
    expect_match("ret",         enc_jmp(H_RET, R_ZERO, R_RA),          1, 1, 8, 6);
    expect_match("jmp",         enc_jmp(H_JMP, R_ZERO, 5'd3),          0, 0, 0, 0);
    expect_match("stq",         enc_mem(OP_STQ, 5'd1, 5'd2, 8),        1, 2, 14, 5);
    expect_match("stb",         enc_mem(OP_STB, 5'd1, R_SP, 8),        1, 2, 14, 5);
    expect_match("ldq sp",      enc_mem(OP_LDQ, 5'd4, R_SP, 32),       1, 3, 20, 2);
    expect_match("ldq r4 r9",   enc_mem(OP_LDQ, 5'd4, 5'd9, 32),       1, 4, 24, 3);
    expect_match("ldl r4 r9",   enc_mem(OP_LDL, 5'd4, 5'd9, 32),       0, 0, 0, 0);
    expect_match("ldq r5 r9",   enc_mem(OP_LDQ, 5'd5, 5'd9, 32),       0, 0, 0, 0);
    expect_match("addq len0",   enc_opr(OP_INTA, F_ADDQ, 1, 2, 3),     0, 0, 0, 0);
    expect_match("lda",         enc_mem(OP_LDA, 5'd1, 5'd2, 8),        0, 0, 0, 0);

    // read back
    for (int i = 0; i < 6; i++) begin
      rd_idx = 3'(i);
      #1;
      checks++;
      if (rd_data.valid !== 1'b1) begin failures++; $display("FAIL readback %0d", i); end
    end
    rd_idx = 3'd1; #1;
    checks++;
    if (rd_data != prod_pat(1)) begin failures++; $display("FAIL readback content"); end

    // invalidate the call entry
    wr(0, '0);
    expect_match("bsr after clear", enc_br(OP_BSR, R_RA, 100), 0, 0, 0, 0);

    // reset clears everything
    rst_n = 1'b0; #1; rst_n = 1'b1;
    expect_match("ret after reset", enc_jmp(H_RET, R_ZERO, R_RA), 0, 0, 0, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
