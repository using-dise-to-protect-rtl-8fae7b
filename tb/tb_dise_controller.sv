// tb_dise_controller: self-checking test of the privileged programming port.
//
// Privileged writes must reach exactly the addressed table or register in
// the same cycle, privileged reads must return the addressed item one cycle
// later, and unprivileged or out-of-range accesses must do nothing but
// raise cfg_error. The enable bit is set and cleared through the control
// register, and the engine-context words through control registers 1-3.
// Tables and the engine context are modelled in the testbench.
module tb_dise_controller;
  import dise_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             cfg_valid = 1'b0, cfg_write = 1'b0, cfg_priv = 1'b0;
  cfg_target_e      cfg_target = T_PT;
  logic [7:0]       cfg_index = '0;
  logic [CFG_W-1:0] cfg_wdata = '0, cfg_rdata;
  logic             cfg_rvalid, cfg_error, enable;
  logic             pt_wr_en, rt_wr_en, dr_wr_en;
  logic [2:0]       pt_idx;
  logic [4:0]       rt_idx, dr_idx;
  pattern_t         pt_wr_data, pt_rd_data;
  template_t        rt_wr_data, rt_rd_data;
  logic [63:0]      dr_wr_data, dr_rd_data;
  logic [2:0]       ctx_wr_en;
  logic [63:0]      ctx_wdata;
  logic             ctx_dfunc = 1'b0;
  resume_t          ctx_saved = '0;
  int               n_ctx_wr [3] = '{0, 0, 0};

  pattern_t    pt_m [8];
  template_t   rt_m [32];
  logic [63:0] dr_m [8];

  dise_controller #(.PT_ENTRIES(8), .RT_ENTRIES(32), .N_DREGS(8)) dut (.*);

  // the tables the controller writes, modelled here
  assign pt_rd_data = pt_m[pt_idx];
  assign rt_rd_data = rt_m[rt_idx];
  assign dr_rd_data = dr_m[dr_idx[2:0]];
  always_ff @(posedge clk) begin
    if (pt_wr_en) pt_m[pt_idx] <= pt_wr_data;
    if (rt_wr_en) rt_m[rt_idx] <= rt_wr_data;
    if (dr_wr_en) dr_m[dr_idx[2:0]] <= dr_wr_data;
    for (int i = 0; i < 3; i++) if (ctx_wr_en[i]) n_ctx_wr[i]++;
    if (ctx_wr_en[0]) ctx_dfunc <= ctx_wdata[0];
    if (ctx_wr_en[1]) {ctx_saved.rt_next, ctx_saved.rt_end, ctx_saved.trig} <= ctx_wdata[47:0];
    if (ctx_wr_en[2]) ctx_saved.pc <= ctx_wdata;
    if (ctx_wr_en != '0 && !$onehot(ctx_wr_en)) begin
      failures++; $display("FAIL several context strobes");
    end
  end

  int checks = 0, failures = 0;
  int n_err = 0;

  task automatic access(logic wr, logic priv, cfg_target_e t, int idx, logic [63:0] d,
                        output logic err, output logic rv, output logic [63:0] rd);
    @(negedge clk);
    cfg_valid = 1'b1; cfg_write = wr; cfg_priv = priv; cfg_target = t;
    cfg_index = 8'(idx); cfg_wdata = d;
    @(negedge clk);
    cfg_valid = 1'b0;
    err = cfg_error; rv = cfg_rvalid; rd = cfg_rdata;
  endtask

  task automatic chk(string name, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", name); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic err, rv;
    logic [63:0] rd, d;
    for (int i = 0; i < 8; i++) begin pt_m[i] = '0; dr_m[i] = '0; end
    for (int i = 0; i < 32; i++) rt_m[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk("enable off after reset", enable == 1'b0);

    // privileged writes and read-back of each target
    for (int k = 0; k < 40; k++) begin
      cfg_target_e t;
      int idx, lim;
      t = cfg_target_e'($urandom_range(2));
      lim = (t == T_RT) ? 32 : 8;
      idx = $urandom_range(lim - 1);
      d = {$urandom, $urandom};
      if (t == T_PT) d = 64'(d[$bits(pattern_t)-1:0]);
      if (t == T_RT) d = 64'(d[$bits(template_t)-1:0]);
      access(1'b1, 1'b1, t, idx, d, err, rv, rd);
      chk("priv write no error", !err);
      access(1'b0, 1'b1, t, idx, 64'd0, err, rv, rd);
      chk("priv read valid", rv && !err);
      chk("priv read data", rd == d);
    end

    // unprivileged write must not change anything
    access(1'b1, 1'b1, T_DREG, 3, 64'h1234, err, rv, rd);
    access(1'b1, 1'b0, T_DREG, 3, 64'hdead, err, rv, rd);
    chk("unpriv write error", err); n_err += int'(err);
    access(1'b0, 1'b0, T_DREG, 3, 64'd0, err, rv, rd);
    chk("unpriv read error, no data", err && !rv); n_err += int'(err);
    access(1'b0, 1'b1, T_DREG, 3, 64'd0, err, rv, rd);
    chk("value kept", rv && rd == 64'h1234);
    access(1'b1, 1'b0, T_CTRL, 0, 64'd1, err, rv, rd);
    chk("unpriv enable refused", err && !enable); n_err += int'(err);
    // out-of-range index
    access(1'b1, 1'b1, T_PT, 8, 64'd5, err, rv, rd);
    chk("pt index range", err); n_err += int'(err);
    access(1'b1, 1'b1, T_DREG, 9, 64'd5, err, rv, rd);
    chk("dreg index range", err); n_err += int'(err);
    // enable
    access(1'b1, 1'b1, T_CTRL, 0, 64'd1, err, rv, rd);
    chk("enable set", !err && enable);
    access(1'b0, 1'b1, T_CTRL, 0, 64'd0, err, rv, rd);
    chk("enable read", rv && rd == 64'd1);
    access(1'b1, 1'b1, T_CTRL, 0, 64'd0, err, rv, rd);
    chk("enable clear", !enable);
    chk("errors seen", n_err == 5);
    // engine context words
    access(1'b1, 1'b1, T_CTRL, 1, 64'd1, err, rv, rd);
    access(1'b1, 1'b1, T_CTRL, 2, 64'h0000_0D0E_1234_5678, err, rv, rd);
    access(1'b1, 1'b1, T_CTRL, 3, 64'hABCD_0000_0000_0100, err, rv, rd);
    chk("ctx strobes once each", n_ctx_wr[0] == 1 && n_ctx_wr[1] == 1 && n_ctx_wr[2] == 1);
    chk("ctx writes leave enable", !enable);
    access(1'b0, 1'b1, T_CTRL, 1, 64'd0, err, rv, rd);
    chk("ctx dfunc read", rv && rd == 64'd1);
    access(1'b0, 1'b1, T_CTRL, 2, 64'd0, err, rv, rd);
    chk("ctx resume read", rv && rd == 64'h0000_0D0E_1234_5678);
    access(1'b0, 1'b1, T_CTRL, 3, 64'd0, err, rv, rd);
    chk("ctx pc read", rv && rd == 64'hABCD_0000_0000_0100);
    access(1'b1, 1'b0, T_CTRL, 1, 64'd0, err, rv, rd);
    chk("unpriv ctx write refused", err && n_ctx_wr[0] == 1);
    access(1'b1, 1'b1, T_CTRL, 4, 64'd0, err, rv, rd);
    chk("ctrl index range", err);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
