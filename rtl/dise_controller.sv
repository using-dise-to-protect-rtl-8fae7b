// dise_controller: the privileged gateway through which DISE is programmed.
//
// The OS issues one access per cycle: a target (pattern table, replacement
// table, DISE register or control register), an index, write data and a
// read/write flag, together with cfg_priv, which the processor drives from
// its privilege mode. A privileged write is forwarded in the same cycle as a
// write strobe to the addressed table or register. A privileged read returns
// the addressed item in cfg_rdata one cycle later with cfg_rvalid, so the
// OS can save DISE state on a context switch. An unprivileged access, or
// one whose index is out of range, changes nothing and sets cfg_error for
// one cycle, so user code can neither install nor read productions. Control
// register 0 holds the engine enable bit; control registers 1 to 3 give
// access to the engine's context (DISE-function flag; {next template,
// sequence end, trigger word}; trigger PC) so that a context switch can save
// and restore a program that was inside a DISE function.
//
// Interface: pattern entries and templates travel in the low bits of the
// 64-bit data word (pattern_t, template_t). Reset clears enable.
//
// That only the OS can reach the controller follows the description of
// DISE; the access format and timing are this design's choices.
module dise_controller
  import dise_pkg::*;
#(
  parameter int unsigned PT_ENTRIES = 8,
  parameter int unsigned RT_ENTRIES = 32,
  parameter int unsigned N_DREGS    = 8,
  localparam int unsigned PW = (PT_ENTRIES > 1) ? $clog2(PT_ENTRIES) : 1,
  localparam int unsigned RW = (RT_ENTRIES > 1) ? $clog2(RT_ENTRIES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // OS access port
  input  logic             cfg_valid,
  input  logic             cfg_write,
  input  logic             cfg_priv,
  input  cfg_target_e      cfg_target,
  input  logic [7:0]       cfg_index,
  input  logic [CFG_W-1:0] cfg_wdata,
  output logic             cfg_rvalid,
  output logic [CFG_W-1:0] cfg_rdata,
  output logic             cfg_error,
  // towards the engine and the register file
  output logic             enable,
  output logic             pt_wr_en,
  output logic [PW-1:0]    pt_idx,
  output pattern_t         pt_wr_data,
  input  pattern_t         pt_rd_data,
  output logic             rt_wr_en,
  output logic [RW-1:0]    rt_idx,
  output template_t        rt_wr_data,
  input  template_t        rt_rd_data,
  output logic             dr_wr_en,
  output logic [4:0]       dr_idx,
  output logic [63:0]      dr_wr_data,
  input  logic [63:0]      dr_rd_data,
  // engine context (control registers 1 to 3)
  output logic [2:0]       ctx_wr_en,
  output logic [63:0]      ctx_wdata,
  input  logic             ctx_dfunc,
  input  resume_t          ctx_saved
);

  logic in_range, ok;

  always_comb begin
    unique case (cfg_target)
      T_PT:    in_range = 32'(cfg_index) < PT_ENTRIES;
      T_RT:    in_range = 32'(cfg_index) < RT_ENTRIES;
      T_DREG:  in_range = 32'(cfg_index) < N_DREGS;
      default: in_range = cfg_index < 8'd4;
    endcase
  end

  assign ok = cfg_valid && cfg_priv && in_range;

  assign pt_idx     = cfg_index[PW-1:0];
  assign rt_idx     = cfg_index[RW-1:0];
  assign dr_idx     = cfg_index[4:0];
  assign pt_wr_data = pattern_t'(cfg_wdata[$bits(pattern_t)-1:0]);
  assign rt_wr_data = template_t'(cfg_wdata[$bits(template_t)-1:0]);
  assign dr_wr_data = cfg_wdata;

  assign pt_wr_en = ok && cfg_write && (cfg_target == T_PT);
  assign rt_wr_en = ok && cfg_write && (cfg_target == T_RT);
  assign dr_wr_en = ok && cfg_write && (cfg_target == T_DREG);

  logic [CFG_W-1:0] rd_mux;
  always_comb begin
    unique case (cfg_target)
      T_PT:    rd_mux = CFG_W'(pt_rd_data);
      T_RT:    rd_mux = CFG_W'(rt_rd_data);
      T_DREG:  rd_mux = dr_rd_data;
      default: begin
        unique case (cfg_index[1:0])
          2'd0:    rd_mux = CFG_W'(enable);
          2'd1:    rd_mux = CFG_W'(ctx_dfunc);
          2'd2:    rd_mux = CFG_W'({ctx_saved.rt_next, ctx_saved.rt_end, ctx_saved.trig});
          default: rd_mux = ctx_saved.pc;
        endcase
      end
    endcase
  end

  always_comb begin
    ctx_wr_en = '0;
    if (ok && cfg_write && cfg_target == T_CTRL && cfg_index != 8'd0)
      ctx_wr_en[cfg_index[1:0] - 2'd1] = 1'b1;
  end
  assign ctx_wdata = cfg_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable     <= 1'b0;
      cfg_rvalid <= 1'b0;
      cfg_rdata  <= '0;
      cfg_error  <= 1'b0;
    end else begin
      cfg_error  <= cfg_valid && !ok;
      cfg_rvalid <= ok && !cfg_write;
      if (ok && !cfg_write) cfg_rdata <= rd_mux;
      if (ok && cfg_write && cfg_target == T_CTRL && cfg_index == 8'd0)
        enable <= cfg_wdata[0];
    end
  end

endmodule
