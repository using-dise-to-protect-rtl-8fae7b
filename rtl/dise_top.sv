// dise_top: the DISE hardware of one processor core.
//
// DISE (dynamic instruction stream editing) rewrites the instruction stream
// between fetch and execution according to programmable productions, each a
// pattern plus a parameterized replacement sequence. Return-address
// protection uses it to push the return address (XOR-encoded with a secret
// key) and the stack pointer onto a shadow stack at every call, to pop and
// compare them at every return, and optionally to check every store against
// the shadow stack's address segment.
//
// This module joins the three hardware parts: the controller (the OS-only
// programming port), the engine (pattern table, replacement table and
// instantiation logic) and the dedicated DISE register file. The processor
// core that fetches and executes is outside: its fetch stream comes in on
// in_*, the edited stream goes out on out_*, its execute stage uses the
// dr_* ports of the DISE registers and reports flush, ccall_taken / dret.
// The controller also reaches the engine's context (DISE-function flag and
// resume point), so that an OS can save and restore a program that was
// switched out inside a DISE function; this path is internal.
//
// Timing: see dise_engine (one output register, one instruction per cycle)
// and dise_controller (writes take effect at the next edge, reads return one
// cycle later). The split into engine, controller and dedicated registers
// follows the description of DISE; table sizes are this design's choice.
module dise_top
  import dise_pkg::*;
#(
  parameter int unsigned PT_ENTRIES = 8,
  parameter int unsigned RT_ENTRIES = 32,
  parameter int unsigned N_DREGS    = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // OS access to the controller
  input  logic             cfg_valid,
  input  logic             cfg_write,
  input  logic             cfg_priv,
  input  cfg_target_e      cfg_target,
  input  logic [7:0]       cfg_index,
  input  logic [CFG_W-1:0] cfg_wdata,
  output logic             cfg_rvalid,
  output logic [CFG_W-1:0] cfg_rdata,
  output logic             cfg_error,
  output logic             enable,
  // fetch side
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [31:0]      in_insn,
  input  logic [63:0]      in_pc,
  // execute side: edited stream
  output logic             out_valid,
  input  logic             out_ready,
  output uop_t             out_uop,
  input  logic             flush,
  input  logic             ccall_taken,
  input  resume_t          ccall_resume,
  input  logic             dret,
  output logic [63:0]      resume_pc,
  output logic             in_dfunc,
  output logic             busy,
  // execute side: DISE registers
  input  logic             dr_mode,
  input  logic             dr_rd1_en,
  input  logic [4:0]       dr_rd1_idx,
  output logic [63:0]      dr_rd1_data,
  input  logic             dr_rd2_en,
  input  logic [4:0]       dr_rd2_idx,
  output logic [63:0]      dr_rd2_data,
  input  logic             dr_wr_en,
  input  logic [4:0]       dr_wr_idx,
  input  logic [63:0]      dr_wr_data,
  output logic             dr_fault
);

  localparam int unsigned PW = (PT_ENTRIES > 1) ? $clog2(PT_ENTRIES) : 1;
  localparam int unsigned RW = (RT_ENTRIES > 1) ? $clog2(RT_ENTRIES) : 1;

  logic          pt_wr_en, rt_wr_en, c_dr_wr_en;
  logic [PW-1:0] pt_idx;
  logic [RW-1:0] rt_idx;
  logic [4:0]    c_dr_idx;
  pattern_t      pt_wr_data, pt_rd_data;
  template_t     rt_wr_data, rt_rd_data;
  logic [63:0]   c_dr_wdata, c_dr_rdata;
  logic [2:0]    ctx_wr_en;
  logic [63:0]   ctx_wdata;
  resume_t       ctx_saved;

  dise_controller #(
    .PT_ENTRIES(PT_ENTRIES), .RT_ENTRIES(RT_ENTRIES), .N_DREGS(N_DREGS)
  ) u_ctrl (
    .clk, .rst_n,
    .cfg_valid, .cfg_write, .cfg_priv, .cfg_target, .cfg_index, .cfg_wdata,
    .cfg_rvalid, .cfg_rdata, .cfg_error,
    .enable,
    .pt_wr_en, .pt_idx, .pt_wr_data, .pt_rd_data,
    .rt_wr_en, .rt_idx, .rt_wr_data, .rt_rd_data,
    .dr_wr_en(c_dr_wr_en), .dr_idx(c_dr_idx), .dr_wr_data(c_dr_wdata),
    .dr_rd_data(c_dr_rdata),
    .ctx_wr_en, .ctx_wdata, .ctx_dfunc(in_dfunc), .ctx_saved
  );

  dise_engine #(.PT_ENTRIES(PT_ENTRIES), .RT_ENTRIES(RT_ENTRIES)) u_engine (
    .clk, .rst_n, .enable,
    .pt_wr_en, .pt_wr_idx(pt_idx), .pt_wr_data, .pt_rd_idx(pt_idx), .pt_rd_data,
    .rt_wr_en, .rt_wr_idx(rt_idx), .rt_wr_data, .rt_rd_idx(rt_idx), .rt_rd_data,
    .in_valid, .in_ready, .in_insn, .in_pc,
    .out_valid, .out_ready, .out_uop,
    .flush, .ccall_taken, .ccall_resume, .dret,
    .resume_pc, .in_dfunc, .busy,
    .ctx_wr_en, .ctx_wdata, .ctx_saved
  );

  dise_regfile #(.N_DREGS(N_DREGS), .W(64)) u_dregs (
    .clk, .rst_n,
    .dise_mode(dr_mode),
    .rd1_en(dr_rd1_en), .rd1_idx(dr_rd1_idx), .rd1_data(dr_rd1_data),
    .rd2_en(dr_rd2_en), .rd2_idx(dr_rd2_idx), .rd2_data(dr_rd2_data),
    .wr_en(dr_wr_en), .wr_idx(dr_wr_idx), .wr_data(dr_wr_data),
    .fault(dr_fault),
    .cfg_wr_en(c_dr_wr_en), .cfg_idx(c_dr_idx), .cfg_wdata(c_dr_wdata),
    .cfg_rdata(c_dr_rdata)
  );

endmodule
