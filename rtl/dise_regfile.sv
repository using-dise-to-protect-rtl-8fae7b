// dise_regfile: the dedicated DISE register set.
//
// N_DREGS registers of W bits, used by replacement sequences for temporaries
// and for state carried from one sequence to the next (in return-address
// protection: shadow-stack base, pointer and limit, the XOR key and the
// shadow-stack segment). The execution side reads two registers and writes
// one per cycle; each access states whether the instruction making it is in
// DISE mode. An access outside DISE mode, or to a register number beyond
// N_DREGS, reads zero, writes nothing and raises fault in the same cycle.
// A separate port lets the controller (the OS) load and save the registers,
// for initial state and context switches.
//
// Reads are combinational, writes take effect at the clock edge; when both
// write ports hit one register in a cycle the execution write wins. Reset
// clears all registers.
//
// That the set is reachable only from DISE mode follows the description of
// DISE; the number of registers, the ports and the fault signal are this
// design's choices.
module dise_regfile #(
  parameter int unsigned N_DREGS = 8,
  parameter int unsigned W       = 64,
  localparam int unsigned IW     = (N_DREGS > 1) ? $clog2(N_DREGS) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         dise_mode,
  input  logic         rd1_en,
  input  logic [4:0]   rd1_idx,
  output logic [W-1:0] rd1_data,
  input  logic         rd2_en,
  input  logic [4:0]   rd2_idx,
  output logic [W-1:0] rd2_data,
  input  logic         wr_en,
  input  logic [4:0]   wr_idx,
  input  logic [W-1:0] wr_data,
  output logic         fault,
  // controller port
  input  logic         cfg_wr_en,
  input  logic [4:0]   cfg_idx,
  input  logic [W-1:0] cfg_wdata,
  output logic [W-1:0] cfg_rdata
);

  logic [W-1:0] regs [N_DREGS];

  logic ok1, ok2, okw;
  assign ok1 = dise_mode && (32'(rd1_idx) < N_DREGS);
  assign ok2 = dise_mode && (32'(rd2_idx) < N_DREGS);
  assign okw = dise_mode && (32'(wr_idx)  < N_DREGS);

  assign rd1_data  = (rd1_en && ok1) ? regs[rd1_idx[IW-1:0]] : '0;
  assign rd2_data  = (rd2_en && ok2) ? regs[rd2_idx[IW-1:0]] : '0;
  assign fault     = (rd1_en && !ok1) || (rd2_en && !ok2) || (wr_en && !okw);
  assign cfg_rdata = (32'(cfg_idx) < N_DREGS) ? regs[cfg_idx[IW-1:0]] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_DREGS; i++) regs[i] <= '0;
    end else begin
      if (cfg_wr_en && (32'(cfg_idx) < N_DREGS)) regs[cfg_idx[IW-1:0]] <= cfg_wdata;
      if (wr_en && okw) regs[wr_idx[IW-1:0]] <= wr_data;
    end
  end

endmodule
