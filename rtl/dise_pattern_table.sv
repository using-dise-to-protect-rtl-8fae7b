// dise_pattern_table: the programmable trigger patterns of the DISE engine.
//
// Every fetched instruction is compared, in the same cycle, with all
// PT_ENTRIES patterns. A pattern can name an opcode class set (for example
// "jsr|bsr" or "store"), an opcode under a bit mask and the ra and rb
// register fields. The lowest-numbered valid matching entry wins and its
// replacement sequence (first template, length) is reported. An entry with
// rt_len = 0 never fires.
//
// Interface: one synchronous write port and one read-back port for the
// controller; match outputs are combinational from insn. Reset clears all
// entries.
//
// What a pattern may inspect (opcode, registers) follows the description of
// DISE; the table size, the field layout and the first-match priority are
// choices of this design.
module dise_pattern_table
  import dise_pkg::*;
#(
  parameter int unsigned PT_ENTRIES = 8,
  localparam int unsigned IW = (PT_ENTRIES > 1) ? $clog2(PT_ENTRIES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [IW-1:0] wr_idx,
  input  pattern_t      wr_data,
  input  logic [IW-1:0] rd_idx,
  output pattern_t      rd_data,
  input  logic [31:0]   insn,
  output logic          hit,
  output logic [IW-1:0] hit_idx,
  output logic [7:0]    rt_start,
  output logic [4:0]    rt_len
);

  pattern_t tbl [PT_ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < PT_ENTRIES; i++) tbl[i] <= '0;
    end else if (wr_en && (32'(wr_idx) < PT_ENTRIES)) begin
      tbl[wr_idx] <= wr_data;
    end
  end

  assign rd_data = (32'(rd_idx) < PT_ENTRIES) ? tbl[rd_idx] : '0;

  opclass_e             cls;
  logic [PT_ENTRIES-1:0] match;

  always_comb begin
    cls = classify(insn);
    for (int i = 0; i < PT_ENTRIES; i++) begin
      match[i] = tbl[i].valid
              && (tbl[i].rt_len != '0)
              && tbl[i].cls_mask[cls]
              && (((insn[31:26] ^ tbl[i].op_val) & tbl[i].op_mask) == '0)
              && (!tbl[i].ra_en || (insn[25:21] == tbl[i].ra_val))
              && (!tbl[i].rb_en || (insn[20:16] == tbl[i].rb_val));
    end
  end

  always_comb begin
    hit      = 1'b0;
    hit_idx  = '0;
    rt_start = '0;
    rt_len   = '0;
    for (int i = PT_ENTRIES - 1; i >= 0; i--) begin
      if (match[i]) begin
        hit      = 1'b1;
        hit_idx  = IW'(i);
        rt_start = tbl[i].rt_start;
        rt_len   = tbl[i].rt_len;
      end
    end
  end

endmodule
