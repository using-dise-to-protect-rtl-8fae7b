// dise_replacement_table: storage for the replacement-sequence templates.
//
// A replacement sequence is a run of consecutive templates; the pattern
// table names its first index and its length. The engine reads one template
// per cycle through a combinational read port, so a sequence is emitted at
// one instruction per cycle. A second read port lets the controller read
// templates back (for saving DISE state on a context switch).
//
// Interface: synchronous write, two asynchronous reads. Reset clears the
// table. The table size is this design's choice; the three productions of
// the return-address protection use 20 templates.
module dise_replacement_table
  import dise_pkg::*;
#(
  parameter int unsigned RT_ENTRIES = 32,
  localparam int unsigned IW = (RT_ENTRIES > 1) ? $clog2(RT_ENTRIES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [IW-1:0] wr_idx,
  input  template_t     wr_data,
  input  logic [IW-1:0] rd_idx,
  output template_t     rd_data,
  input  logic [IW-1:0] cfg_rd_idx,
  output template_t     cfg_rd_data
);

  template_t tbl [RT_ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RT_ENTRIES; i++) tbl[i] <= '0;
    end else if (wr_en && (32'(wr_idx) < RT_ENTRIES)) begin
      tbl[wr_idx] <= wr_data;
    end
  end

  assign rd_data     = (32'(rd_idx) < RT_ENTRIES) ? tbl[rd_idx] : '0;
  assign cfg_rd_data = (32'(cfg_rd_idx) < RT_ENTRIES) ? tbl[cfg_rd_idx] : '0;

endmodule
