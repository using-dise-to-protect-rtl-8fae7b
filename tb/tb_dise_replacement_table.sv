// tb_dise_replacement_table: self-checking test of the template storage.
//
// Writes a random template to every entry, keeps its own copy, and reads
// all entries back through both read ports, then overwrites a few entries
// and checks that the others are untouched and that reset clears them.
module tb_dise_replacement_table;
  import dise_pkg::*;

  localparam int N = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        wr_en = 1'b0;
  logic [4:0]  wr_idx = '0, rd_idx = '0, cfg_rd_idx = '0;
  template_t   wr_data = '0, rd_data, cfg_rd_data;
  template_t   model [N];
  int checks = 0, failures = 0;

  dise_replacement_table #(.RT_ENTRIES(N)) dut (.*);

  function automatic template_t rnd();
    return template_t'({$urandom, $urandom});
  endfunction

  task automatic wr(int i, template_t t);
    @(negedge clk);
    wr_en = 1'b1; wr_idx = 5'(i); wr_data = t;
    @(negedge clk);
    wr_en = 1'b0;
    model[i] = t;
  endtask

  task automatic check_all();
    for (int i = 0; i < N; i++) begin
      rd_idx = 5'(i); cfg_rd_idx = 5'(N - 1 - i);
      #1;
      checks += 2;
      if (rd_data != model[i]) begin failures++; $display("FAIL rd %0d", i); end
      if (cfg_rd_data != model[N-1-i]) begin failures++; $display("FAIL cfg rd %0d", N-1-i); end
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_all();
    for (int i = 0; i < N; i++) wr(i, rnd());
    check_all();
    for (int k = 0; k < 8; k++) wr(int'($urandom_range(N - 1)), rnd());
    check_all();
    rst_n = 1'b0; #1; rst_n = 1'b1;
    for (int i = 0; i < N; i++) model[i] = '0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
