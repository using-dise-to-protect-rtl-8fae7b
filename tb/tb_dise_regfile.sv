// tb_dise_regfile: self-checking test of the dedicated DISE register file.
//
// Random reads and writes in and out of DISE mode and through the OS port,
// against a model array: accesses outside DISE mode and to register numbers
// past N_DREGS must read zero, write nothing and raise fault.
module tb_dise_regfile;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        dise_mode = 1'b0;
  logic        rd1_en = 1'b0, rd2_en = 1'b0, wr_en = 1'b0, cfg_wr_en = 1'b0;
  logic [4:0]  rd1_idx = '0, rd2_idx = '0, wr_idx = '0, cfg_idx = '0;
  logic [63:0] rd1_data, rd2_data, wr_data = '0, cfg_wdata = '0, cfg_rdata;
  logic        fault;
  logic [63:0] model [N];
  int checks = 0, failures = 0;
  int n_fault = 0;

  dise_regfile #(.N_DREGS(N), .W(64)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // OS loads every register
    for (int i = 0; i < N; i++) begin
      cfg_wr_en = 1'b1; cfg_idx = 5'(i); cfg_wdata = {$urandom, $urandom};
      model[i] = cfg_wdata;
      @(negedge clk);
    end
    cfg_wr_en = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      logic exp_fault;
      logic [63:0] e1, e2;
      dise_mode = ($urandom_range(3) != 0);
      rd1_en = $urandom_range(1); rd2_en = $urandom_range(1); wr_en = $urandom_range(1);
      rd1_idx = 5'($urandom_range(9)); rd2_idx = 5'($urandom_range(9));
      wr_idx  = 5'($urandom_range(9)); wr_data = {$urandom, $urandom};
      cfg_idx = 5'($urandom_range(N - 1));
      #1;
      e1 = (rd1_en && dise_mode && rd1_idx < N) ? model[rd1_idx] : '0;
      e2 = (rd2_en && dise_mode && rd2_idx < N) ? model[rd2_idx] : '0;
      exp_fault = (rd1_en && !(dise_mode && rd1_idx < N)) ||
                  (rd2_en && !(dise_mode && rd2_idx < N)) ||
                  (wr_en  && !(dise_mode && wr_idx  < N));
      checks += 4;
      if (rd1_data !== e1) begin failures++; $display("FAIL rd1 k=%0d", k); end
      if (rd2_data !== e2) begin failures++; $display("FAIL rd2 k=%0d", k); end
      if (fault !== exp_fault) begin failures++; $display("FAIL fault k=%0d", k); end
      if (cfg_rdata !== model[cfg_idx]) begin failures++; $display("FAIL cfg rd k=%0d", k); end
      if (exp_fault) n_fault++;
      @(negedge clk);
      if (wr_en && dise_mode && wr_idx < N) model[wr_idx] = wr_data;
    end
    checks++;
    if (n_fault == 0) begin failures++; $display("FAIL no faulting access was made"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
