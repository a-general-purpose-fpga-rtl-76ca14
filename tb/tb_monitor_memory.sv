// tb_monitor_memory: three channels on a 16-step memory watch random x
// vectors for 40 steps, so the memory wraps. Afterwards the last 16 steps of
// every channel are read back and compared with what the bench stored; a
// clear must restart the step count.
`timescale 1ns/1ps
module tb_monitor_memory;
  import rts_pkg::*;
  localparam int N = 5, C = 3, D = 16, NS = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, store = 0;
  idx_t sel [C];
  fx_t  x [N];
  logic [1:0] rd_ch = '0;
  logic [3:0] rd_addr = '0;
  fx_t  rd_data;
  logic [31:0] n_stored;
  monitor_memory #(.N_X(N), .N_MON(C), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  fx_t hist [NS][C];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel[0] = 8'd4; sel[1] = 8'd0; sel[2] = IDX_NONE;
    for (int i = 0; i < N; i++) x[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      for (int i = 0; i < N; i++) x[i] = fx_t'({$urandom, $urandom});
      hist[n][0] = x[4]; hist[n][1] = x[0]; hist[n][2] = '0;
      store = 1; @(negedge clk); store = 0; @(negedge clk);
    end
    checks++;
    if (n_stored != NS) begin failures++; $display("FAIL count %0d", n_stored); end
    for (int n = NS - D; n < NS; n++) for (int c = 0; c < C; c++) begin
      rd_ch = 2'(c); rd_addr = 4'(n % D);
      @(negedge clk);
      checks++;
      if (rd_data != hist[n][c]) begin failures++; $display("FAIL step %0d ch %0d", n, c); end
    end
    clr = 1; @(negedge clk); clr = 0;
    checks++;
    if (n_stored != 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
