// tb_mvm_solver: five computational units in parallel on a 5 x 7 matrix with
// three multipliers each. H is loaded entry by entry through row and column
// selects; several b vectors are multiplied and every element of x is compared
// with a floating-point product. Latency must be ceil(7/3) + 2 cycles.
`timescale 1ns/1ps
module tb_mvm_solver;
  import rts_pkg::*;
  localparam int N = 5, M = 7, P = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_we = 0, start = 0, done;
  idx_t h_row = '0, h_col = '0;
  fx_t  h_data = '0;
  fx_t  b [M];
  fx_t  x [N];
  mvm_solver #(.N_X(N), .M_B(M), .MULTS(P)) dut (.*);

  function automatic int rint(int span);
    int v;
    v = $urandom_range(span);
    return v;
  endfunction

  int checks = 0, failures = 0;
  real hr [N][M], br [M];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < M; j++) b[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) begin
      hr[i][j] = (rint((2000)) - 1000) / 64.0;
      @(negedge clk);
      h_we = 1; h_row = idx_t'(i); h_col = idx_t'(j);
      h_data = fx_t'(longint'(hr[i][j] * 4294967296.0));
    end
    @(negedge clk);
    h_we = 0;
    for (int t = 0; t < 10; t++) begin
      int lat;
      for (int j = 0; j < M; j++) begin
        br[j] = (rint((100000)) - 50000) / 128.0;
        b[j] = fx_t'(longint'(br[j] * 4294967296.0));
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 50) begin @(negedge clk); lat++; end
      checks++;
      if (lat != (M + P - 1) / P + 2) begin failures++; $display("FAIL: latency %0d", lat); end
      for (int i = 0; i < N; i++) begin
        real e;
        e = 0.0;
        for (int j = 0; j < M; j++) e += hr[i][j] * br[j];
        checks++;
        if (real'(x[i]) / 4294967296.0 != e) begin
          failures++;
          $display("FAIL: x[%0d]=%f expected %f", i, real'(x[i]) / 4294967296.0, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
