// tb_compute_unit: one computational unit with 10 columns and 4 multipliers
// (three passes, the last one padded). Random H rows and b vectors of
// multiples of 1/256, so every product is exact; the result is compared with
// a floating-point dot product, and the latency with ceil(10/4) + 2 cycles.
`timescale 1ns/1ps
module tb_compute_unit;
  import rts_pkg::*;
  localparam int M = 10, P = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_we = 0, start = 0, done;
  idx_t h_col = '0;
  fx_t  h_data = '0, x;
  fx_t  b [M];
  compute_unit #(.M_B(M), .MULTS(P)) dut (.*);

  function automatic int rint(int span);
    int v;
    v = $urandom_range(span);
    return v;
  endfunction

  int checks = 0, failures = 0;
  real hr [M], br [M];

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
    for (int t = 0; t < 20; t++) begin
      real e;
      int lat;
      for (int j = 0; j < M; j++) begin
        hr[j] = (rint((4000)) - 2000) / 256.0;
        br[j] = (rint((400000)) - 200000) / 256.0;
        @(negedge clk);
        h_we = 1; h_col = idx_t'(j); h_data = fx_t'(longint'(hr[j] * 4294967296.0));
        b[j] = fx_t'(longint'(br[j] * 4294967296.0));
      end
      @(negedge clk);
      h_we = 0;
      e = 0.0;
      for (int j = 0; j < M; j++) e += hr[j] * br[j];
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 50) begin @(negedge clk); lat++; end
      checks += 2;
      if (real'(x) / 4294967296.0 != e) begin
        failures++;
        $display("FAIL: x=%f expected %f", real'(x) / 4294967296.0, e);
      end
      if (lat != (M + P - 1) / P + 2) begin
        failures++;
        $display("FAIL: latency %0d", lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
